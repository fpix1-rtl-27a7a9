// fpix1_prio_enc: priority encoder of an FPIX1 end-of-column cell.
//
// Chooses which EOC Set broadcasts the INPUT command, so that at any time at
// most one Set of the column does. At each BCO tick, if no Set will go on
// listening (none is listening, or the listening one is taking a hit and
// closes at this tick), the lowest-numbered free Set is granted and starts
// listening on the next clock. A Set that listened through a crossing with no
// hit simply keeps listening. When all Sets hold crossings, no Set is
// granted and hits in the column are ignored until a Set is freed
// (column full); 'full' reports that condition.
//
// Timing: combinational; the grant is acted on by the Sets at the clock edge
// that ends the BCO tick cycle. The assignment at the BCO clock edge follows
// the chip description; lowest-index-first priority is this design's choice.
module fpix1_prio_enc
  import fpix1_pkg::*;
(
  input  logic             bco_tick,
  input  logic [NSETS-1:0] is_free,
  input  logic [NSETS-1:0] is_listen,
  input  logic             hfast_or,   // the listening Set takes a hit now
  output logic [NSETS-1:0] grant,
  output logic             full
);

  always_comb begin
    grant = '0;
    if (bco_tick && (is_listen == '0 || hfast_or)) begin
      for (int s = NSETS - 1; s >= 0; s--)
        if (is_free[s]) grant = NSETS'(1) << s;
    end
  end

  assign full = (is_free == '0) && (is_listen == '0);

  // Never more than one Set may be given the INPUT command
  always_comb a_onehot: assert final ($onehot0(grant));

endmodule
