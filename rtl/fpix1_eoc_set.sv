// fpix1_eoc_set: one EOC command Set of an FPIX1 end-of-column cell.
//
// A Set owns one buffered bunch crossing of its column. It holds a timestamp
// register (SBCO), a state machine that chooses the command broadcast to the
// column, and two comparators: SBCO against the Requested BCO (RBCO) and
// SBCO against the Current BCO (CBCO) with a programmable mask.
//
//   FREE    -> LISTEN   when the priority encoder grants it (at a BCO tick)
//   LISTEN  : broadcasts INPUT; on HFastOR latches CBCO into SBCO -> LATCHED
//   LATCHED : keeps broadcasting INPUT, so every cell hit in the same crossing
//             joins this Set, until the next BCO tick -> WAIT
//   WAIT    : broadcasts IDLE; SBCO == RBCO (while RBCO is valid) -> OUTPUT,
//             else SBCO == CBCO on the unmasked bits -> RESET
//   OUTPUT  : broadcasts OUTPUT until the column controller reports the
//             column read out (col_done) -> FREE
//   RESET   : broadcasts RESET for one clock -> FREE
//
// reset_mask bit = 1 ignores that CBCO bit, which sets the reset delay: with
// all bits compared a stored crossing is dropped 2^BCO_W crossings after it
// was taken; comparing only the low k bits drops it after 2^k crossings.
// The RBCO match has priority over the CBCO match.
//
// Timing: one clock (the readout clock); bco_tick is a one-clock strobe at
// each rising edge of the BCO clock, on which CBCO advances. The states and
// comparators follow the chip description; the separate LATCHED state, the
// rbco_valid qualifier and the single-clock reset pulse are this design's
// choices.
module fpix1_eoc_set
  import fpix1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bco_tick,
  input  logic             grant,       // become the inputting Set
  input  logic             hfast_or,    // a cell of the column was hit
  input  logic [BCO_W-1:0] cbco,
  input  logic [BCO_W-1:0] rbco,
  input  logic             rbco_valid,
  input  logic [BCO_W-1:0] reset_mask,  // 1 = ignore this CBCO bit
  input  logic             col_done,    // column readout finished
  output cmd_e             cmd,
  output logic             is_free,
  output logic             is_listen,
  output logic             is_output
);

  typedef enum logic [2:0] {
    S_FREE, S_LISTEN, S_LATCHED, S_WAIT, S_OUTPUT, S_RESET
  } state_e;

  state_e state_q, state_d;
  logic [BCO_W-1:0] sbco_q;
  logic rbco_match, cbco_match;

  assign rbco_match = rbco_valid && (rbco == sbco_q);
  assign cbco_match = ((cbco ^ sbco_q) & ~reset_mask) == '0;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_FREE:    if (grant) state_d = S_LISTEN;
      S_LISTEN:  if (hfast_or) state_d = bco_tick ? S_WAIT : S_LATCHED;
      S_LATCHED: if (bco_tick) state_d = S_WAIT;
      S_WAIT:    if (rbco_match) state_d = S_OUTPUT;
                 else if (cbco_match) state_d = S_RESET;
      S_OUTPUT:  if (col_done) state_d = S_FREE;
      S_RESET:   state_d = S_FREE;
      default:   state_d = S_FREE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_FREE;
      sbco_q  <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == S_LISTEN && hfast_or) sbco_q <= cbco;
    end
  end

  always_comb begin
    unique case (state_q)
      S_LISTEN, S_LATCHED: cmd = CMD_INPUT;
      S_OUTPUT:            cmd = CMD_OUTPUT;
      S_RESET:             cmd = CMD_RESET;
      default:             cmd = CMD_IDLE;
    endcase
  end

  assign is_free   = (state_q == S_FREE);
  assign is_listen = (state_q == S_LISTEN);
  assign is_output = (state_q == S_OUTPUT);

endmodule
