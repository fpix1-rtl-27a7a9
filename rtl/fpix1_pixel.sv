// fpix1_pixel: digital interface of one FPIX1 pixel cell.
//
// Two parts, as in the chip description:
//  * Command Interpreter. It watches the commands of the four EOC Sets of its
//    column. While one Set issues INPUT and the discriminator output 'hit' is
//    high, the cell stores the hit, remembers that Set (association) and
//    drives its share of the wired-OR HFastOR line. From then on it obeys only
//    the associated Set: RESET clears it, OUTPUT makes it request the bus,
//    IDLE and the other Sets' commands are ignored. The three flash-ADC
//    comparator outputs are caught in set-only flip-flops while the cell is
//    taking the hit (during the INPUT period of its Set).
//  * Pixel Token and Bus Controller. A requesting cell stops the column
//    token; a cell with nothing to send passes it on combinationally
//    (token skip). The requesting cell that holds the token drives its data
//    {ADC thermometer bits, row address} for that clock cycle, is cleared at
//    the next rising clock edge if the EOC logic took the word (rd_en, high
//    while the column owns the chip bus) and, while it is being read, withdraws its
//    share of RFastOR, so RFastOR falls during the last read of a column.
//
// Timing: single clock (the readout clock). The bus request, token skip,
// HFastOR and RFastOR are combinational; storage changes on the rising edge.
// Tri-state data lines of the chip are modelled as AND-OR: bus_data is zero
// unless the cell is selected. The per-cell 'kill' input disables a noisy
// cell; the chip description mentions disabling noisy cells, but how is this
// design's choice. Synchronous single-clock operation and the rd_en
// qualifier (the cell holding the early column token waits for the EOC
// token before it clears) are also this design's choices.
module fpix1_pixel
  import fpix1_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  cmd_e [NSETS-1:0]         cmd,      // commands of the four Sets
  input  logic                     hit,      // discriminator output
  input  logic [THERM_W-1:0]       comp,     // flash ADC comparators
  input  logic                     kill,     // disable this cell
  input  logic [ROW_W-1:0]         row_addr, // hard-wired row address
  input  logic                     tok_in,   // column token from below
  input  logic                     rd_en,    // EOC takes the bus this clock
  output logic                     tok_out,  // column token to above
  output logic                     hfast,    // share of HFastOR
  output logic                     rfast,    // share of RFastOR
  output logic                     sel,      // this cell drives the bus
  output pix_word_t                bus_data  // zero unless sel
);

  logic               valid_q;
  logic [SET_W-1:0]   assoc_q;
  logic [THERM_W-1:0] therm_q;

  logic             in_active;
  logic [SET_W-1:0] in_idx;
  cmd_e             own_cmd;
  logic             capture, req, clear;

  always_comb begin
    in_active = 1'b0;
    in_idx    = '0;
    for (int s = 0; s < NSETS; s++)
      if (cmd[s] == CMD_INPUT) begin
        in_active = 1'b1;
        in_idx    = SET_W'(s);
      end
  end

  assign own_cmd = cmd[assoc_q];
  // A free cell takes a hit from whichever Set issues INPUT; a cell that
  // already holds a hit only adds to it while its own Set is still inputting.
  assign capture = hit && !kill && in_active && (!valid_q || (assoc_q == in_idx));
  assign req     = valid_q && (own_cmd == CMD_OUTPUT);
  assign sel     = tok_in && req;
  assign tok_out = tok_in && !req;
  assign hfast   = capture;
  assign rfast   = req && !tok_in;
  assign clear   = (sel && rd_en) || (valid_q && own_cmd == CMD_RESET);
  assign bus_data = sel ? pix_word_t'{therm: therm_q, row: row_addr} : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      assoc_q <= '0;
      therm_q <= '0;
    end else if (clear) begin
      valid_q <= 1'b0;
      therm_q <= '0;
    end else if (capture) begin
      valid_q <= 1'b1;
      assoc_q <= in_idx;
      therm_q <= therm_q | comp;
    end
  end

endmodule
