// fpix1_column: one column of FPIX1 pixel cells.
//
// NROWS pixel cells share the four command lines of their EOC cell, the
// wired-OR HFastOR and RFastOR lines, the column token chain and the column
// data bus. The column token (CTkin) enters at the bottom (row 0) and skips
// every cell that does not request the bus, so within one clock cycle it
// reaches the lowest requesting cell, which then drives the bus. When no
// cell requests, the token leaves the top of the column as CTkout. Wired-OR
// lines and the tri-state bus are modelled as OR reductions; bus_data is zero
// when no cell is selected. rd_en (from the EOC cell) says the selected cell's
// word is taken this clock, so the cell clears at the next edge.
//
// Timing: all combinational paths (token skip, HFastOR, RFastOR, bus) settle
// within the clock cycle; cell storage changes on the rising clock edge.
// Row r carries row address r. The geometry and signal names follow the chip
// description; the OR-reduction form of wired-OR and tri-state is this
// design's choice.
module fpix1_column
  import fpix1_pkg::*;
#(
  parameter int unsigned ROWS = NROWS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  cmd_e [NSETS-1:0]              cmd,
  input  logic [ROWS-1:0]               hit,
  input  logic [ROWS-1:0][THERM_W-1:0]  comp,
  input  logic [ROWS-1:0]               kill,
  input  logic                          ctkin,
  input  logic                          rd_en,
  output logic                          ctkout,
  output logic                          hfast_or,
  output logic                          rfast_or,
  output logic                          bus_valid,
  output pix_word_t                     bus_data
);

  logic [ROWS:0]     tok;
  logic [ROWS-1:0]   hfast, rfast, sel;
  pix_word_t         data [ROWS];

  assign tok[0] = ctkin;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    fpix1_pixel u_pix (
      .clk      (clk),
      .rst_n    (rst_n),
      .cmd      (cmd),
      .hit      (hit[r]),
      .comp     (comp[r]),
      .kill     (kill[r]),
      .row_addr (ROW_W'(r)),
      .tok_in   (tok[r]),
      .rd_en    (rd_en),
      .tok_out  (tok[r+1]),
      .hfast    (hfast[r]),
      .rfast    (rfast[r]),
      .sel      (sel[r]),
      .bus_data (data[r])
    );
  end

  assign ctkout   = tok[ROWS];
  assign hfast_or = |hfast;
  assign rfast_or = |rfast;
  assign bus_valid = |sel;

  always_comb begin
    bus_data = '0;
    for (int r = 0; r < ROWS; r++) bus_data = bus_data | data[r];
  end

endmodule
