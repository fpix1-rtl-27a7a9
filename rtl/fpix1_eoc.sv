// fpix1_eoc: End-Of-Column logic cell of FPIX1 (one per column).
//
// Holds a priority encoder, four EOC command Sets, the Column Token and Bus
// Controller and the ADC encoder. The Sets buffer up to four bunch crossings
// with hits in this column: each broadcasts its command to all cells of the
// column (cmd[s]), takes a timestamp from CBCO when the column reports a hit
// on HFastOR, and later issues OUTPUT (RBCO match) or RESET (masked CBCO
// match). When a Set outputs, the controller sends the column token up the
// column and, once the chip's EOC token arrives, puts one hit cell per clock
// on the chip bus as {column address, row address, 2-bit ADC}.
//
// Interface: column side (cmd, ctkin, col_rd_en, ctkout, hfast_or, rfast_or, col_valid,
// col_data); chip side (bco_tick, cbco, rbco, rbco_valid, reset_mask, the
// EOC token etkin/etkout, hit_valid/hit_data, armed, full). hit_data is zero
// when this cell does not drive the bus (AND-OR model of a shared bus).
// Timing: single readout clock; bco_tick strobes the BCO clock edge. The
// structure follows the chip description.
module fpix1_eoc
  import fpix1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [COL_W-1:0] col_addr,
  // chip control side
  input  logic             bco_tick,
  input  logic [BCO_W-1:0] cbco,
  input  logic [BCO_W-1:0] rbco,
  input  logic             rbco_valid,
  input  logic [BCO_W-1:0] reset_mask,
  input  logic             etkin,
  output logic             etkout,
  output logic             hit_valid,
  output hit_word_t        hit_data,
  output logic             armed,
  output logic             full,
  // column side
  output cmd_e [NSETS-1:0] cmd,
  output logic             ctkin,
  output logic             col_rd_en,
  input  logic             hfast_or,
  input  logic             rfast_or,
  input  logic             ctkout,
  input  logic             col_valid,
  input  pix_word_t        col_data
);

  logic [NSETS-1:0] grant, is_free, is_listen, is_output;
  logic col_done, bus_en;
  logic [ADC_W-1:0] adc;

  fpix1_prio_enc u_prio (
    .bco_tick  (bco_tick),
    .is_free   (is_free),
    .is_listen (is_listen),
    .hfast_or  (hfast_or),
    .grant     (grant),
    .full      (full)
  );

  for (genvar s = 0; s < NSETS; s++) begin : g_set
    fpix1_eoc_set u_set (
      .clk        (clk),
      .rst_n      (rst_n),
      .bco_tick   (bco_tick),
      .grant      (grant[s]),
      .hfast_or   (hfast_or),
      .cbco       (cbco),
      .rbco       (rbco),
      .rbco_valid (rbco_valid),
      .reset_mask (reset_mask),
      .col_done   (col_done),
      .cmd        (cmd[s]),
      .is_free    (is_free[s]),
      .is_listen  (is_listen[s]),
      .is_output  (is_output[s])
    );
  end

  fpix1_col_ctrl u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .any_output (|is_output),
    .rfast_or   (rfast_or),
    .ctkout     (ctkout),
    .etkin      (etkin),
    .etkout     (etkout),
    .ctkin      (ctkin),
    .bus_en     (bus_en),
    .armed      (armed),
    .col_done   (col_done)
  );

  fpix1_adc_enc u_adc (
    .therm (col_data.therm),
    .adc   (adc)
  );

  assign col_rd_en = bus_en;
  assign hit_valid = bus_en && col_valid;
  assign hit_data  = hit_valid ? hit_word_t'{col: col_addr, row: col_data.row, adc: adc}
                               : '0;

endmodule
