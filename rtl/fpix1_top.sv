// fpix1_top: the FPIX1 pixel readout chip.
//
// A column-based hybrid pixel readout chip: ROWS x COLS pixel cells (160 x 18
// by default). Each cell has an analog front end (discriminator and 2-bit
// flash ADC, behavioural model) and a digital interface that stores a hit
// until the end-of-column (EOC) logic of its column asks for it. The EOC
// cell buffers up to four bunch crossings per column through its four EOC
// Sets, which reference the stored hits by command rather than by pointer:
// a hit cell attaches itself to the Set that was broadcasting INPUT when it
// was hit, and later answers that Set's OUTPUT or RESET command. The chip
// control logic counts the Current BCO, chooses the Requested BCO
// (continuously or from an external trigger) and walks the EOC token across
// the columns, so the hits of one crossing leave the chip as a header word
// followed by one hit word per readout clock.
//
// Ports: clk is the readout clock; bco_tick marks each rising edge of the BCO
// clock (one clk wide). amp_e[c][r] is the amplitude seen by the front end of
// cell (row r, column c) in electrons; thr_e and adc_thr_e are the four
// threshold levels shared by all cells; kill[c][r] disables a cell. The
// output is dout/dv (see fpix1_pkg for the word layout); mode, trig_* and
// reset_mask configure the readout. col_full reports the columns whose four
// Sets are all busy (further hits there are lost).
//
// The partitioning (pixel cell, EOC logic, chip control) follows the chip
// description; a single readout clock with a BCO strobe is this design's
// choice.
module fpix1_top
  import fpix1_pkg::*;
#(
  parameter int unsigned ROWS  = NROWS,
  parameter int unsigned COLS  = NCOLS,
  parameter int unsigned AMP_W = 16
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               bco_tick,
  input  logic [COLS-1:0][ROWS-1:0][AMP_W-1:0] amp_e,
  input  logic [AMP_W-1:0]                   thr_e,
  input  logic [2:0][AMP_W-1:0]              adc_thr_e,
  input  logic [COLS-1:0][ROWS-1:0]          kill,
  input  logic                               mode,
  input  logic                               trig_valid,
  input  logic [BCO_W-1:0]                   trig_bco,
  output logic                               trig_ready,
  input  logic [BCO_W-1:0]                   reset_mask,
  input  logic [CHIPID_W-1:0]                chip_id,
  output logic [BCO_W-1:0]                   cbco,
  output logic [COLS-1:0]                    col_full,
  output logic [DOUT_W-1:0]                  dout,
  output logic                               dv
);

  logic [BCO_W-1:0] rbco;
  logic             rbco_valid;
  logic [COLS:0]    etk;
  logic [COLS-1:0]  armed, hit_valid;
  hit_word_t        hit_data [COLS];
  logic             bus_valid;
  hit_word_t        bus_data;

  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic [ROWS-1:0]              hit;
    logic [ROWS-1:0][THERM_W-1:0] comp;
    cmd_e [NSETS-1:0]             cmd;
    logic ctkin, ctkout, rd_en, hfast_or, rfast_or, col_valid;
    pix_word_t col_data;

    for (genvar r = 0; r < ROWS; r++) begin : g_fe
      fpix1_frontend #(.AMP_W(AMP_W)) u_fe (
        .amp_e     (amp_e[c][r]),
        .thr_e     (thr_e),
        .adc_thr_e (adc_thr_e),
        .hit       (hit[r]),
        .comp      (comp[r])
      );
    end

    fpix1_column #(.ROWS(ROWS)) u_column (
      .clk       (clk),
      .rst_n     (rst_n),
      .cmd       (cmd),
      .hit       (hit),
      .comp      (comp),
      .kill      (kill[c]),
      .ctkin     (ctkin),
      .rd_en     (rd_en),
      .ctkout    (ctkout),
      .hfast_or  (hfast_or),
      .rfast_or  (rfast_or),
      .bus_valid (col_valid),
      .bus_data  (col_data)
    );

    fpix1_eoc u_eoc (
      .clk        (clk),
      .rst_n      (rst_n),
      .col_addr   (COL_W'(c)),
      .bco_tick   (bco_tick),
      .cbco       (cbco),
      .rbco       (rbco),
      .rbco_valid (rbco_valid),
      .reset_mask (reset_mask),
      .etkin      (etk[c]),
      .etkout     (etk[c+1]),
      .hit_valid  (hit_valid[c]),
      .hit_data   (hit_data[c]),
      .armed      (armed[c]),
      .full       (col_full[c]),
      .cmd        (cmd),
      .ctkin      (ctkin),
      .col_rd_en  (rd_en),
      .hfast_or   (hfast_or),
      .rfast_or   (rfast_or),
      .ctkout     (ctkout),
      .col_valid  (col_valid),
      .col_data   (col_data)
    );
  end

  // Chip data bus: only the column holding the EOC token drives it
  always_comb begin
    bus_data = '0;
    for (int c = 0; c < COLS; c++) bus_data = bus_data | hit_data[c];
  end
  assign bus_valid = |hit_valid;

  fpix1_chip_ctrl u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .bco_tick    (bco_tick),
    .mode        (mode),
    .trig_valid  (trig_valid),
    .trig_bco    (trig_bco),
    .trig_ready  (trig_ready),
    .chip_id     (chip_id),
    .cbco        (cbco),
    .rbco        (rbco),
    .rbco_valid  (rbco_valid),
    .etkin_first (etk[0]),
    .etkout_last (etk[COLS]),
    .any_armed   (|armed),
    .bus_valid   (bus_valid),
    .bus_data    (bus_data),
    .dout        (dout),
    .dv          (dv)
  );

  // At most one column may drive the chip bus in any cycle
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit_valid));

endmodule
