// fpix1_chip_ctrl: Chip Control Logic of FPIX1.
//
// Keeps what is common to the whole chip: the Current BCO number (CBCO,
// counted on the BCO clock), the Requested BCO number (RBCO), the EOC token
// that walks through the columns, and the off-chip output.
//
// Two readout modes (mode input):
//  * continuous (mode = 0): no trigger is needed. A read pointer follows
//    CBCO; every crossing that has ended (pointer != CBCO) is requested in
//    turn, oldest first.
//  * external trigger (mode = 1): an external system hands in the BCO number
//    to read (trig_bco with trig_valid; trig_ready acknowledges it).
//
// One readout: RBCO is presented with rbco_valid for EVAL_CYC clocks (one for
// the Sets to compare, one for the column controllers to arm, one to look), during
// which the EOC Sets holding that crossing start OUTPUT and their columns arm.
// If no column armed, nothing is sent. Otherwise a header word {1, chip ID,
// RBCO} is sent, then the EOC token is sent into column 0; each column with
// data puts one hit word {0, column, row, ADC} per clock on the bus, and the
// token comes out of the last column when all are done. dout/dv are
// registered on the rising edge, so they are stable at the falling edge where
// the receiver strobes them.
//
// The two modes, the CBCO/RBCO numbers, the EOC token and the output order
// (chip ID and timestamp, then the hits, with a data-valid bit) follow the
// chip description. Word layout, the read pointer, EVAL_CYC and sending
// nothing for a crossing without hits are this design's choices.
module fpix1_chip_ctrl
  import fpix1_pkg::*;
#(
  parameter int unsigned EVAL_CYC = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bco_tick,
  input  logic                mode,        // 0 continuous, 1 external trigger
  input  logic                trig_valid,
  input  logic [BCO_W-1:0]    trig_bco,
  output logic                trig_ready,
  input  logic [CHIPID_W-1:0] chip_id,
  output logic [BCO_W-1:0]    cbco,
  output logic [BCO_W-1:0]    rbco,
  output logic                rbco_valid,
  output logic                etkin_first, // EOC token into column 0
  input  logic                etkout_last, // EOC token out of the last column
  input  logic                any_armed,
  input  logic                bus_valid,
  input  hit_word_t           bus_data,
  output logic [DOUT_W-1:0]   dout,
  output logic                dv
);

  typedef enum logic [2:0] {R_IDLE, R_EVAL, R_HEADER, R_TOKEN, R_NEXT} rstate_e;
  rstate_e state_q;

  logic [BCO_W-1:0] cbco_q, rptr_q, rbco_q;
  logic [$clog2(EVAL_CYC+1)-1:0] eval_q;
  logic mode_q;

  assign cbco        = cbco_q;
  assign rbco        = rbco_q;
  assign rbco_valid  = (state_q == R_EVAL);
  assign etkin_first = (state_q == R_TOKEN);
  assign trig_ready  = (state_q == R_IDLE) && mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cbco_q <= '0;
    else if (bco_tick) cbco_q <= cbco_q + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= R_IDLE;
      rptr_q  <= '0;
      rbco_q  <= '0;
      eval_q  <= '0;
      mode_q  <= 1'b0;
      dout    <= '0;
      dv      <= 1'b0;
    end else begin
      dv   <= 1'b0;
      dout <= '0;
      unique case (state_q)
        R_IDLE: begin
          eval_q <= '0;
          if (mode) begin
            rptr_q <= cbco_q;            // resume continuous mode at "now"
            if (trig_valid) begin
              rbco_q  <= trig_bco;
              mode_q  <= 1'b1;
              state_q <= R_EVAL;
            end
          end else if (rptr_q != cbco_q) begin
            rbco_q  <= rptr_q;
            mode_q  <= 1'b0;
            state_q <= R_EVAL;
          end
        end
        R_EVAL: begin
          eval_q <= eval_q + 1'b1;
          if (eval_q == ($bits(eval_q))'(EVAL_CYC - 1))
            state_q <= any_armed ? R_HEADER : R_NEXT;
        end
        R_HEADER: begin
          dout    <= header_word(chip_id, rbco_q);
          dv      <= 1'b1;
          state_q <= R_TOKEN;
        end
        R_TOKEN: begin
          if (bus_valid) begin
            dout <= hit_word(bus_data);
            dv   <= 1'b1;
          end
          if (etkout_last) state_q <= R_NEXT;
        end
        R_NEXT: begin
          if (!mode_q) rptr_q <= rptr_q + 1'b1;
          state_q <= R_IDLE;
        end
        default: state_q <= R_IDLE;
      endcase
    end
  end

endmodule
