// fpix1_col_ctrl: Column Token and Bus Controller of an FPIX1 EOC cell.
//
// Arbitrates the access of its column to the chip data bus with the EOC
// token, which the chip control logic sends through the columns in order.
//
//   IDLE  : passes ETkin straight to ETkout. When one of its Sets matches the
//           Requested BCO (a Set broadcasting OUTPUT) -> ARMED.
//   ARMED : issues the column token CTkin early, so the first hit cell
//           already has the token and its data ready. On ETkin the column is
//           put on the bus in the same cycle -> READ (or DONE).
//   READ  : one hit cell per clock is put on the bus. When RFastOR is low
//           while a cell is read, that cell is the last one -> DONE. CTkout
//           high (the token passed the whole column) also ends the column.
//   DONE  : passes ETkin to ETkout (registered hand-over: the next column
//           drives the bus in the cycle after this column's last cell, so no
//           clock is lost between columns) and tells its Sets the column is
//           read out (col_done). When ETkin is withdrawn -> IDLE.
//
// Timing: single readout clock; CTkin, bus_en and ETkout are combinational
// from the state and ETkin. The state machine and the early CTkin follow the
// chip description; the exact state encoding is this design's choice.
module fpix1_col_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic any_output,  // a Set of this column broadcasts OUTPUT
  input  logic rfast_or,    // cells other than the one being read request
  input  logic ctkout,      // column token left the top: nothing requests
  input  logic etkin,
  output logic etkout,
  output logic ctkin,
  output logic bus_en,      // column data goes to the chip bus
  output logic armed,       // column has data for the requested BCO
  output logic col_done
);

  typedef enum logic [1:0] {C_IDLE, C_ARMED, C_READ, C_DONE} cstate_e;
  cstate_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      C_IDLE:  if (any_output) state_d = C_ARMED;
      C_ARMED,
      C_READ:  if (etkin) state_d = (rfast_or && !ctkout) ? C_READ : C_DONE;
      C_DONE:  if (!etkin) state_d = C_IDLE;
      default: state_d = C_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= C_IDLE;
    else        state_q <= state_d;
  end

  assign ctkin    = (state_q == C_ARMED) || (state_q == C_READ);
  assign bus_en   = ctkin && etkin;
  assign etkout   = etkin && ((state_q == C_IDLE) || (state_q == C_DONE));
  assign armed    = ctkin;
  assign col_done = (state_q == C_DONE);

endmodule
