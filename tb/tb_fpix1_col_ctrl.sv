// tb_fpix1_col_ctrl: test of the Column Token and Bus Controller. A column
// holding N hit cells is modelled by a counter: RFastOR is high while more
// than the cell being read remain. Checks: token pass-through while idle,
// early CTkin, one bus cycle per cell with no gap, the EOC token handed on
// in the cycle after the last cell, col_done, and return to idle.
module tb_fpix1_col_ctrl;
  logic clk = 0, rst_n = 0;
  logic any_out, rfast, ctkout, etkin, etkout, ctkin, bus_en, armed, col_done;
  int checks = 0, failures = 0;
  int remaining, reads, first_read, last_read, etk_cyc, cyc;

  fpix1_col_ctrl dut (.clk, .rst_n, .any_output(any_out), .rfast_or(rfast), .ctkout,
                      .etkin, .etkout, .ctkin, .bus_en, .armed, .col_done);

  always #5 clk = ~clk;

  // column model: 'remaining' hit cells requesting while ctkin is given
  always_comb begin
    rfast  = ctkin && ((bus_en && remaining > 1) || (!bus_en && remaining > 0));
    ctkout = ctkin && (remaining == 0);
  end

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bus_en && remaining > 0) remaining <= remaining - 1;
  end

  task automatic run_column(int n);
    remaining = n; reads = 0; first_read = -1; last_read = -1; etk_cyc = -1;
    any_out = 1;
    @(posedge clk); #1;
    chk("ctkin early", ctkin, 1); chk("armed", armed, 1); chk("no etkout", etkout, 0);
    any_out = 0;   // the Set stays in OUTPUT in reality; the controller holds state
    repeat (2) @(posedge clk); #1;
    chk("waits for etkin", bus_en, 0);
    etkin = 1;
    for (int i = 0; i < n + 5; i++) begin
      #1;
      if (bus_en && remaining > 0) begin
        reads++;
        if (first_read < 0) first_read = cyc;
        last_read = cyc;
      end
      if (etkout && etk_cyc < 0) etk_cyc = cyc;
      @(posedge clk);
    end
    checks++; if (reads != n) begin failures++; $display("FAIL reads %0d of %0d", reads, n); end
    if (n > 0) begin
      checks++; if (last_read - first_read != n - 1) begin failures++; $display("FAIL gap in reads"); end
    end else last_read = etk_cyc - 1;
    checks++; if (etk_cyc < 0 || etk_cyc != last_read + 1) begin failures++; $display("FAIL etkout at %0d, last read %0d", etk_cyc, last_read); end
    #1 chk("col_done", col_done, 1);
    etkin = 0;
    @(posedge clk); #1;
    chk("back to idle", ctkin, 0); chk("idle no done", col_done, 0);
  endtask

  initial begin
    cyc = 0; any_out = 0; etkin = 0; remaining = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    etkin = 1; #1 chk("idle passes token", etkout, 1); chk("idle no ctkin", ctkin, 0);
    etkin = 0; #1 chk("idle passes token low", etkout, 0);
    run_column(1);
    run_column(5);
    run_column(37);
    // armed column whose cells vanished: CTkout ends it
    run_column(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
