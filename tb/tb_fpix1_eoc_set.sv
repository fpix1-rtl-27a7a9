// tb_fpix1_eoc_set: directed test of one EOC command Set: grant, INPUT while
// listening and until the BCO tick after a hit, timestamp capture, OUTPUT on
// an RBCO match (only while RBCO is valid), release on col_done, RESET after
// the delay set by the CBCO mask, with the RBCO match taking priority.
module tb_fpix1_eoc_set;
  import fpix1_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tick, grant, hf, rv, done;
  logic [7:0] cbco, rbco, mask;
  cmd_e cmd;
  logic is_free, is_listen, is_output;
  int checks = 0, failures = 0;
  int cyc;

  fpix1_eoc_set dut (.clk, .rst_n, .bco_tick(tick), .grant, .hfast_or(hf), .cbco, .rbco,
                     .rbco_valid(rv), .reset_mask(mask), .col_done(done), .cmd,
                     .is_free, .is_listen, .is_output);

  always #5 clk = ~clk;

  task automatic chkc(string what, cmd_e exp);
    checks++;
    if (cmd !== exp) begin
      failures++;
      $display("FAIL %s: cmd %s expected %s at %0t", what, cmd.name(), exp.name(), $time);
    end
  endtask

  // one BCO tick: CBCO advances at the same edge
  task automatic do_tick();
    tick = 1; @(posedge clk); #1 tick = 0; cbco = cbco + 1;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick = 0; grant = 0; hf = 0; rv = 0; done = 0; cbco = 8'd10; rbco = 0; mask = 8'h00;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chkc("after reset", CMD_IDLE); checks++; if (!is_free) failures++;
    // listen
    grant = 1; @(posedge clk); #1 grant = 0;
    chkc("listen", CMD_INPUT); checks++; if (!is_listen) failures++;
    repeat (3) @(posedge clk); #1 chkc("listen holds", CMD_INPUT);
    // hit in crossing 10
    hf = 1; @(posedge clk); #1 hf = 0;
    chkc("latched keeps input", CMD_INPUT); checks++; if (is_listen) failures++;
    @(posedge clk); #1 chkc("latched keeps input 2", CMD_INPUT);
    do_tick();
    chkc("wait idle after tick", CMD_IDLE);
    // RBCO requested but not valid: nothing
    rbco = 8'd10; @(posedge clk); #1 chkc("rbco not valid", CMD_IDLE);
    rv = 1; rbco = 8'd9; @(posedge clk); #1 chkc("rbco mismatch", CMD_IDLE);
    rbco = 8'd10; @(posedge clk); #1 rv = 0;
    chkc("output on match", CMD_OUTPUT); checks++; if (!is_output) failures++;
    repeat (3) @(posedge clk); #1 chkc("output holds", CMD_OUTPUT);
    done = 1; @(posedge clk); #1 done = 0;
    chkc("free after done", CMD_IDLE); checks++; if (!is_free) failures++;

    // hit together with the tick: straight to wait; reset after 4 crossings
    mask = 8'hFC;  // compare only the two low bits
    cbco = 8'd20;
    grant = 1; @(posedge clk); #1 grant = 0;
    hf = 1; tick = 1; @(posedge clk); #1 hf = 0; tick = 0; cbco = 8'd21;
    chkc("wait after hit+tick", CMD_IDLE);
    cyc = 1;
    while (cmd != CMD_RESET && cyc < 20) begin
      do_tick(); cyc++;
      @(posedge clk); #1;   // the compare acts one clock after CBCO moves
    end
    chkc("reset issued", CMD_RESET);
    checks++;
    if (cbco != 8'd24) begin failures++; $display("FAIL reset at cbco %0d", cbco); end
    @(posedge clk); #1 chkc("reset one clock", CMD_IDLE); checks++; if (!is_free) failures++;

    // full compare: dropped 256 crossings later
    mask = 8'h00; cbco = 8'd30;
    grant = 1; @(posedge clk); #1 grant = 0;
    hf = 1; @(posedge clk); #1 hf = 0;
    do_tick(); cyc = 1;
    while (cyc < 256) begin
      do_tick(); cyc++;
      checks++; if (cmd == CMD_RESET) begin failures++; $display("FAIL early reset"); end
    end
    @(posedge clk); #1 chkc("full-compare reset", CMD_RESET);

    // RBCO match beats CBCO match
    mask = 8'hFF; cbco = 8'd40;  // CBCO always matches
    @(posedge clk);
    grant = 1; @(posedge clk); #1 grant = 0;
    hf = 1; tick = 1; rv = 1; rbco = 8'd40; @(posedge clk); #1 hf = 0; tick = 0; cbco = 8'd41;
    @(posedge clk); #1 rv = 0;
    chkc("output has priority", CMD_OUTPUT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
