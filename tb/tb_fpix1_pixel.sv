// tb_fpix1_pixel: directed test of one pixel cell's digital interface:
// association with the inputting Set, ignoring other Sets, ADC flip-flops,
// bus request, token skip and selection, self-clear after readout, RESET and
// the kill bit.
module tb_fpix1_pixel;
  import fpix1_pkg::*;
  logic clk = 0, rst_n = 0;
  cmd_e [NSETS-1:0] cmd;
  logic hit, kill, tok_in, tok_out, hfast, rfast, sel;
  logic [2:0] comp;
  pix_word_t bus;
  int checks = 0, failures = 0;

  fpix1_pixel dut (.clk, .rst_n, .cmd, .hit, .comp, .kill, .row_addr(8'd93),
                   .tok_in, .rd_en(tok_in), .tok_out, .hfast, .rfast, .sel, .bus_data(bus));

  always #5 clk = ~clk;

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic setcmds(cmd_e c0, cmd_e c1, cmd_e c2, cmd_e c3);
    cmd[0] = c0; cmd[1] = c1; cmd[2] = c2; cmd[3] = c3;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    setcmds(CMD_IDLE, CMD_IDLE, CMD_IDLE, CMD_IDLE);
    hit = 0; comp = 0; kill = 0; tok_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // token passes an empty cell
    tok_in = 1; #1; chk("skip empty", tok_out, 1); chk("no sel", sel, 0);
    tok_in = 0;
    // 1: hit without any INPUT command is ignored
    hit = 1; comp = 3'b111; #1; chk("hfast no input", hfast, 0);
    @(negedge clk); hit = 0; comp = 0;
    setcmds(CMD_OUTPUT, CMD_OUTPUT, CMD_OUTPUT, CMD_OUTPUT); #1;
    chk("no req after ignored hit", rfast, 0);
    // 2: Set 2 inputs; hit with two comparators
    setcmds(CMD_IDLE, CMD_IDLE, CMD_INPUT, CMD_IDLE);
    hit = 1; comp = 3'b001; #1; chk("hfast on input", hfast, 1);
    @(negedge clk); comp = 3'b011; #1; chk("hfast same set", hfast, 1);
    @(negedge clk); hit = 0; comp = 0;
    // Set 2 closes, Set 0 starts inputting: a new hit must be ignored
    setcmds(CMD_INPUT, CMD_IDLE, CMD_IDLE, CMD_IDLE);
    hit = 1; comp = 3'b111; #1; chk("hfast other set", hfast, 0);
    @(negedge clk); hit = 0; comp = 0;
    // other Sets' OUTPUT/RESET ignored
    setcmds(CMD_OUTPUT, CMD_RESET, CMD_IDLE, CMD_OUTPUT); #1;
    chk("rfast other set", rfast, 0);
    @(negedge clk);
    tok_in = 1; #1; chk("skip with foreign output", tok_out, 1);
    tok_in = 0;
    // 3: own Set outputs: request without token
    setcmds(CMD_IDLE, CMD_IDLE, CMD_OUTPUT, CMD_IDLE); #1;
    chk("rfast own output", rfast, 1); chk("token stops", tok_out, 0);
    @(negedge clk);
    tok_in = 1; #1;
    chk("sel with token", sel, 1); chk("rfast withdrawn", rfast, 0);
    chk("tok_out held", tok_out, 0);
    checks++; if (bus.row !== 8'd93 || bus.therm !== 3'b011) begin
      failures++; $display("FAIL bus %h", bus);
    end
    @(negedge clk);  // read at that edge: cleared
    chk("cleared after read", sel, 0); chk("token passes after read", tok_out, 1);
    checks++; if (bus !== '0) failures++;
    tok_in = 0;
    // 4: RESET by own Set
    setcmds(CMD_IDLE, CMD_INPUT, CMD_IDLE, CMD_IDLE);
    hit = 1; comp = 3'b100; @(negedge clk); hit = 0; comp = 0;
    setcmds(CMD_IDLE, CMD_RESET, CMD_IDLE, CMD_IDLE); @(negedge clk);
    setcmds(CMD_IDLE, CMD_OUTPUT, CMD_IDLE, CMD_IDLE); #1;
    chk("no req after reset", rfast, 0);
    // 5: a killed cell ignores hits
    setcmds(CMD_INPUT, CMD_IDLE, CMD_IDLE, CMD_IDLE);
    kill = 1; hit = 1; #1; chk("killed hfast", hfast, 0);
    @(negedge clk); hit = 0; kill = 0;
    setcmds(CMD_OUTPUT, CMD_IDLE, CMD_IDLE, CMD_IDLE); #1;
    chk("killed no req", rfast, 0);
    // 6: ADC bits of a fresh hit do not include earlier ones
    setcmds(CMD_IDLE, CMD_IDLE, CMD_IDLE, CMD_INPUT);
    hit = 1; comp = 3'b001; @(negedge clk); hit = 0; comp = 0;
    setcmds(CMD_IDLE, CMD_IDLE, CMD_IDLE, CMD_OUTPUT); tok_in = 1; #1;
    checks++; if (bus.therm !== 3'b001) begin failures++; $display("FAIL therm %b", bus.therm); end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
