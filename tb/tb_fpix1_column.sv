// tb_fpix1_column: test of a full 160-cell column driven by a model of its
// EOC cell. Random groups of cells are hit while different Sets input; one
// Set's group is then read with the column token and must come out in row
// order, one cell per clock, with the right ADC bits, RFastOR falling during
// the last cell and CTkout rising after it. Another group is removed with
// RESET, and a group of a Set that is not asked must stay untouched.
module tb_fpix1_column;
  import fpix1_pkg::*;
  localparam int R = NROWS;
  logic clk = 0, rst_n = 0;
  cmd_e [NSETS-1:0] cmd;
  logic [R-1:0] hit, kill;
  logic [R-1:0][2:0] comp;
  logic ctkin, ctkout, hf, rf, bv;
  pix_word_t bd;
  int checks = 0, failures = 0;
  bit [R-1:0] grp [NSETS];
  logic [2:0] therm [R];

  fpix1_column #(.ROWS(R)) dut (.clk, .rst_n, .cmd, .hit, .comp, .kill, .ctkin, .rd_en(ctkin), .ctkout,
                                .hfast_or(hf), .rfast_or(rf), .bus_valid(bv), .bus_data(bd));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic all_idle();
    for (int s = 0; s < NSETS; s++) cmd[s] = CMD_IDLE;
  endtask

  // hit the cells of grp[s] while Set s inputs
  task automatic fill(int s, int n);
    all_idle(); cmd[s] = CMD_INPUT;
    grp[s] = '0;
    for (int i = 0; i < n; i++) begin
      int r = $urandom_range(R - 1);
      if (kill[r]) continue;
      // a cell already owned by another Set must not be picked
      if (grp[0][r] | grp[1][r] | grp[2][r] | grp[3][r]) continue;
      grp[s][r] = 1'b1;
    end
    for (int r = 0; r < R; r++) if (grp[s][r]) begin
      therm[r] = 3'($urandom_range(7));
      hit[r] = 1'b1; comp[r] = therm[r];
    end
    #1;
    checks++; if (hf !== (grp[s] != '0)) begin failures++; $display("FAIL hfast"); end
    @(posedge clk); #1;
    hit = '0; comp = '0;
    all_idle();
    @(posedge clk); #1;
  endtask

  task automatic read_set(int s);
    int expect_rows[$];
    int got = 0;
    for (int r = 0; r < R; r++) if (grp[s][r]) expect_rows.push_back(r);
    all_idle(); cmd[s] = CMD_OUTPUT; ctkin = 1;
    #1;
    foreach (expect_rows[i]) begin
      checks++;
      if (!bv || bd.row != ROW_W'(expect_rows[i]) || bd.therm != therm[expect_rows[i]]) begin
        failures++;
        $display("FAIL read %0d: bv=%b row=%0d therm=%b expected row %0d therm %b",
                 i, bv, bd.row, bd.therm, expect_rows[i], therm[expect_rows[i]]);
      end
      checks++;
      if (rf !== (i != expect_rows.size() - 1)) begin
        failures++; $display("FAIL rfast_or=%b at read %0d of %0d", rf, i, expect_rows.size());
      end
      checks++; if (ctkout) begin failures++; $display("FAIL ctkout early"); end
      got++;
      @(posedge clk); #1;
    end
    checks++; if (!ctkout || bv) begin failures++; $display("FAIL column not empty after read"); end
    ctkin = 0; all_idle(); grp[s] = '0;
    @(posedge clk); #1;
  endtask

  initial begin
    hit = '0; comp = '0; kill = '0; ctkin = 0; all_idle();
    for (int s = 0; s < NSETS; s++) grp[s] = '0;
    kill[R-1] = 1'b1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      fill(0, 12); fill(1, 5); fill(2, 30); fill(3, 1);
      // the killed cell is ignored
      all_idle(); cmd[1] = CMD_INPUT; hit[R-1] = 1'b1; #1;
      checks++; if (hf) begin failures++; $display("FAIL killed cell"); end
      @(posedge clk); #1 hit = '0; all_idle();
      read_set(2);
      // RESET removes Set 0's cells only
      all_idle(); cmd[0] = CMD_RESET; @(posedge clk); #1; all_idle(); grp[0] = '0;
      read_set(0);                 // nothing left
      read_set(3);
      read_set(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
