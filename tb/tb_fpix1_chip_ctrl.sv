// tb_fpix1_chip_ctrl: test of the chip control logic against a simple model
// of three EOC cells. The model holds, for each BCO number, how many hits
// each column has; when RBCO is presented it arms (two clocks later) if any
// column has hits, and with the EOC token it delivers the hits column by
// column, one per clock. Checks: CBCO counting; in continuous mode every
// ended crossing is requested once and in order; a header {chip ID, BCO}
// precedes the hit words only for crossings with hits; the words of one
// crossing leave back to back; in trigger mode exactly the triggered BCOs are
// read; switching modes works.
module tb_fpix1_chip_ctrl;
  import fpix1_pkg::*;
  localparam int C = 3;
  localparam int NB = 256;
  logic clk = 0, rst_n = 0;
  logic tick, mode, tv, tr, rv, etk0, etkl, armed, bv, dv;
  logic [7:0] tbco, cbco, rbco;
  hit_word_t bd;
  logic [15:0] dout;
  int checks = 0, failures = 0;
  int hits [NB][C];
  int rem [C];
  int arm_cnt;
  logic [7:0] req_b;
  int n_req [NB];
  logic [15:0] exp_q[$], got_q[$];
  int gaps = 0;
  logic prev_dv;

  fpix1_chip_ctrl dut (.clk, .rst_n, .bco_tick(tick), .mode, .trig_valid(tv), .trig_bco(tbco),
                       .trig_ready(tr), .chip_id(7'h35), .cbco, .rbco, .rbco_valid(rv),
                       .etkin_first(etk0), .etkout_last(etkl), .any_armed(armed),
                       .bus_valid(bv), .bus_data(bd), .dout, .dv);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the EOC cells
  always_comb begin
    int first;
    first = -1;
    for (int c = C - 1; c >= 0; c--) if (rem[c] > 0) first = c;
    bv   = etk0 && first >= 0;
    etkl = etk0 && first < 0;
    bd   = '0;
    if (bv) bd = hit_word_t'{col: 5'(first), row: 8'(rem[first]), adc: 2'(first)};
    armed = (arm_cnt >= 2);
  end

  logic rv_prev = 0;
  always @(posedge clk) begin
    rv_prev <= rv;
    if (rv && !rv_prev) begin
      int any;
      any = 0;
      req_b = rbco;
      n_req[rbco]++;
      for (int c = 0; c < C; c++) begin rem[c] = hits[rbco][c]; any += rem[c]; end
      arm_cnt <= (any > 0) ? 1 : 0;
    end else if (rv && arm_cnt > 0) arm_cnt <= arm_cnt + 1;
    else if (!rv && !etk0) arm_cnt <= 0;
    if (bv) for (int c = 0; c < C; c++) if (rem[c] > 0) begin rem[c]--; break; end
    if (rst_n && dv) got_q.push_back(dout);
    if (prev_dv && !dv && rem.sum() > 0 && etk0) gaps++;
    prev_dv <= dv;
  end

  // expected output for one crossing
  function automatic void expect_bco(int b);
    int tot;
    tot = 0;
    for (int c = 0; c < C; c++) tot += hits[b][c];
    if (tot == 0) return;
    exp_q.push_back({1'b1, 7'h35, 8'(b)});
    for (int c = 0; c < C; c++)
      for (int k = hits[b][c]; k > 0; k--) exp_q.push_back({1'b0, 5'(c), 8'(k), 2'(c)});
  endfunction

  task automatic bco_periods(int n);
    repeat (n) begin
      repeat (9) @(posedge clk);
      #1 tick = 1; @(posedge clk); #1 tick = 0;
    end
  endtask

  initial begin
    tick = 0; mode = 0; tv = 0; tbco = 0; arm_cnt = 0; prev_dv = 0;
    for (int c = 0; c < C; c++) rem[c] = 0;
    for (int b = 0; b < NB; b++) begin
      n_req[b] = 0;
      for (int c = 0; c < C; c++) hits[b][c] = ($urandom_range(3) == 0) ? $urandom_range(3) : 0;
    end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // continuous mode over 20 crossings
    bco_periods(20);
    repeat (40) @(posedge clk);
    checks++; if (cbco != 8'd20) begin failures++; $display("FAIL cbco %0d", cbco); end
    for (int b = 0; b < 20; b++) begin
      checks++;
      if (n_req[b] != 1) begin failures++; $display("FAIL BCO %0d requested %0d times", b, n_req[b]); end
      expect_bco(b);
    end
    checks++; if (n_req[20] != 0) begin failures++; $display("FAIL current crossing requested"); end
    // trigger mode: read three chosen crossings
    mode = 1;
    @(posedge clk);
    foreach (n_req[b]) n_req[b] = 0;
    for (int i = 0; i < 3; i++) begin
      int b;
      b = 30 + 7 * i;
      // make sure there is something to read
      hits[b][1] = 2;
      @(negedge clk);
      tv = 1; tbco = 8'(b);
      while (!tr) @(negedge clk);
      @(posedge clk); #1 tv = 0;
      expect_bco(b);
      repeat (30) @(posedge clk);
    end
    bco_periods(5);
    checks++; if (n_req.sum() != 3) begin failures++; $display("FAIL %0d requests in trigger mode", n_req.sum()); end
    // back to continuous mode: resumes at the current crossing
    mode = 0;
    @(posedge clk);
    for (int b = int'(cbco); b < int'(cbco) + 4; b++) expect_bco(b);
    bco_periods(4);
    repeat (40) @(posedge clk);
    checks++;
    if (got_q.size() != exp_q.size()) begin
      failures++; $display("FAIL %0d words, expected %0d", got_q.size(), exp_q.size());
    end
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
      checks++;
      if (got_q[i] !== exp_q[i]) begin
        failures++; $display("FAIL word %0d: %h expected %h", i, got_q[i], exp_q[i]);
      end
    end
    checks++; if (gaps != 0) begin failures++; $display("FAIL %0d gaps", gaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
