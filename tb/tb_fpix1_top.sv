// tb_fpix1_top: end-to-end test of the full FPIX1 chip (160 x 18 cells, all
// parameters at their defaults).
//
// The test bench plays the sensor: in each bunch crossing it puts pulses on
// random cells (amplitude in electrons) and keeps a reference of what the
// chip must send: for each crossing with hits, a header {1, chip ID, BCO},
// then one word {0, column, row, ADC} per hit cell, columns in ascending
// order and rows ascending within a column, with dv high on every clock from
// the header to the last word. Three phases:
//   1. continuous readout of random crossings (one cell is killed and hit);
//   2. external trigger mode: one column is hit in five crossings in a row,
//      so its four EOC Sets fill up and the fifth crossing is lost; one
//      crossing is triggered and read; with the CBCO mask the others are
//      reset, and a later trigger for one of them returns nothing;
//   3. back to continuous readout.
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_fpix1_top;
  import fpix1_pkg::*;
  localparam int R = NROWS;
  localparam int C = NCOLS;
  localparam int W = 16;
  localparam int BCO_PER = 40;       // readout clocks per bunch crossing
  localparam int HIT_PHASE = 30;     // clock within the crossing of the pulses
  localparam logic [6:0] ID = 7'h2A;

  logic clk = 0, rst_n = 0, tick;
  logic [C-1:0][R-1:0][W-1:0] amp;
  logic [C-1:0][R-1:0] kill;
  logic [W-1:0] thr;
  logic [2:0][W-1:0] athr;
  logic mode, tv, tr;
  logic [7:0] tbco, mask, cbco;
  logic [C-1:0] col_full;
  logic [15:0] dout;
  logic dv;

  fpix1_top dut (.clk, .rst_n, .bco_tick(tick), .amp_e(amp), .thr_e(thr), .adc_thr_e(athr),
                 .kill, .mode, .trig_valid(tv), .trig_bco(tbco), .trig_ready(tr),
                 .reset_mask(mask), .chip_id(ID), .cbco, .col_full, .dout, .dv);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] exp_q[$], got_q[$];
  // mechanism counters
  int n_cont = 0, n_trig = 0, n_full = 0, n_lost = 0, n_reset = 0, n_switch = 0;
  int n_killed = 0, n_multi = 0, n_gap = 0, n_empty_trig = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // BCO clock
  int phase = 0;
  always @(posedge clk) if (rst_n) phase <= (phase == BCO_PER - 1) ? 0 : phase + 1;
  assign tick = rst_n && (phase == BCO_PER - 1);

  task automatic to_phase(int p);
    do begin @(posedge clk); #1; end while (phase != p);
  endtask

  task automatic clear_amp();
    for (int c = 0; c < C; c++) for (int r = 0; r < R; r++) amp[c][r] = '0;
  endtask

  function automatic logic [1:0] adc_of(int a);
    int n;
    n = 0;
    for (int i = 0; i < 3; i++) if (a > int'(athr[i])) n++;
    return 2'(n);
  endfunction

  // one crossing: pulse the given cells for one clock at HIT_PHASE and, if
  // 'expect_out', append the expected readout of this crossing
  task automatic crossing(bit [C-1:0][R-1:0] cells, bit expect_out);
    int a [C][R];
    int b, nw;
    to_phase(HIT_PHASE);
    b = int'(cbco);
    nw = 0;
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++)
        if (cells[c][r]) begin
          a[c][r] = $urandom_range(2500, 20000);
          amp[c][r] = W'(a[c][r]);
          if (kill[c][r]) n_killed++;
          else nw++;
        end
    @(posedge clk); #1 clear_amp();
    if (expect_out && nw > 0) begin
      exp_q.push_back({1'b1, ID, 8'(b)});
      for (int c = 0; c < C; c++)
        for (int r = 0; r < R; r++)
          if (cells[c][r] && !kill[c][r]) exp_q.push_back({1'b0, 5'(c), 8'(r), adc_of(a[c][r])});
    end
  endtask

  function automatic bit [C-1:0][R-1:0] random_cells(int n);
    bit [C-1:0][R-1:0] m;
    m = '0;
    for (int i = 0; i < n; i++) m[$urandom_range(C - 1)][$urandom_range(R - 1)] = 1'b1;
    return m;
  endfunction

  task automatic trigger(int b);
    @(negedge clk);
    tv = 1; tbco = 8'(b);
    while (!tr) @(negedge clk);
    @(posedge clk); #1 tv = 0;
  endtask

  // output monitor
  logic prev_dv = 0;
  logic [15:0] prev_word = '0;
  always @(posedge clk) begin
    if (rst_n && dv) begin
      got_q.push_back(dout);
      if (dout[15]) begin
        if (mode) n_trig++; else n_cont++;
      end
      if (prev_dv && !dout[15] && !prev_word[15] && dout[14:10] != prev_word[14:10]) n_switch++;
    end
    prev_dv   <= rst_n && dv;
    prev_word <= dout;
  end

  // internal probes: RESET commands, full columns, several crossings held
  always @(posedge clk) begin
    if (rst_n) begin
      if (col_full != '0) n_full++;
      for (int s = 0; s < NSETS; s++)
        if (dut.g_col[1].u_eoc.cmd[s] == CMD_RESET) n_reset++;
      if (($countones({dut.g_col[1].u_eoc.is_free}) <= 2)) n_multi++;
    end
  end

  task automatic compare_stream(string tag);
    checks++;
    if (got_q.size() != exp_q.size()) begin
      failures++;
      $display("FAIL %s: %0d words, expected %0d", tag, got_q.size(), exp_q.size());
    end
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
      checks++;
      if (got_q[i] !== exp_q[i]) begin
        failures++;
        if (failures < 20) $display("FAIL %s word %0d: %h expected %h", tag, i, got_q[i], exp_q[i]);
      end
    end
    got_q.delete(); exp_q.delete();
  endtask

  // dv must stay high from a header to the last word of its crossing: after
  // dv falls, the next word must be a header
  logic pending = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (prev_dv && !dv) pending <= 1'b1;
      if (dv) begin
        if (pending && !dout[15]) n_gap++;
        pending <= 1'b0;
      end
    end
  end

  initial begin
    bit [C-1:0][R-1:0] m;
    clear_amp(); kill = '0; thr = 16'd2000; athr = {16'd12000, 16'd8000, 16'd4000};
    mode = 0; tv = 0; tbco = 0; mask = 8'h00;
    kill[7][77] = 1'b1;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    to_phase(0);

    // ---- phase 1: continuous readout
    for (int k = 0; k < 24; k++) begin
      m = random_cells($urandom_range(0, 12));
      if (k == 3) m[7][77] = 1'b1;               // the killed cell
      if (k == 5) begin m = '0; m[7][77] = 1'b1; end // only the killed cell
      if (k == 8) begin                           // all rows of one column
        m = '0;
        for (int r = 0; r < R; r += 16) m[C-1][r] = 1'b1;
        m[0][R-1] = 1'b1;
      end
      crossing(m, 1);
    end
    repeat (2) to_phase(0);
    compare_stream("continuous");

    // ---- phase 2: trigger mode, overflow and reset
    mode = 1; mask = 8'hF8;   // compare 3 low bits: drop after 8 crossings
    to_phase(0);
    begin
      int base;
      base = int'(cbco);
      for (int k = 0; k < 5; k++) begin
        m = '0;
        m[1][10 + 3 * k] = 1'b1; m[1][100 + 3 * k] = 1'b1;
        crossing(m, k == 1);   // only crossing base+1 will be triggered
      end
      checks++;
      if (col_full[1] !== 1'b1) begin failures++; $display("FAIL column 1 not full"); end
      trigger(base + 1);
      repeat (2) to_phase(0);
      compare_stream("trigger");
      // the fifth crossing found the column full: nothing was kept of it
      trigger(base + 4);
      repeat (2) to_phase(0);
      checks++;
      if (got_q.size() != 0) begin failures++; $display("FAIL lost crossing was read"); end
      else n_lost++;
      got_q.delete();
      repeat (10) to_phase(0);
      // crossing base+2 has been reset by now
      trigger(base + 2);
      repeat (2) to_phase(0);
      checks++;
      if (got_q.size() != 0) begin failures++; $display("FAIL reset crossing was read"); end
      else n_empty_trig++;
      got_q.delete();
      // the freed column takes hits again
      checks++;
      if (col_full[1] !== 1'b0) begin failures++; $display("FAIL column 1 still full"); end
    end

    // ---- phase 3: continuous again
    mode = 0; mask = 8'h00;
    to_phase(0);
    for (int k = 0; k < 12; k++) crossing(random_cells($urandom_range(1, 20)), 1);
    repeat (2) to_phase(0);
    compare_stream("continuous again");

    // ---- mechanisms
    $display("continuous events %0d, trigger events %0d, column-full cycles %0d, lost crossings %0d",
             n_cont, n_trig, n_full, n_lost);
    $display("reset commands %0d, back-to-back column switches %0d, killed-cell hits %0d",
             n_reset, n_switch, n_killed);
    $display("cycles with >=2 crossings held in one column %0d, empty trigger replies %0d",
             n_multi, n_empty_trig);
    checks++; if (n_cont == 0)   begin failures++; $display("FAIL no continuous readout"); end
    checks++; if (n_trig == 0)   begin failures++; $display("FAIL no triggered readout"); end
    checks++; if (n_full == 0)   begin failures++; $display("FAIL column never full"); end
    checks++; if (n_lost == 0)   begin failures++; $display("FAIL no crossing lost to a full column"); end
    checks++; if (n_reset == 0)  begin failures++; $display("FAIL no reset command"); end
    checks++; if (n_switch == 0) begin failures++; $display("FAIL no column switch"); end
    checks++; if (n_killed == 0) begin failures++; $display("FAIL killed cell never hit"); end
    checks++; if (n_multi == 0)  begin failures++; $display("FAIL never two crossings buffered"); end
    checks++; if (n_gap != 0)    begin failures++; $display("FAIL %0d gaps inside a crossing", n_gap); end
    checks++; if (n_empty_trig == 0) begin failures++; $display("FAIL no empty trigger"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
