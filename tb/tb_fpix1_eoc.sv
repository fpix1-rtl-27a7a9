// tb_fpix1_eoc: test of one EOC logic cell driving a full 160-cell column.
// Hits arrive in five consecutive bunch crossings: the first four are held by
// the four EOC Sets, the fifth finds the column full and is lost. Crossings
// are then requested out of order through RBCO; each must arm the column,
// and with the EOC token read out exactly its cells, in row order, one per
// clock, as {column, row, 2-bit ADC}, then pass the token on. Finally the
// masked CBCO comparison must drop a crossing nobody asked for.
module tb_fpix1_eoc;
  import fpix1_pkg::*;
  localparam int R = NROWS;
  localparam int BCO_PER = 8;   // readout clocks per bunch crossing
  logic clk = 0, rst_n = 0;
  logic tick, rv, etkin, etkout, hv, armed, full;
  logic [7:0] cbco, rbco, mask;
  hit_word_t hd;
  cmd_e [NSETS-1:0] cmd;
  logic ctkin, ctkout, rd_en, hf, rf, cv;
  pix_word_t cd;
  logic [R-1:0] hit;
  logic [R-1:0][2:0] comp;
  int checks = 0, failures = 0;
  int n_full = 0;
  bit [R-1:0] grp [256];
  logic [1:0] adc_of [256][R];

  fpix1_column #(.ROWS(R)) u_col (.clk, .rst_n, .cmd, .hit, .comp, .kill('0), .ctkin, .rd_en, .ctkout,
                                  .hfast_or(hf), .rfast_or(rf), .bus_valid(cv), .bus_data(cd));
  fpix1_eoc dut (.clk, .rst_n, .col_addr(5'd11), .bco_tick(tick), .cbco, .rbco, .rbco_valid(rv),
                 .reset_mask(mask), .etkin, .etkout, .hit_valid(hv), .hit_data(hd), .armed,
                 .full, .cmd, .ctkin, .col_rd_en(rd_en), .hfast_or(hf), .rfast_or(rf), .ctkout, .col_valid(cv),
                 .col_data(cd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // BCO clock: a tick every BCO_PER clocks, CBCO advancing with it
  int phase = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      phase <= (phase == BCO_PER - 1) ? 0 : phase + 1;
      if (tick) cbco <= cbco + 1;
    end
  end
  assign tick = rst_n && (phase == BCO_PER - 1);

  task automatic wait_phase(int p);
    do begin
      @(posedge clk); #1;
    end while (phase != p);
  endtask

  // hit random cells during crossing 'b' (b = CBCO value), for one clock
  task automatic hit_crossing(int b, int n);
    grp[b] = '0;
    wait_phase(3);
    // rows of crossing b are kept to r % 8 == b % 8, so a cell still
    // holding an older crossing is never hit again
    for (int i = 0; i < n; i++) grp[b][8 * $urandom_range(R / 8 - 1) + (b % 8)] = 1'b1;
    for (int r = 0; r < R; r++) if (grp[b][r]) begin
      logic [2:0] t;
      t = 3'($urandom_range(7));
      comp[r] = t; hit[r] = 1'b1;
      adc_of[b][r] = t[2] ? 2'd3 : t[1] ? 2'd2 : t[0] ? 2'd1 : 2'd0;
    end
    @(posedge clk); #1 hit = '0; comp = '0;
  endtask

  task automatic request(int b, bit expect_data);
    int exp_rows[$];
    int got = 0, first = -1, last = -1, etk = -1;
    rbco = 8'(b); rv = 1;
    repeat (3) @(posedge clk);
    #1 rv = 0;
    checks++; if (armed !== expect_data) begin failures++; $display("FAIL armed=%b for BCO %0d", armed, b); end
    if (expect_data) for (int r = 0; r < R; r++) if (grp[b][r]) exp_rows.push_back(r);
    etkin = 1;
    for (int c = 0; c < exp_rows.size() + 4; c++) begin
      #1;
      if (hv) begin
        if (got < exp_rows.size()) begin
          checks++;
          if (hd.col != 5'd11 || hd.row != 8'(exp_rows[got]) || hd.adc != adc_of[b][exp_rows[got]]) begin
            failures++;
            $display("FAIL word %0d: col %0d row %0d adc %0d, expected row %0d adc %0d", got, hd.col, hd.row, hd.adc, exp_rows[got], adc_of[b][exp_rows[got]]);
          end
        end
        if (first < 0) first = c;
        last = c;
        got++;
      end
      if (etkout && etk < 0) etk = c;
      @(posedge clk);
    end
    checks++; if (got != exp_rows.size()) begin failures++; $display("FAIL %0d words of %0d", got, exp_rows.size()); end
    if (expect_data) begin
      checks++; if (first != 0 || last != got - 1) begin failures++; $display("FAIL not back to back"); end
      checks++; if (etk != last + 1) begin failures++; $display("FAIL etkout at %0d", etk); end
    end else begin
      checks++; if (etk != 0) begin failures++; $display("FAIL token not passed"); end
    end
    #1 etkin = 0;
    @(posedge clk); @(posedge clk); #1;
  endtask

  always @(posedge clk) if (full) n_full <= n_full + 1;

  initial begin
    hit = '0; comp = '0; rv = 0; etkin = 0; rbco = 0; mask = 8'h00; cbco = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    wait_phase(0);                // first tick granted a Set: CBCO = 1
    for (int b = 1; b <= 5; b++) begin
      checks++; if (cbco != 8'(b)) begin failures++; $display("FAIL cbco %0d", cbco); end
      if (b == 5) begin
        #1 checks++; if (!full) begin failures++; $display("FAIL not full"); end
      end
      hit_crossing(b, 3 + 2 * b);
      wait_phase(0);
    end
    // crossing 5 was lost: column full
    request(5, 0);
    request(3, 1);
    request(1, 1);
    request(3, 0);                // already read
    // a freed Set takes a new crossing (rows of residues 1..5 still held)
    while (cbco % 8 < 6) wait_phase(0);
    hit_crossing(int'(cbco), 9);
    wait_phase(1);
    request(int'(cbco) - 1, 1);
    request(4, 1);
    // crossing 2 is never requested: reset after 4 crossings with mask FC
    mask = 8'hFC;
    repeat (5) wait_phase(0);
    request(2, 0);
    checks++; if (n_full == 0) begin failures++; $display("FAIL column never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
