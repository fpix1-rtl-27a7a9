// tb_fpix1_frontend: self-checking test of the front-end model.
// Sweeps amplitudes around each of the four thresholds and checks the
// discriminator and comparator outputs against direct comparisons.
module tb_fpix1_frontend;
  localparam int unsigned W = 16;
  logic [W-1:0] amp, thr;
  logic [2:0][W-1:0] athr;
  logic hit;
  logic [2:0] comp;
  int checks = 0, failures = 0;

  fpix1_frontend #(.AMP_W(W)) dut (.amp_e(amp), .thr_e(thr), .adc_thr_e(athr), .hit(hit), .comp(comp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    thr  = 16'd2000;
    athr = {16'd12000, 16'd8000, 16'd4000};
    for (int a = 0; a < 20000; a += 37) begin
      amp = W'(a);
      #1;
      checks++;
      if (hit !== (a > 2000)) failures++;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (comp[i] !== (a > 4000 * (i + 1))) failures++;
      end
    end
    // exact boundaries: equal is below threshold
    amp = 16'd2000; #1; checks++; if (hit) failures++;
    amp = 16'd2001; #1; checks++; if (!hit) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
