// tb_fpix1_prio_enc: test of the EOC priority encoder. All combinations of
// free/listening Sets, tick and HFastOR are applied and the grant is compared
// with a reference: lowest free Set, only at a tick, only when no Set goes on
// listening.
module tb_fpix1_prio_enc;
  logic tick, hf, full;
  logic [3:0] fr, ls, gr, exp_g;
  int checks = 0, failures = 0;

  fpix1_prio_enc dut (.bco_tick(tick), .is_free(fr), .is_listen(ls), .hfast_or(hf),
                      .grant(gr), .full(full));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      fr = v[3:0]; ls = v[7:4]; tick = v[8]; hf = v[9];
      if ((fr & ls) != 0) continue;        // a Set is never both
      if ($countones(ls) > 1) continue;    // at most one Set listens
      exp_g = 4'b0;
      if (tick && (ls == 0 || hf))
        for (int s = 0; s < 4; s++)
          if (fr[s] && exp_g == 0) exp_g = 4'(1 << s);
      #1;
      checks++;
      if (gr !== exp_g) begin
        failures++;
        $display("free=%b listen=%b tick=%b hf=%b grant=%b exp=%b", fr, ls, tick, hf, gr, exp_g);
      end
      checks++;
      if (full !== (fr == 0 && ls == 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
