// tb_two_tap - random error sequences and coefficients through the two-tap
// filter; the reference is F_h = e'_{h+1} + conj(lamda) e'_h (e'_{g+1} = 0) in
// real arithmetic. With a genuine root divided out, the output must also
// equal the channel with its root reflected. done must come exactly G+1
// clocks after clock_2.
module tb_two_tap;
  import mpf_pkg::*;
  import tb_cplx_pkg::*;

  localparam int G = 10;

  logic  clk = 1'b0, rst_n = 1'b0, clock_2 = 1'b0;
  cplx_t error [G], f [G];
  cplx_t lc;
  logic  done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  two_tap #(.G(G)) dut (.clk(clk), .rst_n(rst_n), .clock_2(clock_2), .error(error),
                        .lamda_conjugate(lc), .f(f), .done(done));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(output int cyc);
    clock_2 = 1'b1;
    @(posedge clk);
    #1 clock_2 = 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
      #1;
    end while (!done && cyc < 100);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      rc_t er [G+1];
      rc_t lr;
      int  cyc;
      for (int h = 0; h < G; h++) begin
        er[h]    = rc(real'($urandom_range(0, 2000)) / 2.0 - 500.0, real'($urandom_range(0, 2000)) / 2.0 - 500.0);
        error[h] = to_cplx(er[h]);
        er[h]    = from_cplx(error[h]);
      end
      er[G] = rc(0.0, 0.0);
      lr = rand_root(0.0, 1.0);
      lc = to_cplx(lr);
      lr = from_cplx(lc);
      run(cyc);
      check(cyc == G + 1, $sformatf("trial %0d: done after %0d clocks, expected %0d", t, cyc, G + 1));
      for (int h = 0; h < G; h++) begin
        rc_t want;
        want = r_add(er[h+1], r_mul(lr, er[h]));
        check(r_abs(r_sub(from_cplx(f[h]), want)) < 1.0e-4,
              $sformatf("trial %0d: F[%0d] = (%f, %f), expected (%f, %f)", t, h,
                        from_cplx(f[h]).re, from_cplx(f[h]).im, want.re, want.im));
      end
      @(negedge clk);
    end
    // reflection of one root: Y = 100 (1 - 2 z^-1)(1 - 0.5j z^-1); beta = -0.5.
    // e' = Y / (1 + beta z) in reverse order; F must be 100 * -2 (1 - 0.5 z^-1)(1 - 0.5j z^-1)
    begin
      rc_t yr[$], fr[$], rts[$];
      rc_t e [G+1];
      int  cyc;
      rts = {rc(2.0, 0.0), rc(0.0, 0.5)};
      poly_from_roots(rts, rc(100.0, 0.0), yr);
      min_phase_from_roots(rts, rc(100.0, 0.0), fr);
      while (yr.size() < G) yr.push_back(rc(0.0, 0.0));
      while (fr.size() < G) fr.push_back(rc(0.0, 0.0));
      e[G] = rc(0.0, 0.0);
      for (int h = G - 1; h >= 0; h--) e[h] = r_sub(yr[h], r_mul(rc(-0.5, 0.0), e[h+1]));
      for (int h = 0; h < G; h++) error[h] = to_cplx(e[h]);
      lc = to_cplx(rc(-0.5, 0.0));
      run(cyc);
      for (int h = 0; h < G; h++)
        check(r_abs(r_sub(from_cplx(f[h]), fr[h])) < 1.0e-4,
              $sformatf("reflection: F[%0d] = (%f, %f), expected (%f, %f)", h,
                        from_cplx(f[h]).re, from_cplx(f[h]).im, fr[h].re, fr[h].im));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
