// tb_full_size - the design at its default parameters (10 taps, 10 passes,
// 40 iterations, c = 1, d = 1e-10) on the two kinds of channel the design is
// meant for: a 10-tap channel with all nine roots outside the unit circle,
// and one with eight outside and one inside. The output must equal the exact
// minimum-phase equivalent (every outside root r replaced by 1/conj(r)) to
// within the accuracy set by d, be minimum phase, keep the input's energy,
// and report as many reflected roots as there are outside the circle.
module tb_full_size;
  import mpf_pkg::*;
  import tb_cplx_pkg::*;

  localparam int G = 10;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cplx_t y [G], f [G];
  logic  busy, done;
  logic [3:0] roots;
  cplx_t lamda_log [10];
  logic  conv, amag, aiter;
  int checks = 0, failures = 0;
  int n_conv = 0, n_drop = 0;

  always @(posedge clk) begin
    if (conv) n_conv++;
    if (amag || aiter) n_drop++;
  end

  always #5 clk = ~clk;

  main_finding_root dut (
    .clk(clk), .rst_n(rst_n), .start(start), .y(y), .f(f), .busy(busy), .done(done),
    .roots_found(roots), .lamda_log(lamda_log),
    .ev_converged(conv), .ev_abort_mag(amag), .ev_abort_iter(aiter)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_channel(string name, rc_t roots_in[$]);
    rc_t yc[$], ec[$], fc[$];
    rc_t k;
    real mx, e_in;
    int  n_out, cyc;
    poly_from_roots(roots_in, rc(1.0, 0.0), yc);
    mx = 0.0;
    foreach (yc[h]) if (r_abs(yc[h]) > mx) mx = r_abs(yc[h]);
    k = rc(700.0 / mx, 0.0);
    poly_from_roots(roots_in, k, yc);
    min_phase_from_roots(roots_in, k, ec);
    n_out = 0;
    foreach (roots_in[r]) if (r_abs2(roots_in[r]) > 1.0) n_out++;
    for (int h = 0; h < G; h++) begin
      y[h]  = to_cplx(yc[h]);
      yc[h] = from_cplx(y[h]);
    end
    e_in = energy(yc);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(busy, $sformatf("%s: busy not raised", name));
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(!busy, $sformatf("%s: busy still high at done", name));
    for (int i = 0; i < n_out; i++) begin
      real best;
      best = 1.0e9;
      foreach (roots_in[r])
        if (r_abs2(roots_in[r]) > 1.0) begin
          real dd;
          dd = r_abs(r_sub(from_cplx(lamda_log[i]), r_div(rc(-1.0, 0.0), roots_in[r])));
          if (dd < best) best = dd;
        end
      check(best < 1.0e-5, $sformatf("%s: logged lamda %0d matches no outside root", name, i));
    end
    fc = {};
    for (int h = 0; h < G; h++) fc.push_back(from_cplx(f[h]));
    check(roots == 4'(n_out), $sformatf("%s: %0d roots reflected, %0d outside", name, roots, n_out));
    for (int h = 0; h < G; h++)
      check(r_abs(r_sub(fc[h], ec[h])) < 2.0e-5 * 700.0,
            $sformatf("%s: F[%0d] = (%f, %f), expected (%f, %f)", name, h, fc[h].re, fc[h].im,
                      ec[h].re, ec[h].im));
    check(is_min_phase(fc), $sformatf("%s: output not minimum phase", name));
    check(!is_min_phase(yc), $sformatf("%s: input already minimum phase", name));
    check(rel_diff(energy(fc), e_in) < 1.0e-6, $sformatf("%s: energy changed", name));
    $display("%s: %0d roots reflected in %0d clocks", name, roots, cyc);
    for (int h = 0; h < G; h++)
      $display("  h=%0d  y = (%9.3f, %9.3f)  F = (%9.3f, %9.3f)", h, yc[h].re, yc[h].im, fc[h].re, fc[h].im);
  endtask

  initial begin
    rc_t rs[$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rs = {};
    for (int r = 0; r < 9; r++)
      rs.push_back(r_scale(rc($cos(0.7 * r + 0.3), $sin(0.7 * r + 0.3)), 1.3 + 0.1 * r));
    run_channel("channel with nine roots outside", rs);
    rs[4] = rc(0.35, -0.5);
    run_channel("channel with eight roots outside, one inside", rs);
    $display("searches converged %0d, starting points dropped %0d", n_conv, n_drop);
    check(n_conv == 17, "expected 9 + 8 converged searches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
