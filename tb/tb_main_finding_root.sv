// tb_main_finding_root - end-to-end test of the minimum-phase root finder.
//
// Channels are built from chosen roots, so the exact minimum-phase
// equivalent is known in closed form (tb_cplx_pkg). Three copies of the
// design run each channel side by side:
//   dut     default parameters (10 taps, 10 passes, 40 iterations, c = 1,
//           d = 1e-10): every output sample is compared with the exact
//           minimum-phase response, the output is checked to be minimum
//           phase (Schur-Cohn), its energy to equal the input's, the number
//           of reflected roots to equal the number outside the circle, and
//           each logged lamda to match -1/r of one of those roots;
//   dut_np  at most 2 passes: stops at the pass limit;
//   dut_it  at most 3 iterations per starting point: starting points are
//           dropped at the iteration limit, the output must still have the
//           input's energy;
//   dut_c   damping constant c = 0.5: where it reflects every outside root
//           its output must match the exact response too.
// Workloads: a channel with all nine roots outside the circle, one with
// eight outside and one inside, one already minimum phase (must pass
// through unchanged), then random channels. Each mechanism (convergence,
// drop for |lamda| > 1, drop at the iteration limit, pass limit, no root
// found) is counted and must occur at least once.
module tb_main_finding_root;
  import mpf_pkg::*;
  import tb_cplx_pkg::*;

  localparam int G = 10;
  localparam int N_RANDOM = 6;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  start = 1'b0;
  cplx_t y [G];

  cplx_t f     [G], f_np [G], f_it [G], f_c [G];
  logic  busy, done, busy_np, done_np, busy_it, done_it, busy_c, done_c;
  logic [3:0] roots, roots_np, roots_it, roots_c;
  cplx_t lamda_log [10], lamda_log_np [2], lamda_log_it [10], lamda_log_c [10];
  logic  conv, amag, aiter, conv_np, amag_np, aiter_np, conv_it, amag_it, aiter_it;
  logic  conv_c, amag_c, aiter_c;

  int checks = 0, failures = 0;
  int n_conv = 0, n_abort_mag = 0, n_abort_iter = 0, n_pass_limit = 0, n_no_root = 0;
  real worst_err = 0.0;
  int n_damped_full = 0;

  always #5 clk = ~clk;

  main_finding_root dut (
    .clk(clk), .rst_n(rst_n), .start(start), .y(y), .f(f), .busy(busy), .done(done),
    .roots_found(roots), .lamda_log(lamda_log),
    .ev_converged(conv), .ev_abort_mag(amag), .ev_abort_iter(aiter)
  );

  main_finding_root #(.N_PASSES(2)) dut_np (
    .clk(clk), .rst_n(rst_n), .start(start), .y(y), .f(f_np), .busy(busy_np), .done(done_np),
    .roots_found(roots_np[1:0]), .lamda_log(lamda_log_np),
    .ev_converged(conv_np), .ev_abort_mag(amag_np), .ev_abort_iter(aiter_np)
  );
  assign roots_np[3:2] = 2'b00;

  main_finding_root #(.MAX_ITER(3)) dut_it (
    .clk(clk), .rst_n(rst_n), .start(start), .y(y), .f(f_it), .busy(busy_it), .done(done_it),
    .roots_found(roots_it), .lamda_log(lamda_log_it),
    .ev_converged(conv_it), .ev_abort_mag(amag_it), .ev_abort_iter(aiter_it)
  );

  main_finding_root #(.C(0.5)) dut_c (
    .clk(clk), .rst_n(rst_n), .start(start), .y(y), .f(f_c), .busy(busy_c), .done(done_c),
    .roots_found(roots_c), .lamda_log(lamda_log_c),
    .ev_converged(conv_c), .ev_abort_mag(amag_c), .ev_abort_iter(aiter_c)
  );

  always @(posedge clk) begin
    if (conv) n_conv++;
    if (amag) n_abort_mag++;
    if (aiter_it) n_abort_iter++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic void seq_of(input cplx_t s [G], output rc_t c[$]);
    c = {};
    for (int h = 0; h < G; h++) c.push_back(from_cplx(s[h]));
  endfunction

  task automatic run_channel(string name, rc_t roots_in[$]);
    rc_t yc[$], ec[$], fc[$], fnp[$], fit[$], fcc[$];
    rc_t k;
    real mx, tol, e_in;
    int  n_out;
    bit  d0, d1, d2, d3;

    poly_from_roots(roots_in, rc(1.0, 0.0), yc);
    mx = 0.0;
    foreach (yc[h]) if (r_abs(yc[h]) > mx) mx = r_abs(yc[h]);
    k = rc(500.0 / mx, 0.0);
    poly_from_roots(roots_in, k, yc);
    min_phase_from_roots(roots_in, k, ec);
    n_out = 0;
    foreach (roots_in[r]) if (r_abs2(roots_in[r]) > 1.0) n_out++;

    for (int h = 0; h < G; h++) y[h] = to_cplx(yc[h]);
    seq_of(y, yc);                               // the exact quantised input
    e_in = energy(yc);

    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    d0 = 0; d1 = 0; d2 = 0; d3 = 0;
    while (!(d0 && d1 && d2 && d3)) begin
      @(posedge clk);
      if (done_c) d3 = 1;
      if (done) d0 = 1;
      if (done_np) d1 = 1;
      if (done_it) d2 = 1;
    end
    @(negedge clk);

    // default instance
    seq_of(f, fc);
    check(roots == 4'(n_out), $sformatf("%s: roots_found %0d, expected %0d", name, roots, n_out));
    tol = 2.0e-5 * 500.0;       // lamda is accurate to about sqrt(d) = 1e-5
    for (int h = 0; h < G; h++) begin
      real err;
      err = r_abs(r_sub(fc[h], ec[h]));
      if (err > worst_err) worst_err = err;
      check(err < tol, $sformatf("%s: F[%0d] = (%f, %f), expected (%f, %f)", name, h,
                                 fc[h].re, fc[h].im, ec[h].re, ec[h].im));
    end
    check(is_min_phase(fc), $sformatf("%s: output not minimum phase", name));
    check(rel_diff(energy(fc), e_in) < 1.0e-6,
          $sformatf("%s: energy %f, input %f", name, energy(fc), e_in));
    for (int i = 0; i < n_out && i < 10; i++) begin
      real best;
      rc_t lg;
      lg = from_cplx(lamda_log[i]);
      best = 1.0e9;
      foreach (roots_in[r])
        if (r_abs2(roots_in[r]) > 1.0) begin
          real dd;
          dd = r_abs(r_sub(lg, r_div(rc(-1.0, 0.0), roots_in[r])));
          if (dd < best) best = dd;
        end
      check(best < 1.0e-5, $sformatf("%s: lamda %0d = (%f, %f) matches no root", name, i, lg.re, lg.im));
    end
    if (n_out == 0) begin
      n_no_root++;
      for (int h = 0; h < G; h++) check(f[h] == y[h], $sformatf("%s: F[%0d] changed", name, h));
    end

    // pass-limited instance
    seq_of(f_np, fnp);
    check(roots_np == 4'((n_out < 2) ? n_out : 2),
          $sformatf("%s: pass-limited roots_found %0d", name, roots_np));
    check(rel_diff(energy(fnp), e_in) < 1.0e-6, $sformatf("%s: pass-limited energy", name));
    if (n_out > 2) n_pass_limit++;

    // iteration-limited instance
    seq_of(f_it, fit);
    check(roots_it <= 4'(n_out), $sformatf("%s: iteration-limited roots_found %0d", name, roots_it));
    check(rel_diff(energy(fit), e_in) < 1.0e-6, $sformatf("%s: iteration-limited energy", name));

    // damped instance, c = 0.5: same result, fewer roots only if a search ran out of iterations
    seq_of(f_c, fcc);
    check(roots_c <= 4'(n_out), $sformatf("%s: damped roots_found %0d", name, roots_c));
    check(rel_diff(energy(fcc), e_in) < 1.0e-6, $sformatf("%s: damped energy", name));
    if (roots_c == 4'(n_out)) begin
      n_damped_full++;
      for (int h = 0; h < G; h++)
        check(r_abs(r_sub(fcc[h], ec[h])) < tol, $sformatf("%s: damped F[%0d]", name, h));
    end

    $display("%s: %0d roots outside, reflected %0d (2-pass %0d, 3-iteration %0d, c=0.5 %0d)",
             name, n_out, roots, roots_np, roots_it, roots_c);
  endtask

  initial begin
    rc_t rs[$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // nine roots, all outside the unit circle
    rs = {};
    for (int r = 0; r < 9; r++) rs.push_back(rc(1.6 * $cos(0.7 * r + 0.3), 1.6 * $sin(0.7 * r + 0.3)));
    for (int r = 0; r < 9; r++) rs[r] = r_scale(rs[r], 1.0 + 0.12 * r);
    run_channel("all-outside", rs);

    // eight outside, one inside
    rs[4] = rc(0.35, -0.5);
    run_channel("eight-outside", rs);

    // already minimum phase
    rs = {};
    for (int r = 0; r < 9; r++) rs.push_back(rc(0.8 * $cos(0.69 * r), 0.8 * $sin(0.69 * r)));
    run_channel("min-phase", rs);

    for (int t = 0; t < N_RANDOM; t++) begin
      rs = {};
      for (int r = 0; r < 9; r++)
        rs.push_back(($urandom_range(0, 2) != 0) ? rand_root(1.25, 3.0) : rand_root(0.2, 0.8));
      run_channel($sformatf("random-%0d", t), rs);
    end

    $display("worst |F - exact| = %g", worst_err);
    $display("converged %0d, dropped |lamda|>1 %0d, dropped at iteration limit %0d, pass limit %0d, no-root %0d",
             n_conv, n_abort_mag, n_abort_iter, n_pass_limit, n_no_root);
    check(n_conv > 0, "no search converged");
    check(n_abort_mag > 0, "no start point dropped for |lamda| > 1");
    check(n_abort_iter > 0, "no start point dropped at the iteration limit");
    check(n_pass_limit > 0, "pass limit never reached");
    check(n_no_root > 0, "no channel without outside roots");
    check(n_damped_full > N_RANDOM / 2, $sformatf("damped search complete on only %0d channels", n_damped_full));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
