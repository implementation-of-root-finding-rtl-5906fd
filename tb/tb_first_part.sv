// tb_first_part - one Newton search at a time on channels built from known
// roots. On a channel with roots outside the unit circle the search must
// report a lamda within 1e-5 of -1/r for one of those roots r, together with
// the error sequence that lamda produces (checked against the recursion in
// real arithmetic, and e'_0 close to zero). On a minimum-phase channel it
// must report no root after dropping each of the nine starting points
// exactly once. An iteration must take 2*G + DW + 7 clocks. The
// convergence, |lamda| > 1 and iteration-limit outcomes must each occur.
module tb_first_part;
  import mpf_pkg::*;
  import tb_cplx_pkg::*;

  localparam int G = 10;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cplx_t y [G], error [G], lamda;
  logic  done, found, ev_conv, ev_mag, ev_iter;
  int checks = 0, failures = 0;
  int n_conv = 0, n_mag = 0, n_iter = 0;
  int last_restart = -1, min_gap = 1000000, cycle = 0;

  always #5 clk = ~clk;

  first_part #(.G(G)) dut (.clk(clk), .rst_n(rst_n), .start(start), .y(y), .done(done),
                           .found(found), .lamda(lamda), .error(error),
                           .ev_converged(ev_conv), .ev_abort_mag(ev_mag), .ev_abort_iter(ev_iter));

  always @(posedge clk) begin
    cycle++;
    if (ev_conv) n_conv++;
    if (ev_mag) n_mag++;
    if (ev_iter) n_iter++;
    if (dut.restart) begin
      if (last_restart >= 0 && cycle - last_restart < min_gap) min_gap = cycle - last_restart;
      last_restart = cycle;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic search(input rc_t roots_in[$], input string name);
    rc_t yc[$];
    rc_t e [G+1];
    rc_t lr;
    real mx;
    int  n_out, drops_before;
    poly_from_roots(roots_in, rc(1.0, 0.0), yc);
    mx = 0.0;
    foreach (yc[h]) if (r_abs(yc[h]) > mx) mx = r_abs(yc[h]);
    for (int h = 0; h < G; h++) begin
      y[h]  = to_cplx(r_scale(yc[h], 300.0 / mx));
      yc[h] = from_cplx(y[h]);
    end
    n_out = 0;
    foreach (roots_in[r]) if (r_abs2(roots_in[r]) > 1.0) n_out++;
    drops_before = n_mag + n_iter;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    if (n_out == 0) begin
      check(!found, $sformatf("%s: root reported on a minimum-phase channel", name));
      @(negedge clk);
      check(n_mag + n_iter - drops_before == 9,
            $sformatf("%s: %0d starting points dropped, expected 9", name, n_mag + n_iter - drops_before));
    end else begin
      real best;
      check(found, $sformatf("%s: no root found", name));
      lr = from_cplx(lamda);
      best = 1.0e9;
      foreach (roots_in[r])
        if (r_abs2(roots_in[r]) > 1.0) begin
          real dd;
          dd = r_abs(r_sub(lr, r_div(rc(-1.0, 0.0), roots_in[r])));
          if (dd < best) best = dd;
        end
      check(best < 1.0e-5, $sformatf("%s: lamda (%f, %f) is not -1/r of an outside root", name, lr.re, lr.im));
      e[G] = rc(0.0, 0.0);
      for (int h = G - 1; h >= 0; h--) e[h] = r_sub(yc[h], r_mul(lr, e[h+1]));
      for (int h = 0; h < G; h++)
        check(r_abs(r_sub(from_cplx(error[h]), e[h])) < 1.0e-3,
              $sformatf("%s: error[%0d] does not belong to the reported lamda", name, h));
      check(r_abs(from_cplx(error[0])) < 1.0e-2, $sformatf("%s: e'_0 not close to zero", name));
    end
  endtask

  initial begin
    rc_t rs[$];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    search({rc(2.0, 0.0), rc(0.0, 0.5), rc(-1.5, 1.0), rc(0.3, -0.2)}, "four roots");
    rs = {};
    for (int r = 0; r < 9; r++) rs.push_back(rc(0.8 * $cos(0.69 * r), 0.8 * $sin(0.69 * r)));
    search(rs, "minimum phase");
    for (int t = 0; t < 6; t++) begin
      rs = {};
      for (int r = 0; r < 9; r++)
        rs.push_back(($urandom_range(0, 1) != 0) ? rand_root(1.25, 3.0) : rand_root(0.2, 0.8));
      search(rs, $sformatf("random-%0d", t));
    end
    check(min_gap == 2 * G + DW + 7, $sformatf("iteration takes %0d clocks, expected %0d", min_gap, 2 * G + DW + 7));
    check(n_conv > 0 && n_mag > 0 && n_iter > 0,
          $sformatf("outcomes: converged %0d, |lamda|>1 %0d, iteration limit %0d", n_conv, n_mag, n_iter));
    $display("converged %0d, dropped |lamda|>1 %0d, dropped at iteration limit %0d", n_conv, n_mag, n_iter);
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
