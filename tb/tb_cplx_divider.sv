// tb_cplx_divider - random complex quotients over a wide range of
// magnitudes, compared with real division; quotients too large for a word
// (and division by zero) must saturate with the right sign. done must come
// exactly DW clocks after start.
module tb_cplx_divider;
  import mpf_pkg::*;
  import tb_cplx_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cplx_t a, b, q;
  logic  done;
  int checks = 0, failures = 0;

  localparam fx_t MAXV = fx_t'({1'b0, {(DW-1){1'b1}}});

  always #5 clk = ~clk;

  cplx_divider dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .q(q), .done(done));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic divide(input cplx_t aa, input cplx_t bb, output int cyc);
    a = aa;
    b = bb;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    a = '{re: fx_t'($urandom), im: fx_t'($urandom)};   // inputs need not be held
    b = '{re: fx_t'($urandom), im: fx_t'($urandom)};
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
      #1;
    end while (!done && cyc < 200);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      rc_t ar, br, qr, got;
      real sa, sb;
      int  cyc;
      sa = 10.0 ** (real'($urandom_range(0, 8)) - 5.0);
      sb = 10.0 ** (real'($urandom_range(0, 7)) - 3.0);
      ar = r_scale(rand_root(0.1, 1.0), sa);
      br = r_scale(rand_root(0.1, 1.0), sb);
      ar = from_cplx(to_cplx(ar));
      br = from_cplx(to_cplx(br));
      qr = r_div(ar, br);
      divide(to_cplx(ar), to_cplx(br), cyc);
      got = from_cplx(q);
      check(cyc == DW, $sformatf("trial %0d: done after %0d clocks, expected %0d", t, cyc, DW));
      if (r_abs(qr) < 1.0e5)
        check(r_abs(r_sub(got, qr)) < 1.0e-6 * (1.0 + r_abs(qr)),
              $sformatf("trial %0d: q = (%g, %g), expected (%g, %g)", t, got.re, got.im, qr.re, qr.im));
      @(negedge clk);
    end
    begin
      int  cyc;
      // overflow: 1e6 / 1e-6 saturates, real positive, imaginary negative
      divide('{re: to_fx(1.0e6), im: -to_fx(1.0e6)}, '{re: to_fx(1.0e-6), im: '0}, cyc);
      check(q.re == MAXV && q.im == -MAXV, "saturation on overflow");
      @(negedge clk);
      divide('{re: to_fx(3.0), im: '0}, C_ZERO, cyc);
      check(q.re == MAXV, "saturation on division by zero");
      @(negedge clk);
      divide('{re: -to_fx(1.5), im: to_fx(0.5)}, '{re: '0, im: to_fx(1.0)}, cyc);
      check(q.re == to_fx(0.5) && q.im == to_fx(1.5), "(-1.5 + 0.5j) / j = 0.5 + 1.5j");
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
