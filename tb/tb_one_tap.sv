// tb_one_tap - random sequences and lamdas through the one-tap feedback
// filter. The reference is the recursion e'_h = y_h - lamda e'_{h+1} in
// real arithmetic; e'_0 is also checked against the channel polynomial
// evaluated directly at z^-1 = -lamda. done must come exactly G clocks
// after restart.
module tb_one_tap;
  import mpf_pkg::*;
  import tb_cplx_pkg::*;

  localparam int G = 10;

  logic  clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  cplx_t y [G];
  cplx_t lamda;
  cplx_t error [G];
  logic  done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  one_tap #(.G(G)) dut (.clk(clk), .rst_n(rst_n), .restart(restart), .y(y), .lamda(lamda),
                        .error(error), .done(done));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      rc_t yr [G];
      rc_t er [G+1];
      rc_t lr, p, xp;
      int  cyc;
      for (int h = 0; h < G; h++) begin
        yr[h] = rc(real'($urandom_range(0, 2000)) / 2.0 - 500.0, real'($urandom_range(0, 2000)) / 2.0 - 500.0);
        y[h]  = to_cplx(yr[h]);
        yr[h] = from_cplx(y[h]);
      end
      lr    = rand_root(0.0, 0.99);
      lamda = to_cplx(lr);
      lr    = from_cplx(lamda);
      er[G] = rc(0.0, 0.0);
      for (int h = G - 1; h >= 0; h--) er[h] = r_sub(yr[h], r_mul(lr, er[h+1]));
      p  = rc(0.0, 0.0);
      xp = rc(1.0, 0.0);
      for (int h = 0; h < G; h++) begin
        p  = r_add(p, r_mul(yr[h], xp));
        xp = r_mul(xp, rc(-lr.re, -lr.im));
      end

      restart = 1'b1;
      @(posedge clk);
      #1 restart = 1'b0;
      cyc = 0;
      do begin
        @(posedge clk);
        cyc++;
        #1;
      end while (!done && cyc < 100);
      check(cyc == G, $sformatf("trial %0d: done after %0d clocks, expected %0d", t, cyc, G));
      for (int h = 0; h < G; h++)
        check(r_abs(r_sub(from_cplx(error[h]), er[h])) < 1.0e-4,
              $sformatf("trial %0d: e'[%0d] = (%f, %f), expected (%f, %f)", t, h,
                        from_cplx(error[h]).re, from_cplx(error[h]).im, er[h].re, er[h].im));
      check(r_abs(r_sub(from_cplx(error[0]), p)) < 1.0e-4, $sformatf("trial %0d: e'[0] is not Y(-lamda)", t));
      @(negedge clk);
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
