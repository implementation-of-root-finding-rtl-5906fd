// tb_epsilon_computing - random error sequences and lamdas; the reference is
// eps = sum_{h=1..g} e'_h (-lamda)^(h-1) in real arithmetic. done must come
// exactly G-1 clocks after start. A restart in the middle of a pass must
// abort it (no done) and the next pass must still be correct.
module tb_epsilon_computing;
  import mpf_pkg::*;
  import tb_cplx_pkg::*;

  localparam int G = 10;

  logic  clk = 1'b0, rst_n = 1'b0, restart = 1'b0, start = 1'b0;
  cplx_t error [G];
  cplx_t lamda, epsilon;
  logic  done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  epsilon_computing #(.G(G)) dut (.clk(clk), .rst_n(rst_n), .restart(restart), .start(start),
                                  .error(error), .lamda(lamda), .epsilon(epsilon), .done(done));

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
      rc_t er [G];
      rc_t lr, eps, pw;
      int  cyc;
      for (int h = 0; h < G; h++) begin
        er[h]    = rc(real'($urandom_range(0, 2000)) / 2.0 - 500.0, real'($urandom_range(0, 2000)) / 2.0 - 500.0);
        error[h] = to_cplx(er[h]);
        er[h]    = from_cplx(error[h]);
      end
      lr    = rand_root(0.0, 0.99);
      lamda = to_cplx(lr);
      lr    = from_cplx(lamda);
      eps = rc(0.0, 0.0);
      pw  = rc(1.0, 0.0);
      for (int h = 1; h < G; h++) begin
        eps = r_add(eps, r_mul(er[h], pw));
        pw  = r_mul(pw, rc(-lr.re, -lr.im));
      end

      if (t % 8 == 3) begin
        // start, then abort with restart after a few terms
        start = 1'b1;
        @(posedge clk);
        #1 start = 1'b0;
        repeat (3) @(posedge clk);
        #1 restart = 1'b1;
        @(posedge clk);
        #1 restart = 1'b0;
        cyc = 0;
        repeat (G + 2) begin
          @(posedge clk);
          #1 if (done) cyc++;
        end
        check(cyc == 0, $sformatf("trial %0d: done after restart", t));
      end

      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      cyc = 0;
      do begin
        @(posedge clk);
        cyc++;
        #1;
      end while (!done && cyc < 100);
      check(cyc == G - 1, $sformatf("trial %0d: done after %0d clocks, expected %0d", t, cyc, G - 1));
      check(r_abs(r_sub(from_cplx(epsilon), eps)) < 1.0e-3,
            $sformatf("trial %0d: eps = (%f, %f), expected (%f, %f)", t,
                      from_cplx(epsilon).re, from_cplx(epsilon).im, eps.re, eps.im));
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
