// tb_lamda_computing - the damped Newton update new_lamda = lamda + c e'_0/eps
// and the undamped step e'_0/eps, for c = 1 (default) and c = 0.5, compared
// with real arithmetic. done must come exactly DW+2 clocks after start.
module tb_lamda_computing;
  import mpf_pkg::*;
  import tb_cplx_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cplx_t error0, epsilon, lamda;
  cplx_t step1, nl1, step2, nl2;
  logic  done1, done2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lamda_computing dut (.clk(clk), .rst_n(rst_n), .start(start), .error0(error0), .epsilon(epsilon),
                       .lamda(lamda), .step(step1), .new_lamda(nl1), .done(done1));
  lamda_computing #(.C(0.5)) dut_half (.clk(clk), .rst_n(rst_n), .start(start), .error0(error0),
                       .epsilon(epsilon), .lamda(lamda), .step(step2), .new_lamda(nl2), .done(done2));

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
      rc_t er, ep, lr, st;
      int  cyc;
      er = r_scale(rand_root(0.0, 1.0), 10.0 ** (real'($urandom_range(0, 4)) - 2.0));
      ep = r_scale(rand_root(0.2, 1.0), 10.0 ** (real'($urandom_range(0, 3))));
      lr = rand_root(0.0, 0.99);
      error0  = to_cplx(er);  er = from_cplx(error0);
      epsilon = to_cplx(ep);  ep = from_cplx(epsilon);
      lamda   = to_cplx(lr);  lr = from_cplx(lamda);
      st = r_div(er, ep);
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      lamda = C_ZERO;                       // sampled at start
      cyc = 0;
      do begin
        @(posedge clk);
        cyc++;
        #1;
      end while (!done1 && cyc < 200);
      check(cyc == DW + 2, $sformatf("trial %0d: done after %0d clocks, expected %0d", t, cyc, DW + 2));
      check(done2, "c = 0.5 instance not done together");
      check(r_abs(r_sub(from_cplx(step1), st)) < 1.0e-5, $sformatf("trial %0d: step", t));
      check(r_abs(r_sub(from_cplx(nl1), r_add(lr, st))) < 1.0e-5,
            $sformatf("trial %0d: new lamda (c = 1) = (%f, %f), expected (%f, %f)", t,
                      from_cplx(nl1).re, from_cplx(nl1).im, r_add(lr, st).re, r_add(lr, st).im));
      check(r_abs(r_sub(from_cplx(nl2), r_add(lr, r_scale(st, 0.5)))) < 1.0e-5,
            $sformatf("trial %0d: new lamda (c = 0.5)", t));
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
