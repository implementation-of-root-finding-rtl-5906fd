// tb_find_conj - the conjugate is registered on clock_1 and clock_2 follows
// one clock later; the output holds while clock_1 is low.
module tb_find_conj;
  import mpf_pkg::*;
  import tb_cplx_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, clock_1 = 1'b0;
  cplx_t lamda, lc;
  logic  clock_2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  find_conj dut (.clk(clk), .rst_n(rst_n), .clock_1(clock_1), .lamda(lamda),
                 .lamda_conjugate(lc), .clock_2(clock_2));

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
    for (int t = 0; t < 30; t++) begin
      cplx_t v;
      v = to_cplx(rand_root(0.0, 1.0));
      lamda = v;
      clock_1 = 1'b1;
      @(posedge clk);
      #1 clock_1 = 1'b0;
      lamda = to_cplx(rand_root(0.0, 1.0));
      check(clock_2 == 1'b1, "clock_2 not one clock after clock_1");
      check(lc.re == v.re && lc.im == -v.im, $sformatf("trial %0d: conjugate wrong", t));
      @(posedge clk);
      #1;
      check(clock_2 == 1'b0, "clock_2 longer than one clock");
      check(lc.re == v.re && lc.im == -v.im, $sformatf("trial %0d: conjugate not held", t));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
