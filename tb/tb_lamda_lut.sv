// tb_lamda_lut - checks the nine starting values of lamda, in order, and
// the fallback of unused indices, against the table of starting points.
module tb_lamda_lut;
  import mpf_pkg::*;
  import tb_cplx_pkg::*;

  logic [3:0] idx;
  cplx_t      lamda0;
  int checks = 0, failures = 0;

  lamda_lut dut (.idx(idx), .lamda0(lamda0));

  rc_t table_v [9];

  initial begin
    table_v[0] = rc(0.01, 0.0);
    table_v[1] = rc(0.909, 0.0);
    table_v[2] = rc(0.0, -0.909);
    table_v[3] = rc(0.0, 0.909);
    table_v[4] = rc(-0.909, 0.0);
    table_v[5] = rc(0.643, -0.643);
    table_v[6] = rc(0.643, 0.643);
    table_v[7] = rc(-0.643, -0.643);
    table_v[8] = rc(-0.643, 0.643);
    for (int i = 0; i < 16; i++) begin
      rc_t got, want;
      idx = 4'(i);
      #1;
      got  = from_cplx(lamda0);
      want = (i < 9) ? table_v[i] : table_v[0];
      checks++;
      if (r_abs(r_sub(got, want)) > 1.0e-7) begin
        failures++;
        $display("FAIL: idx %0d gives (%f, %f), expected (%f, %f)", i, got.re, got.im, want.re, want.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
