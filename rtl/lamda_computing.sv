// lamda_computing - damped Newton update of lamda.
//
// Computes the correction step = e'_0 / eps with a complex divider, scales
// it by the constant c and adds it to the current estimate:
//     new_lamda = lamda + c * e'_0 / eps.
// With c = 1 this is one Newton-Raphson step on the channel polynomial in
// the variable z^-1 (evaluated at -lamda). The divide - multiply - add
// chain is the algorithm's; c may be any value in (0, 1]; its default of 1
// is this design's choice. The undamped step is also output, because the
// convergence test |e'_0/eps|^2 < d is made on it.
//
// Interface and timing: start (the epsilon_computing done strobe) samples
// error0, epsilon and lamda. step and new_lamda are valid when done pulses,
// DW+2 clocks after the edge that saw start, and hold until the next result.
module lamda_computing
  import mpf_pkg::*;
#(
  parameter real C = 1.0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cplx_t error0,
  input  cplx_t epsilon,
  input  cplx_t lamda,
  output cplx_t step,
  output cplx_t new_lamda,
  output logic  done
);

  localparam cplx_t C_FX = '{re: to_fx(C), im: '0};

  cplx_t lamda_r;
  cplx_t result;
  logic  div_done;
  logic  mult_pending;

  cplx_divider u_divider (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .a    (error0),
    .b    (epsilon),
    .q    (result),
    .done (div_done)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done         <= 1'b0;
      mult_pending <= 1'b0;
      step         <= C_ZERO;
      new_lamda    <= C_ZERO;
      lamda_r      <= C_ZERO;
    end else begin
      done <= 1'b0;
      if (start) lamda_r <= lamda;
      mult_pending <= div_done;
      if (mult_pending) begin
        step      <= result;
        new_lamda <= c_add(lamda_r, c_mul(result, C_FX));
        done      <= 1'b1;
      end
    end
  end

  initial assert (C > 0.0 && C <= 1.0) else $error("c must lie in (0, 1]");

endmodule
