// find_conj - conjugate of the converged lamda.
//
// When the search reports a root (clock_1), the converged lamda (the
// estimate of beta) is registered as its complex conjugate, which is the
// coefficient of the two-tap filter 1 + conj(lamda) z^-1, and the strobe is
// passed on as clock_2. Registering the value with one clock of latency is
// this design's choice.
//
// Interface and timing: clock_1 samples lamda; lamda_conjugate is valid and
// clock_2 pulses on the next clock edge. lamda_conjugate holds until the next
// clock_1.
module find_conj
  import mpf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clock_1,
  input  cplx_t lamda,
  output cplx_t lamda_conjugate,
  output logic  clock_2
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lamda_conjugate <= C_ZERO;
      clock_2         <= 1'b0;
    end else begin
      clock_2 <= clock_1;
      if (clock_1) lamda_conjugate <= c_conj(lamda);
    end
  end

endmodule
