// epsilon_computing - derivative term of the Newton step.
//
// From the error sequence of one_tap it forms
//     eps = sum_{h=1..g} e'_h * (-lamda)^(h-1),
// which is the derivative of the channel polynomial (in the variable z^-1)
// at z^-1 = -lamda. One term is added per clock: a multiplier forms
// e'_h times the running power of -lamda, an adder accumulates it, and the
// power is advanced by one more complex multiply. The sum and the power
// sequence are the algorithm's; forming the power incrementally rather than
// by a separate power procedure is this design's choice.
//
// Interface and timing: start (the one_tap done strobe) clears the
// accumulator and begins; error and lamda must stay stable for G-1 clocks.
// epsilon is valid when done pulses, G-1 clocks after the edge that saw
// start. restart aborts a
// pass and clears the accumulator.
module epsilon_computing
  import mpf_pkg::*;
#(
  parameter int G = G_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  restart,
  input  logic  start,
  input  cplx_t error [G],
  input  cplx_t lamda,
  output cplx_t epsilon,
  output logic  done
);

  localparam int HW = $clog2(G);

  logic          running;
  logic [HW-1:0] h;
  cplx_t         powered_lamda;    // (-lamda)^(h-1)
  cplx_t         mult_out;

  always_comb mult_out = c_mul(error[h], powered_lamda);

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      running       <= 1'b0;
      done          <= 1'b0;
      h             <= '0;
      epsilon       <= C_ZERO;
      powered_lamda <= C_ONE;
    end else begin
      done <= 1'b0;
      if (start) begin
        running       <= 1'b1;
        h             <= HW'(1);
        epsilon       <= C_ZERO;
        powered_lamda <= C_ONE;
      end else if (running) begin
        epsilon       <= c_add(epsilon, mult_out);
        powered_lamda <= c_mul(powered_lamda, c_neg(lamda));
        if (h == HW'(G - 1)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else begin
          h <= h + 1'b1;
        end
      end
    end
  end

  initial assert (G >= 2) else $error("epsilon_computing needs at least two taps");

endmodule
