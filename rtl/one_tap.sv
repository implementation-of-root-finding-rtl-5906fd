// one_tap - one-tap feedback transversal filter run over the stored sequence
// in reverse order.
//
// The sequence y_0..y_g is read from its last sample back to its first and
// passed through 1/(1 + lamda z): each output is the input minus lamda times
// the previous output,
//     e'_h = y_h - lamda * e'_{h+1},   h = g, g-1, ..., 0,   e'_{g+1} = 0.
// e'_0 is then the value of the channel polynomial at z^-1 = -lamda, and
// e'_1..e'_g are the coefficients of the quotient left after dividing out
// the factor (1 + lamda z). Subtraction, delay element (cleared by restart)
// and complex multiplier follow the filter structure of the algorithm; one
// sample per clock is this design's timing.
//
// Interface and timing: a restart pulse clears the delay element and starts a
// pass; y and lamda must stay stable during the pass. error[h] is written on
// the clock edges that follow, h = G-1 first; done rises on the edge that
// writes error[0], G clocks after the edge that saw restart.
// error holds its values until the next restart.
module one_tap
  import mpf_pkg::*;
#(
  parameter int G = G_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  restart,
  input  cplx_t y      [G],
  input  cplx_t lamda,
  output cplx_t error  [G],
  output logic  done
);

  localparam int HW = $clog2(G);

  logic          running;
  logic [HW-1:0] h;
  cplx_t         old_error;        // delay element T
  cplx_t         feedback_value;
  cplx_t         err_now;

  always_comb begin
    feedback_value = c_mul(old_error, lamda);
    err_now        = c_sub(y[h], feedback_value);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running   <= 1'b0;
      done      <= 1'b0;
      h         <= '0;
      old_error <= C_ZERO;
    end else begin
      done <= 1'b0;
      if (restart) begin
        running   <= 1'b1;
        h         <= HW'(G - 1);
        old_error <= C_ZERO;
      end else if (running) begin
        old_error <= err_now;
        if (h == '0) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else begin
          h <= h - 1'b1;
        end
      end
    end
  end

  // sample store, written once per pass
  always_ff @(posedge clk) begin
    if (running && !restart) error[h] <= err_now;
  end

  initial assert (G >= 2) else $error("one_tap needs at least two taps");

  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) restart |-> !running)
    else $error("one_tap restarted during a pass");

endmodule
