// two_tap - two-tap feedforward filter that reflects the found root.
//
// The error sequence e'_0..e'_g left by the converged search is fed in
// forward order through 1 + conj(lamda) z^-1: each output is the current
// input plus conj(lamda) times the previous input. A zero is fed after e'_g,
// so the filter produces g+2 outputs; the first one (which equals e'_0 and
// is close to zero at convergence) is dropped, which advances the sequence
// by one sample:
//     F_h = e'_{h+1} + conj(lamda) * e'_h,   h = 0..g,   e'_{g+1} = 0.
// In the z domain the factor (1 + beta z) of the channel is replaced by
// (1 + conj(beta) z^-1): the root -1/beta outside the unit circle moves to
// -conj(beta) inside it, and the magnitude response is unchanged. Delay,
// multiplier and adder follow the algorithm; one sample per clock is this
// design's timing.
//
// Interface and timing: clock_2 starts a pass; error and lamda_conjugate
// must stay stable during it. f[h] is written on the edges that follow; done
// rises on the edge that writes f[G-1], G+1 clocks after the edge that saw
// clock_2. f holds its values until the next pass.
module two_tap
  import mpf_pkg::*;
#(
  parameter int G = G_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clock_2,
  input  cplx_t error [G],
  input  cplx_t lamda_conjugate,
  output cplx_t f     [G],
  output logic  done
);

  localparam int HW = $clog2(G + 1);

  logic          running;
  logic [HW-1:0] idx;              // index of the input sample e'_idx
  cplx_t         in_now;
  cplx_t         prev;             // delay element T
  cplx_t         sum;

  always_comb begin
    in_now = (idx < HW'(G)) ? error[idx] : C_ZERO;
    sum    = c_add(in_now, c_mul(prev, lamda_conjugate));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      idx     <= '0;
      prev    <= C_ZERO;
    end else begin
      done <= 1'b0;
      if (clock_2) begin
        running <= 1'b1;
        idx     <= '0;
        prev    <= C_ZERO;
      end else if (running) begin
        prev <= in_now;
        idx  <= idx + 1'b1;
        if (idx == HW'(G)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  // output store: output number idx is f_{idx-1}; f_{-1} is dropped
  always_ff @(posedge clk) begin
    if (running && !clock_2 && idx != '0) f[idx - 1'b1] <= sum;
  end

  initial assert (G >= 2) else $error("two_tap needs at least two taps");

  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) clock_2 |-> !running)
    else $error("two_tap restarted during a pass");

endmodule
