// first_part - Newton search for one root of the channel outside the unit
// circle.
//
// The channel polynomial Y(z) = y_0 + y_1 z^-1 + ... + y_g z^-g has a root
// -1/beta outside the unit circle exactly when |beta| < 1 and Y vanishes at
// z^-1 = -beta. The search keeps an estimate lamda of beta and repeats one
// iteration:
//   1. one_tap          e'_h = y_h - lamda e'_{h+1}, h = g..0  (e'_0 = Y at -lamda)
//   2. epsilon_computing eps = sum_{h>=1} e'_h (-lamda)^(h-1)   (the derivative)
//   3. lamda_computing   step = e'_0/eps, lamda_new = lamda + c step
// The search has converged when |step|^2 < d; lamda and the error sequence
// it produced are then reported. A start is abandoned when |lamda_new| > 1
// (the estimate is heading for a root inside the circle) or after MAX_ITER
// iterations; the next of the nine starting values of lamda_lut is then
// tried. When all nine fail, no root outside the circle is reported. The
// iteration, the tests, the limit of 40 and the order of the starting points
// follow the algorithm; the fixed-point format, the handshakes and the
// restart strobe timing are this design's.
//
// Interface and timing: start begins a search on y, which must stay stable
// until done. done pulses once at the end; found, lamda and error are valid
// from then until the next start. One iteration takes 2*G + DW + 7 clocks.
// ev_converged, ev_abort_mag and ev_abort_iter pulse once per converged
// search, per start point dropped for |lamda| > 1 and per start point dropped
// for the iteration limit.
module first_part
  import mpf_pkg::*;
#(
  parameter int  G        = G_DEFAULT,
  parameter int  MAX_ITER = 40,
  parameter real C        = 1.0,
  parameter real D        = 1.0e-10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cplx_t y     [G],
  output logic  done,
  output logic  found,
  output cplx_t lamda,
  output cplx_t error [G],
  output logic  ev_converged,
  output logic  ev_abort_mag,
  output logic  ev_abort_iter
);

  localparam int    N_START  = 9;
  localparam mag2_t D_THRESH = to_mag2(D);
  localparam int    IW       = $clog2(MAX_ITER + 1);

  typedef enum logic [2:0] {IDLE, LOAD, ITERATE, WAIT, CHECK} state_t;

  state_t        state;
  logic [3:0]    s_idx;            // starting point in use
  logic [IW-1:0] iter;             // iterations made from this start
  logic          restart;
  cplx_t         lamda0;
  cplx_t         epsilon;
  cplx_t         step;
  cplx_t         new_lamda;
  logic          clock_3, clock_4, lc_done;

  lamda_lut #(.N_START(N_START)) u_lut (
    .idx   (s_idx),
    .lamda0(lamda0)
  );

  one_tap #(.G(G)) u_one_tap (
    .clk    (clk),
    .rst_n  (rst_n),
    .restart(restart),
    .y      (y),
    .lamda  (lamda),
    .error  (error),
    .done   (clock_3)
  );

  epsilon_computing #(.G(G)) u_epsilon (
    .clk    (clk),
    .rst_n  (rst_n),
    .restart(restart),
    .start  (clock_3),
    .error  (error),
    .lamda  (lamda),
    .epsilon(epsilon),
    .done   (clock_4)
  );

  lamda_computing #(.C(C)) u_lamda (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (clock_4),
    .error0   (error[0]),
    .epsilon  (epsilon),
    .lamda    (lamda),
    .step     (step),
    .new_lamda(new_lamda),
    .done     (lc_done)
  );

  logic converged, too_big, out_of_iter;
  always_comb begin
    converged   = c_mag2(step) < D_THRESH;
    too_big     = c_mag2(new_lamda) > MAG2_ONE;
    out_of_iter = iter == IW'(MAX_ITER - 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= IDLE;
      s_idx         <= '0;
      iter          <= '0;
      restart       <= 1'b0;
      done          <= 1'b0;
      found         <= 1'b0;
      lamda         <= C_ZERO;
      ev_converged  <= 1'b0;
      ev_abort_mag  <= 1'b0;
      ev_abort_iter <= 1'b0;
    end else begin
      restart       <= 1'b0;
      done          <= 1'b0;
      ev_converged  <= 1'b0;
      ev_abort_mag  <= 1'b0;
      ev_abort_iter <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          s_idx <= '0;
          found <= 1'b0;
          state <= LOAD;
        end
        LOAD: begin
          lamda <= lamda0;
          iter  <= '0;
          state <= ITERATE;
        end
        ITERATE: begin
          restart <= 1'b1;
          state   <= WAIT;
        end
        WAIT: if (lc_done) state <= CHECK;
        CHECK: begin
          if (converged) begin
            found        <= 1'b1;
            done         <= 1'b1;
            ev_converged <= 1'b1;
            state        <= IDLE;
          end else if (too_big || out_of_iter) begin
            ev_abort_mag  <= too_big;
            ev_abort_iter <= !too_big;
            if (s_idx == 4'(N_START - 1)) begin
              done  <= 1'b1;
              state <= IDLE;
            end else begin
              s_idx <= s_idx + 1'b1;
              state <= LOAD;
            end
          end else begin
            lamda <= new_lamda;
            iter  <= iter + 1'b1;
            state <= ITERATE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  initial assert (MAX_ITER >= 1) else $error("MAX_ITER must be positive");

  // handshake rules: each stage reports only while its result is awaited
  a_lc_in_wait: assert property (@(posedge clk) disable iff (!rst_n) lc_done |-> state == WAIT)
    else $error("lamda_computing finished outside an iteration");
  a_done_once: assert property (@(posedge clk) disable iff (!rst_n) done |-> state == IDLE)
    else $error("search reported done while still running");

endmodule
