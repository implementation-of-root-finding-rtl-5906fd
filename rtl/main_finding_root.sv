// main_finding_root - turns a channel impulse response into its
// minimum-phase equivalent by reflecting its roots into the unit circle.
//
// A receiver that feeds a reduced-state equalizer wants the overall channel
// response to be minimum phase, so that its energy sits at the front. Given
// the G-tap response y_0..y_g (g = G-1), this block finds, one at a time, the
// roots of Y(z) that lie outside the unit circle and replaces each root r by
// 1/conj(r), which leaves the magnitude response unchanged. Each pass:
//   first_part  Newton search (nine starting points, at most 40 iterations
//               each) for lamda ~ beta = -1/r with |beta| < 1;
//   find_conj   conj(lamda);
//   two_tap     F_h = e'_{h+1} + conj(lamda) e'_h, the deflated sequence
//               multiplied by (1 + conj(beta) z^-1) and advanced one sample.
// F then replaces the stored sequence and the next pass starts. Processing
// stops after the first pass that finds no root outside the circle, or after
// N_PASSES passes. The output f is the stored sequence: y itself if no root
// was found, otherwise the minimum-phase response F_m. The pass structure
// and the limit of ten passes follow the algorithm; reading and writing the
// samples as fixed-point words on ports (rather than text files), the
// start/busy/done handshake and the root log are this design's.
//
// Interface and timing: start (while idle) samples y. busy is high until
// done pulses; f, roots_found and lamda_log are then valid and hold until
// the next start. ev_* pulse for each converged search, each starting point
// dropped because |lamda| > 1 and each dropped at the iteration limit.
module main_finding_root
  import mpf_pkg::*;
#(
  parameter int  G        = G_DEFAULT,
  parameter int  N_PASSES = 10,
  parameter int  MAX_ITER = 40,
  parameter real C        = 1.0,
  parameter real D        = 1.0e-10
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  cplx_t                         y           [G],
  output cplx_t                         f           [G],
  output logic                          busy,
  output logic                          done,
  output logic [$clog2(N_PASSES+1)-1:0] roots_found,
  output cplx_t                         lamda_log   [N_PASSES],
  output logic                          ev_converged,
  output logic                          ev_abort_mag,
  output logic                          ev_abort_iter
);

  localparam int PW = $clog2(N_PASSES + 1);
  localparam int LW = (N_PASSES > 1) ? $clog2(N_PASSES) : 1;

  typedef enum logic [1:0] {IDLE, SEARCH, REFLECT} state_t;

  state_t  state;
  cplx_t   cur [G];                // sequence being processed (Y, F_1, F_2, ...)
  logic    fp_start, fp_done, fp_found;
  cplx_t   lamda;
  cplx_t   error [G];
  cplx_t   lamda_conjugate;
  logic    clock_1, clock_2, tt_done;
  cplx_t   f_new [G];
  logic [PW-1:0] pass;

  assign clock_1 = fp_done && fp_found;
  assign f       = cur;

  first_part #(
    .G(G), .MAX_ITER(MAX_ITER), .C(C), .D(D)
  ) u_first_part (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (fp_start),
    .y            (cur),
    .done         (fp_done),
    .found        (fp_found),
    .lamda        (lamda),
    .error        (error),
    .ev_converged (ev_converged),
    .ev_abort_mag (ev_abort_mag),
    .ev_abort_iter(ev_abort_iter)
  );

  find_conj u_find_conj (
    .clk            (clk),
    .rst_n          (rst_n),
    .clock_1        (clock_1),
    .lamda          (lamda),
    .lamda_conjugate(lamda_conjugate),
    .clock_2        (clock_2)
  );

  two_tap #(.G(G)) u_two_tap (
    .clk            (clk),
    .rst_n          (rst_n),
    .clock_2        (clock_2),
    .error          (error),
    .lamda_conjugate(lamda_conjugate),
    .f              (f_new),
    .done           (tt_done)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= IDLE;
      busy        <= 1'b0;
      done        <= 1'b0;
      fp_start    <= 1'b0;
      pass        <= '0;
      roots_found <= '0;
      for (int k = 0; k < G; k++) cur[k] <= C_ZERO;
      for (int k = 0; k < N_PASSES; k++) lamda_log[k] <= C_ZERO;
    end else begin
      done     <= 1'b0;
      fp_start <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          cur         <= y;
          pass        <= '0;
          roots_found <= '0;
          for (int k = 0; k < N_PASSES; k++) lamda_log[k] <= C_ZERO;
          busy        <= 1'b1;
          fp_start    <= 1'b1;
          state       <= SEARCH;
        end
        SEARCH: if (fp_done) begin
          if (fp_found) begin
            lamda_log[pass[LW-1:0]] <= lamda;
            state           <= REFLECT;
          end else begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= IDLE;
          end
        end
        REFLECT: if (tt_done) begin
          cur         <= f_new;
          roots_found <= roots_found + 1'b1;
          pass        <= pass + 1'b1;
          if (pass == PW'(N_PASSES - 1)) begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            fp_start <= 1'b1;
            state    <= SEARCH;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // handshake rules: a result arrives only in the state that waits for it
  a_fp_done: assert property (@(posedge clk) disable iff (!rst_n) fp_done |-> state == SEARCH)
    else $error("first_part finished while not searching");
  a_tt_done: assert property (@(posedge clk) disable iff (!rst_n) tt_done |-> state == REFLECT)
    else $error("two_tap finished while not reflecting");

endmodule
