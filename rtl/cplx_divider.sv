// cplx_divider - sequential complex divider q = a / b.
//
// The quotient is formed as a * conj(b) / |b|^2: the two products and |b|^2
// are taken at full width, then the real and the imaginary part are each
// divided by |b|^2 with a restoring divider that produces one quotient bit
// per clock, most significant first. Signs are handled separately (divide
// magnitudes, negate at the end). A quotient whose magnitude does not fit in
// a DW-bit word, division by zero included, is saturated to the largest
// value of its sign. The algorithm needs only "a divider"; the method,
// the saturation and the latency are this design's.
//
// Interface and timing: start (honoured only while idle) samples a and b.
// done pulses and q is valid DW clocks after the edge that saw start; q holds
// until the next result.
module cplx_divider
  import mpf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t q,
  output logic  done
);

  localparam int QB = DW - 1;              // quotient magnitude bits
  localparam int RW = 2 * DW + QB;         // remainder / shifted divisor width
  localparam int CW = $clog2(QB + 1);

  typedef logic [RW-1:0] rem_t;
  typedef enum logic [1:0] {IDLE, DIVIDE, FINISH} state_t;

  state_t        state;
  logic [CW-1:0] cnt;
  rem_t          dsh;                      // |b|^2 shifted to the current bit
  rem_t          rem   [2];                // 0: real part, 1: imaginary part
  logic [QB-1:0] qmag  [2];
  logic          neg   [2];
  logic          sat   [2];

  fx_wide_t      num   [2];
  fx_wide_t      num_mag [2];
  mag2_t         den;

  always_comb begin
    num[0] = fx_wide_t'(a.re) * fx_wide_t'(b.re) + fx_wide_t'(a.im) * fx_wide_t'(b.im);
    num[1] = fx_wide_t'(a.im) * fx_wide_t'(b.re) - fx_wide_t'(a.re) * fx_wide_t'(b.im);
    den    = c_mag2(b);
    for (int k = 0; k < 2; k++) num_mag[k] = num[k][2*DW] ? -num[k] : num[k];
  end

  function automatic fx_t apply_sign(logic [QB-1:0] m, logic s, logic n);
    fx_t v;
    v = s ? fx_t'({1'b0, {QB{1'b1}}}) : fx_t'({1'b0, m});
    return n ? -v : v;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      done  <= 1'b0;
      cnt   <= '0;
      q     <= C_ZERO;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          for (int k = 0; k < 2; k++) begin
            neg[k]  <= num[k][2*DW];
            rem[k]  <= rem_t'(num_mag[k]) << FW;
            sat[k]  <= (rem_t'(num_mag[k]) << FW) >= (rem_t'(den) << QB);
            qmag[k] <= '0;
          end
          dsh   <= rem_t'(den) << (QB - 1);
          cnt   <= CW'(QB);
          state <= DIVIDE;
        end
        DIVIDE: begin
          for (int k = 0; k < 2; k++) begin
            if (rem[k] >= dsh) begin
              rem[k]  <= rem[k] - dsh;
              qmag[k] <= {qmag[k][QB-2:0], 1'b1};
            end else begin
              qmag[k] <= {qmag[k][QB-2:0], 1'b0};
            end
          end
          dsh <= dsh >> 1;
          cnt <= cnt - 1'b1;
          if (cnt == CW'(1)) state <= FINISH;
        end
        FINISH: begin
          q.re  <= apply_sign(qmag[0], sat[0], neg[0]);
          q.im  <= apply_sign(qmag[1], sat[1], neg[1]);
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // start is honoured only while idle; the user must not start a busy divider
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == IDLE)
    else $error("divider started while busy");

endmodule
