// lamda_lut - the nine starting values of lamda for the Newton search.
//
// A search for a root outside the unit circle starts from one of nine fixed
// estimates of beta (the negative reciprocal of the root): 0.01, the four
// points +/-0.909 and +/-j0.909, and the four diagonal points
// +/-0.643 +/- j0.643. When a start fails (|lamda| grows past one or the
// iteration limit is hit) the controller moves to the next entry, in the
// table order given here. The values and their order are the algorithm's;
// the rounding to the nearest fixed-point word and the fallback of unused
// indices to entry 0 are this design's.
//
// Interface: idx (0..8) selects an entry, lamda0 is the complex value.
// Purely combinational.
module lamda_lut
  import mpf_pkg::*;
#(
  parameter int N_START = 9
) (
  input  logic [3:0] idx,
  output cplx_t      lamda0
);

  localparam fx_t A = to_fx(0.909);
  localparam fx_t B = to_fx(0.643);

  always_comb begin
    unique case (idx)
      4'd0: lamda0 = '{re: to_fx(0.01), im: '0};
      4'd1: lamda0 = '{re:  A, im: '0};
      4'd2: lamda0 = '{re: '0, im: -A};
      4'd3: lamda0 = '{re: '0, im:  A};
      4'd4: lamda0 = '{re: -A, im: '0};
      4'd5: lamda0 = '{re:  B, im: -B};
      4'd6: lamda0 = '{re:  B, im:  B};
      4'd7: lamda0 = '{re: -B, im: -B};
      4'd8: lamda0 = '{re: -B, im:  B};
      default: lamda0 = '{re: to_fx(0.01), im: '0};
    endcase
  end

  initial assert (N_START == 9) else $error("lamda_lut holds exactly nine starting points");

endmodule
