// fir_preadder: folds a symmetric tap pair before multiplication.
//
// Because h(k) = h(M-1-k), the products h(k)x(n-k) + h(k)x(n-M+1+k) can be
// computed as h(k) * (x(n-k) + x(n-M+1+k)), halving the number of
// multiplications (9 instead of 17 for M = 17). This block forms that sum
// one bit wider than the samples so it never overflows. For the centre tap
// of an odd-length filter there is no partner: with center high the output
// is just sample a, sign-extended. Purely combinational.
module fir_preadder
  import fir_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                center,
  output logic signed [W:0]   sum
);

  always_comb begin
    if (center) sum = {a[W-1], a};
    else        sum = {a[W-1], a} + {b[W-1], b};
  end

endmodule
