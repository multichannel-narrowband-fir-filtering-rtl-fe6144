// fir_saturate: clamps the 40-bit accumulator to the 32-bit result.
//
// If the accumulator value fits in OUT_W bits (its top IN_W-OUT_W+1 bits
// are all equal), it passes unchanged; otherwise the output is the largest
// positive (0x7FFF_FFFF) or most negative (0x8000_0000) OUT_W-bit value,
// chosen by the accumulator's sign, and sat is raised. No bits are dropped
// at the bottom: the result is the accumulator's integer value, as the
// specification's 40-bit to 32-bit saturated result implies. Purely
// combinational.
module fir_saturate
  import fir_pkg::*;
#(
  parameter int unsigned IN_W  = ACC_W,
  parameter int unsigned OUT_W_P = OUT_W
) (
  input  logic signed [IN_W-1:0]    din,
  output logic signed [OUT_W_P-1:0] dout,
  output logic                      sat
);

  logic [IN_W-OUT_W_P:0] top;

  always_comb begin
    top = din[IN_W-1:OUT_W_P-1];
    sat = !((&top) || !(|top));
    if (!sat)               dout = din[OUT_W_P-1:0];
    else if (din[IN_W-1])   dout = {1'b1, {(OUT_W_P-1){1'b0}}};
    else                    dout = {1'b0, {(OUT_W_P-1){1'b1}}};
  end

endmodule
