// fir_accumulator: the wide accumulator of the shared MAC.
//
// Adds sign-extended products into a 40-bit register. With 32-bit products
// that leaves 8 guard bits, so up to 256 full-scale products can be summed
// before the register itself can wrap; the result is only saturated to
// 32 bits at the end (see fir_saturate). This matches the MAC format the
// specification copies from its DSP: 32-bit product into a 40-bit
// accumulator. Here the product is 33 bits because the symmetric pre-add
// widens the multiplicand by one bit.
//
// clr (one cycle, priority) zeroes the register; en adds din at the clock
// edge. The sum wraps modulo 2^ACC_W, which cannot happen for a 17-tap
// filter of 16-bit data. acc is the register output.
module fir_accumulator
  import fir_pkg::*;
#(
  parameter int unsigned IN_W = 33,
  parameter int unsigned AW   = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 en,
  input  logic signed [IN_W-1:0] din,
  output logic signed [AW-1:0]   acc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= acc + AW'(din);
  end

endmodule
