// fir_seq_mult: area-lean sequential (shift-add) two's-complement multiplier.
//
// Computes p = a * b for a signed AW-bit multiplicand and a signed BW-bit
// multiplier, one multiplier bit per clock, using only an adder and a right
// shift: the classic add-and-shift-right algorithm that the specification
// names as its multiplication method for an area-only design. The partial
// product sits in a (AW+1)-bit high register and the multiplier register,
// which shift right together. In step i the multiplicand is added to the
// high part when multiplier bit i is 1; in the last step (the sign bit of
// the multiplier, weight -2^(BW-1)) it is subtracted instead, which makes
// the result correct for two's-complement operands without any correction.
//
// Interface and timing: a one-cycle start pulse loads a and b. The BW steps
// follow on the next BW clock edges, and done is high for exactly one cycle,
// BW+1 cycles after the start cycle (17 cycles for BW = 16). p is valid from
// that cycle until the next start. A start while busy restarts the
// multiplication. In the filter, a is the 17-bit pre-added sample pair and
// b the 16-bit coefficient, giving a 33-bit product.
module fir_seq_mult #(
  parameter int unsigned AW = 17,
  parameter int unsigned BW = 16,
  localparam int unsigned CW = $clog2(BW)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [AW-1:0]   a,
  input  logic signed [BW-1:0]   b,
  output logic                   busy,
  output logic                   done,
  output logic signed [AW+BW-1:0] p
);

  logic signed [AW-1:0] a_q;
  logic signed [AW:0]   hi_q;
  logic [BW-1:0]        lo_q;
  logic [CW-1:0]        cnt_q;
  logic                 busy_q, done_q;

  logic signed [AW+1:0] addend, sum;

  always_comb begin
    if (!lo_q[0])                       addend = '0;
    else if (cnt_q == CW'(BW - 1))      addend = -(AW+2)'(a_q);
    else                                addend = (AW+2)'(a_q);
    sum = (AW+2)'(hi_q) + addend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      hi_q   <= '0;
      lo_q   <= '0;
      cnt_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
    end else if (start) begin
      a_q    <= a;
      hi_q   <= '0;
      lo_q   <= b;
      cnt_q  <= '0;
      busy_q <= 1'b1;
      done_q <= 1'b0;
    end else if (busy_q) begin
      hi_q   <= sum[AW+1:1];           // arithmetic shift right by one
      lo_q   <= {sum[0], lo_q[BW-1:1]};
      cnt_q  <= cnt_q + 1'b1;
      if (cnt_q == CW'(BW - 1)) begin
        busy_q <= 1'b0;
        done_q <= 1'b1;
      end
    end else begin
      done_q <= 1'b0;
    end
  end

  assign busy = busy_q;
  assign done = done_q;
  assign p    = {hi_q[AW-1:0], lo_q};

endmodule
