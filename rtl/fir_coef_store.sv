// fir_coef_store: the distinct coefficients of the symmetric filter.
//
// A symmetric M-tap filter has h(k) = h(M-1-k), so only (M+1)/2 values are
// stored: entry k holds h(k) = h(M-1-k) for k < M/2, and for odd M the last
// entry holds the centre tap h((M-1)/2). With M = 17 that is 9 registers of
// 16 bits. The coefficients are constant during filtering but can be
// reloaded at run time: a write (we, waddr, wdata) takes effect at the next
// clock edge. All entries are visible at once on coefs, so that several
// multipliers can read their coefficients in the same cycle. Writes to
// addresses beyond the last entry are ignored.
//
// The specification calls the coefficients constant but reconfigurable and
// gives no values (they come from an external filter design), so reset
// clears them to zero and they must be loaded before use; the write port
// is this design's choice of how to reconfigure them.
module fir_coef_store
  import fir_pkg::*;
#(
  parameter int unsigned N_TAPS = TAPS,
  parameter int unsigned W      = COEF_W,
  localparam int unsigned N_U   = (N_TAPS + 1) / 2,
  localparam int unsigned A_W   = $clog2(N_U)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic [A_W-1:0]      waddr,
  input  logic signed [W-1:0] wdata,
  output logic signed [W-1:0] coefs [N_U]
);

  logic signed [W-1:0] coef_q [N_U];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_U); i++) coef_q[i] <= '0;
    end else if (we && (int'(waddr) < int'(N_U))) begin
      coef_q[waddr] <= wdata;
    end
  end

  assign coefs = coef_q;

endmodule
