// fir_data_store: per-channel sample delay lines of the multiplexed filter.
//
// Holds CHANNELS independent delay lines of TAPS samples each, i.e. the
// x(n), x(n-1), ..., x(n-M+1) history of every channel. Only one channel is
// written at a time: when shift_en is high, the delay line of channel
// wr_ch moves one place (x(n-k) -> x(n-k-1), the oldest sample is dropped)
// and wr_data enters as the new x(n), all in one clock edge. The other
// channels keep their contents. This follows the specification: one set of
// registers per channel, and the old data shifted to free one location
// before each new input.
//
// The read side is combinational: rd_line presents the whole history of
// channel rd_ch (rd_line[0] is the newest sample x(n), rd_line[k] is
// x(n-k)), from which the datapath takes the tap pairs that share a
// coefficient. This is the channel multiplexer in front of the single
// shared filter. Reset clears every register to zero (a design choice:
// filter history starts at rest).
module fir_data_store
  import fir_pkg::*;
#(
  parameter int unsigned N_CH   = CHANNELS,
  parameter int unsigned N_TAPS = TAPS,
  parameter int unsigned W      = DATA_W,
  localparam int unsigned CH_W  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic [CH_W-1:0]     wr_ch,
  input  logic signed [W-1:0] wr_data,
  input  logic [CH_W-1:0]     rd_ch,
  output logic signed [W-1:0] rd_line [N_TAPS]
);

  logic signed [W-1:0] line_q [N_CH][N_TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(N_CH); c++)
        for (int t = 0; t < int'(N_TAPS); t++)
          line_q[c][t] <= '0;
    end else if (shift_en) begin
      line_q[wr_ch][0] <= wr_data;
      for (int t = 1; t < int'(N_TAPS); t++)
        line_q[wr_ch][t] <= line_q[wr_ch][t-1];
    end
  end

  assign rd_line = line_q[rd_ch];

endmodule
