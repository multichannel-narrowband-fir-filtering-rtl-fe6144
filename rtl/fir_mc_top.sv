// fir_mc_top: eight-channel, area-minimised 17-tap symmetric FIR filter.
//
// One multiply-accumulate datapath is shared by eight channels; each channel
// owns only its 17-sample history. A sample arrives with the number of the
// channel it belongs to (in_valid/in_ready handshake). The channel's
// history shifts the sample in, and the filter output
//   y(n) = sum_{k=0}^{16} h(k) x(n-k)
// of that channel is computed with 9 multiplications, because the
// symmetric coefficients (h(k) = h(16-k)) allow the two samples that share
// a coefficient to be added first. Each multiplication is a 16-step
// shift-add in its own small sequential multiplier; N_MUL of them (by
// default 9, one per distinct coefficient) run side by side, and their
// products are then added one per cycle into a 40-bit accumulator, whose
// value is saturated to 32 bits. With N_MUL below 9 the coefficients are
// processed in groups of N_MUL, down to a single shared multiplier.
// Samples and coefficients are 16-bit two's complement.
//
// Interface:
//   in_valid/in_ready/in_ch/in_data  sample input; accepted when both high
//   coef_we/coef_addr/coef_data      writes distinct coefficient coef_addr
//                                    (0..8; entry k is h(k) = h(16-k),
//                                    entry 8 the centre tap)
//   out_valid/out_ch/out_data/out_sat  one-cycle result strobe; out_sat
//                                    flags a clamped result
// Timing: out_valid comes 1 + 18*G + 9 cycles after the accepting cycle,
// G = ceil(9/N_MUL) being the number of multiplier groups, and a new
// sample can be accepted one cycle after that: 28/29 cycles by default
// (0.29 us per sample at 100 MHz), 172/173 cycles with one multiplier.
// Coefficient writes take effect immediately and should be made while the
// filter is idle.
//
// From the specification: channel count, tap count, symmetry folding, word
// sizes, shift-then-filter order, shift-add multiplication, parallel
// multiplications followed by one final add per product. This design's
// own: the handshake, the coefficient write port, reset values, the
// control sequence and the 33-bit product (the pre-added multiplicand is
// 17 bits wide).
module fir_mc_top
  import fir_pkg::*;
#(
  parameter int unsigned N_CH   = CHANNELS,
  parameter int unsigned N_TAPS = TAPS,
  parameter int unsigned N_MUL  = MULTS,
  localparam int unsigned N_U   = (N_TAPS + 1) / 2,
  localparam int unsigned N_G   = (N_U + N_MUL - 1) / N_MUL,
  localparam int unsigned CH_W  = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int unsigned U_W   = $clog2(N_U),
  localparam int unsigned G_W   = (N_G > 1) ? $clog2(N_G) : 1,
  localparam int unsigned L_W   = (N_MUL > 1) ? $clog2(N_MUL) : 1,
  localparam int unsigned PRE_W = DATA_W + 1,
  localparam int unsigned PROD_W = PRE_W + COEF_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [CH_W-1:0]          in_ch,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     coef_we,
  input  logic [U_W-1:0]           coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  output logic                     out_valid,
  output logic [CH_W-1:0]          out_ch,
  output logic signed [OUT_W-1:0]  out_data,
  output logic                     out_sat
);

  logic                      store_shift, mult_start, acc_clr, acc_en;
  logic [CH_W-1:0]           rd_ch;
  logic [G_W-1:0]            grp;
  logic [L_W-1:0]            acc_lane;
  logic signed [DATA_W-1:0]  line [N_TAPS];
  logic signed [COEF_W-1:0]  coefs [N_U];
  logic signed [ACC_W-1:0]   acc;

  // per-lane datapath signals
  logic signed [DATA_W-1:0]  tap_a [N_MUL];
  logic signed [DATA_W-1:0]  tap_b [N_MUL];
  logic                      center [N_MUL];
  logic signed [COEF_W-1:0]  coef [N_MUL];
  logic signed [PRE_W-1:0]   pre_sum [N_MUL];
  logic signed [PROD_W-1:0]  product [N_MUL];
  logic [N_MUL-1:0]          lane_done, lane_busy;

  fir_ctrl #(.N_CH(N_CH), .N_TAPS(N_TAPS), .N_MUL(N_MUL)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ch, .in_ready,
    .store_shift, .rd_ch,
    .grp,
    .mult_start,
    .mult_done(lane_done[0]),
    .acc_clr, .acc_en, .acc_lane,
    .out_valid, .out_ch
  );

  fir_data_store #(.N_CH(N_CH), .N_TAPS(N_TAPS), .W(DATA_W)) u_store (
    .clk, .rst_n,
    .shift_en(store_shift),
    .wr_ch   (in_ch),
    .wr_data (in_data),
    .rd_ch,
    .rd_line (line)
  );

  fir_coef_store #(.N_TAPS(N_TAPS), .W(COEF_W)) u_coef (
    .clk, .rst_n,
    .we   (coef_we),
    .waddr(coef_addr),
    .wdata(coef_data),
    .coefs
  );

  // Lane j of group grp handles coefficient k = grp*N_MUL + j and the tap
  // pair x(n-k), x(n-(M-1-k)); lanes past the last coefficient get zeros.
  for (genvar j = 0; j < int'(N_MUL); j++) begin : g_lane
    int unsigned k;

    always_comb begin
      k = int'(grp) * N_MUL + j;
      if (k < N_U) begin
        tap_a[j]  = line[k];
        tap_b[j]  = line[N_TAPS - 1 - k];
        center[j] = (k == N_TAPS - 1 - k);
        coef[j]   = coefs[k];
      end else begin
        tap_a[j]  = '0;
        tap_b[j]  = '0;
        center[j] = 1'b0;
        coef[j]   = '0;
      end
    end

    fir_preadder #(.W(DATA_W)) u_preadd (
      .a(tap_a[j]), .b(tap_b[j]), .center(center[j]), .sum(pre_sum[j])
    );

    fir_seq_mult #(.AW(PRE_W), .BW(COEF_W)) u_mult (
      .clk, .rst_n,
      .start(mult_start),
      .a    (pre_sum[j]),
      .b    (coef[j]),
      .busy (lane_busy[j]),
      .done (lane_done[j]),
      .p    (product[j])
    );
  end

  fir_accumulator #(.IN_W(PROD_W), .AW(ACC_W)) u_acc (
    .clk, .rst_n,
    .clr(acc_clr), .en(acc_en), .din(product[acc_lane]), .acc
  );

  fir_saturate #(.IN_W(ACC_W), .OUT_W_P(OUT_W)) u_sat (
    .din(acc), .dout(out_data), .sat(out_sat)
  );

  // The multipliers are only started when idle, and all finish together.
  a_mult_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                mult_start |-> !(|lane_busy));
  a_lanes_sync: assert property (@(posedge clk) disable iff (!rst_n)
                                 (&lane_done) || !(|lane_done));

endmodule
