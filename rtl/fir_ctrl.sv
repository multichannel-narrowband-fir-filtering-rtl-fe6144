// fir_ctrl: sequencer of the multiplexed filter.
//
// One sample is filtered at a time. The N_U = (M+1)/2 distinct
// coefficients are handled by N_MUL multipliers ("lanes") in groups of
// N_MUL: lane j of group g works on coefficient k = g*N_MUL + j.
//   ST_IDLE  in_ready is high. When in_valid is seen the sample is
//            accepted: the data store of channel in_ch shifts it in, the
//            channel number is latched and the accumulator cleared, all on
//            that clock edge.
//   ST_LOAD  the datapath pre-adds every lane's tap pair and mult_start
//            starts all multipliers of the group together.
//   ST_MUL   wait for mult_done (all lanes finish together).
//   ST_ACC   one lane per cycle (acc_lane = j) is added to the accumulator,
//            skipping lanes beyond the last coefficient; then the next
//            group is loaded, or after the last group ST_OUT follows.
//   ST_OUT   out_valid is high for one cycle with out_ch; the saturated
//            accumulator is the result and stays valid until the next
//            sample is accepted.
//
// Timing: with G = ceil(N_U/N_MUL) groups and a multiplier whose done comes
// 17 cycles after its start, out_valid follows the accepting cycle after
// 1 + 18*G + N_U cycles, and in_ready returns one cycle later. With the
// defaults (17 taps, 9 lanes) that is 28 cycles, with a single lane 172.
// Parallel sequential multiplications followed by one final add per
// product is the arrangement the specification proposes; the state
// sequence and handshake are this design's own.
module fir_ctrl
  import fir_pkg::*;
#(
  parameter int unsigned N_CH   = CHANNELS,
  parameter int unsigned N_TAPS = TAPS,
  parameter int unsigned N_MUL  = MULTS,
  localparam int unsigned N_U   = (N_TAPS + 1) / 2,
  localparam int unsigned N_G   = (N_U + N_MUL - 1) / N_MUL,
  localparam int unsigned CH_W  = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int unsigned G_W   = (N_G > 1) ? $clog2(N_G) : 1,
  localparam int unsigned L_W   = (N_MUL > 1) ? $clog2(N_MUL) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // sample input handshake
  input  logic            in_valid,
  input  logic [CH_W-1:0] in_ch,
  output logic            in_ready,
  // data store control
  output logic            store_shift,
  output logic [CH_W-1:0] rd_ch,
  // current group of coefficients
  output logic [G_W-1:0]  grp,
  // multiplier and accumulator control
  output logic            mult_start,
  input  logic            mult_done,
  output logic            acc_clr,
  output logic            acc_en,
  output logic [L_W-1:0]  acc_lane,
  // result strobe
  output logic            out_valid,
  output logic [CH_W-1:0] out_ch
);

  fir_state_e      state_q, state_d;
  logic [G_W-1:0]  g_q, g_d;
  logic [L_W-1:0]  j_q, j_d;
  logic [CH_W-1:0] ch_q, ch_d;
  int unsigned     k_cur;  // coefficient index of lane j_q in group g_q
  logic            last_lane, last_coef;

  always_comb begin
    k_cur     = int'(g_q) * N_MUL + int'(j_q);
    last_coef = (k_cur == N_U - 1);
    last_lane = (int'(j_q) == N_MUL - 1) || last_coef;
  end

  always_comb begin
    state_d     = state_q;
    g_d         = g_q;
    j_d         = j_q;
    ch_d        = ch_q;
    in_ready    = 1'b0;
    store_shift = 1'b0;
    mult_start  = 1'b0;
    acc_clr     = 1'b0;
    acc_en      = 1'b0;
    out_valid   = 1'b0;
    unique case (state_q)
      ST_IDLE: begin
        in_ready = 1'b1;
        if (in_valid) begin
          store_shift = 1'b1;
          acc_clr     = 1'b1;
          ch_d        = in_ch;
          g_d         = '0;
          state_d     = ST_LOAD;
        end
      end
      ST_LOAD: begin
        mult_start = 1'b1;
        j_d        = '0;
        state_d    = ST_MUL;
      end
      ST_MUL: begin
        if (mult_done) state_d = ST_ACC;
      end
      ST_ACC: begin
        acc_en = 1'b1;
        if (!last_lane) begin
          j_d = j_q + 1'b1;
        end else if (last_coef) begin
          state_d = ST_OUT;
        end else begin
          g_d     = g_q + 1'b1;
          state_d = ST_LOAD;
        end
      end
      ST_OUT: begin
        out_valid = 1'b1;
        state_d   = ST_IDLE;
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      g_q     <= '0;
      j_q     <= '0;
      ch_q    <= '0;
    end else begin
      state_q <= state_d;
      g_q     <= g_d;
      j_q     <= j_d;
      ch_q    <= ch_d;
    end
  end

  assign rd_ch    = ch_q;
  assign grp      = g_q;
  assign acc_lane = j_q;
  assign out_ch   = ch_q;

  // The multipliers are only started in ST_LOAD, and a result strobe never
  // coincides with accepting a sample.
  a_start_in_load: assert property (@(posedge clk) disable iff (!rst_n)
                                    mult_start |-> state_q == ST_LOAD);
  a_out_not_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(out_valid && in_ready));

endmodule
