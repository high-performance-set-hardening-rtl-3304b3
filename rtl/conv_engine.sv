`timescale 1ps/1ps
// conv_engine: convolution and fully-connected layer engine.
//
// For every output element (co, oy, ox) it computes
//   bias[co] + sum over ci, ky, kx of w[co][ci][ky][kx] * in[ci][oy*S+ky-P][ox*S+kx-P]
// saturates the result back to the 16-bit Q8.8 format, optionally rectifies
// it (relu) and writes it to the output buffer. Taps that fall in the zero
// padding contribute nothing. A fully-connected layer is run as a convolution
// whose kernel covers the whole input map, so one engine executes all eight
// ZFNet layers. The function (convolution, rectification, fully-connected
// layers, 16-bit data) follows the benchmark; the organisation below and the
// fixed-point format are this design's choices.
//
// Organisation: LANES output channels (a group) are computed at once. Each
// clock one input value is read and multiplied by the LANES weights of one
// weight-store word, one multiply-accumulate per lane. The loop order is
// group, oy, ox, then ci, ky, kx. When the taps of a position are done, the
// LANES results are saturated, rectified and captured in an output register
// bank, from which a writer drains them one per clock while the next position
// accumulates. If the writer is still busy the engine waits (only possible
// when a position has fewer than LANES taps).
//
// Interface: start (one-cycle pulse; cfg must stay stable until done), done
// (one-cycle pulse, the clock after the last write), busy. Feature reads
// f_raddr -> f_rdata and weight reads w_raddr -> w_rdata (one word of LANES
// weights) both have one cycle of latency. Results leave on
// wr_en/wr_addr/wr_data. Timing: each position of each group takes
// K*K*Cin + 3 clocks (bias fetch, taps, pipeline drain, capture).
module conv_engine
  import zfnet_pkg::*;
#(
  parameter int unsigned FAW = 21
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  stage_t              cfg,
  output logic                busy,
  output logic                done,
  output logic [FAW-1:0]      f_raddr,
  input  data_t               f_rdata,
  output logic [W_AW-1:0]     w_raddr,
  input  wword_t              w_rdata,
  output logic                wr_en,
  output logic [FAW-1:0]      wr_addr,
  output data_t               wr_data
);

  typedef enum logic [2:0] {S_IDLE, S_BIAS, S_MAC, S_DRAIN, S_CAPT, S_FLUSH} state_e;
  state_e state;

  localparam int unsigned LW = $clog2(LANES) + 1;

  logic [CH_W-1:0]  g;                 // first channel of the current group
  logic [CH_W-1:0]  ci;
  logic [DIM_W-1:0] oy, ox;
  logic [3:0]       ky, kx;
  logic [W_AW-1:0]  w_ptr, w_grp_base, b_ptr;
  acc_t             acc [LANES];
  logic             p_bias, p_term;    // what the read data of this cycle is

  // Input coordinates of the current tap.
  logic signed [DIM_W+5:0] iy, ix;
  logic                    in_range;
  assign iy = $signed({6'b0, oy}) * $signed({12'b0, cfg.stride}) + $signed({10'b0, ky})
            - $signed({12'b0, cfg.pad});
  assign ix = $signed({6'b0, ox}) * $signed({12'b0, cfg.stride}) + $signed({10'b0, kx})
            - $signed({12'b0, cfg.pad});
  assign in_range = (iy >= 0) && (iy < $signed({6'b0, cfg.h})) &&
                    (ix >= 0) && (ix < $signed({6'b0, cfg.w}));

  logic last_tap, last_pos, last_grp;
  assign last_tap = (kx == cfg.k - 4'd1) && (ky == cfg.k - 4'd1) && (ci == cfg.cin - 1'b1);
  assign last_pos = (ox == cfg.ow - 1'b1) && (oy == cfg.oh - 1'b1);
  assign last_grp = (32'(g) + LANES >= 32'(cfg.cout));

  // Output register bank and its writer.
  data_t            res [LANES];
  data_t            res_next [LANES];
  logic             wr_busy;
  logic [LW-1:0]    wr_lane, wr_nlanes;
  logic [CH_W-1:0]  wr_g;
  logic [DIM_W-1:0] wr_oy, wr_ox;

  always_comb begin
    f_raddr = '0;
    w_raddr = w_ptr;
    if (state == S_BIAS) w_raddr = b_ptr;
    if (state == S_MAC && in_range)
      f_raddr = FAW'((32'(ci) * 32'(cfg.h) + 32'(iy)) * 32'(cfg.w) + 32'(ix));
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    relu u_relu (.en(cfg.relu), .x(sat_q(acc[l])), .y(res_next[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      g          <= '0;
      ci         <= '0;
      oy         <= '0;
      ox         <= '0;
      ky         <= '0;
      kx         <= '0;
      w_ptr      <= '0;
      w_grp_base <= '0;
      b_ptr      <= '0;
      p_bias     <= 1'b0;
      p_term     <= 1'b0;
      wr_busy    <= 1'b0;
      wr_lane    <= '0;
      wr_nlanes  <= '0;
      wr_g       <= '0;
      wr_oy      <= '0;
      wr_ox      <= '0;
      for (int l = 0; l < LANES; l++) begin
        acc[l] <= '0;
        res[l] <= '0;
      end
    end else begin
      // Accumulate the data requested in the previous cycle.
      for (int l = 0; l < LANES; l++) begin
        if (p_bias)      acc[l] <= acc_t'(w_rdata[l]) <<< FRAC;
        else if (p_term) acc[l] <= acc[l] + acc_t'(f_rdata) * acc_t'(w_rdata[l]);
      end
      p_bias <= 1'b0;
      p_term <= 1'b0;

      // Writer: one result per clock.
      if (wr_busy) begin
        wr_lane <= wr_lane + 1'b1;
        if (wr_lane == wr_nlanes - 1'b1) wr_busy <= 1'b0;
      end

      unique case (state)
        S_IDLE: if (start) begin
          g          <= '0;
          oy         <= '0;
          ox         <= '0;
          w_grp_base <= cfg.w_base;
          b_ptr      <= cfg.b_base;
          state      <= S_BIAS;
        end
        S_BIAS: begin
          p_bias <= 1'b1;
          ci     <= '0;
          ky     <= '0;
          kx     <= '0;
          w_ptr  <= w_grp_base;
          state  <= S_MAC;
        end
        S_MAC: begin
          p_term <= in_range;
          w_ptr  <= w_ptr + 1'b1;
          if (kx == cfg.k - 4'd1) begin
            kx <= '0;
            if (ky == cfg.k - 4'd1) begin
              ky <= '0;
              ci <= ci + 1'b1;
            end else begin
              ky <= ky + 4'd1;
            end
          end else begin
            kx <= kx + 4'd1;
          end
          if (last_tap) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_CAPT;
        S_CAPT: if (!wr_busy || (wr_lane == wr_nlanes - 1'b1)) begin
          // Hand the results to the writer.
          for (int l = 0; l < LANES; l++) res[l] <= res_next[l];
          wr_busy   <= 1'b1;
          wr_lane   <= '0;
          wr_nlanes <= last_grp ? LW'(32'(cfg.cout) - 32'(g)) : LW'(LANES);
          wr_g      <= g;
          wr_oy     <= oy;
          wr_ox     <= ox;
          // Next position.
          if (last_pos && last_grp) begin
            state <= S_FLUSH;
          end else begin
            state <= S_BIAS;
            if (ox == cfg.ow - 1'b1) begin
              ox <= '0;
              if (oy == cfg.oh - 1'b1) begin
                oy         <= '0;
                g          <= g + CH_W'(LANES);
                w_grp_base <= w_ptr;
                b_ptr      <= b_ptr + 1'b1;
              end else begin
                oy <= oy + 1'b1;
              end
            end else begin
              ox <= ox + 1'b1;
            end
          end
        end
        S_FLUSH: if (!wr_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign wr_en   = wr_busy;
  assign wr_addr = FAW'(((32'(wr_g) + 32'(wr_lane)) * 32'(cfg.oh) + 32'(wr_oy)) * 32'(cfg.ow)
                        + 32'(wr_ox));
  assign wr_data = res[wr_lane[LW-2:0]];
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_FLUSH) && !wr_busy;

endmodule
