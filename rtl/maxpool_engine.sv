`timescale 1ps/1ps
// maxpool_engine: max pooling over K x K windows with stride S (3x3, stride 2
// in ZFNet) for every channel of a feature map.
//
// For every output element (c, oy, ox) it reads the window taps
// in[c][oy*S+ky][ox*S+kx] one per clock and keeps the largest. A window that
// runs over the bottom or right edge is clipped to the taps inside the map,
// which gives the 110 -> 55, 26 -> 13 and 13 -> 6 map sizes of ZFNet. The
// pooling rule follows the benchmark; the serial organisation and the edge
// clipping are this design's choices.
//
// Interface: start/cfg/busy/done as in conv_engine; feature reads have one
// cycle of latency; results leave on wr_en/wr_addr/wr_data. Timing: each
// output element takes K*K + 2 cycles.
module maxpool_engine
  import zfnet_pkg::*;
#(
  parameter int unsigned FAW = 21
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  stage_t         cfg,
  output logic           busy,
  output logic           done,
  output logic [FAW-1:0] f_raddr,
  input  data_t          f_rdata,
  output logic           wr_en,
  output logic [FAW-1:0] wr_addr,
  output data_t          wr_data
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_DRAIN, S_WRITE} state_e;
  state_e state;

  logic [CH_W-1:0]  c;
  logic [DIM_W-1:0] oy, ox;
  logic [3:0]       ky, kx;
  data_t            best;
  logic             p_tap;

  logic [DIM_W+5:0] iy, ix;
  logic             in_range;
  assign iy       = (DIM_W+6)'(oy) * (DIM_W+6)'(cfg.stride) + (DIM_W+6)'(ky);
  assign ix       = (DIM_W+6)'(ox) * (DIM_W+6)'(cfg.stride) + (DIM_W+6)'(kx);
  assign in_range = (iy < (DIM_W+6)'(cfg.h)) && (ix < (DIM_W+6)'(cfg.w));

  logic last_tap, last_out;
  assign last_tap = (kx == cfg.k - 4'd1) && (ky == cfg.k - 4'd1);
  assign last_out = (ox == cfg.ow - 1'b1) && (oy == cfg.oh - 1'b1) && (c == cfg.cout - 1'b1);

  always_comb begin
    f_raddr = '0;
    if (state == S_READ && in_range)
      f_raddr = FAW'((32'(c) * 32'(cfg.h) + 32'(iy)) * 32'(cfg.w) + 32'(ix));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      c     <= '0;
      oy    <= '0;
      ox    <= '0;
      ky    <= '0;
      kx    <= '0;
      best  <= 16'sh8000;
      p_tap <= 1'b0;
    end else begin
      if (p_tap && f_rdata > best) best <= f_rdata;
      p_tap <= 1'b0;

      unique case (state)
        S_IDLE: if (start) begin
          c     <= '0;
          oy    <= '0;
          ox    <= '0;
          ky    <= '0;
          kx    <= '0;
          best  <= 16'sh8000;
          state <= S_READ;
        end
        S_READ: begin
          p_tap <= in_range;
          if (kx == cfg.k - 4'd1) begin
            kx <= '0;
            ky <= ky + 4'd1;
          end else begin
            kx <= kx + 4'd1;
          end
          if (last_tap) begin
            ky    <= '0;
            state <= S_DRAIN;
          end
        end
        S_DRAIN: state <= S_WRITE;
        S_WRITE: begin
          best <= 16'sh8000;
          if (last_out) begin
            state <= S_IDLE;
          end else begin
            state <= S_READ;
            if (ox == cfg.ow - 1'b1) begin
              ox <= '0;
              if (oy == cfg.oh - 1'b1) begin
                oy <= '0;
                c  <= c + 1'b1;
              end else begin
                oy <= oy + 1'b1;
              end
            end else begin
              ox <= ox + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign wr_en   = (state == S_WRITE);
  assign wr_addr = FAW'((32'(c) * 32'(cfg.oh) + 32'(oy)) * 32'(cfg.ow) + 32'(ox));
  assign wr_data = best;
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_WRITE) && last_out;

endmodule
