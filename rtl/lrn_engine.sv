`timescale 1ps/1ps
// lrn_engine: local response normalisation across feature maps.
//
// For every element (c, y, x) it sums the squares of the N values at the same
// position in channels c-N/2 .. c+N/2 (those that exist) and writes
//   out = a / (K + sumsq * 2^-ALPHA_SHIFT)
// in Q8.8. The normalisation across feature maps follows the benchmark. The
// constants (window N = 5, K = 2, alpha about 1.5e-5 per term, as the
// published ZFNet/AlexNet layers use) and the exponent beta = 1, chosen so a
// single divider does the work where the published layers use beta = 0.75,
// are this design's choices. The reads run one per clock; the division is
// combinational in the write cycle.
//
// Interface: start/cfg/busy/done as in conv_engine; feature reads have one
// cycle of latency; results leave on wr_en/wr_addr/wr_data. Timing: each
// element takes N + 2 cycles.
module lrn_engine
  import zfnet_pkg::*;
#(
  parameter int unsigned FAW         = 21,
  parameter int unsigned N           = 5,
  parameter int unsigned K           = 2,
  parameter int unsigned ALPHA_SHIFT = 16
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
  logic [DIM_W-1:0] y, x;
  logic [3:0]       j;             // tap index 0..N-1
  logic [39:0]      sumsq;
  data_t            center;
  logic             p_tap, p_center;

  // Channel of tap j: c - N/2 + j.
  logic signed [CH_W+1:0] cc;
  logic                   in_range;
  assign cc       = $signed({2'b0, c}) + $signed({{(CH_W-2){1'b0}}, j}) - (CH_W+2)'(N / 2);
  assign in_range = (cc >= 0) && (cc < $signed({2'b0, cfg.cin}));

  logic last_out;
  assign last_out = (x == cfg.w - 1'b1) && (y == cfg.h - 1'b1) && (c == cfg.cin - 1'b1);

  always_comb begin
    f_raddr = '0;
    if (state == S_READ && in_range)
      f_raddr = FAW'((32'(cc) * 32'(cfg.h) + 32'(y)) * 32'(cfg.w) + 32'(x));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      c        <= '0;
      y        <= '0;
      x        <= '0;
      j        <= '0;
      sumsq    <= '0;
      center   <= '0;
      p_tap    <= 1'b0;
      p_center <= 1'b0;
    end else begin
      if (p_tap)    sumsq  <= sumsq + 40'(32'($signed(f_rdata) * $signed(f_rdata)));
      if (p_center) center <= f_rdata;
      p_tap    <= 1'b0;
      p_center <= 1'b0;

      unique case (state)
        S_IDLE: if (start) begin
          c     <= '0;
          y     <= '0;
          x     <= '0;
          j     <= '0;
          sumsq <= '0;
          state <= S_READ;
        end
        S_READ: begin
          p_tap    <= in_range;
          p_center <= (j == 4'(N / 2));
          j        <= j + 4'd1;
          if (j == 4'(N - 1)) begin
            j     <= '0;
            state <= S_DRAIN;
          end
        end
        S_DRAIN: state <= S_WRITE;
        S_WRITE: begin
          sumsq <= '0;
          if (last_out) begin
            state <= S_IDLE;
          end else begin
            state <= S_READ;
            if (x == cfg.w - 1'b1) begin
              x <= '0;
              if (y == cfg.h - 1'b1) begin
                y <= '0;
                c <= c + 1'b1;
              end else begin
                y <= y + 1'b1;
              end
            end else begin
              x <= x + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Denominator in Q8.8: K + sumsq (Q16.16) * 2^-ALPHA_SHIFT.
  logic signed [40:0] den, num, quo;
  assign den = 41'(K << FRAC) + $signed({1'b0, sumsq >> (FRAC + ALPHA_SHIFT)});
  assign num = 41'(center) <<< FRAC;
  assign quo = num / den;

  assign wr_en   = (state == S_WRITE);
  assign wr_addr = FAW'((32'(c) * 32'(cfg.h) + 32'(y)) * 32'(cfg.w) + 32'(x));
  assign wr_data = (quo > 41'sd32767) ? 16'sh7fff : (quo < -41'sd32768) ? 16'sh8000 : data_t'(quo);
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_WRITE) && last_out;

endmodule
