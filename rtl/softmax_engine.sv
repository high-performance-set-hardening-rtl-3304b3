`timescale 1ps/1ps
// softmax_engine: final classification stage. It turns the n class scores of
// the last fully-connected layer (addresses 0 .. n-1 of the source buffer,
// Q8.8) into soft-max probabilities, written to addresses 0 .. n-1 of the
// destination buffer, and reports the winning class.
//
// It makes three passes over the scores, one score per clock:
//   1. maximum: the largest score z_max and its index (a tie goes to the
//      lower index). These are class_score and class_idx.
//   2. sum: S = sum of e_i, where e_i = exp(z_i - z_max) in Q0.16 (1.0 =
//      65536). Subtracting z_max keeps every e_i in (0, 1].
//   3. output: p_i = e_i * 2^15 / S, saturated to 0x7FFF, written as Q1.15.
// exp(x) is computed as 2^(x log2 e): x log2 e is split into an integer part
// k <= 0 and a fraction f in [0, 1); 2^f is approximated by the quadratic
// 1 + f (0.6565 + 0.3435 f), exact at both ends and within 0.3 % between; the
// result is shifted right by -k. The division is combinational.
//
// Interface: start/cfg/busy/done and the one-cycle-latency feature read as in
// the other engines (cfg.cin is n); wr_en/wr_addr/wr_data go to the
// write-back path. class_idx and class_score are valid from the end of pass 1
// until the next start. Timing: 3n + 2 clocks, start to done.
//
// That the last layer is a soft-max follows the document; the three-pass
// organisation, the exponential approximation and the Q1.15 output format are
// this design's choices.
module softmax_engine
  import zfnet_pkg::*;
#(
  parameter int unsigned FAW = 21
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  stage_t          cfg,
  output logic            busy,
  output logic            done,
  output logic [FAW-1:0]  f_raddr,
  input  data_t           f_rdata,
  output logic            wr_en,
  output logic [FAW-1:0]  wr_addr,
  output data_t           wr_data,
  output logic [CH_W-1:0] class_idx,
  output data_t           class_score
);

  localparam int LOG2E_Q14 = 23637;    // log2(e) * 2^14

  typedef enum logic [1:0] {S_IDLE, S_READ, S_DRAIN, S_DONE} state_e;
  state_e state;

  logic [1:0]      pass, p_pass;      // 0: maximum, 1: sum, 2: output
  logic [CH_W-1:0] i, p_i;
  logic            p_tap;
  logic [31:0]     sum;

  assign f_raddr = (state == S_READ) ? FAW'(i) : '0;

  // ------------------------------------------------- exp(z - z_max), Q0.16
  logic signed [16:0] diff;           // z - z_max, Q8.8, <= 0
  logic signed [35:0] t_full;
  logic signed [21:0] t;              // (z - z_max) log2 e, Q8.8
  logic signed [13:0] k;              // integer part (floor), <= 0
  logic        [15:0] xs;             // fraction, Q0.16
  logic        [31:0] inner, mant;    // 2^fraction, Q1.16
  logic        [16:0] e_val;

  always_comb begin
    diff   = 17'(f_rdata) - 17'(class_score);
    t_full = 36'(diff) * 36'(LOG2E_Q14);
    t      = 22'(t_full >>> 14);
    k      = 14'(t >>> 8);
    xs     = {t[7:0], 8'h00};
    inner  = 32'd43024 + ((32'd22512 * 32'(xs)) >> 16);
    mant   = 32'd65536 + ((32'(xs) * inner) >> 16);
    if (k < -14'sd17) e_val = '0;
    else              e_val = 17'(mant >> (-k));
  end

  // ---------------------------------------------- p = e * 2^15 / S, Q1.15
  logic [31:0] quot;
  always_comb begin
    quot = (sum == '0) ? '0 : ({e_val, 15'd0} / sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pass        <= '0;
      p_pass      <= '0;
      i           <= '0;
      p_i         <= '0;
      p_tap       <= 1'b0;
      sum         <= '0;
      class_idx   <= '0;
      class_score <= 16'sh8000;
      wr_en       <= 1'b0;
      wr_addr     <= '0;
      wr_data     <= '0;
    end else begin
      wr_en <= 1'b0;
      if (p_tap) begin
        unique case (p_pass)
          2'd0: if (p_i == '0 || f_rdata > class_score) begin
            class_score <= f_rdata;
            class_idx   <= p_i;
          end
          2'd1: sum <= sum + 32'(e_val);
          default: begin
            wr_en   <= 1'b1;
            wr_addr <= FAW'(p_i);
            wr_data <= (quot > 32'h7FFF) ? 16'sh7FFF : data_t'(quot[15:0]);
          end
        endcase
      end
      p_tap <= 1'b0;

      unique case (state)
        S_IDLE: if (start) begin
          i     <= '0;
          pass  <= '0;
          sum   <= '0;
          state <= S_READ;
        end
        S_READ: begin
          p_tap  <= 1'b1;
          p_i    <= i;
          p_pass <= pass;
          if (i == cfg.cin - 1'b1) begin
            i    <= '0;
            pass <= pass + 1'b1;
            if (pass == 2'd2) state <= S_DRAIN;
          end else begin
            i <= i + 1'b1;
          end
        end
        S_DRAIN: state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

endmodule
