`timescale 1ps/1ps
// layer_sequencer: walks the network's stage table and runs each stage on the
// engine it names, one stage at a time.
//
// The input image sits in feature buffer 0. Every stage that produces a map
// reads the current buffer and writes the other one, so the two buffers swap
// roles after each stage, the final soft-max included. After a stage's
// engine reports done the sequencer waits GAP cycles so the write-back
// register has written the last result before the next stage reads it. The
// order of the layers follows the benchmark; the table-driven control is this
// design's choice.
//
// Interface: start (pulse, accepted when idle), busy, done (pulse when the
// last stage ends), stage (descriptor of the running stage), stage_idx,
// src_bank (buffer the running stage reads; after done, the buffer holding the
// last map), eng_start[op] pulses the engine of op_e value op, eng_done[op]
// is that engine's done pulse.
module layer_sequencer
  import zfnet_pkg::*;
#(
  parameter int unsigned NUM_STAGES = ZF_STAGES,
  parameter stage_t [NUM_STAGES-1:0] STAGES = zfnet_stages(),
  parameter int unsigned GAP = 2,
  localparam int unsigned IW = (NUM_STAGES > 1) ? $clog2(NUM_STAGES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output stage_t        stage,
  output logic [IW-1:0] stage_idx,
  output logic          src_bank,
  output logic [3:0]    eng_start,
  input  logic [3:0]    eng_done
);

  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_WAIT, S_GAP} state_e;
  state_e state;
  logic [3:0] gap_cnt;

  assign stage = STAGES[stage_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      stage_idx <= '0;
      src_bank  <= 1'b0;
      gap_cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          stage_idx <= '0;
          src_bank  <= 1'b0;
          state     <= S_LAUNCH;
        end
        S_LAUNCH: state <= S_WAIT;
        S_WAIT: if (eng_done[stage.op]) begin
          gap_cnt <= 4'(GAP);
          state   <= S_GAP;
        end
        S_GAP: begin
          if (gap_cnt != 0) begin
            gap_cnt <= gap_cnt - 4'd1;
          end else begin
            src_bank <= ~src_bank;
            if (stage_idx == IW'(NUM_STAGES - 1)) begin
              state <= S_IDLE;
            end else begin
              stage_idx <= stage_idx + 1'b1;
              state     <= S_LAUNCH;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    eng_start = '0;
    if (state == S_LAUNCH) eng_start[stage.op] = 1'b1;
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_GAP) && (gap_cnt == 0) && (stage_idx == IW'(NUM_STAGES - 1));

endmodule
