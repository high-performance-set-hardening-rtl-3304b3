`timescale 1ps/1ps
// zfnet_top: ZFNet CNN inference circuit with a selectively SET-hardened
// write-back register.
//
// The network (224x224x3 input, five convolutional layers with rectification,
// 3x3 stride-2 max pooling and cross-map normalisation, three fully-connected
// layers and the final soft-max classification) runs as a sequence of stages. A
// layer_sequencer starts one engine per stage (conv_engine for convolutions
// and fully-connected layers, maxpool_engine, lrn_engine, softmax_engine);
// the engine reads the current feature buffer (fmap_ram) and its results go
// through one shared write-back register into the other buffer. Weights and
// biases (62.4 M values) are read from an external weight store through the
// w_raddr/w_rdata port, one word of LANES = 16 weights per read.
//
// The write-back register is where the selective SET hardening is applied:
// its bits are stmr_ff cells, and those the SET analysis marks as sensitive
// (expected transient wider than 450 ps, WB_PULSE_PS) get a set_filter sized
// to the expected width, capped at 300 ps. The sensitivity profile is an
// assumed example; the threshold and the cap follow the hardening method. The
// rest of the datapath uses plain flip-flops in this model. The filters make
// this module a timed behavioural model; every other block is synthesizable.
//
// Interface:
//   load_we/load_addr/load_data  write the input image into buffer 0 (idle only)
//   start, busy, done            run one inference; done pulses at the end
//   w_raddr -> w_rdata           weight store read (16 weights), one cycle latency
//   rd_addr -> rd_data           read the buffer holding the last map (idle;
//                                after an inference: the probabilities),
//                                one cycle latency
//   class_idx, class_score       classification result, valid after done
//   stage_idx                    stage being executed
//   set_strike                   transient injected on the write-back D lines
//                                (modelling input, tie to zero)
module zfnet_top
  import zfnet_pkg::*;
#(
  parameter int unsigned NUM_STAGES    = ZF_STAGES,
  parameter stage_t [NUM_STAGES-1:0] STAGES = zfnet_stages(),
  parameter int unsigned FMAP_WORDS    = 1161600,
  parameter int unsigned WB_PULSE_PS [DATA_W] =
    '{0, 0, 0, 0, 300, 400, 455, 460, 470, 480, 500, 520, 540, 560, 580, 620},
  parameter int unsigned MAX_FILTER_PS = set_pkg::MAX_FILTER_PS,
  parameter int unsigned T_INV_PS      = set_pkg::T_INV_PS,
  localparam int unsigned FAW = $clog2(FMAP_WORDS),
  localparam int unsigned IW  = (NUM_STAGES > 1) ? $clog2(NUM_STAGES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_we,
  input  logic [FAW-1:0]    load_addr,
  input  data_t             load_data,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [W_AW-1:0]   w_raddr,
  input  wword_t            w_rdata,
  input  logic [FAW-1:0]    rd_addr,
  output data_t             rd_data,
  output logic [CH_W-1:0]   class_idx,
  output data_t             class_score,
  output logic [IW-1:0]     stage_idx,
  input  logic [DATA_W-1:0] set_strike
);

  // ---------------------------------------------------------------- control
  stage_t     stage;
  logic       src_bank;
  logic [3:0] eng_start, eng_done;

  layer_sequencer #(.NUM_STAGES(NUM_STAGES), .STAGES(STAGES)) u_seq (
    .clk, .rst_n, .start, .busy, .done, .stage, .stage_idx, .src_bank,
    .eng_start, .eng_done
  );

  // ---------------------------------------------------------------- engines
  logic [FAW-1:0] c_raddr, p_raddr, l_raddr, a_raddr;
  logic           c_we, p_we, l_we, a_we;
  logic [FAW-1:0] c_waddr, p_waddr, l_waddr, a_waddr;
  data_t          c_wdata, p_wdata, l_wdata, a_wdata;
  data_t          src_rdata;
  logic           c_busy, p_busy, l_busy, a_busy;

  conv_engine #(.FAW(FAW)) u_conv (
    .clk, .rst_n, .start(eng_start[OP_CONV]), .cfg(stage), .busy(c_busy),
    .done(eng_done[OP_CONV]), .f_raddr(c_raddr), .f_rdata(src_rdata),
    .w_raddr, .w_rdata, .wr_en(c_we), .wr_addr(c_waddr), .wr_data(c_wdata)
  );

  maxpool_engine #(.FAW(FAW)) u_pool (
    .clk, .rst_n, .start(eng_start[OP_POOL]), .cfg(stage), .busy(p_busy),
    .done(eng_done[OP_POOL]), .f_raddr(p_raddr), .f_rdata(src_rdata),
    .wr_en(p_we), .wr_addr(p_waddr), .wr_data(p_wdata)
  );

  lrn_engine #(.FAW(FAW)) u_lrn (
    .clk, .rst_n, .start(eng_start[OP_LRN]), .cfg(stage), .busy(l_busy),
    .done(eng_done[OP_LRN]), .f_raddr(l_raddr), .f_rdata(src_rdata),
    .wr_en(l_we), .wr_addr(l_waddr), .wr_data(l_wdata)
  );

  softmax_engine #(.FAW(FAW)) u_softmax (
    .clk, .rst_n, .start(eng_start[OP_SOFTMAX]), .cfg(stage), .busy(a_busy),
    .done(eng_done[OP_SOFTMAX]), .f_raddr(a_raddr), .f_rdata(src_rdata),
    .wr_en(a_we), .wr_addr(a_waddr), .wr_data(a_wdata), .class_idx, .class_score
  );

  // Only one engine runs at a time.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({c_busy, p_busy, l_busy, a_busy}))
    else $error("zfnet_top: two engines active at once");

  // -------------------------------------------------- hardened write-back
  logic           eng_we;
  logic [FAW-1:0] eng_waddr;
  data_t          eng_wdata;
  always_comb begin
    eng_we    = c_we | p_we | l_we | a_we;
    eng_waddr = c_we ? c_waddr : p_we ? p_waddr : l_we ? l_waddr : a_waddr;
    eng_wdata = c_we ? c_wdata : p_we ? p_wdata : l_we ? l_wdata : a_wdata;
  end

  logic           wb_we;
  logic [FAW-1:0] wb_addr;
  logic [DATA_W-1:0] wb_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_we   <= 1'b0;
      wb_addr <= '0;
    end else begin
      wb_we   <= eng_we;
      wb_addr <= eng_waddr;
    end
  end

  sel_hardened_reg #(
    .WIDTH        (DATA_W),
    .PULSE_PS     (WB_PULSE_PS),
    .MAX_FILTER_PS(MAX_FILTER_PS),
    .T_INV_PS     (T_INV_PS)
  ) u_wb_reg (
    .clk, .rst_n, .en(eng_we), .d(eng_wdata), .strike(set_strike), .q(wb_data)
  );

  // ------------------------------------------------------- feature buffers
  logic [FAW-1:0] eng_raddr;
  assign eng_raddr = c_raddr | p_raddr | l_raddr | a_raddr;

  logic [1:0]     bank_we;
  logic [FAW-1:0] bank_waddr [2];
  data_t          bank_wdata [2];
  logic [FAW-1:0] bank_raddr [2];
  logic [DATA_W-1:0] bank_rdata [2];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    // Write: the write-back register into the destination buffer, or the
    // host loading the image into buffer 0 while idle.
    always_comb begin
      if (busy) begin
        bank_we[b]    = wb_we && (src_bank != 1'(b));
        bank_waddr[b] = wb_addr;
        bank_wdata[b] = wb_data;
      end else begin
        bank_we[b]    = load_we && (b == 0);
        bank_waddr[b] = load_addr;
        bank_wdata[b] = load_data;
      end
      bank_raddr[b] = busy ? eng_raddr : rd_addr;
    end

    fmap_ram #(.DEPTH(FMAP_WORDS), .DATA_W(DATA_W)) u_ram (
      .clk, .we(bank_we[b]), .waddr(bank_waddr[b]), .wdata(bank_wdata[b]),
      .raddr(bank_raddr[b]), .rdata(bank_rdata[b])
    );
  end

  assign src_rdata = bank_rdata[src_bank];
  assign rd_data   = bank_rdata[src_bank];

endmodule
