`timescale 1ps/1ps
// zfnet_pkg: data format, stage descriptors and the ZFNet layer table.
//
// Every value the network moves is a 16-bit signed fixed-point number with 8
// fraction bits (the 16-bit width follows the benchmark; the Q8.8 split is this
// design's choice). The network is executed as a list of stages. A stage is one
// pass of one engine over a feature map held in an on-chip buffer: a
// convolution (fully-connected layers are convolutions whose kernel covers the
// whole input), a 3x3 stride-2 max pooling, a normalisation across feature
// maps, or the final classification. Feature maps are stored channel-major,
// address = (c*H + y)*W + x. The convolution engine computes LANES output
// channels at once, so the weight store is organised in words of LANES
// weights: for each group of LANES output channels, one word per (ci, ky, kx)
// in that order, lane l holding the weight of channel group*LANES + l. The
// bias words follow, one per group. Lanes beyond the last channel are unused.
//
// The layer shapes after the first one (kernel sizes, strides, padding and the
// channel counts of layers 2 to 8) are those of the published ZFNet; the text
// describing this design gives only the input (224x224), the 96 first-layer
// filters, the 3x3 stride-2 pooling and the 55x55 map it yields.
package zfnet_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned FRAC   = 8;
  localparam int unsigned ACC_W  = 48;
  localparam int unsigned LANES  = 16;   // output channels computed in parallel
  localparam int unsigned W_AW   = 26;   // weight word address
  localparam int unsigned DIM_W  = 8;    // height/width up to 255
  localparam int unsigned CH_W   = 13;   // channels up to 8191

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef data_t [LANES-1:0]        wword_t;   // one weight store word

  typedef enum logic [1:0] {
    OP_CONV   = 2'd0,
    OP_POOL   = 2'd1,
    OP_LRN    = 2'd2,
    OP_SOFTMAX = 2'd3
  } op_e;

  typedef struct packed {
    op_e               op;
    logic              relu;
    logic [CH_W-1:0]   cin;     // input channels
    logic [DIM_W-1:0]  h;       // input height
    logic [DIM_W-1:0]  w;       // input width
    logic [3:0]        k;       // kernel size
    logic [1:0]        stride;
    logic [1:0]        pad;
    logic [CH_W-1:0]   cout;    // output channels
    logic [DIM_W-1:0]  oh;      // output height
    logic [DIM_W-1:0]  ow;      // output width
    logic [W_AW-1:0]   w_base;  // first weight of the layer
    logic [W_AW-1:0]   b_base;  // first bias of the layer
  } stage_t;

  localparam int unsigned ZF_STAGES = 14;
  typedef stage_t [ZF_STAGES-1:0] zf_table_t;

  function automatic int unsigned groups(int unsigned cout);
    return (cout + LANES - 1) / LANES;
  endfunction

  // Convolution stage; w_next returns the first weight address after it.
  function automatic stage_t conv_stage(int unsigned cin, int unsigned h, int unsigned w,
                                        int unsigned k, int unsigned s, int unsigned p,
                                        int unsigned cout, bit relu_en,
                                        int unsigned w_base);
    stage_t st;
    st        = '0;
    st.op     = OP_CONV;
    st.relu   = relu_en;
    st.cin    = CH_W'(cin);
    st.h      = DIM_W'(h);
    st.w      = DIM_W'(w);
    st.k      = 4'(k);
    st.stride = 2'(s);
    st.pad    = 2'(p);
    st.cout   = CH_W'(cout);
    st.oh     = DIM_W'((h + 2*p - k) / s + 1);
    st.ow     = DIM_W'((w + 2*p - k) / s + 1);
    st.w_base = W_AW'(w_base);
    st.b_base = W_AW'(w_base + groups(cout)*cin*k*k);
    return st;
  endfunction

  function automatic int unsigned w_next(stage_t st);
    return int'(st.b_base) + groups(int'(st.cout));
  endfunction

  // 3x3 stride-2 pooling; a window at the bottom/right edge is clipped.
  function automatic stage_t pool_stage(int unsigned c, int unsigned h, int unsigned w);
    stage_t st;
    st        = '0;
    st.op     = OP_POOL;
    st.cin    = CH_W'(c);
    st.cout   = CH_W'(c);
    st.h      = DIM_W'(h);
    st.w      = DIM_W'(w);
    st.k      = 4'd3;
    st.stride = 2'd2;
    st.oh     = DIM_W'((h - 2) / 2 + 1);
    st.ow     = DIM_W'((w - 2) / 2 + 1);
    return st;
  endfunction

  function automatic stage_t lrn_stage(int unsigned c, int unsigned h, int unsigned w);
    stage_t st;
    st      = '0;
    st.op   = OP_LRN;
    st.cin  = CH_W'(c);
    st.cout = CH_W'(c);
    st.h    = DIM_W'(h);
    st.w    = DIM_W'(w);
    st.oh   = DIM_W'(h);
    st.ow   = DIM_W'(w);
    return st;
  endfunction

  // Classification over n scores stored at addresses 0..n-1.
  function automatic stage_t softmax_stage(int unsigned n);
    stage_t st;
    st      = '0;
    st.op   = OP_SOFTMAX;
    st.cin  = CH_W'(n);
    st.cout = CH_W'(n);
    st.h    = 8'd1;
    st.w    = 8'd1;
    st.oh   = 8'd1;
    st.ow   = 8'd1;
    return st;
  endfunction

  // The ZFNet stage list: 224x224x3 input, five convolutional layers, three
  // fully-connected layers and the classifier. Element 0 runs first.
  function automatic zf_table_t zfnet_stages();
    zf_table_t t;
    int unsigned wb;
    wb    = 0;
    t[0]  = conv_stage(3,   224, 224, 7, 2, 1, 96,   1'b1, wb); wb = w_next(t[0]);
    t[1]  = pool_stage(96,  110, 110);
    t[2]  = lrn_stage (96,  55,  55);
    t[3]  = conv_stage(96,  55,  55,  5, 2, 0, 256,  1'b1, wb); wb = w_next(t[3]);
    t[4]  = pool_stage(256, 26,  26);
    t[5]  = lrn_stage (256, 13,  13);
    t[6]  = conv_stage(256, 13,  13,  3, 1, 1, 384,  1'b1, wb); wb = w_next(t[6]);
    t[7]  = conv_stage(384, 13,  13,  3, 1, 1, 384,  1'b1, wb); wb = w_next(t[7]);
    t[8]  = conv_stage(384, 13,  13,  3, 1, 1, 256,  1'b1, wb); wb = w_next(t[8]);
    t[9]  = pool_stage(256, 13,  13);
    t[10] = conv_stage(256, 6,   6,   6, 1, 0, 4096, 1'b1, wb); wb = w_next(t[10]);
    t[11] = conv_stage(4096, 1,  1,   1, 1, 0, 4096, 1'b1, wb); wb = w_next(t[11]);
    t[12] = conv_stage(4096, 1,  1,   1, 1, 0, 1000, 1'b0, wb);
    t[13] = softmax_stage(1000);
    return t;
  endfunction

  // Saturate an accumulator holding a value with 2*FRAC fraction bits to data_t.
  function automatic data_t sat_q(acc_t a);
    acc_t s;
    s = a >>> FRAC;
    if (s > acc_t'(32767))  return 16'sh7fff;
    if (s < -acc_t'(32768)) return 16'sh8000;
    return data_t'(s);
  endfunction

endpackage
