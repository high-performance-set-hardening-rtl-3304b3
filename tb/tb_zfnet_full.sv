`timescale 1ps/1ps
// tb_zfnet_full: one complete ZFNet inference on the circuit at its default
// size: a 224x224x3 image, five convolutional layers, three fully-connected
// layers and the soft-max classification, with weights from a modelled weight store.
//
// The testbench mirrors every write-back into its own copy of the current
// and the previous map. For every stage it recomputes a sample of the
// outputs (every 997th address, plus the first and last) from the previous
// map with the reference arithmetic, checks the number of writes, and at the
// end checks the class and all 1000 probabilities (within 4 LSB + 1 %)
// against the mirrored last-layer scores, and the inference cycle count against the per-stage formulas.
module tb_zfnet_full;
  import zfnet_pkg::*;
  import tb_ref_pkg::*;

  localparam int PERIOD = 12724;
  localparam zf_table_t T = zfnet_stages();
  localparam int FAW = 21;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic load_we = 1'b0;
  logic [FAW-1:0] load_addr = '0, rd_addr = '0;
  data_t load_data = '0, rd_data, class_score;
  wword_t w_rdata;
  logic busy, done;
  logic [W_AW-1:0] w_raddr;
  logic [CH_W-1:0] class_idx;
  logic [3:0] stage_idx;

  zfnet_top dut (
    .clk, .rst_n, .load_we, .load_addr, .load_data, .start, .busy, .done,
    .w_raddr, .w_rdata, .rd_addr, .rd_data, .class_idx, .class_score, .stage_idx,
    .set_strike(16'h0000));

  always #(PERIOD/2) clk = ~clk;
  always_ff @(posedge clk) for (int l = 0; l < LANES; l++) w_rdata[l] <= data_t'(w_lane(int'(w_raddr), l));

  int prev_map [];
  int cur_map [];
  int writes = 0;
  int cur_stage = 0;

  int ih, iw;   // input map size of the stage being checked

  function automatic int in_at(int c, int y, int x);
    int v;
    v = 0;
    if (y >= 0 && x >= 0 && y < ih && x < iw) v = prev_map[(c*ih + y)*iw + x];
    return v;
  endfunction

  // Reference value of output element a of stage s, from prev_map.
  function automatic int ref_elem(stage_t s, int a);
    int oh, ow, c, oy, ox, r;
    oh = int'(s.oh);
    ow = int'(s.ow);
    c  = a / (oh*ow);
    oy = (a / ow) % oh;
    ox = a % ow;
    ih = int'(s.h);
    iw = int'(s.w);
    case (s.op)
      OP_CONV: begin
        longint acc;
        int k, cin;
        k = int'(s.k);
        cin = int'(s.cin);
        acc = longint'(w_lane(int'(s.b_base) + c / LANES, c % LANES)) * 256;
        for (int ci = 0; ci < cin; ci++)
          for (int ky = 0; ky < k; ky++)
            for (int kx = 0; kx < k; kx++)
              begin
                int iy, ix, fv, wv;
                iy = oy*int'(s.stride) + ky - int'(s.pad);
                ix = ox*int'(s.stride) + kx - int'(s.pad);
                fv = in_at(ci, iy, ix);
                wv = w_of(int'(s.w_base), cin, k, c, ci, ky, kx);
                acc += longint'(fv) * longint'(wv);
              end
        r = sat16(acc >>> 8);
        if (s.relu && r < 0) r = 0;
      end
      OP_POOL: begin
        r = -32768;
        for (int y = 2*oy; y < 2*oy + 3 && y < int'(s.h); y++)
          for (int x = 2*ox; x < 2*ox + 3 && x < int'(s.w); x++)
            begin
              int v;
              v = in_at(c, y, x);
              if (v > r) r = v;
            end
      end
      default: begin   // OP_LRN
        longint sq;
        sq = 0;
        for (int cc = c - 2; cc <= c + 2; cc++)
          if (cc >= 0 && cc < int'(s.cin)) begin
            longint v;
            v = longint'(in_at(cc, oy, ox));
            sq += v * v;
          end
        begin
          int a0;
          a0 = in_at(c, oy, ox);
          r = sat16(longint'(a0) * 256 / (512 + (sq >> 24)));
        end
      end
    endcase
    return r;
  endfunction

  always @(negedge clk) begin
    if (dut.wb_we && dut.busy) begin
      writes++;
      cur_map[dut.wb_addr] = int'($signed(dut.wb_data));
    end
  end

  task automatic check_stage(int st);
    stage_t s;
    int n;
    s = T[st];
    n = int'(s.cout) * int'(s.oh) * int'(s.ow);
    checks++;
    if (writes != n) begin
      failures++; $display("FAIL stage %0d: %0d writes, expected %0d", st, writes, n);
    end
    for (int a = 0; a < n; a += ((a + 997 < n) || (a == n - 1)) ? 997 : (n - 1 - a)) begin
      int e;
      e = ref_elem(s, a);
      checks++;
      if (cur_map[a] != e) begin
        failures++; $display("FAIL stage %0d addr %0d: got %0d expected %0d", st, a, cur_map[a], e);
      end
      if (a == n - 1) break;
    end
  endtask

  function automatic longint expected_cycles();
    longint c;
    c = 0;
    for (int i = 0; i < ZF_STAGES; i++) begin
      longint n;
      n = longint'(T[i].cout) * T[i].oh * T[i].ow;
      case (T[i].op)
        OP_CONV:   c += conv_cycles(int'(T[i].k) * int'(T[i].k) * int'(T[i].cin),
                                    int'(T[i].oh) * int'(T[i].ow), int'(T[i].cout));
        OP_POOL:   c += n * 11;
        OP_LRN:    c += n * 7;
        OP_SOFTMAX: c += 3 * longint'(T[i].cin) + 2;
      endcase
      c += 4;
    end
    return c;
  endfunction

  initial begin
    longint cycles;
    int st;
    prev_map = new[1161600];
    cur_map  = new[1161600];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Image: 3 x 224 x 224, values in [-2, 2) in Q8.8.
    for (int i = 0; i < 3*224*224; i++) begin
      @(negedge clk);
      load_we = 1'b1;
      load_addr = FAW'(i);
      load_data = data_t'((w_hash(i + 32'h5000_0000) * 32));
      cur_map[i] = int'(load_data);
    end
    @(negedge clk) load_we = 1'b0;
    $display("image loaded");
    $fflush();
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    st = 0;
    prev_map = cur_map;
    writes = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
      if (int'(stage_idx) != st) begin
        $display("stage %0d done at cycle %0d (%0d writes)", st, cycles, writes);
        $fflush();
        check_stage(st);
        st = int'(stage_idx);
        prev_map = cur_map;
        writes = 0;
      end
    end
    @(negedge clk);
    begin
      int idx, best;
      int scores [], probs [];
      scores = new[1000];
      foreach (scores[i]) scores[i] = prev_map[i];
      ref_argmax(scores, 1000, idx, best);
      ref_softmax(scores, 1000, probs);
      checks++;
      if (writes != 1000) begin failures++; $display("FAIL soft-max: %0d writes", writes); end
      foreach (probs[i]) begin
        checks++;
        if (!prob_close(cur_map[i], probs[i])) begin
          failures++; $display("FAIL p[%0d] = %0d expected %0d", i, cur_map[i], probs[i]);
        end
      end
      checks++;
      if (int'(class_idx) != idx || int'(class_score) != best) begin
        failures++; $display("FAIL class %0d/%0d expected %0d/%0d", class_idx, class_score, idx, best);
      end
      $display("class %0d, score %0d, probability %0d / 32768", class_idx, class_score, cur_map[idx]);
    end
    checks++;
    if (cycles != expected_cycles()) begin
      failures++; $display("FAIL %0d cycles, expected %0d", cycles, expected_cycles());
    end
    $display("inference: %0d cycles (%0d ms at 78.59 MHz)", cycles, cycles * PERIOD / 1_000_000_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_500_000_000) @(negedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
