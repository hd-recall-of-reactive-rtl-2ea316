// tb_amigos_inference: the length of the evaluated inference task at full
// size. 380 samples (the emotion data set after downsampling, 214 features
// each: 32 GSR, 77 ECG, 105 EEG) stream through the default design and all 378
// results are compared with the testbench's own model (sign-selected
// projection, binding, per-modality majority, 3-way majority, N-gram with
// cyclic right shifts, Hamming distance, lower class wins a tie). The
// recorded features are not available here, so feature values are random;
// class HVs are noisy copies of expected N-grams so that both labels of both
// tasks occur. Results are taken at once, so the run also checks the
// sustained rate of one sample per 105 clocks over the whole task.
module tb_amigos_inference;
  import hdc_pkg::*;
  localparam int unsigned D = HV_DIM, NG = NGRAM, FW = FEAT_W, NC = NUM_CLASSES;
  localparam int unsigned CH [3] = '{CH_GSR, CH_ECG, CH_EEG};
  localparam int unsigned MAXC = MEM_DEPTH;
  localparam int unsigned AW = $clog2(MAXC), CW = 1, DW = $clog2(D + 1);
  localparam int unsigned NS = 380;        // samples streamed

  logic clk = 0, rst_n = 0;
  logic mem_wr_en = 0;
  mem_sel_e mem_wr_sel = MEM_ITEM;
  logic [AW-1:0] mem_wr_addr = '0;
  logic [D-1:0] mem_wr_data = '0;
  logic am_wr_en = 0;
  am_task_e am_wr_task = TASK_AROUSAL;
  logic [CW-1:0] am_wr_class = '0;
  logic [D-1:0] am_wr_data = '0;
  logic feat_valid = 0, feat_ready;
  logic [2:0][FW-1:0] feat_data = '0;
  logic res_valid, res_ready = 0;
  logic [CW-1:0] res_arousal, res_valence;
  logic [DW-1:0] res_dist_arousal [NC], res_dist_valence [NC];

  hdc_fusion_top dut (.*);

  always #5 clk = ~clk;

  // ---- model state ----
  logic [D-1:0] im [MAXC], pp [MAXC], pn [MAXC];
  logic [FW-1:0] feat [NS][3][MAXC];
  logic [D-1:0] ngram_exp [NS];
  logic [D-1:0] cls_a [NC], cls_v [NC];
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_masked = 0, n_bubble = 0, n_stall = 0, n_warm = 0;
  int seen_a [NC], seen_v [NC];
  longint cyc = 0;

  always @(posedge clk) cyc++;

  function automatic logic [D-1:0] rnd_hv();
    logic [D-1:0] v;
    for (int i = 0; i < int'(D); i += 32) begin
      logic [31:0] w;
      w = $urandom;
      for (int b = 0; b < 32 && i + b < int'(D); b++) v[i+b] = w[b];
    end
    return v;
  endfunction

  function automatic logic [D-1:0] spatial_model(int s, int m);
    logic [D-1:0] r;
    for (int i = 0; i < int'(D); i++) begin
      int cnt;
      cnt = 0;
      for (int c = 0; c < int'(CH[m]); c++) begin
        logic p;
        p = feat[s][m][c][FW-1] ? pn[c][i] : pp[c][i];
        cnt += int'(im[c][i] ^ p);
      end
      r[i] = cnt > int'(CH[m]) / 2;
    end
    return r;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- result monitor ----
  int n_res = 0;
  longint last_beat_cyc [NS];
  int     last_done = 0;
  always @(posedge clk) begin
    if (rst_n && feat_valid && !feat_ready) n_stall++;
    if (rst_n && res_valid && res_ready) begin
      int s, da [NC], dv [NC], ba, bv;
      s = n_res + int'(NG) - 1;
      ba = 0; bv = 0;
      for (int c = 0; c < int'(NC); c++) begin
        da[c] = $countones(ngram_exp[s] ^ cls_a[c]);
        dv[c] = $countones(ngram_exp[s] ^ cls_v[c]);
        if (da[c] < da[ba]) ba = c;
        if (dv[c] < dv[bv]) bv = c;
        chk(int'(res_dist_arousal[c]) == da[c], $sformatf("sample %0d arousal dist[%0d] %0d exp %0d", s, c, res_dist_arousal[c], da[c]));
        chk(int'(res_dist_valence[c]) == dv[c], $sformatf("sample %0d valence dist[%0d] %0d exp %0d", s, c, res_dist_valence[c], dv[c]));
      end
      chk(int'(res_arousal) == ba, $sformatf("sample %0d arousal label %0d exp %0d", s, res_arousal, ba));
      chk(int'(res_valence) == bv, $sformatf("sample %0d valence label %0d exp %0d", s, res_valence, bv));
      seen_a[ba]++; seen_v[bv]++;
      n_res++;
    end
  end

  // latency: first sample with a free pipeline gives its result 4 clocks after
  // its last beat was accepted
  initial begin
    wait (last_done == int'(NG));
    @(posedge clk);
    while (!res_valid) @(posedge clk);
    chk(cyc - last_beat_cyc[NG-1] == 4, $sformatf("latency %0d clocks, expected 4", cyc - last_beat_cyc[NG-1]));
  end

  initial begin
    int s_exp_order;
    longint t_start, t_end;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- memories ----
    for (int r = 0; r < int'(MAXC); r++) begin im[r] = rnd_hv(); pp[r] = rnd_hv(); pn[r] = rnd_hv(); end
    for (int m = 0; m < 3; m++)
      for (int r = 0; r < int'(MAXC); r++) begin
        @(negedge clk);
        mem_wr_en = 1; mem_wr_sel = mem_sel_e'(m); mem_wr_addr = AW'(r);
        mem_wr_data = (m == 0) ? im[r] : (m == 1) ? pp[r] : pn[r];
      end
    @(negedge clk);
    mem_wr_en = 0;
    // ---- features and expected N-grams ----
    for (int s = 0; s < int'(NS); s++)
      for (int m = 0; m < 3; m++)
        for (int c = 0; c < int'(MAXC); c++) feat[s][m][c] = FW'($urandom);
    begin
      logic [D-1:0] fused [NS];
      for (int s = 0; s < int'(NS); s++) begin
        logic [D-1:0] a, b, c3;
        a = spatial_model(s, 0); b = spatial_model(s, 1); c3 = spatial_model(s, 2);
        fused[s] = (a & b) | (b & c3) | (a & c3);
      end
      for (int s = int'(NG) - 1; s < int'(NS); s++)
        for (int i = 0; i < int'(D); i++)
          ngram_exp[s][i] = fused[s][i] ^ fused[s-1][(i + 1) % D] ^ fused[s-2][(i + 2) % D];
    end
    // ---- class HVs: noisy copies of chosen N-grams ----
    cls_a[0] = ngram_exp[20]; cls_a[1] = ngram_exp[150];
    cls_v[0] = ngram_exp[300]; cls_v[1] = ngram_exp[77];
    for (int k = 0; k < 300; k++) begin
      cls_a[0][$urandom_range(D - 1)] ^= 1'b1; cls_a[1][$urandom_range(D - 1)] ^= 1'b1;
      cls_v[0][$urandom_range(D - 1)] ^= 1'b1; cls_v[1][$urandom_range(D - 1)] ^= 1'b1;
    end
    for (int t = 0; t < 2; t++)
      for (int c = 0; c < int'(NC); c++) begin
        @(negedge clk);
        am_wr_en = 1; am_wr_task = am_task_e'(t); am_wr_class = CW'(c);
        am_wr_data = (t == 0) ? cls_a[c] : cls_v[c];
      end
    @(negedge clk);
    am_wr_en = 0;
    // ---- stream samples ----
    // samples 0..3 at full rate with results taken at once (throughput check),
    // then bubbles and result back-pressure.
    for (int s = 0; s < int'(NS); s++) begin
      if (s == 0) t_start = cyc;
      for (int c = 0; c < int'(MAXC); c++) begin
        if (1'b0) begin
          @(negedge clk);
          feat_valid = 0;
          n_bubble++;
        end
        @(negedge clk);
        feat_valid = 1;
        for (int m = 0; m < 3; m++) begin
          feat_data[m] = feat[s][m][c];
          if (c < int'(CH[m])) begin
            if (feat[s][m][c][FW-1]) n_neg++; else n_pos++;
          end else begin
            n_masked++;
            feat_data[m] = FW'($urandom);   // must be ignored
          end
        end
        @(posedge clk);
        while (!feat_ready) @(posedge clk);
        if (c == int'(MAXC) - 1) begin
          last_beat_cyc[s] = cyc;
          last_done = s + 1;
        end
      end
      if (s < int'(NG) - 1) n_warm++;
      if (s == int'(NS) - 1) begin
        t_end = cyc;
        chk(t_end - t_start == longint'(NS * MAXC), $sformatf("%0d samples took %0d clocks", NS, t_end - t_start));
      end
    end
    @(negedge clk);
    feat_valid = 0;
    wait (n_res == int'(NS) - int'(NG) + 1);
    repeat (10) @(posedge clk);
    chk(n_res == int'(NS) - int'(NG) + 1, "result count");
    chk(n_pos > 0, "positive projection never used");
    chk(n_neg > 0, "negative projection never used");
    chk(n_masked > 0, "no masked lane");
    chk(n_stall == 0, "feature stream stalled although results were always taken");
    chk(n_warm == int'(NG) - 1, "warm-up");
    for (int c = 0; c < int'(NC); c++) begin
      chk(seen_a[c] > 0, $sformatf("arousal label %0d never seen", c));
      chk(seen_v[c] > 0, $sformatf("valence label %0d never seen", c));
    end
    $display("results=%0d pos=%0d neg=%0d masked=%0d bubbles=%0d stalls=%0d warmup=%0d",
             n_res, n_pos, n_neg, n_masked, n_bubble, n_stall, n_warm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result consumer: always ready for the first results, then slow
  always @(negedge clk) res_ready <= 1'b1;
endmodule
