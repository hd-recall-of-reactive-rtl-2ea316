// tb_spatial_sequencer: drives feature beats with random gaps for channel
// counts 3/5/4 (5 beats per sample) and checks, beat by beat, the memory read
// address, the stage-1 controls one clock later (first, last, per-modality
// enable and sign), the result flag, and that the last beat of a sample is
// held back while the previous result is still pending, and only then.
module tb_spatial_sequencer;
  localparam int unsigned C0 = 3, C1 = 5, C2 = 4, MAXC = 5, FW = 8, AW = 3;
  logic clk = 0, rst_n = 0;
  logic feat_valid = 0, feat_ready;
  logic [2:0][FW-1:0] feat_data = '0;
  logic mem_rd_en;
  logic [AW-1:0] mem_rd_addr;
  logic acc_valid, acc_first, acc_last;
  logic [2:0] acc_ch_en, acc_neg;
  logic out_valid, out_ready = 0;
  int checks = 0, failures = 0, n_beats = 0, n_samples = 0, n_stall = 0, n_results = 0;

  spatial_sequencer #(.CH_GSR(C0), .CH_ECG(C1), .CH_EEG(C2), .FEAT_W(FW), .MAX_CH(MAXC), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (beat %0d, t=%0t)", what, n_beats, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stage-1 expectations of the beat accepted on the previous clock.
  logic       exp_v = 0, exp_first, exp_last;
  logic [2:0] exp_en, exp_neg;
  logic       exp_out = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      // compare what the DUT shows this cycle
      chk(acc_valid == exp_v, "acc_valid");
      if (exp_v) begin
        chk(acc_first == exp_first, "acc_first");
        chk(acc_last == exp_last, "acc_last");
        chk(acc_ch_en == exp_en, "acc_ch_en");
        chk(acc_neg == exp_neg, "acc_neg");
      end
      chk(out_valid == exp_out, "out_valid");
      chk(mem_rd_en == (feat_valid && feat_ready), "mem_rd_en");
      // the only stall: last beat while a result is pending
      chk(feat_ready == !((n_beats % MAXC == MAXC - 1) && out_valid && !out_ready), "feat_ready");
      if (feat_valid && !feat_ready) n_stall++;
      if (out_valid && out_ready) n_results++;
      // model update
      if (out_valid && out_ready) exp_out = 0;
      if (exp_v && exp_last) exp_out = 1;
      exp_v = feat_valid && feat_ready;
      if (exp_v) begin
        int c;
        c = n_beats % MAXC;
        chk(int'(mem_rd_addr) == c, "mem_rd_addr");
        exp_first = (c == 0);
        exp_last  = (c == MAXC - 1);
        exp_en    = {c < C2, c < C1, c < C0};
        exp_neg   = {feat_data[2][FW-1], feat_data[1][FW-1], feat_data[0][FW-1]};
        n_beats++;
        if (c == MAXC - 1) n_samples++;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (!feat_valid || feat_ready) begin
        feat_valid <= ($urandom_range(3) != 0);
        feat_data  <= {FW'($urandom), FW'($urandom), FW'($urandom)};
      end
      // long periods of back-pressure so the stall happens
      out_ready <= ($urandom_range(5) == 0);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (n_samples == 80);
    repeat (3) @(posedge clk);
    chk(n_stall > 0, "stall never happened");
    chk(n_results > 10, "results taken");
    $display("beats=%0d samples=%0d stalls=%0d results=%0d", n_beats, n_samples, n_stall, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
