// tb_spatial_encoder: feeds random samples into two encoders (odd and even
// channel counts) and compares the registered HV with a per-bit majority
// computed from the bound channel HVs in the testbench. Samples run back to
// back, with idle cycles and disabled channels mixed in.
module tb_spatial_encoder;
  localparam int unsigned D = 80;
  localparam int unsigned CH_A = 7, CH_B = 6;
  localparam int unsigned BEATS = 9;    // beats per sample; channels beyond CH are disabled
  logic clk = 0, rst_n = 0;
  logic acc_valid = 0, acc_first = 0, acc_last = 0, en_a = 0, en_b = 0, neg_a = 0, neg_b = 0;
  logic [D-1:0] im_hv = '0, pos_hv = '0, neg_hv = '0, hv_a, hv_b;
  int checks = 0, failures = 0;

  spatial_encoder #(.D(D), .CHANNELS(CH_A)) dut_a (.clk, .rst_n, .acc_valid, .acc_first, .acc_last,
    .ch_en(en_a), .feat_neg(neg_a), .im_hv, .pos_hv, .neg_hv, .hv(hv_a));
  spatial_encoder #(.D(D), .CHANNELS(CH_B)) dut_b (.clk, .rst_n, .acc_valid, .acc_first, .acc_last,
    .ch_en(en_b), .feat_neg(neg_b), .im_hv, .pos_hv, .neg_hv, .hv(hv_b));

  always #5 clk = ~clk;

  function automatic logic [D-1:0] rnd_hv();
    logic [D-1:0] v;
    for (int i = 0; i < int'(D); i++) v[i] = 1'($urandom);
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt_a [D], cnt_b [D];
    logic [D-1:0] exp_a, exp_b;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 60; s++) begin
      for (int i = 0; i < int'(D); i++) begin cnt_a[i] = 0; cnt_b[i] = 0; end
      for (int c = 0; c < int'(BEATS); c++) begin
        // occasional idle cycle inside a sample
        if ($urandom_range(3) == 0) begin
          @(negedge clk);
          acc_valid = 0; im_hv = rnd_hv();
        end
        @(negedge clk);
        acc_valid = 1; acc_first = (c == 0); acc_last = (c == int'(BEATS) - 1);
        im_hv = rnd_hv(); pos_hv = rnd_hv(); neg_hv = rnd_hv();
        neg_a = 1'($urandom); neg_b = 1'($urandom);
        // s == 0: all channels off except channel 0 (sparse case)
        en_a = (c < int'(CH_A)) && (s != 0 || c == 0);
        en_b = (c < int'(CH_B)) && (s != 0 || c == 0);
        for (int i = 0; i < int'(D); i++) begin
          if (en_a) cnt_a[i] += int'(im_hv[i] ^ (neg_a ? neg_hv[i] : pos_hv[i]));
          if (en_b) cnt_b[i] += int'(im_hv[i] ^ (neg_b ? neg_hv[i] : pos_hv[i]));
        end
      end
      for (int i = 0; i < int'(D); i++) begin
        exp_a[i] = cnt_a[i] > int'(CH_A / 2);
        exp_b[i] = cnt_b[i] > int'(CH_B / 2);
      end
      @(negedge clk);
      acc_valid = 0; acc_first = 0; acc_last = 0;
      checks++;
      if (hv_a !== exp_a) begin failures++; $display("FAIL A sample %0d: %h exp %h", s, hv_a, exp_a); end
      checks++;
      if (hv_b !== exp_b) begin failures++; $display("FAIL B sample %0d: %h exp %h", s, hv_b, exp_b); end
      // result holds while the next sample accumulates
      @(negedge clk);
      acc_valid = 1; acc_first = 1; en_a = 1; en_b = 1; im_hv = rnd_hv();
      @(negedge clk);
      acc_valid = 0;
      checks++;
      if (hv_a !== exp_a || hv_b !== exp_b) begin failures++; $display("FAIL hold sample %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
