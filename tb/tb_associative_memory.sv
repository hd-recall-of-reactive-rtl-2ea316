// tb_associative_memory: loads random class HVs, then sends queries made by
// flipping a random number of bits of a random class HV. Expected distances
// come from $countones of the XOR and the label from an arg-min with the
// lower index winning ties (a tie is forced on purpose). Random back-pressure
// checks that the result is held.
module tb_associative_memory;
  localparam int unsigned D = 70, NC = 3, CW = 2, DW = 7;
  logic clk = 0, rst_n = 0;
  logic cls_wr_en = 0;
  logic [CW-1:0] cls_wr_idx = '0;
  logic [D-1:0] cls_wr_hv = '0, in_hv = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [CW-1:0] out_label;
  logic [DW-1:0] out_dist [NC];
  logic [D-1:0] cls [NC];
  int checks = 0, failures = 0, nq = 0;
  int seen_label [NC];

  associative_memory #(.D(D), .NUM_CLASSES(NC), .CLS_W(CW), .DIST_W(DW)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [D-1:0] rnd_hv();
    logic [D-1:0] v;
    for (int i = 0; i < int'(D); i++) v[i] = 1'($urandom);
    return v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic query(logic [D-1:0] q);
    int d [NC];
    int best;
    @(negedge clk);
    in_valid = 1; in_hv = q;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 0;
    // keep the result pending for a few cycles sometimes
    out_ready = 0;
    repeat ($urandom_range(2)) begin
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: result dropped"); end
    end
    best = 0;
    for (int c = 0; c < int'(NC); c++) begin
      d[c] = $countones(q ^ cls[c]);
      if (d[c] < d[best]) best = c;
    end
    checks++;
    if (!out_valid || int'(out_label) != best) begin
      failures++; $display("FAIL q%0d: label %0d exp %0d valid %b", nq, out_label, best, out_valid);
    end
    for (int c = 0; c < int'(NC); c++) begin
      checks++;
      if (int'(out_dist[c]) != d[c]) begin failures++; $display("FAIL q%0d dist[%0d] %0d exp %0d", nq, c, out_dist[c], d[c]); end
    end
    seen_label[best]++;
    out_ready = 1;
    @(negedge clk);
    nq++;
  endtask

  initial begin
    logic [D-1:0] q;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < int'(NC); c++) begin
      cls[c] = rnd_hv();
      @(negedge clk);
      cls_wr_en = 1; cls_wr_idx = CW'(c); cls_wr_hv = cls[c];
    end
    @(negedge clk);
    cls_wr_en = 0;
    for (int t = 0; t < 90; t++) begin
      int k;
      k = $urandom_range(NC - 1);
      q = cls[k];
      repeat ($urandom_range(25)) q[$urandom_range(D - 1)] ^= 1'b1;
      query(q);
    end
    // forced tie between classes 1 and 2: a query equidistant from both
    q = cls[1];
    for (int i = 0; i < int'(D); i++) if (cls[1][i] != cls[2][i] && $urandom_range(1) == 0) q[i] = cls[2][i];
    cls[0] = ~q;   // make class 0 far away
    @(negedge clk);
    cls_wr_en = 1; cls_wr_idx = 0; cls_wr_hv = cls[0];
    @(negedge clk);
    cls_wr_en = 0;
    begin
      logic [D-1:0] q2;
      int diff_cnt, flipped;
      q2 = cls[1]; diff_cnt = $countones(cls[1] ^ cls[2]); flipped = 0;
      for (int i = 0; i < int'(D) && flipped < diff_cnt / 2; i++)
        if (cls[1][i] != cls[2][i]) begin q2[i] = cls[2][i]; flipped++; end
      query(q2);   // exact tie when diff_cnt is even; label 1 expected either way
    end
    for (int c = 0; c < int'(NC); c++) begin
      checks++;
      if (seen_label[c] == 0) begin failures++; $display("FAIL: label %0d never produced", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
