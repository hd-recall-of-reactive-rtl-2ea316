// tb_hv_memory: writes random rows, reads them back with the one-clock read
// latency, checks that rd_data holds between reads, that a same-cycle write
// and read return the old row, and that writes beyond DEPTH are dropped.
module tb_hv_memory;
  localparam int unsigned D = 96, DEPTH = 11, AW = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [D-1:0] wr_data = '0, rd_data;
  logic [D-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  hv_memory #(.D(D), .DEPTH(DEPTH), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [D-1:0] rnd_hv();
    logic [D-1:0] v;
    for (int i = 0; i < int'(D); i++) v[i] = 1'($urandom);
    return v;
  endfunction

  task automatic expect_rd(logic [D-1:0] exp, string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, rd_data, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_rd('0, "after reset");
    // fill
    for (int r = 0; r < int'(DEPTH); r++) begin
      model[r] = rnd_hv();
      wr_en = 1; wr_addr = AW'(r); wr_data = model[r];
      @(negedge clk);
    end
    // out-of-range write must not alias a row
    wr_en = 1; wr_addr = AW'(DEPTH + 2); wr_data = ~model[2];
    @(negedge clk);
    wr_en = 0;
    // random reads
    for (int t = 0; t < 60; t++) begin
      int r;
      r = $urandom_range(DEPTH - 1);
      rd_en = 1; rd_addr = AW'(r);
      @(negedge clk);
      expect_rd(model[r], "read");
      rd_en = 0;
      @(negedge clk);
      expect_rd(model[r], "hold");
    end
    // same-cycle write and read of one row returns the old row
    rd_en = 1; rd_addr = 4'd5; wr_en = 1; wr_addr = 4'd5; wr_data = rnd_hv();
    @(negedge clk);
    expect_rd(model[5], "read during write");
    model[5] = wr_data;
    wr_en = 0;
    @(negedge clk);
    expect_rd(model[5], "read after write");
    rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
