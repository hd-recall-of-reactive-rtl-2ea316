// tb_popcount: compares the adder-tree popcount with $countones at the
// default width (2,000 bits) and at a width that is not a multiple of the
// chunk size, for all-zero, all-one, single-bit and random vectors.
module tb_popcount;
  localparam int unsigned WA = 2000, WB = 37;
  logic [WA-1:0] a;
  logic [WB-1:0] b;
  logic [$clog2(WA+1)-1:0] ca;
  logic [$clog2(WB+1)-1:0] cb;
  int checks = 0, failures = 0;

  popcount dut_a (.in(a), .count(ca));
  popcount #(.W(WB)) dut_b (.in(b), .count(cb));

  task automatic check();
    #1;
    checks += 2;
    if (int'(ca) != $countones(a)) begin failures++; $display("FAIL A: %0d exp %0d", ca, $countones(a)); end
    if (int'(cb) != $countones(b)) begin failures++; $display("FAIL B: %0d exp %0d", cb, $countones(b)); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    for (int i = 0; i < int'(WA); i += 97) begin
      a = '0; a[i] = 1'b1; b = '0; b[i % WB] = 1'b1; check();
    end
    for (int t = 0; t < 100; t++) begin
      int density;
      density = $urandom_range(8);
      for (int i = 0; i < int'(WA); i++) a[i] = ($urandom_range(7) < density);
      for (int i = 0; i < int'(WB); i++) b[i] = ($urandom_range(7) < density);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
