// tb_majority3: checks the bitwise 3-input majority against a per-bit count
// of ones (>= 2 of 3) over random and corner-case vectors.
module tb_majority3;
  localparam int unsigned D = 67;
  logic [D-1:0] a, b, c, y;
  int checks = 0, failures = 0;

  majority3 #(.D(D)) dut (.a, .b, .c, .y);

  task automatic check();
    logic [D-1:0] exp;
    for (int i = 0; i < int'(D); i++) exp[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h y=%h exp=%h", a, b, c, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; c = '0; check();
    a = '1; b = '1; c = '0; check();
    a = '1; b = '0; c = '1; check();
    a = '0; b = '1; c = '1; check();
    a = '1; b = '0; c = '0; check();
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < int'(D); i++) begin
        a[i] = 1'($urandom); b[i] = 1'($urandom); c[i] = 1'($urandom);
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
