// tb_temporal_encoder: streams random HVs through the N = 3 encoder with
// random input gaps and output back-pressure. The expected N-gram is built
// from the input history by explicit index arithmetic:
//   G[i] = S(t)[i] ^ S(t-1)[(i+1) mod D] ^ S(t-2)[(i+2) mod D].
// Also checks that the first N-1 inputs give no output, that the output is
// held under back-pressure and that an accepted input shows up one clock later.
module tb_temporal_encoder;
  localparam int unsigned D = 53, N = 3, NIN = 120;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [D-1:0] in_hv = '0, out_hv;
  logic [D-1:0] hist [NIN];
  logic [D-1:0] expq [$];
  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_stall = 0;

  temporal_encoder #(.D(D), .N(N)) dut (.*);

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

  // producer
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n_in < int'(NIN)) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      if (in_valid) begin
        in_hv = rnd_hv();
      end
      @(posedge clk);
      if (in_valid && in_ready) begin
        hist[n_in] = in_hv;
        if (n_in >= int'(N) - 1) begin
          logic [D-1:0] g;
          for (int i = 0; i < int'(D); i++)
            g[i] = hist[n_in][i] ^ hist[n_in-1][(i+1) % D] ^ hist[n_in-2][(i+2) % D];
          expq.push_back(g);
        end
        n_in++;
      end
      if (in_valid && !in_ready) n_stall++;
    end
    @(negedge clk);
    in_valid = 0;
  end

  // consumer and checker
  logic [D-1:0] last_out;
  logic         last_pending = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (last_pending) begin
        checks++;
        if (!out_valid || out_hv !== last_out) begin failures++; $display("FAIL: output not held"); end
      end
      last_pending <= out_valid && !out_ready;
      last_out     <= out_hv;
      if (out_valid && out_ready) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL: output with no expected N-gram (n_in=%0d)", n_in);
        end else begin
          logic [D-1:0] e;
          e = expq.pop_front();
          if (out_hv !== e) begin failures++; $display("FAIL ngram %0d: %h exp %h", n_out, out_hv, e); end
        end
        n_out++;
      end
    end
  end
  always @(negedge clk) out_ready <= ($urandom_range(2) != 0);

  // completion
  initial begin
    wait (n_out == int'(NIN) - int'(N) + 1);
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != int'(NIN) - int'(N) + 1) begin failures++; $display("FAIL count %0d", n_out); end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: back-pressure never reached the input"); end
    $display("inputs=%0d outputs=%0d input stalls=%0d", n_in, n_out, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: an input accepted while the output register is empty is
  // visible right after that clock edge
  int lat_checks_done = 0;
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready && !out_valid && n_in >= int'(N) - 1 && lat_checks_done < 20) begin
      lat_checks_done++;
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL latency"); end
    end
  end
endmodule
