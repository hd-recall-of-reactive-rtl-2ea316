// temporal_encoder: N-gram encoder over the stream of fused spatial HVs.
//
// It keeps the previous N-1 input HVs in a sliding window. For a new input
// S(t) it outputs
//     G(t) = S(t) ^ rho(S(t-1)) ^ rho^2(S(t-2)) ^ ... ^ rho^(N-1)(S(t-N+1))
// where rho is a one-bit cyclic right shift (bit i takes bit i+1, bit 0 wraps
// to bit D-1) and ^ is binding (XOR). This is the same as repeatedly permuting
// the running HV and binding it with the next one. For N = 3 it is two HV
// registers and a 3-input XOR per bit. Each input yields one N-gram (sliding
// window, no recomputation); the first N-1 inputs after reset only fill the
// window and produce no output.
//
// Interface: ready/valid in and out. The output is registered: an accepted
// input produces out_valid on the next clock; out_hv holds while out_valid is
// high and out_ready low, and in_ready is low only then. Reset empties the
// window.
//
// N = 3, the permute-and-bind rule and the right-shift direction follow the
// source design; the handshake, the warm-up behaviour and clearing the window
// only on reset are this design's choices.
module temporal_encoder #(
  parameter int unsigned D = hdc_pkg::HV_DIM,
  parameter int unsigned N = hdc_pkg::NGRAM
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [D-1:0] in_hv,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [D-1:0] out_hv
);

  localparam int unsigned FILL_W = hdc_pkg::cnt_width(N - 1);

  // hist[k] holds S(t-1-k).
  logic [D-1:0]      hist [N-1];
  logic [FILL_W-1:0] fill;
  logic [D-1:0]      ngram;
  logic              accept;

  // rot[k] = rho^(k+1)(hist[k]): cyclic right shift by k+1 positions.
  logic [D-1:0] rot [N-1];
  for (genvar k = 0; k < N - 1; k++) begin : g_rot
    assign rot[k] = {hist[k][k:0], hist[k][D-1:k+1]};
  end

  always_comb begin
    ngram = in_hv;
    for (int k = 0; k < int'(N) - 1; k++) ngram ^= rot[k];
  end

  assign in_ready = !out_valid || out_ready;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N) - 1; k++) hist[k] <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_hv    <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (accept) begin
        hist[0] <= in_hv;
        for (int k = 1; k < int'(N) - 1; k++) hist[k] <= hist[k-1];
        if (32'(fill) == N - 1) begin
          out_valid <= 1'b1;
          out_hv    <= ngram;
        end else begin
          fill <= fill + 1'b1;
        end
      end
    end
  end

  // Handshake rule: a pending output is held unchanged.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_hv));

endmodule
