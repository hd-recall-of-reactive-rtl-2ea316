// associative_memory: nearest-class lookup for one classification task.
//
// Holds NUM_CLASSES pre-trained class HVs in registers (few classes, so no
// SRAM). For a query HV it computes the Hamming distance to every class HV,
// an XOR followed by a popcount, and returns the index of the class with the
// least distance; on a tie the lower index wins. All classes are compared in
// the same cycle, each with its own XOR row and popcount adder tree.
//
// Class HVs are written through cls_wr_* (one HV per clock) before inference;
// training logic is not part of this inference-only block. Reset clears them.
//
// Interface: ready/valid query in, ready/valid result out. The result (label
// and every distance) is registered one clock after the query is accepted and
// held while out_valid is high and out_ready low.
//
// XOR/popcount distance, least-distance wins and register storage follow the
// source design; the tie rule, the load port and the one-clock registered
// result are this design's choices.
module associative_memory #(
  parameter int unsigned D           = hdc_pkg::HV_DIM,
  parameter int unsigned NUM_CLASSES = hdc_pkg::NUM_CLASSES,
  parameter int unsigned CLS_W       = (NUM_CLASSES < 2) ? 1 : $clog2(NUM_CLASSES),
  parameter int unsigned DIST_W      = $clog2(D + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cls_wr_en,
  input  logic [CLS_W-1:0]  cls_wr_idx,
  input  logic [D-1:0]      cls_wr_hv,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [D-1:0]      in_hv,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [CLS_W-1:0]  out_label,
  output logic [DIST_W-1:0] out_dist [NUM_CLASSES]
);

  logic [D-1:0]      cls_hv [NUM_CLASSES];
  logic [DIST_W-1:0] ham   [NUM_CLASSES];
  logic [CLS_W-1:0]  best;

  // Hamming distances: XOR with each class HV, then an adder-tree popcount.
  for (genvar c = 0; c < NUM_CLASSES; c++) begin : g_cls
    popcount #(.W(D), .CNT(DIST_W)) u_pop (.in(in_hv ^ cls_hv[c]), .count(ham[c]));
  end

  // Arg-min; the lower index wins a tie.
  always_comb begin
    best = '0;
    for (int c = 1; c < int'(NUM_CLASSES); c++)
      if (ham[c] < ham[best]) best = CLS_W'(c);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(NUM_CLASSES); c++) cls_hv[c] <= '0;
    end else if (cls_wr_en && (32'(cls_wr_idx) < NUM_CLASSES)) begin
      cls_hv[cls_wr_idx] <= cls_wr_hv;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_label <= '0;
      for (int c = 0; c < int'(NUM_CLASSES); c++) out_dist[c] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid <= 1'b1;
        out_label <= best;
        out_dist  <= ham;
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_label));

endmodule
