// spatial_sequencer: controller of the spatial encoding stage.
//
// The three modality spatial encoders run in lockstep: on each clock one
// channel index c is processed for all modalities at once, so a sample takes
// MAX_CH = max(CH_GSR, CH_ECG, CH_EEG) beats, and all three encoders read the
// same row c of the shared item and projection memories.
//
// Input: a ready/valid stream of feature beats. Beat c of a sample carries
// feature c of every modality (feat_data[m] for modality m = 0 GSR, 1 ECG,
// 2 EEG); lanes of modalities with fewer than c+1 channels are ignored. The
// beat count marks the sample boundaries: beat MAX_CH-1 closes a sample.
//
// Pipeline: an accepted beat issues the memory read of row c (stage 0); one
// clock later, when the memory rows are out, acc_valid drives the encoders
// with the registered sign bits and per-modality channel enables (stage 1).
// When the last beat reaches stage 1 the encoders register their HVs and
// out_valid rises on the same clock edge. The encoders can already take beats
// of the next sample while that result waits; only the last beat of a sample
// is held back (feat_ready low) while the previous result has not been taken,
// which is the stage's only stall.
//
// Processing all modalities of one channel together follows the source
// design; the beat format, the two-stage pipeline and the stall rule are this
// design's own.
module spatial_sequencer #(
  parameter int unsigned CH_GSR = hdc_pkg::CH_GSR,
  parameter int unsigned CH_ECG = hdc_pkg::CH_ECG,
  parameter int unsigned CH_EEG = hdc_pkg::CH_EEG,
  parameter int unsigned FEAT_W = hdc_pkg::FEAT_W,
  parameter int unsigned MAX_CH = (CH_GSR > CH_ECG) ? ((CH_GSR > CH_EEG) ? CH_GSR : CH_EEG)
                                                    : ((CH_ECG > CH_EEG) ? CH_ECG : CH_EEG),
  parameter int unsigned ADDR_W = (MAX_CH < 2) ? 1 : $clog2(MAX_CH)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // feature beats
  input  logic                        feat_valid,
  output logic                        feat_ready,
  input  logic [2:0][FEAT_W-1:0]      feat_data,
  // shared memory read port
  output logic                        mem_rd_en,
  output logic [ADDR_W-1:0]           mem_rd_addr,
  // spatial encoder control
  output logic                        acc_valid,
  output logic                        acc_first,
  output logic                        acc_last,
  output logic [2:0]                  acc_ch_en,
  output logic [2:0]                  acc_neg,
  // spatial result handshake
  output logic                        out_valid,
  input  logic                        out_ready
);

  localparam int unsigned CH [3] = '{CH_GSR, CH_ECG, CH_EEG};

  logic [ADDR_W-1:0] beat;
  logic              beat_last;
  logic              accept;

  assign beat_last   = (32'(beat) == MAX_CH - 1);
  assign feat_ready  = !beat_last || !out_valid || out_ready;
  assign accept      = feat_valid && feat_ready;
  assign mem_rd_en   = accept;
  assign mem_rd_addr = beat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat      <= '0;
      acc_valid <= 1'b0;
      acc_first <= 1'b0;
      acc_last  <= 1'b0;
      acc_ch_en <= '0;
      acc_neg   <= '0;
      out_valid <= 1'b0;
    end else begin
      // stage 0: take a beat, read row `beat`
      acc_valid <= accept;
      if (accept) begin
        acc_first <= (beat == '0);
        acc_last  <= beat_last;
        for (int m = 0; m < 3; m++) begin
          acc_ch_en[m] <= (32'(beat) < CH[m]);
          acc_neg[m]   <= feat_data[m][FEAT_W-1];
        end
        beat <= beat_last ? '0 : beat + 1'b1;
      end
      // stage 1: the encoders register their HVs on the last beat
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (acc_valid && acc_last)  out_valid <= 1'b1;
    end
  end

  // The last beat is only accepted when the result register is free, so a
  // result is never overwritten before it is taken.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    acc_valid && acc_last |-> !out_valid || out_ready);

endmodule
