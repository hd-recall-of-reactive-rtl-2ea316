// spatial_encoder: maps one sample of one modality into a single hypervector.
//
// For every feature channel c of the modality, the channel HV iM[c] is bound
// (bitwise XOR) with a feature projection HV. Rather than multiplying a
// ternary projection vector by the feature value and binarizing, the
// projection is pre-multiplied: the positive projection HV is used when the
// feature value is >= 0, the negative one when it is < 0 (a multiplexer
// instead of multipliers). The bound channel HVs of all channels are bundled
// by a per-bit majority: D counters of cnt_width(CHANNELS) bits count the ones
// in each bit position, and bit i of the result is 1 when its count exceeds
// CHANNELS/2 (integer division).
//
// Channels arrive one per clock (acc_valid). acc_first marks channel 0 of a
// sample: the counters are loaded instead of incremented, so consecutive
// samples need no gap. acc_last marks the final beat of the sample; on it the
// majority is taken and registered in hv, which then holds until the next
// acc_last. ch_en low on a beat contributes nothing (used when a smaller
// modality runs in lockstep with a larger one). hv is valid from the clock
// edge that consumes the acc_last beat.
//
// The sign multiplexer, XOR binding, per-bit counters and the > CHANNELS/2
// threshold follow the source design; treating a zero feature as positive,
// loading the counters on the first beat and registering the result are this
// design's choices.
module spatial_encoder #(
  parameter int unsigned D        = hdc_pkg::HV_DIM,
  parameter int unsigned CHANNELS = hdc_pkg::CH_EEG,
  parameter int unsigned CNT_W    = hdc_pkg::cnt_width(CHANNELS)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         acc_valid,
  input  logic         acc_first,
  input  logic         acc_last,
  input  logic         ch_en,
  input  logic         feat_neg,
  input  logic [D-1:0] im_hv,
  input  logic [D-1:0] pos_hv,
  input  logic [D-1:0] neg_hv,
  output logic [D-1:0] hv
);

  localparam int unsigned THRESH = CHANNELS / 2;

  logic [D-1:0] bound;

  // Bind the channel HV with the projection HV picked by the feature sign.
  assign bound = ch_en ? (im_hv ^ (feat_neg ? neg_hv : pos_hv)) : '0;

  // One counter and one majority bit per HV bit position.
  for (genvar i = 0; i < D; i++) begin : g_bit
    logic [CNT_W-1:0] cnt;
    logic [CNT_W-1:0] sum;

    assign sum = (acc_first ? CNT_W'(0) : cnt) + CNT_W'(bound[i]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt   <= '0;
        hv[i] <= 1'b0;
      end else if (acc_valid) begin
        cnt <= sum;
        if (acc_last) hv[i] <= (32'(sum) > THRESH);
      end
    end
  end

endmodule
