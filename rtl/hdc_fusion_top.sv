// hdc_fusion_top: early-fusion hyperdimensional classifier for three
// physiological modalities (GSR, ECG, EEG), inference only.
//
// Datapath (one sample = one feature vector of CH_GSR + CH_ECG + CH_EEG
// values):
//   shared memories  item memory (iM) and positive / negative feature
//                    projection memories, MAX_CH rows of D bits each, shared by
//                    all modalities and by both classification tasks
//   spatial stage    three spatial encoders in lockstep, one channel index per
//                    clock, controlled by spatial_sequencer
//   early fusion     bitwise 3-input majority of the three modality HVs
//   temporal stage   one N-gram encoder on the fused HV stream
//   classification   two associative memories (arousal, valence) compare the
//                    same N-gram with their class HVs by Hamming distance
// Fusing before the temporal encoder (early fusion) needs one temporal
// encoder instead of one per modality.
//
// Loading: before inference, write the 3 x MAX_CH memory rows through mem_wr_*
// and the class HVs of both tasks through am_wr_*. The design does no
// training.
//
// Streaming: feat_* is a ready/valid stream of MAX_CH beats per sample, beat c
// carrying feature c of each modality (only the sign of a feature is used).
// res_* is a ready/valid stream with one result per sample from the N-th
// sample on (the temporal window must fill first). Throughput is one sample
// per MAX_CH clocks; a sample's result appears 4 clocks after its last beat is
// accepted (memory read, spatial accumulate, N-gram register, associative
// memory register).
//
// The block structure, sizes and sharing of memories follow the source
// design; the port format, the load ports, the fork/join of the two
// associative memories and all cycle timing are this design's own.
module hdc_fusion_top
  import hdc_pkg::*;
#(
  parameter int unsigned D           = HV_DIM,
  parameter int unsigned N           = NGRAM,
  parameter int unsigned GSR_CH      = CH_GSR,
  parameter int unsigned ECG_CH      = CH_ECG,
  parameter int unsigned EEG_CH      = CH_EEG,
  parameter int unsigned FW          = FEAT_W,
  parameter int unsigned NCLS        = NUM_CLASSES,
  parameter int unsigned MAX_CH      = (GSR_CH > ECG_CH) ? ((GSR_CH > EEG_CH) ? GSR_CH : EEG_CH)
                                                         : ((ECG_CH > EEG_CH) ? ECG_CH : EEG_CH),
  parameter int unsigned ADDR_W      = (MAX_CH < 2) ? 1 : $clog2(MAX_CH),
  parameter int unsigned CLS_W       = (NCLS < 2) ? 1 : $clog2(NCLS),
  parameter int unsigned DIST_W      = $clog2(D + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // shared HV memory load
  input  logic              mem_wr_en,
  input  mem_sel_e          mem_wr_sel,
  input  logic [ADDR_W-1:0] mem_wr_addr,
  input  logic [D-1:0]      mem_wr_data,
  // class HV load
  input  logic              am_wr_en,
  input  am_task_e          am_wr_task,
  input  logic [CLS_W-1:0]  am_wr_class,
  input  logic [D-1:0]      am_wr_data,
  // feature beats
  input  logic              feat_valid,
  output logic              feat_ready,
  input  logic [2:0][FW-1:0] feat_data,
  // results
  output logic              res_valid,
  input  logic              res_ready,
  output logic [CLS_W-1:0]  res_arousal,
  output logic [CLS_W-1:0]  res_valence,
  output logic [DIST_W-1:0] res_dist_arousal [NCLS],
  output logic [DIST_W-1:0] res_dist_valence [NCLS]
);

  // ---------------- shared memories ----------------
  logic              rd_en;
  logic [ADDR_W-1:0] rd_addr;
  logic [D-1:0]      im_hv, pos_hv, neg_hv;

  hv_memory #(.D(D), .DEPTH(MAX_CH), .ADDR_W(ADDR_W)) u_item_mem (
    .clk, .rst_n,
    .wr_en(mem_wr_en && mem_wr_sel == MEM_ITEM), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_en, .rd_addr, .rd_data(im_hv));

  hv_memory #(.D(D), .DEPTH(MAX_CH), .ADDR_W(ADDR_W)) u_proj_pos_mem (
    .clk, .rst_n,
    .wr_en(mem_wr_en && mem_wr_sel == MEM_PROJ_POS), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_en, .rd_addr, .rd_data(pos_hv));

  hv_memory #(.D(D), .DEPTH(MAX_CH), .ADDR_W(ADDR_W)) u_proj_neg_mem (
    .clk, .rst_n,
    .wr_en(mem_wr_en && mem_wr_sel == MEM_PROJ_NEG), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_en, .rd_addr, .rd_data(neg_hv));

  // ---------------- spatial stage ----------------
  logic       acc_valid, acc_first, acc_last;
  logic [2:0] acc_ch_en, acc_neg;
  logic       sp_valid, sp_ready;
  logic [D-1:0] sp_hv [3];

  spatial_sequencer #(
    .CH_GSR(GSR_CH), .CH_ECG(ECG_CH), .CH_EEG(EEG_CH), .FEAT_W(FW),
    .MAX_CH(MAX_CH), .ADDR_W(ADDR_W)
  ) u_seq (
    .clk, .rst_n,
    .feat_valid, .feat_ready, .feat_data,
    .mem_rd_en(rd_en), .mem_rd_addr(rd_addr),
    .acc_valid, .acc_first, .acc_last, .acc_ch_en, .acc_neg,
    .out_valid(sp_valid), .out_ready(sp_ready));

  spatial_encoder #(.D(D), .CHANNELS(GSR_CH)) u_senc_gsr (
    .clk, .rst_n, .acc_valid, .acc_first, .acc_last,
    .ch_en(acc_ch_en[0]), .feat_neg(acc_neg[0]),
    .im_hv, .pos_hv, .neg_hv, .hv(sp_hv[0]));

  spatial_encoder #(.D(D), .CHANNELS(ECG_CH)) u_senc_ecg (
    .clk, .rst_n, .acc_valid, .acc_first, .acc_last,
    .ch_en(acc_ch_en[1]), .feat_neg(acc_neg[1]),
    .im_hv, .pos_hv, .neg_hv, .hv(sp_hv[1]));

  spatial_encoder #(.D(D), .CHANNELS(EEG_CH)) u_senc_eeg (
    .clk, .rst_n, .acc_valid, .acc_first, .acc_last,
    .ch_en(acc_ch_en[2]), .feat_neg(acc_neg[2]),
    .im_hv, .pos_hv, .neg_hv, .hv(sp_hv[2]));

  // ---------------- early fusion ----------------
  logic [D-1:0] fused_hv;

  majority3 #(.D(D)) u_fuse (.a(sp_hv[0]), .b(sp_hv[1]), .c(sp_hv[2]), .y(fused_hv));

  // ---------------- temporal stage ----------------
  logic         ng_valid, ng_ready;
  logic [D-1:0] ng_hv;

  temporal_encoder #(.D(D), .N(N)) u_tenc (
    .clk, .rst_n,
    .in_valid(sp_valid), .in_ready(sp_ready), .in_hv(fused_hv),
    .out_valid(ng_valid), .out_ready(ng_ready), .out_hv(ng_hv));

  // ---------------- classification ----------------
  // The N-gram goes to both associative memories at once (fork) and their
  // results leave together (join).
  logic a_in_ready, v_in_ready, a_out_valid, v_out_valid;

  assign ng_ready  = a_in_ready && v_in_ready;
  assign res_valid = a_out_valid && v_out_valid;

  associative_memory #(.D(D), .NUM_CLASSES(NCLS), .CLS_W(CLS_W), .DIST_W(DIST_W)) u_am_arousal (
    .clk, .rst_n,
    .cls_wr_en(am_wr_en && am_wr_task == TASK_AROUSAL), .cls_wr_idx(am_wr_class), .cls_wr_hv(am_wr_data),
    .in_valid(ng_valid && ng_ready), .in_ready(a_in_ready), .in_hv(ng_hv),
    .out_valid(a_out_valid), .out_ready(res_ready && res_valid),
    .out_label(res_arousal), .out_dist(res_dist_arousal));

  associative_memory #(.D(D), .NUM_CLASSES(NCLS), .CLS_W(CLS_W), .DIST_W(DIST_W)) u_am_valence (
    .clk, .rst_n,
    .cls_wr_en(am_wr_en && am_wr_task == TASK_VALENCE), .cls_wr_idx(am_wr_class), .cls_wr_hv(am_wr_data),
    .in_valid(ng_valid && ng_ready), .in_ready(v_in_ready), .in_hv(ng_hv),
    .out_valid(v_out_valid), .out_ready(res_ready && res_valid),
    .out_label(res_valence), .out_dist(res_dist_valence));

endmodule
