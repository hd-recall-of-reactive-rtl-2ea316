// hdc_pkg: constants and types shared by the early-fusion hyperdimensional
// (HDC) emotion classifier.
//
// The numbers follow the synthesized configuration: binary hypervectors (HVs)
// of D = 2,000 bits, a temporal N-gram of N = 3, three sensor modalities
// (GSR 32 features, ECG 77 features, EEG 105 features, 214 in total), and one
// item memory plus one positive and one negative feature projection memory
// shared by all modalities, each 105 HVs deep (the largest modality), 315 HVs
// in all. Two binary classifications (arousal and valence) with two classes
// each are made from the same encoded HV.
//
// The feature word width, the memory-select and task encodings are this
// design's own choices.
package hdc_pkg;

  // Hypervector dimension.
  localparam int unsigned HV_DIM = 2000;
  // Temporal encoder N-gram length.
  localparam int unsigned NGRAM = 3;
  // Feature channels per modality.
  localparam int unsigned CH_GSR = 32;
  localparam int unsigned CH_ECG = 77;
  localparam int unsigned CH_EEG = 105;
  // Depth of each shared HV memory: the largest modality.
  localparam int unsigned MEM_DEPTH = CH_EEG;
  // Classes per associative memory (strong/weak, positive/negative).
  localparam int unsigned NUM_CLASSES = 2;
  // Width of one pre-processed feature value (two's complement).
  localparam int unsigned FEAT_W = 16;

  // Which of the three shared HV memories a load addresses.
  typedef enum logic [1:0] {
    MEM_ITEM     = 2'd0,
    MEM_PROJ_POS = 2'd1,
    MEM_PROJ_NEG = 2'd2
  } mem_sel_e;

  // Which associative memory a class-HV load addresses.
  typedef enum logic {
    TASK_AROUSAL = 1'b0,
    TASK_VALENCE = 1'b1
  } am_task_e;

  // Width of a counter that holds 0..n.
  function automatic int unsigned cnt_width(int unsigned n);
    return (n < 2) ? 1 : $clog2(n + 1);
  endfunction

endpackage
