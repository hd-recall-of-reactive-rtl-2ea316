// popcount: number of ones in a W-bit vector, in two levels of adders.
//
// The vector is cut into chunks of CHUNK bits (the last one zero-padded).
// Each chunk is counted by its own small adder, then the chunk counts are
// summed. Purely combinational. Used for the Hamming distances of the
// associative memory, where W is the hypervector dimension. The source design
// only calls for a popcount; the two-level arrangement is this design's choice.
module popcount #(
  parameter int unsigned W     = hdc_pkg::HV_DIM,
  parameter int unsigned CNT   = $clog2(W + 1),
  parameter int unsigned CHUNK = 16
) (
  input  logic [W-1:0]   in,
  output logic [CNT-1:0] count
);

  localparam int unsigned NCHUNK = (W + CHUNK - 1) / CHUNK;
  localparam int unsigned PCW    = $clog2(CHUNK + 1);

  logic [NCHUNK*CHUNK-1:0] padded;
  logic [PCW-1:0]          part [NCHUNK];

  assign padded = (NCHUNK*CHUNK)'(in);

  for (genvar g = 0; g < NCHUNK; g++) begin : g_chunk
    always_comb begin
      part[g] = '0;
      for (int i = 0; i < int'(CHUNK); i++) part[g] += PCW'(padded[g*CHUNK + i]);
    end
  end

  always_comb begin
    count = '0;
    for (int g = 0; g < int'(NCHUNK); g++) count += CNT'(part[g]);
  end

endmodule
