// majority3: the early-fusion bundler. Bundles the three per-modality
// spatial HVs into one HV by a bitwise majority, (a & b) | (b & c) | (c & a).
// With three inputs there are no ties. Purely combinational.
// The function is the source design's early-fusion bundling.
module majority3 #(
  parameter int unsigned D = hdc_pkg::HV_DIM
) (
  input  logic [D-1:0] a,
  input  logic [D-1:0] b,
  input  logic [D-1:0] c,
  output logic [D-1:0] y
);

  assign y = (a & b) | (b & c) | (c & a);

endmodule
