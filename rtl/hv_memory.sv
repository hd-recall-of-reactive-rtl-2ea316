// hv_memory: a hypervector memory, DEPTH rows of D bits, one synchronous
// write port and one synchronous read port.
//
// The classifier keeps three of these: the item memory (one random channel HV
// per feature channel) and the positive and negative feature projection
// memories. In silicon they map to compiled SRAM macros "channels deep and D
// wide"; here each is a plain array that a synthesis tool can infer as
// memory. The contents are written once through the write port before
// inference (in the original system by a host processor) and are then only
// read.
//
// Timing: rd_data shows the row addressed by rd_addr one clock after rd_en is
// high and holds it until the next read. A write and a read of the same row in
// one cycle return the old row. No reset: the array is loaded before use, the
// read register is cleared by reset.
module hv_memory #(
  parameter int unsigned D      = hdc_pkg::HV_DIM,
  parameter int unsigned DEPTH  = hdc_pkg::MEM_DEPTH,
  parameter int unsigned ADDR_W = (DEPTH < 2) ? 1 : $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [D-1:0]      wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [D-1:0]      rd_data
);

  logic [D-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                    rd_data <= '0;
    else if (rd_en && (32'(rd_addr) < DEPTH))      rd_data <= mem[rd_addr];
  end

endmodule
