// global_buf: on-chip global memory buffer shared by the bitonic-sort compute
// units. It stands where the kernels' global arrays live; keeping them on chip
// lets the kernels exchange data without a round trip through off-chip DRAM.
//
// Two independent ports, each with a synchronous read (data valid the cycle
// after the address) and a write. The two ports never write the same address
// in the same cycle in this design (the compute units always access disjoint
// pairs); if they did, port 1 would win. A read of an address written in the
// same cycle returns the old word.
//
// From the document: on-chip global memory buffers for inter-kernel
// communication, and dual-ported block RAM. This design's choices: the port
// count and the read-during-write behaviour.
module global_buf
  import join_pkg::*;
#(
  parameter int unsigned DEPTH = 8192
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] rd_addr0,
  input  logic [$clog2(DEPTH)-1:0] rd_addr1,
  output rec_t                     rd_data0,
  output rec_t                     rd_data1,
  input  logic                     wr_en0,
  input  logic [$clog2(DEPTH)-1:0] wr_addr0,
  input  rec_t                     wr_data0,
  input  logic                     wr_en1,
  input  logic [$clog2(DEPTH)-1:0] wr_addr1,
  input  rec_t                     wr_data1
);

  rec_t mem [DEPTH];

  always_ff @(posedge clk) begin
    rd_data0 <= mem[rd_addr0];
    rd_data1 <= mem[rd_addr1];
    if (wr_en0) mem[wr_addr0] <= wr_data0;
    if (wr_en1) mem[wr_addr1] <= wr_data1;
  end

endmodule
