// Shared data buffer of one memory based switch.
//
// A simple-dual-port memory holding DEPTH flits of WIDTH bits: one write and
// one read per core clock cycle, which is what lets S inputs and S outputs
// share it by time multiplexing. The default 576 x 256 bits is 18 KB, built on
// the FPGA from eight 36-bit-wide block RAMs side by side. The read is
// registered: 'rd_data' holds the word addressed in the cycle before, as a
// block RAM delivers it.
module shared_buffer #(
  parameter int unsigned DEPTH = 576,
  parameter int unsigned WIDTH = 256
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
