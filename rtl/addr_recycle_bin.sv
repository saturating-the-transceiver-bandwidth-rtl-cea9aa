// Address recycle bin of a memory based switch.
//
// Keeps, for every shared-buffer address, a destination vector with one lane
// per local output (S lanes of LANE_W bits). It is a true-dual-port memory in
// write-first mode:
//   port A  writes the whole vector 'wr_vec_a' when a flit is stored;
//   port B  writes zero into the lanes enabled by 'be_b' when the flit leaves
//           through those outputs, and returns the updated vector on 'rd_vec'
//           one cycle later.
// Because the write lands before the read in the same cycle, back-to-back
// clears of the same address (several outputs of a multicast flit leaving in
// consecutive cycles) each see the previous ones. The check logic raises
// 'free' together with the read-back vector when that vector is all zero;
// 'free_addr' is the address it belongs to. With LANE_W = 8 every destination
// takes a byte and port B needs byte enables; the default LANE_W = 1 is the
// variant with a 1-bit write port and an S-bit read port, which wastes no bits.
// Both ports must not address the same word in the same cycle.
module addr_recycle_bin #(
  parameter int unsigned DEPTH  = 576,
  parameter int unsigned S      = 4,
  parameter int unsigned LANE_W = 1
) (
  input  logic                     clk,
  input  logic                     rst,
  // port A: set the destination vector of a newly stored flit
  input  logic                     wr_en_a,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [S*LANE_W-1:0]      wr_vec_a,
  // port B: clear the lanes of departing copies
  input  logic                     wr_en_b,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  input  logic [S-1:0]             be_b,
  output logic [S*LANE_W-1:0]      rd_vec,
  output logic                     rd_valid,
  output logic                     free,
  output logic [$clog2(DEPTH)-1:0] free_addr
);
  logic [S*LANE_W-1:0] mem [DEPTH];
  logic [S*LANE_W-1:0] upd_b;

  // Word seen by port B after its own write (write-first).
  always_comb begin
    upd_b = mem[addr_b];
    for (int unsigned l = 0; l < S; l++)
      if (be_b[l]) upd_b[l*LANE_W +: LANE_W] = '0;
  end

  always_ff @(posedge clk) begin
    if (wr_en_a) mem[addr_a] <= wr_vec_a;
    if (wr_en_b) begin
      mem[addr_b] <= upd_b;
      rd_vec      <= upd_b;
      free_addr   <= addr_b;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) rd_valid <= 1'b0;
    else     rd_valid <= wr_en_b;
  end

  // Check logic: the vector read back is all zero.
  assign free = rd_valid && (rd_vec == '0);

  a_port_conflict: assert property (@(posedge clk) disable iff (rst)
                                    (wr_en_a && wr_en_b) |-> (addr_a != addr_b));

endmodule
