// Free address pool of a memory based switch.
//
// Supplies a free shared-buffer address to every arriving flit and takes back
// the addresses that the recycle bin releases. After reset every address is
// free: instead of preloading a queue, a fill counter hands out the addresses
// 0..DEPTH-1 once, in order; from then on addresses come from a FIFO of
// recycled ones. The next free address is always visible on 'alloc_addr' while
// 'avail' is high; 'alloc' takes it. One allocation and one recycle may happen
// in the same cycle. 'free_count' is the number of addresses currently free.
// One queue serves all S inputs of the switch, each in its own time slot,
// so a busy input can borrow space the others are not using.
module free_addr_pool #(
  parameter int unsigned DEPTH = 576
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       alloc,
  output logic                       avail,
  output logic [$clog2(DEPTH)-1:0]   alloc_addr,
  input  logic                       recycle,
  input  logic [$clog2(DEPTH)-1:0]   recycle_addr,
  output logic [$clog2(DEPTH+1)-1:0] free_count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [CW-1:0] fresh;          // next never-used address
  logic          fresh_left;
  logic [AW-1:0] q_head;
  logic          q_empty, q_full;
  logic [CW-1:0] q_count;

  assign fresh_left = (fresh != CW'(DEPTH));
  assign avail      = fresh_left || !q_empty;
  assign alloc_addr = fresh_left ? AW'(fresh) : q_head;
  assign free_count = (CW'(DEPTH) - fresh) + q_count;

  always_ff @(posedge clk) begin
    if (rst)                      fresh <= '0;
    else if (alloc && fresh_left) fresh <= fresh + 1'b1;
  end

  sync_fifo #(.WIDTH(AW), .DEPTH(DEPTH)) u_recycled (
    .clk   (clk),
    .rst   (rst),
    .push  (recycle),
    .din   (recycle_addr),
    .pop   (alloc && !fresh_left),
    .dout  (q_head),
    .empty (q_empty),
    .full  (q_full),
    .count (q_count)
  );

  a_alloc_when_avail: assert property (@(posedge clk) disable iff (rst) alloc |-> avail);
  a_no_excess_free:   assert property (@(posedge clk) disable iff (rst) recycle |-> !q_full);

endmodule
