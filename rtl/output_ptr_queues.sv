// Output pointer queues of a memory based switch.
//
// S first-come-first-served FIFOs of shared-buffer addresses, one for each
// local output. A stored flit's address is pushed into every queue named in
// 'push_mask' in the same cycle, so a multicast flit is queued for all its
// outputs while its data is stored once. Per cycle one queue, 'pop_sel', can
// be read: its head is on 'head_addr' and 'pop' removes it. Each queue holds
// DEPTH entries, enough for every address of the buffer, so it cannot
// overflow while the buffer itself has room.
module output_ptr_queues #(
  parameter int unsigned S     = 4,
  parameter int unsigned DEPTH = 576
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [S-1:0]                     push_mask,
  input  logic [$clog2(DEPTH)-1:0]         push_addr,
  input  logic [((S > 1) ? $clog2(S) : 1)-1:0] pop_sel,
  input  logic                             pop,
  output logic [$clog2(DEPTH)-1:0]         head_addr,
  output logic [S-1:0]                     nonempty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [S-1:0][AW-1:0] heads;
  logic [S-1:0]         empty, full;

  for (genvar q = 0; q < S; q++) begin : g_q
    sync_fifo #(.WIDTH(AW), .DEPTH(DEPTH)) u_fifo (
      .clk   (clk),
      .rst   (rst),
      .push  (push_mask[q]),
      .din   (push_addr),
      .pop   (pop && (pop_sel == q)),
      .dout  (heads[q]),
      .empty (empty[q]),
      .full  (full[q]),
      .count ()
    );
  end

  assign nonempty  = ~empty;
  assign head_addr = heads[pop_sel];

  // Every queue is as deep as the buffer, so an address always fits.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) (push_mask & full) == '0);

endmodule
