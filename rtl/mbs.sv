// Memory based switch (MBS): an S x S output-queued subswitch made of one
// shared buffer and its dynamic memory management.
//
// It sits at one crosspoint of the (N/S) x (N/S) crossbar and serves the S
// inputs of its row and the S outputs of its column, one input and one output
// per core clock cycle (the core runs S times faster than the ports).
//
// Write path (one flit per cycle): a flit on 'in_valid' whose local
// destination mask 'in_dest' is not zero takes the next address of the free
// address pool, is written into the shared buffer at that address, has the
// address pushed into the output pointer queue of every destination, and has
// its destination vector written into the address recycle bin through port A.
// The sender must hold a credit for the flit (see 'recycle'); a flit for no
// local output is ignored.
//
// Read path (one flit per cycle): when 'out_grant' is high the queue of local
// output 'out_sel' is popped, the shared buffer is read at the head address,
// and port B of the recycle bin clears that output's lane. The flit appears on
// 'out_data' with 'out_valid' one cycle after the grant. 'q_nonempty' tells
// the output schedulers which queues hold flits.
//
// Recycling: when the recycle bin reports an all-zero vector the address goes
// back to the pool and 'recycle' pulses once; the row serializer counts these
// pulses as returned credits. A multicast flit is thus freed after its last
// copy has left. Latency from 'in_valid' to the earliest grant is one cycle
// (the pointer queue's count is registered).
module mbs #(
  parameter int unsigned S      = 4,
  parameter int unsigned DATA_W = 256,
  parameter int unsigned DEPTH  = 576,
  parameter int unsigned LANE_W = 1
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic                             in_valid,
  input  logic [S-1:0]                     in_dest,
  input  logic [DATA_W-1:0]                in_data,
  input  logic [((S > 1) ? $clog2(S) : 1)-1:0] out_sel,
  input  logic                             out_grant,
  output logic [S-1:0]                     q_nonempty,
  output logic                             out_valid,
  output logic [DATA_W-1:0]                out_data,
  output logic                             recycle,
  output logic [$clog2(DEPTH+1)-1:0]       free_count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic          accept, pool_avail, do_read;
  logic [AW-1:0] wr_addr, head_addr, free_addr;
  logic [S*LANE_W-1:0] dest_vec;
  logic [S-1:0]  clear_lane;

  assign accept  = in_valid && (in_dest != '0);
  assign do_read = out_grant && q_nonempty[out_sel];

  // One lane per local output; a destination's lane holds the value 1.
  always_comb begin
    dest_vec = '0;
    for (int unsigned l = 0; l < S; l++)
      dest_vec[l*LANE_W +: LANE_W] = LANE_W'(in_dest[l]);
    clear_lane = '0;
    clear_lane[out_sel] = 1'b1;
  end

  free_addr_pool #(.DEPTH(DEPTH)) u_pool (
    .clk          (clk),
    .rst          (rst),
    .alloc        (accept),
    .avail        (pool_avail),
    .alloc_addr   (wr_addr),
    .recycle      (recycle),
    .recycle_addr (free_addr),
    .free_count   (free_count)
  );

  shared_buffer #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_buf (
    .clk     (clk),
    .wr_en   (accept),
    .wr_addr (wr_addr),
    .wr_data (in_data),
    .rd_en   (do_read),
    .rd_addr (head_addr),
    .rd_data (out_data)
  );

  output_ptr_queues #(.S(S), .DEPTH(DEPTH)) u_opq (
    .clk       (clk),
    .rst       (rst),
    .push_mask (accept ? in_dest : '0),
    .push_addr (wr_addr),
    .pop_sel   (out_sel),
    .pop       (do_read),
    .head_addr (head_addr),
    .nonempty  (q_nonempty)
  );

  addr_recycle_bin #(.DEPTH(DEPTH), .S(S), .LANE_W(LANE_W)) u_arb (
    .clk       (clk),
    .rst       (rst),
    .wr_en_a   (accept),
    .addr_a    (wr_addr),
    .wr_vec_a  (dest_vec),
    .wr_en_b   (do_read),
    .addr_b    (head_addr),
    .be_b      (clear_lane),
    .rd_vec    (),
    .rd_valid  (),
    .free      (recycle),
    .free_addr (free_addr)
  );

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= do_read;
  end

  a_has_space: assert property (@(posedge clk) disable iff (rst) accept |-> pool_avail);

endmodule
