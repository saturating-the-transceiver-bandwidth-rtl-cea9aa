// Output scheduler and multiplexer of one switch output.
//
// Output o = c*S + LOCAL_IDX is fed by the N/S memory based switches (MBSs)
// of crossbar column c, one per row. In the core cycles where 'phase' equals
// LOCAL_IDX this output owns the read slot of its column: a round-robin
// arbiter picks one MBS whose pointer queue for this output is not empty and
// raises that MBS's bit of 'grant'. The granted MBS delivers the flit one
// cycle later, and it is written into a small dual-clock FIFO that carries it
// to the port clock. A grant is given only while the FIFO, counting the flit
// still in flight, has room, so the output port can stall with 'out_ready'
// without loss. Port side: 'out_valid' and 'out_data' hold the head flit,
// which is taken when 'out_ready' is high at a port-clock edge.
module output_mux #(
  parameter int unsigned N         = 16,
  parameter int unsigned S         = 4,
  parameter int unsigned DATA_W    = 256,
  parameter int unsigned OQ_DEPTH  = 8,
  parameter int unsigned LOCAL_IDX = 0
) (
  input  logic                                clk_core,
  input  logic                                rst_core,
  input  logic [((S > 1) ? $clog2(S) : 1)-1:0] phase,
  input  logic [N/S-1:0]                      mbs_nonempty,
  output logic [N/S-1:0]                      grant,
  input  logic [N/S-1:0]                      mbs_out_valid,
  input  logic [N/S-1:0][DATA_W-1:0]          mbs_out_data,

  input  logic                                clk_port,
  input  logic                                rst_port,
  output logic                                out_valid,
  output logic [DATA_W-1:0]                   out_data,
  input  logic                                out_ready
);
  localparam int unsigned G  = N / S;
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1;
  localparam int unsigned QW = $clog2(OQ_DEPTH) + 1;
  localparam int unsigned SW = (S > 1) ? $clog2(S) : 1;

  logic              active, room, gnt_valid, granted_d, fifo_full, fifo_empty;
  logic [GW-1:0]     gnt_idx, gnt_idx_d;
  logic [QW-1:0]     wr_count;

  assign active = (phase == SW'(LOCAL_IDX));
  assign room   = (wr_count + QW'(granted_d)) < QW'(OQ_DEPTH);

  rr_arbiter #(.N(G)) u_rr (
    .clk       (clk_core),
    .rst       (rst_core),
    .req       ((active && room) ? mbs_nonempty : '0),
    .accept    (1'b1),
    .gnt_valid (gnt_valid),
    .gnt_idx   (gnt_idx)
  );

  always_comb begin
    grant = '0;
    if (gnt_valid) grant[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk_core) begin
    if (rst_core) granted_d <= 1'b0;
    else          granted_d <= gnt_valid;
    gnt_idx_d <= gnt_idx;
  end

  async_fifo #(.WIDTH(DATA_W), .DEPTH(OQ_DEPTH)) u_ofifo (
    .wclk     (clk_core),
    .wrst     (rst_core),
    .wr_en    (granted_d),
    .wr_data  (mbs_out_data[gnt_idx_d]),
    .full     (fifo_full),
    .wr_count (wr_count),
    .rclk     (clk_port),
    .rrst     (rst_port),
    .rd_en    (out_valid && out_ready),
    .rd_data  (out_data),
    .empty    (fifo_empty)
  );

  assign out_valid = !fifo_empty;

  a_data_arrives: assert property (@(posedge clk_core) disable iff (rst_core)
                                   granted_d |-> mbs_out_valid[gnt_idx_d]);
  // The room check must keep the output FIFO from overflowing.
  a_no_overflow: assert property (@(posedge clk_core) disable iff (rst_core)
                                  granted_d |-> !fifo_full);

endmodule
