// One switch input with its virtual output queues (VOQs).
//
// Because each memory based switch already switches among S outputs, an
// input needs only N/S VOQs, one per output group (a column of the crossbar).
// Each VOQ is a dual-clock FIFO in distributed RAM: it is written at the port
// clock and read at the core clock, so the queues are also the clock-domain
// crossing in front of the crossbar.
//
// Port side: a flit is offered with 'in_valid', its N-bit destination mask
// 'in_dest' (one bit per output, several bits for multicast) and 'in_data';
// it is taken when 'in_ready' is high in the same port-clock cycle. It goes
// into the VOQ of the lowest output group its mask names; the broadcast bus
// behind the VOQs delivers it to every group of the mask. 'in_ready' is low
// while that VOQ is full.
// Core side: 'voq_valid', 'voq_dest' and 'voq_data' show the head of each VOQ;
// 'voq_pop' removes it.
module input_port #(
  parameter int unsigned N        = 16,
  parameter int unsigned S        = 4,
  parameter int unsigned DATA_W   = 256,
  parameter int unsigned IQ_DEPTH = 16
) (
  input  logic                          clk_port,
  input  logic                          rst_port,
  input  logic                          in_valid,
  input  logic [N-1:0]                  in_dest,
  input  logic [DATA_W-1:0]             in_data,
  output logic                          in_ready,

  input  logic                          clk_core,
  input  logic                          rst_core,
  output logic [N/S-1:0]                voq_valid,
  output logic [N/S-1:0][N-1:0]         voq_dest,
  output logic [N/S-1:0][DATA_W-1:0]    voq_data,
  input  logic [N/S-1:0]                voq_pop
);
  localparam int unsigned G  = N / S;
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1;

  logic [G-1:0]  voq_full, voq_empty;
  logic [GW-1:0] grp;
  logic          grp_found;

  // Output group that receives the flit: the lowest group the mask names.
  always_comb begin
    grp       = '0;
    grp_found = 1'b0;
    for (int unsigned p = 0; p < N; p++)
      if (!grp_found && in_dest[p]) begin
        grp       = GW'(p / S);
        grp_found = 1'b1;
      end
  end

  assign in_ready = grp_found && !voq_full[grp];

  for (genvar g = 0; g < G; g++) begin : g_voq
    async_fifo #(.WIDTH(N + DATA_W), .DEPTH(IQ_DEPTH)) u_voq (
      .wclk     (clk_port),
      .wrst     (rst_port),
      .wr_en    (in_valid && in_ready && (grp == g)),
      .wr_data  ({in_dest, in_data}),
      .full     (voq_full[g]),
      .wr_count (),
      .rclk     (clk_core),
      .rrst     (rst_core),
      .rd_en    (voq_pop[g]),
      .rd_data  ({voq_dest[g], voq_data[g]}),
      .empty    (voq_empty[g])
    );
  end

  assign voq_valid = ~voq_empty;

  a_dest_nonzero: assert property (@(posedge clk_port) disable iff (rst_port)
                                   in_valid |-> (in_dest != '0));

endmodule
