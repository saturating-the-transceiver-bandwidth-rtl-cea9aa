// Row serializer, input schedulers, credit counters and pipelined broadcast
// bus of one crossbar row.
//
// A row of the crossbar holds N/S memory based switches (MBSs) that all see
// the same S inputs. Rather than running S separate 256-bit buses at the port
// clock past every MBS, the S inputs take turns on one 256-bit bus that runs
// S times faster, at the core clock: in core cycle 'phase' input 'phase' of the
// row may send one flit. Its round-robin scheduler picks a VOQ, the VOQ is
// popped and the flit is registered onto the bus. The bus is cut into N/S
// register stages, one in front of each MBS, so MBS k sees a flit k+1 cycles
// after it was sent; the bus is a broadcast, and every MBS whose output group
// appears in the flit's destination mask stores it.
//
// Flow control is by credits, one per free shared-buffer address: a counter
// per MBS starts at BUF_DEPTH, drops when a flit for that MBS is sent and
// rises when the MBS recycles an address ('recycle', seen CREDIT_DLY cycles
// late). A flit is sent only when every MBS it goes to has a credit, so no MBS
// ever receives a flit it has no room for, and the S inputs share each buffer
// freely. 'credit' shows the counters; 'blocked' pulses when the active input
// had a flit queued but could not send it for lack of credit.
module row_serializer #(
  parameter int unsigned N          = 16,
  parameter int unsigned S          = 4,
  parameter int unsigned DATA_W     = 256,
  parameter int unsigned BUF_DEPTH  = 576,
  parameter int unsigned CREDIT_DLY = 2
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [((S > 1) ? $clog2(S) : 1)-1:0] phase,
  input  logic [S-1:0][N/S-1:0]               voq_valid,
  input  logic [S-1:0][N/S-1:0][N-1:0]        voq_dest,
  input  logic [S-1:0][N/S-1:0][DATA_W-1:0]   voq_data,
  output logic [S-1:0][N/S-1:0]               voq_pop,
  input  logic [N/S-1:0]                      recycle,
  output logic [N/S-1:0]                      bus_valid,
  output logic [N/S-1:0][N-1:0]               bus_dest,
  output logic [N/S-1:0][DATA_W-1:0]          bus_data,
  output logic [N/S-1:0][$clog2(BUF_DEPTH+1)-1:0] credit,
  output logic                                blocked
);
  localparam int unsigned G  = N / S;
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1;
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  logic [G-1:0]          credit_ok;
  logic [S-1:0]          send;
  logic [S-1:0][GW-1:0]  sel;

  logic                  tx_valid;
  logic [N-1:0]          tx_dest;
  logic [DATA_W-1:0]     tx_data;
  logic [G-1:0]          tx_groups;

  logic [CREDIT_DLY-1:0][G-1:0] ret_pipe;

  for (genvar g = 0; g < G; g++) begin : g_ok
    assign credit_ok[g] = (credit[g] != '0);
  end

  // One scheduler per input; only the input owning the slot may send.
  for (genvar s = 0; s < S; s++) begin : g_sched
    voq_scheduler #(.N(N), .S(S)) u_sched (
      .clk       (clk),
      .rst       (rst),
      .slot      (phase == s),
      .voq_valid (voq_valid[s]),
      .voq_dest  (voq_dest[s]),
      .credit_ok (credit_ok),
      .send      (send[s]),
      .sel       (sel[s])
    );
    for (genvar g = 0; g < G; g++) begin : g_pop
      assign voq_pop[s][g] = send[s] && (sel[s] == g);
    end
  end

  // Serializer: the slot owner's chosen VOQ head.
  assign tx_valid = send[phase];
  assign tx_dest  = voq_dest[phase][sel[phase]];
  assign tx_data  = voq_data[phase][sel[phase]];
  assign blocked  = !tx_valid && (voq_valid[phase] != '0);

  always_comb begin
    tx_groups = '0;
    for (int unsigned p = 0; p < N; p++)
      if (tx_dest[p]) tx_groups[p / S] = 1'b1;
  end

  // Credit counters.
  always_ff @(posedge clk) begin
    if (rst) begin
      ret_pipe <= '0;
      for (int unsigned g = 0; g < G; g++) credit[g] <= CW'(BUF_DEPTH);
    end else begin
      ret_pipe[0] <= recycle;
      for (int unsigned d = 1; d < CREDIT_DLY; d++) ret_pipe[d] <= ret_pipe[d-1];
      for (int unsigned g = 0; g < G; g++)
        credit[g] <= credit[g] - CW'(tx_valid && tx_groups[g]) + CW'(ret_pipe[CREDIT_DLY-1][g]);
    end
  end

  // Broadcast bus: one register stage in front of each MBS.
  always_ff @(posedge clk) begin
    if (rst) bus_valid <= '0;
    else begin
      bus_valid[0] <= tx_valid;
      for (int unsigned k = 1; k < G; k++) bus_valid[k] <= bus_valid[k-1];
    end
  end

  always_ff @(posedge clk) begin
    bus_dest[0] <= tx_dest;
    bus_data[0] <= tx_data;
    for (int unsigned k = 1; k < G; k++) begin
      bus_dest[k] <= bus_dest[k-1];
      bus_data[k] <= bus_data[k-1];
    end
  end

  for (genvar g = 0; g < G; g++) begin : g_chk
    a_credit_bound: assert property (@(posedge clk) disable iff (rst)
                                     credit[g] <= CW'(BUF_DEPTH));
  end

endmodule
