// Grouped-crosspoint-queued (GCQ) switch fabric, N x N, internal speedup S.
//
// A crosspoint-queued crossbar needs N*N buffers. Here each group of S x S
// crosspoints shares one memory based switch (MBS): a buffer whose memory runs
// S times faster than the ports, so it can take a flit from each of its S
// inputs and hand one to each of its S outputs per port cycle. The memory then
// does the switching inside the group, the crossbar shrinks to an
// (N/S) x (N/S) array of MBSs, and buffer space is shared dynamically among
// the group's ports. With the defaults (N = 16, S = 4, 256-bit flits, 576-flit
// MBS buffers) this is a 16-port switch of 10 Gb/s ports: 40 MHz port clock,
// 160 MHz core clock.
//
// Data path of one flit:
//   input_port      VOQ per output group, a dual-clock FIFO (port -> core);
//   row_serializer  input r*S+s owns core cycles with phase == s; its
//                   scheduler picks a VOQ whose target MBSs have credit and
//                   puts the flit on the row's pipelined broadcast bus;
//   mbs (r, c)      stores the flit once if its mask names outputs of
//                   column c and queues its address for each such output;
//   output_mux      output c*S+t owns read cycles with phase == t; it picks
//                   one MBS of column c round-robin and moves the flit
//                   through a dual-clock FIFO back to the port clock.
// Multicast: a flit may name any set of outputs; it is sent once, stored once
// per MBS column it touches, and freed after its last copy leaves.
//
// Interface (all per port, port clock): in_valid/in_ready/in_dest/in_data,
// out_valid/out_ready/out_data. Status outputs at the core clock:
// mbs_free[r][c] free addresses of MBS (r, c), row_credit[r][c] the credits
// row r holds for it, credit_stall[r] pulses when row r's slot owner has a
// flit queued but no credit to send it. in_dest is an N-bit output mask and must not
// be zero. A flit carries no other header; payload order is kept per
// input/output pair. The two clocks are independent; the core clock should
// be at least S times the port clock for the ports to run at full rate.
// Resets are synchronous and active high, one per clock domain, and must
// overlap for a few cycles of the slower clock.
module gcq_switch #(
  parameter int unsigned N          = gcq_pkg::GCQ_N,
  parameter int unsigned S          = gcq_pkg::GCQ_S,
  parameter int unsigned DATA_W     = gcq_pkg::GCQ_FLIT_W,
  parameter int unsigned BUF_DEPTH  = gcq_pkg::GCQ_BUF_FLITS,
  parameter int unsigned IQ_DEPTH   = gcq_pkg::GCQ_IQ_DEPTH,
  parameter int unsigned OQ_DEPTH   = gcq_pkg::GCQ_OQ_DEPTH,
  parameter int unsigned CREDIT_DLY = gcq_pkg::GCQ_CREDIT_DLY,
  parameter int unsigned LANE_W     = gcq_pkg::GCQ_LANE_W
) (
  input  logic                        clk_port,
  input  logic                        rst_port,
  input  logic                        clk_core,
  input  logic                        rst_core,

  input  logic [N-1:0]                in_valid,
  input  logic [N-1:0][N-1:0]         in_dest,
  input  logic [N-1:0][DATA_W-1:0]    in_data,
  output logic [N-1:0]                in_ready,

  output logic [N-1:0]                out_valid,
  output logic [N-1:0][DATA_W-1:0]    out_data,
  input  logic [N-1:0]                out_ready,

  // status, core clock
  output logic [N/S-1:0][N/S-1:0][$clog2(BUF_DEPTH+1)-1:0] mbs_free,
  output logic [N/S-1:0][N/S-1:0][$clog2(BUF_DEPTH+1)-1:0] row_credit,
  output logic [N/S-1:0]              credit_stall
);
  localparam int unsigned G  = N / S;
  localparam int unsigned SW = (S > 1) ? $clog2(S) : 1;
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  // Core-clock time slot shared by all rows and columns.
  logic [SW-1:0] phase;
  always_ff @(posedge clk_core) begin
    if (rst_core)                  phase <= '0;
    else if (phase == SW'(S - 1))  phase <= '0;
    else                           phase <= phase + 1'b1;
  end

  // Input side: VOQs per input, grouped by crossbar row.
  logic [G-1:0][S-1:0][G-1:0]             voq_valid, voq_pop;
  logic [G-1:0][S-1:0][G-1:0][N-1:0]      voq_dest;
  logic [G-1:0][S-1:0][G-1:0][DATA_W-1:0] voq_data;

  for (genvar r = 0; r < G; r++) begin : g_row_in
    for (genvar s = 0; s < S; s++) begin : g_in
      input_port #(.N(N), .S(S), .DATA_W(DATA_W), .IQ_DEPTH(IQ_DEPTH)) u_in (
        .clk_port  (clk_port),
        .rst_port  (rst_port),
        .in_valid  (in_valid[r*S+s]),
        .in_dest   (in_dest[r*S+s]),
        .in_data   (in_data[r*S+s]),
        .in_ready  (in_ready[r*S+s]),
        .clk_core  (clk_core),
        .rst_core  (rst_core),
        .voq_valid (voq_valid[r][s]),
        .voq_dest  (voq_dest[r][s]),
        .voq_data  (voq_data[r][s]),
        .voq_pop   (voq_pop[r][s])
      );
    end
  end

  // Crossbar: row buses and the MBS array.
  logic [G-1:0][G-1:0]              bus_valid, recycle, mbs_out_valid, mbs_grant;
  logic [G-1:0][G-1:0][N-1:0]       bus_dest;
  logic [G-1:0][G-1:0][DATA_W-1:0]  bus_data, mbs_out_data;
  logic [G-1:0][G-1:0][CW-1:0]      credit, free_count;

  assign mbs_free   = free_count;
  assign row_credit = credit;
  logic [G-1:0][G-1:0][S-1:0]       q_nonempty;

  // Grants from the S outputs of each column, indexed [column][local][row].
  logic [G-1:0][S-1:0][G-1:0]       out_grant;

  for (genvar r = 0; r < G; r++) begin : g_row
    row_serializer #(.N(N), .S(S), .DATA_W(DATA_W), .BUF_DEPTH(BUF_DEPTH),
                     .CREDIT_DLY(CREDIT_DLY)) u_ser (
      .clk       (clk_core),
      .rst       (rst_core),
      .phase     (phase),
      .voq_valid (voq_valid[r]),
      .voq_dest  (voq_dest[r]),
      .voq_data  (voq_data[r]),
      .voq_pop   (voq_pop[r]),
      .recycle   (recycle[r]),
      .bus_valid (bus_valid[r]),
      .bus_dest  (bus_dest[r]),
      .bus_data  (bus_data[r]),
      .credit    (credit[r]),
      .blocked   (credit_stall[r])
    );

    for (genvar c = 0; c < G; c++) begin : g_col
      always_comb begin
        mbs_grant[r][c] = 1'b0;
        for (int unsigned t = 0; t < S; t++)
          mbs_grant[r][c] = mbs_grant[r][c] | out_grant[c][t][r];
      end

      mbs #(.S(S), .DATA_W(DATA_W), .DEPTH(BUF_DEPTH), .LANE_W(LANE_W)) u_mbs (
        .clk        (clk_core),
        .rst        (rst_core),
        .in_valid   (bus_valid[r][c]),
        .in_dest    (bus_dest[r][c][c*S +: S]),
        .in_data    (bus_data[r][c]),
        .out_sel    (phase),
        .out_grant  (mbs_grant[r][c]),
        .q_nonempty (q_nonempty[r][c]),
        .out_valid  (mbs_out_valid[r][c]),
        .out_data   (mbs_out_data[r][c]),
        .recycle    (recycle[r][c]),
        .free_count (free_count[r][c])
      );
    end
  end

  // Output side: per output an N/S-to-1 scheduler/mux over its column.
  for (genvar c = 0; c < G; c++) begin : g_col_out
    logic [G-1:0]             col_valid;
    logic [G-1:0][DATA_W-1:0] col_data;
    for (genvar r = 0; r < G; r++) begin : g_colsig
      assign col_valid[r] = mbs_out_valid[r][c];
      assign col_data[r]  = mbs_out_data[r][c];
    end

    for (genvar t = 0; t < S; t++) begin : g_out
      logic [G-1:0] nonempty;
      for (genvar r = 0; r < G; r++) begin : g_ne
        assign nonempty[r] = q_nonempty[r][c][t];
      end

      output_mux #(.N(N), .S(S), .DATA_W(DATA_W), .OQ_DEPTH(OQ_DEPTH),
                   .LOCAL_IDX(t)) u_out (
        .clk_core      (clk_core),
        .rst_core      (rst_core),
        .phase         (phase),
        .mbs_nonempty  (nonempty),
        .grant         (out_grant[c][t]),
        .mbs_out_valid (col_valid),
        .mbs_out_data  (col_data),
        .clk_port      (clk_port),
        .rst_port      (rst_port),
        .out_valid     (out_valid[c*S+t]),
        .out_data      (out_data[c*S+t]),
        .out_ready     (out_ready[c*S+t])
      );
    end
  end

endmodule
