// Input scheduler of one switch input: an N/S-to-1 round-robin choice among
// the input's virtual output queues.
//
// In the input's time slot ('slot' high) a VOQ is eligible when it holds a
// flit and every crossbar column that the head flit's destination mask names
// has a free shared-buffer credit ('credit_ok'). The winner is reported on
// 'send'/'sel' in the same cycle and the round-robin pointer moves past it.
// Outside the slot nothing is sent.
module voq_scheduler #(
  parameter int unsigned N = 16,
  parameter int unsigned S = 4
) (
  input  logic                                   clk,
  input  logic                                   rst,
  input  logic                                   slot,
  input  logic [N/S-1:0]                         voq_valid,
  input  logic [N/S-1:0][N-1:0]                  voq_dest,
  input  logic [N/S-1:0]                         credit_ok,
  output logic                                   send,
  output logic [((N/S > 1) ? $clog2(N/S) : 1)-1:0] sel
);
  localparam int unsigned G = N / S;

  logic [G-1:0] eligible;
  logic         gnt_valid;

  always_comb begin
    for (int unsigned v = 0; v < G; v++) begin
      eligible[v] = voq_valid[v];
      for (int unsigned p = 0; p < N; p++)
        if (voq_dest[v][p] && !credit_ok[p / S]) eligible[v] = 1'b0;
    end
  end

  rr_arbiter #(.N(G)) u_rr (
    .clk       (clk),
    .rst       (rst),
    .req       (slot ? eligible : '0),
    .accept    (1'b1),
    .gnt_valid (gnt_valid),
    .gnt_idx   (sel)
  );

  assign send = gnt_valid;

endmodule
