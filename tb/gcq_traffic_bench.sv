// Traffic bench for one GCQ switch configuration (used by tb_gcq_workloads).
//
// It instantiates a switch with the given size, speedup and buffer depths,
// makes its own clocks (core clock exactly S times the port clock), and
// drives uniform random traffic: in every port cycle each input starts a new
// packet with probability LOAD_PM/1000/PKT_LEN (a Bernoulli process), to one
// output chosen uniformly; a packet is PKT_LEN flits to the same output.
// Packets wait in an unbounded source queue in the bench, so the measured
// latency includes source queueing, as in a network simulator. Outputs are
// always ready. Every flit carries source, sequence number and generation
// time; the bench checks that each arrives once, intact and in order per
// input/output pair. After WARMUP port cycles it counts delivered flits and
// their latency for MEASURE cycles, then stops generating and drains.
module gcq_traffic_bench #(
  parameter int unsigned N         = 16,
  parameter int unsigned S         = 4,
  parameter int unsigned BUF_DEPTH = 576,
  parameter int unsigned IQ_DEPTH  = 16,
  parameter int unsigned PKT_LEN   = 1,
  parameter int unsigned LOAD_PM   = 800,    // offered load per input, per mille
  parameter int unsigned WARMUP    = 500,
  parameter int unsigned MEASURE   = 2000
) (
  output logic    done,
  output int      checks,
  output int      failures,
  output int      delivered_in_window,
  output longint  latency_sum,
  output int      offered_in_window
);
  localparam int unsigned DATA_W = 256;
  localparam real PORT_HALF = 12.5;                 // 40 MHz port clock

  logic clk_port = 0, clk_core = 0;
  always #(PORT_HALF) clk_port = ~clk_port;
  always #(PORT_HALF / S) clk_core = ~clk_core;

  logic rst_port, rst_core;
  logic [N-1:0] in_valid, in_ready, out_valid, out_ready;
  logic [N-1:0][N-1:0] in_dest;
  logic [N-1:0][DATA_W-1:0] in_data, out_data;
  logic [N/S-1:0][N/S-1:0][$clog2(BUF_DEPTH+1)-1:0] mbs_free, row_credit;
  logic [N/S-1:0] credit_stall;

  gcq_switch #(.N(N), .S(S), .DATA_W(DATA_W), .BUF_DEPTH(BUF_DEPTH), .IQ_DEPTH(IQ_DEPTH)) dut (.*);

  int port_cyc = 0;
  bit gen_on = 0, measuring = 0;
  int outstanding = 0;

  // source queues: {dest, seq, gen time}
  typedef struct packed { logic [7:0] dst; logic [31:0] sq; logic [31:0] t; } flit_t;
  flit_t srcq [N][$];
  int next_seq [N];
  int last_seq [N][N];

  function automatic logic [DATA_W-1:0] payload(input int src, input flit_t f);
    logic [DATA_W-1:0] w;
    w = '0;
    w[7:0] = 8'(src); w[15:8] = f.dst; w[47:16] = f.sq; w[79:48] = f.t;
    for (int i = 3; i < int'(DATA_W) / 32; i++) w[i*32 +: 32] = 32'(src * 31 + int'(f.sq) * 17 + i);
    return w;
  endfunction

  always @(posedge clk_port) port_cyc <= port_cyc + 1;

  for (genvar i = 0; i < N; i++) begin : g_src
    always @(posedge clk_port) begin
      if (rst_port) in_valid[i] <= 1'b0;
      else begin
        // packet generation
        if (gen_on && $urandom_range(0, 1000 * PKT_LEN - 1) < LOAD_PM) begin
          int d;
          d = $urandom_range(0, N - 1);
          for (int k = 0; k < int'(PKT_LEN); k++) begin
            flit_t f;
            f.dst = 8'(d); f.sq = 32'(next_seq[i]); f.t = 32'(port_cyc);
            next_seq[i]++;
            srcq[i].push_back(f);
            outstanding++;
            if (measuring) offered_in_window++;
          end
        end
        // handshake
        if (in_valid[i] && in_ready[i]) void'(srcq[i].pop_front());
        if (srcq[i].size() > 0) begin
          in_valid[i] <= 1'b1;
          in_dest[i]  <= N'(1) << srcq[i][0].dst;
          in_data[i]  <= payload(i, srcq[i][0]);
        end else in_valid[i] <= 1'b0;
      end
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_sink
    always @(posedge clk_port) begin
      out_ready[o] <= 1'b1;
      if (!rst_port && out_valid[o] && out_ready[o]) begin
        int src;
        flit_t f;
        src = int'(out_data[o][7:0]);
        f.dst = out_data[o][15:8]; f.sq = out_data[o][47:16]; f.t = out_data[o][79:48];
        checks++;
        if (src >= int'(N) || int'(f.dst) != o || out_data[o] != payload(src, f) ||
            int'(f.sq) <= last_seq[src][o]) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d S=%0d: bad flit at output %0d", N, S, o);
        end else last_seq[src][o] = int'(f.sq);
        outstanding--;
        if (measuring) begin
          delivered_in_window++;
          latency_sum += longint'(port_cyc - int'(f.t));
        end
      end
    end
  end

  initial begin
    done = 0; checks = 0; failures = 0; delivered_in_window = 0; latency_sum = 0; offered_in_window = 0;
    rst_port = 1; rst_core = 1; in_dest = '0; in_data = '0;
    for (int i = 0; i < int'(N); i++) begin
      next_seq[i] = 0;
      for (int o = 0; o < int'(N); o++) last_seq[i][o] = -1;
    end
    repeat (6) @(posedge clk_port);
    @(negedge clk_port); rst_port = 0; rst_core = 0;
    gen_on = 1;
    repeat (WARMUP) @(posedge clk_port);
    measuring = 1;
    repeat (MEASURE) @(posedge clk_port);
    measuring = 0; gen_on = 0;
    while (outstanding > 0) @(posedge clk_port);
    repeat (5) @(posedge clk_port);
    checks++;
    for (int r = 0; r < int'(N / S); r++)
      for (int c = 0; c < int'(N / S); c++)
        if (int'(mbs_free[r][c]) != BUF_DEPTH || int'(row_credit[r][c]) != BUF_DEPTH) begin
          failures++;
          $display("FAIL N=%0d S=%0d: buffer or credits not restored", N, S);
        end
    done = 1;
  end
endmodule
