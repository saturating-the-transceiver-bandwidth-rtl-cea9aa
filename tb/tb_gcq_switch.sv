// End-to-end test of the GCQ switch at its default configuration: 16 ports,
// speedup 4 (a 4 x 4 array of memory based switches), 256-bit flits,
// 576-flit shared buffers, 40 MHz port clock and 160 MHz core clock.
//
// Every flit carries its source, a sequence number, its destination mask and
// a filler derived from both in its payload. A scoreboard expects each
// (source, sequence, output) copy exactly once with an intact payload, and in
// order among the flits of one source that share a VOQ and an output.
// Phases:
//   1 latency   single flits through an idle switch; the port-to-port latency
//               must not exceed 10 port cycles (250 ns at 40 MHz);
//   2 rate      a full-load permutation (input i -> output i+5): every output
//               must deliver a flit in at least 98% of the port cycles;
//   3 mixed     random unicast and multicast (within and across output
//               groups) with random output stalls;
//   4 hotspot   output 0 stalls while inputs 0..3 send only to it, so one
//               output queue borrows most of MBS(0,0)'s buffer, the buffer
//               fills, credits run out and the inputs are back-pressured;
//   then everything drains and all credits and addresses must be back.
// Each mechanism (multicast, credit stall, input and output back-pressure,
// an output switching between MBSs of different rows in consecutive cycles,
// buffer borrowing, full buffer) is counted and must occur at least once.
module tb_gcq_switch;
  import gcq_pkg::*;
  localparam int unsigned N = GCQ_N, S = GCQ_S, DATA_W = GCQ_FLIT_W, BUF = GCQ_BUF_FLITS;
  localparam int unsigned G = N / S;

  logic clk_port = 0, clk_core = 0;
  always #12.5  clk_port = ~clk_port;   // 40 MHz
  always #3.125 clk_core = ~clk_core;   // 160 MHz

  logic rst_port, rst_core;
  logic [N-1:0] in_valid, in_ready, out_valid, out_ready;
  logic [N-1:0][N-1:0] in_dest;
  logic [N-1:0][DATA_W-1:0] in_data, out_data;
  logic [G-1:0][G-1:0][$clog2(BUF+1)-1:0] mbs_free, row_credit;
  logic [G-1:0] credit_stall;

  gcq_switch dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ traffic
  int mode = 0;          // 0 idle, 1 latency, 2 permutation, 3 mixed, 4 hotspot
  int port_cyc = 0;
  int seq [N];
  int lat_inject = 0;    // phase 1: number of single flits still to inject
  logic [N-1:0] gen_on;
  int accepted = 0, delivered = 0, expected_copies = 0;

  // payload layout: [7:0] src, [39:8] seq, [71:40] accept cycle,
  // [87:72] mask, rest filler
  function automatic logic [DATA_W-1:0] make_flit(input int src, input int sq, input logic [N-1:0] m);
    logic [DATA_W-1:0] w;
    w = '0;
    w[7:0] = 8'(src); w[39:8] = 32'(sq); w[72 +: N] = m;
    for (int i = 3; i < int'(DATA_W) / 32; i++) w[i*32 +: 32] = 32'(src * 7919 + sq * 104729 + i);
    return w;
  endfunction

  function automatic int low_group(input logic [N-1:0] m);
    for (int p = 0; p < int'(N); p++) if (m[p]) return p / int'(S);
    return 0;
  endfunction

  function automatic logic [N-1:0] pick_mask(input int src);
    logic [N-1:0] m;
    case (mode)
      1: m = N'(1 << ((src * 3 + 1) % N));
      2: m = N'(1 << ((src + 5) % N));
      4: m = (src < int'(S)) ? N'(1) : N'(1 << (S + $urandom_range(0, N - S - 1)));
      default: begin
        case ($urandom_range(0, 9))
          0:       m = N'($urandom) | N'(1 << $urandom_range(0, N - 1));           // any multicast
          1:       m = N'($urandom_range(1, 15)) << (S * $urandom_range(0, G - 1));   // within a group
          default: m = N'(1 << $urandom_range(0, N - 1));
        endcase
      end
    endcase
    return m;
  endfunction

  // scoreboard: expected copies, and per (src, out, voq group) last sequence
  bit exp_copy [longint];
  int last_seq [N][N][G];
  int multicast_flits = 0, cross_group_flits = 0, in_bp = 0, out_bp = 0;
  int lat_max = 0, lat_count = 0;
  int last_out_cyc [N];
  int last_out_row [N];
  int credit_stalls = 0, contention = 0, max_queue = 0, buffer_full = 0;

  for (genvar i = 0; i < N; i++) begin : g_src
    always @(posedge clk_port) begin
      if (rst_port) begin
        in_valid[i] <= 1'b0;
      end else begin
        bit take;
        take = in_valid[i] && in_ready[i];
        if (in_valid[i] && !in_ready[i]) in_bp++;
        if (take) begin
          accepted++;
          for (int o = 0; o < int'(N); o++)
            if (in_dest[i][o]) begin
              exp_copy[{32'(i), 32'(seq[i])} * 64 + longint'(o)] = 1;
              expected_copies++;
            end
          if ($countones(in_dest[i]) > 1) multicast_flits++;
          begin
            int ng;
            ng = 0;
            for (int g = 0; g < int'(G); g++) if (in_dest[i][g*S +: S] != '0) ng++;
            if (ng > 1) cross_group_flits++;
          end
          seq[i]++;
        end
        if (take || !in_valid[i]) begin
          bit go;
          go = gen_on[i] && (mode == 2 || mode == 4 || (mode == 3 && $urandom_range(0, 3) != 0));
          if (mode == 1) go = (i == 0) && lat_inject > 0;
          if (go) begin
            logic [N-1:0] m;
            logic [DATA_W-1:0] w;
            m = pick_mask(i);
            w = make_flit(i, seq[i], m);
            w[71:40] = 32'(port_cyc + 1);
            in_valid[i] <= 1'b1; in_dest[i] <= m; in_data[i] <= w;
            if (mode == 1) lat_inject--;
          end else begin
            in_valid[i] <= 1'b0;
          end
        end
      end
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_sink
    always @(posedge clk_port) begin
      if (rst_port) begin
        out_ready[o] <= 1'b0;
      end else begin
        if (out_valid[o] && !out_ready[o]) out_bp++;
        if (out_valid[o] && out_ready[o]) begin
          int src, sq, grp, lat;
          logic [N-1:0] m;
          longint key;
          src = int'(out_data[o][7:0]);
          sq  = int'(out_data[o][39:8]);
          m   = out_data[o][72 +: N];
          grp = low_group(m);
          key = {32'(src), 32'(sq)} * 64 + longint'(o);
          chk(src < int'(N) && exp_copy.exists(key), $sformatf("output %0d: unexpected flit src %0d seq %0d", o, src, sq));
          if (exp_copy.exists(key)) exp_copy.delete(key);
          chk(m[o], "flit delivered to an output in its mask");
          if (src < int'(N)) begin
            chk(out_data[o] == (make_flit(src, sq, m) | (DATA_W'(out_data[o][71:40]) << 40)),
                $sformatf("output %0d: payload of src %0d seq %0d", o, src, sq));
            chk(sq > last_seq[src][o][grp], $sformatf("order src %0d out %0d", src, o));
            last_seq[src][o][grp] = sq;
          end
          lat = port_cyc - int'(out_data[o][71:40]);
          if (mode == 1) begin
            lat_count++;
            if (lat > lat_max) lat_max = lat;
          end
          if (src < int'(N)) begin
            if (last_out_cyc[o] == port_cyc - 1 && last_out_row[o] != src / int'(S)) contention++;
            last_out_cyc[o] = port_cyc;
            last_out_row[o] = src / int'(S);
          end
          delivered++;
        end
        case (mode)
          3: out_ready[o] <= ($urandom_range(0, 4) != 0);
          4: out_ready[o] <= (o != 0);
          default: out_ready[o] <= 1'b1;
        endcase
      end
    end
  end

  always @(posedge clk_port) port_cyc <= port_cyc + 1;

  // ------------------------------------------------------------ monitors
  for (genvar r = 0; r < G; r++) begin : g_mon_row
    always @(posedge clk_core) if (!rst_core && credit_stall[r]) credit_stalls++;
    for (genvar c = 0; c < G; c++) begin : g_mon_mbs
      always @(posedge clk_core) if (!rst_core) begin
        if (mbs_free[r][c] == 0) buffer_full++;
      end
    end
  end
  // Buffer borrowing: in the hotspot phase everything MBS(0,0) holds is for
  // output 0, so its occupancy is the length of that output's queue.
  always @(posedge clk_core)
    if (!rst_core && mode == 4 && int'(BUF - mbs_free[0][0]) > max_queue)
      max_queue = int'(BUF - mbs_free[0][0]);

  // ------------------------------------------------------------ sequence
  task automatic drain(input int limit);
    int waited;
    mode = 0; gen_on = '0;
    waited = 0;
    while ((delivered < expected_copies || in_valid != '0) && waited < limit) begin
      @(posedge clk_port); waited++;
    end
    repeat (20) @(posedge clk_port);
  endtask

  initial begin
    int d0;
    rst_port = 1; rst_core = 1; gen_on = '0;
    in_dest = '0; in_data = '0;
    for (int i = 0; i < int'(N); i++) begin
      seq[i] = 0; last_out_cyc[i] = -5; last_out_row[i] = -1;
      for (int o = 0; o < int'(N); o++) for (int g = 0; g < int'(G); g++) last_seq[i][o][g] = -1;
    end
    repeat (6) @(posedge clk_port);
    @(negedge clk_port); rst_port = 0; rst_core = 0;
    repeat (10) @(posedge clk_port);

    // 1: latency of single flits through the idle switch
    for (int k = 0; k < 8; k++) begin
      mode = 1; lat_inject = 1; gen_on = '1;
      repeat (40) @(posedge clk_port);
    end
    drain(200);
    $display("port-to-port latency: at most %0d port cycles over %0d flits", lat_max, lat_count);
    chk(lat_count == 8, "all latency probes delivered");
    chk(lat_max <= 10, $sformatf("latency %0d port cycles exceeds 10 (250 ns)", lat_max));

    // 2: full-load permutation
    mode = 2; gen_on = '1;
    repeat (100) @(posedge clk_port);
    d0 = delivered;
    repeat (500) @(posedge clk_port);
    $display("permutation load: %0d flits in 500 port cycles on %0d outputs", delivered - d0, N);
    chk(delivered - d0 >= (N * 500 * 98) / 100, "outputs run at line rate");
    drain(2000);

    // 3: mixed unicast/multicast with output stalls
    mode = 3; gen_on = '1;
    repeat (3000) @(posedge clk_port);
    drain(20000);

    // 4: hotspot on output 0
    mode = 4; gen_on = '1;
    repeat (400) @(posedge clk_port);
    chk(mbs_free[0][0] == 0, "MBS(0,0) buffer full under the hotspot");
    drain(20000);

    // final state
    chk(delivered == expected_copies, $sformatf("delivered %0d of %0d copies", delivered, expected_copies));
    chk(exp_copy.size() == 0, "no copy missing");
    for (int r = 0; r < int'(G); r++)
      for (int c = 0; c < int'(G); c++) begin
        chk(int'(row_credit[r][c]) == BUF, "credits restored");
        chk(int'(mbs_free[r][c]) == BUF, "addresses restored");
      end
    $display("flits %0d, copies %0d, multicast %0d (across groups %0d)", accepted, delivered, multicast_flits, cross_group_flits);
    $display("mechanisms: credit stalls %0d, input back-pressure %0d, output back-pressure %0d",
             credit_stalls, in_bp, out_bp);
    $display("            row changes at an output %0d, longest output queue %0d (share %0d), full-buffer cycles %0d",
             contention, max_queue, BUF / S, buffer_full);
    chk(multicast_flits > 0, "multicast happened");
    chk(cross_group_flits > 0, "multicast across output groups happened");
    chk(credit_stalls > 0, "credit stall happened");
    chk(in_bp > 0, "input back-pressure happened");
    chk(out_bp > 0, "output back-pressure happened");
    chk(contention > 0, "output contention happened");
    chk(max_queue > int'(BUF / S), "buffer borrowing happened");
    chk(buffer_full > 0, "full shared buffer happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk_port);
    failures++;
    $display("watchdog expired: delivered %0d of %0d", delivered, expected_copies);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
