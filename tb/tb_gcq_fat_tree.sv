// Network test: a 3-level fat tree (k-ary n-tree with k = 4, n = 3) built from
// 8-port GCQ switches with S = 4 and 32-flit shared buffers: 64 hosts and
// 16 switches per level, 48 in all. It is the published 3-level, 192-switch,
// 512-host study scaled down by using 8-port instead of 16-port switches.
//
// Topology: host h connects to down port h mod 4 of leaf switch h / 4. Switch
// w of level l uses ports 0..3 downwards and 4..7 upwards; its up port 4+u
// leads to the switch of level l+1 whose number equals w with base-4 digit l
// replaced by u, entering that switch at down port (digit l of w). Routing is
// nearest common ancestor: a flit goes down at port (digit l of its
// destination) when the destination lies below the switch, and otherwise up
// at a port picked by a hash of its source and sequence number, which spreads
// flows over the upper levels at random but keeps one flit's choice stable
// while it waits. The routing is done in this bench, on each switch input, by
// setting in_dest; the switches themselves are unchanged.
//
// Hosts inject single-flit packets by a Bernoulli process to uniform random
// destinations through unbounded source queues and always accept. Phase 1
// offers load 0.6 and phase 2 load 0.9, each measured for 1500 port cycles
// after 300 cycles of warm-up; then the network drains. Checked: every flit
// is delivered exactly once, intact, to the right host; no flit ever leaves
// a top-level switch upwards; buffers and credits of all 48 switches are
// restored; the network carries at least 97 % of what is offered at load
// 0.6 and 95 % at load 0.9. Mean latency (port cycles, source queueing included) and the
// accepted load of both phases are printed. Flits of one flow may take
// different paths, so their order is not checked.
module tb_gcq_fat_tree;
  localparam int unsigned K      = 4;
  localparam int unsigned NL     = 3;
  localparam int unsigned N      = 2 * K;
  localparam int unsigned S      = 4;
  localparam int unsigned DW     = 64;
  localparam int unsigned BUF    = 32;
  localparam int unsigned W      = K ** (NL - 1);        // switches per level
  localparam int unsigned NS     = NL * W;
  localparam int unsigned H      = K ** NL;              // hosts
  localparam int unsigned G      = N / S;
  localparam int unsigned CW     = $clog2(BUF + 1);
  localparam int          WARM   = 300;
  localparam int          MEAS   = 1500;

  logic clk_port = 0, clk_core = 0;
  always #12.5 clk_port = ~clk_port;
  always #3.125 clk_core = ~clk_core;
  logic rst_port, rst_core;

  int checks = 0, failures = 0;

  function automatic int unsigned dig(input int unsigned x, input int unsigned i);
    return (x / (K ** i)) % K;
  endfunction
  function automatic int unsigned setdig(input int unsigned x, input int unsigned i, input int unsigned v);
    return x - dig(x, i) * (K ** i) + v * (K ** i);
  endfunction

  // Nearest common ancestor routing at switch w of level l.
  function automatic logic [N-1:0] route(input int unsigned l, input int unsigned w,
                                         input logic [DW-1:0] f);
    int unsigned d, up;
    logic [31:0] x;
    bit below;
    d = int'(f[15:8]);
    below = 1;
    for (int unsigned i = l; i < NL - 1; i++)
      if (dig(d, i + 1) != dig(w, i)) below = 0;
    x = f[47:16] * 32'h9E3779B1 + 32'(f[7:0]) * 32'h85EBCA6B;
    up = int'(x >> (16 + 4 * l)) % K;                // independent bits per level
    return below ? N'(1) << dig(d, l) : N'(1) << (K + up);
  endfunction

  wire  [N-1:0]         iv [NS], ir [NS], ov [NS], ordy [NS];
  wire  [N-1:0][DW-1:0] idata [NS], odata [NS];
  wire  [N-1:0][N-1:0]  idest [NS];
  logic [G-1:0][G-1:0][CW-1:0] mfree [NS], rcred [NS];
  logic [G-1:0]         cstall [NS];

  logic [DW-1:0] h_data [H];
  logic          h_valid [H];
  wire           h_ready [H];

  for (genvar l = 0; l < NL; l++) begin : g_lvl
    for (genvar w = 0; w < W; w++) begin : g_sw
      localparam int SI = l * W + w;
      gcq_switch #(.N(N), .S(S), .DATA_W(DW), .BUF_DEPTH(BUF)) u_sw (
        .clk_port, .rst_port, .clk_core, .rst_core,
        .in_valid (iv[SI]), .in_dest (idest[SI]), .in_data (idata[SI]), .in_ready (ir[SI]),
        .out_valid (ov[SI]), .out_data (odata[SI]), .out_ready (ordy[SI]),
        .mbs_free (mfree[SI]), .row_credit (rcred[SI]), .credit_stall (cstall[SI]));
      for (genvar p = 0; p < N; p++) begin : g_p
        // what feeds input p
        if (p < K && l == 0) begin : g_host_in
          assign iv[SI][p]    = h_valid[w * K + p];
          assign idata[SI][p] = h_data[w * K + p];
          assign h_ready[w * K + p] = ir[SI][p];
        end else if (p < K) begin : g_from_below
          localparam int SRC = (l - 1) * W + setdig(w, l - 1, p);
          localparam int SP  = K + dig(w, l - 1);
          assign iv[SI][p]    = ov[SRC][SP];
          assign idata[SI][p] = odata[SRC][SP];
        end else if (l == NL - 1) begin : g_top_unused
          assign iv[SI][p]    = 1'b0;
          assign idata[SI][p] = '0;
        end else begin : g_from_above
          localparam int SRC = (l + 1) * W + setdig(w, l, p - K);
          localparam int SP  = dig(w, l);
          assign iv[SI][p]    = ov[SRC][SP];
          assign idata[SI][p] = odata[SRC][SP];
        end
        assign idest[SI][p] = route(l, w, idata[SI][p]);
        // who takes output p
        if (p < K && l == 0) begin : g_host_out
          assign ordy[SI][p] = 1'b1;
        end else if (p < K) begin : g_to_below
          assign ordy[SI][p] = ir[(l - 1) * W + setdig(w, l - 1, p)][K + dig(w, l - 1)];
        end else if (l == NL - 1) begin : g_top_out
          assign ordy[SI][p] = 1'b1;
        end else begin : g_to_above
          assign ordy[SI][p] = ir[(l + 1) * W + setdig(w, l, p - K)][dig(w, l)];
        end
      end
    end
  end

  // ---------------- traffic
  int port_cyc = 0;
  int load_pm = 0;
  bit measuring = 0;
  int offered = 0, delivered = 0, outstanding = 0;
  longint lat_sum = 0;
  int seq [H];
  int pend [longint];                               // {src, seq} -> generation time
  int q_dst [H][$], q_seq [H][$], q_t [H][$];

  function automatic logic [DW-1:0] mkflit(input int src, input int dst, input int sq, input int t);
    return {16'(t), 32'(sq), 8'(dst), 8'(src)};
  endfunction

  always @(posedge clk_port) port_cyc <= port_cyc + 1;

  for (genvar h = 0; h < H; h++) begin : g_host
    always @(posedge clk_port) begin
      if (rst_port) h_valid[h] <= 1'b0;
      else begin
        if ($urandom_range(0, 999) < load_pm) begin
          q_dst[h].push_back($urandom_range(0, H - 1));
          q_seq[h].push_back(seq[h]);
          q_t[h].push_back(port_cyc);
          pend[{32'(h), 32'(seq[h])}] = port_cyc;
          seq[h]++;
          outstanding++;
          if (measuring) offered++;
        end
        if (h_valid[h] && h_ready[h]) begin
          void'(q_dst[h].pop_front()); void'(q_seq[h].pop_front()); void'(q_t[h].pop_front());
        end
        if (q_dst[h].size() > 0) begin
          h_valid[h] <= 1'b1;
          h_data[h]  <= mkflit(h, q_dst[h][0], q_seq[h][0], q_t[h][0]);
        end else h_valid[h] <= 1'b0;
      end
    end

    // sink of host h: output h mod K of leaf switch h / K
    always @(posedge clk_port) begin
      if (!rst_port && ov[h / K][h % K]) begin
        logic [DW-1:0] f;
        longint key;
        f = odata[h / K][h % K];
        key = {32'(f[7:0]), f[47:16]};
        checks++;
        if (int'(f[15:8]) != h || !pend.exists(key) || 16'(pend[key]) != f[63:48]) begin
          failures++;
          if (failures < 10) $display("FAIL host %0d got a wrong or duplicate flit %h", h, f);
        end else begin
          if (measuring) begin
            delivered++;
            lat_sum += longint'(port_cyc) - longint'(pend[key]);
          end
          pend.delete(key);
          outstanding--;
        end
      end
    end
  end

  // no flit may leave the tree upwards
  for (genvar w = 0; w < W; w++) begin : g_top_chk
    always @(posedge clk_port)
      if (!rst_port && ov[(NL - 1) * W + w][N-1:K] != '0) begin
        failures++;
        $display("FAIL top switch %0d sent a flit upwards", w);
      end
  end

  task automatic phase(input int pm, input string label, input real need);
    real acc, off;
    load_pm = pm;
    repeat (WARM) @(posedge clk_port);
    offered = 0; delivered = 0; lat_sum = 0;
    measuring = 1;
    repeat (MEAS) @(posedge clk_port);
    measuring = 0;
    acc = real'(delivered) / real'(H * MEAS);
    off = real'(offered) / real'(H * MEAS);
    $display("%s: offered %0.3f  accepted %0.3f  mean latency %0.1f port cycles", label, off, acc,
             (delivered > 0) ? real'(lat_sum) / real'(delivered) : 0.0);
    checks++;
    if (delivered == 0 || acc < need * off) begin
      failures++;
      $display("FAIL %s: network did not carry the offered load", label);
    end
  endtask

  initial begin
    rst_port = 1; rst_core = 1;
    for (int h = 0; h < int'(H); h++) begin seq[h] = 0; h_data[h] = '0; end
    repeat (6) @(posedge clk_port);
    @(negedge clk_port); rst_port = 0; rst_core = 0;
    phase(600, "load 0.6", 0.97);
    phase(900, "load 0.9", 0.95);
    load_pm = 0;
    while (outstanding > 0) @(posedge clk_port);
    repeat (5) @(posedge clk_port);
    for (int s = 0; s < int'(NS); s++)
      for (int r = 0; r < int'(G); r++)
        for (int c = 0; c < int'(G); c++) begin
          checks++;
          if (int'(mfree[s][r][c]) != BUF || int'(rcred[s][r][c]) != BUF) begin
            failures++;
            $display("FAIL switch %0d: buffer or credits not restored", s);
          end
        end
    checks++;
    if (pend.size() != 0) begin failures++; $display("FAIL %0d flits lost", pend.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
