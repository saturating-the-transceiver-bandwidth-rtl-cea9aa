// Self-checking test of one output scheduler/multiplexer (N = 16, S = 4,
// output with local index 2, 8-entry output FIFO), core clock 160 MHz, port
// clock 40 MHz. The four MBSs of the column are modelled as queues of flits
// that answer a grant with their head flit one cycle later. Checked:
//  - grants only in the output's own slot, one-hot, only to non-empty MBSs;
//  - with all four MBSs busy the grants rotate 0,1,2,3 (round robin);
//  - the port side delivers the granted flits in grant order, intact;
//  - while the port stalls ('out_ready' low) grants stop once the FIFO is
//    full, and no flit is lost;
//  - at full load one flit leaves per port cycle.
module tb_output_mux;
  localparam int unsigned N = 16, S = 4, DATA_W = 256, OQ_DEPTH = 8, LOCAL_IDX = 2;
  localparam int unsigned G = N / S;

  logic clk_core = 0, clk_port = 0;
  always #3.125 clk_core = ~clk_core;
  always #12.5  clk_port = ~clk_port;

  logic rst_core, rst_port, out_valid, out_ready;
  logic [1:0] phase;
  logic [G-1:0] mbs_nonempty, grant, mbs_out_valid;
  logic [G-1:0][DATA_W-1:0] mbs_out_data;
  logic [DATA_W-1:0] out_data;

  output_mux #(.N(N), .S(S), .DATA_W(DATA_W), .OQ_DEPTH(OQ_DEPTH), .LOCAL_IDX(LOCAL_IDX)) dut (.*);

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] mq[G][$];
  logic [DATA_W-1:0] granted[$];
  int grants = 0, delivered = 0, last_g = -1, rot_ok = 0, rot_checks = 0;
  int stall_grants = 0;
  bit stall = 0, all_busy_phase = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always_ff @(posedge clk_core) phase <= rst_core ? 2'd0 : phase + 1'b1;

  always_comb for (int r = 0; r < int'(G); r++) mbs_nonempty[r] = mq[r].size() > 0;

  // MBS model: answer a grant one cycle later
  always @(posedge clk_core) if (!rst_core) begin
    mbs_out_valid <= '0;
    if (grant != '0) begin
      int r;
      r = -1;
      chk(phase == 2'(LOCAL_IDX), "grant only in own slot");
      chk($onehot(grant), "grant one-hot");
      for (int i = 0; i < int'(G); i++) if (grant[i]) r = i;
      chk(mq[r].size() > 0, "grant to a non-empty MBS");
      if (all_busy_phase && last_g >= 0) begin
        rot_checks++;
        chk(r == (last_g + 1) % int'(G), $sformatf("round robin: %0d after %0d", r, last_g));
      end
      last_g = r;
      mbs_out_valid[r] <= 1'b1;
      mbs_out_data[r]  <= mq[r][0];
      granted.push_back(mq[r].pop_front());
      grants++;
      if (stall) stall_grants++;
    end
  end

  always @(posedge clk_port) if (!rst_port && out_valid && out_ready) begin
    chk(granted.size() > 0 && out_data == granted[0], "port side order and content");
    void'(granted.pop_front());
    delivered++;
  end

  function automatic logic [DATA_W-1:0] word(input int r, input int n);
    logic [DATA_W-1:0] w;
    for (int i = 0; i < int'(DATA_W) / 32; i++) w[i*32 +: 32] = 32'(r * 100000 + n * 10 + i);
    return w;
  endfunction

  initial begin
    int t0, d0;
    rst_core = 1; rst_port = 1; out_ready = 0; mbs_out_valid = '0; mbs_out_data = '0;
    repeat (4) @(posedge clk_port);
    @(negedge clk_port); rst_core = 0; rst_port = 0;
    // all four MBSs busy, port always ready: rotation and full rate
    for (int r = 0; r < int'(G); r++) for (int n = 0; n < 100; n++) mq[r].push_back(word(r, n));
    all_busy_phase = 1; out_ready = 1;
    repeat (20) @(posedge clk_port);
    t0 = $time; d0 = delivered;
    repeat (200) @(posedge clk_port);
    chk(delivered - d0 == 200, $sformatf("one flit per port cycle at full load: %0d in 200", delivered - d0));
    all_busy_phase = 0;
    // port stall: grants must stop when the FIFO is full
    @(negedge clk_port); out_ready = 0; stall = 1;
    repeat (60) @(posedge clk_port);
    chk(stall_grants <= OQ_DEPTH + 1, $sformatf("grants during stall %0d", stall_grants));
    chk(granted.size() <= OQ_DEPTH, "no more flits in flight than the FIFO holds");
    chk(out_valid, "output valid while stalled");
    stall = 0;
    // random readiness until everything is out
    while (delivered < 400) begin
      @(negedge clk_port); out_ready = ($urandom_range(0, 2) != 0);
    end
    repeat (10) @(posedge clk_port);
    chk(grants == 400 && granted.size() == 0, "all flits granted and delivered");
    chk(rot_checks > 100, "rotation observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_port);
    failures++;
    $display("watchdog expired, delivered %0d", delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
