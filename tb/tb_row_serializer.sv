// Self-checking test of a row serializer (N = 16, S = 4, 256-bit bus) with a
// small credit pool of 8 flits per MBS so that credit stalls are frequent.
// The testbench models the S inputs' VOQs as queues of random flits
// (unicast and multicast) and the row's four MBSs as sinks that return one
// credit for each flit after a random delay. Checked every cycle:
//  - only the input owning the time slot ('phase') pops, and at most one VOQ;
//  - a pop never targets an MBS without credit, and the credit counters
//    follow the model (minus on send, plus CREDIT_DLY cycles after 'recycle');
//  - the popped flit appears on bus tap k exactly k+1 cycles later;
//  - 'blocked' is raised when the slot owner has flits but no credit;
//  - every flit is eventually sent.
module tb_row_serializer;
  localparam int unsigned N = 16, S = 4, DATA_W = 256, BUF_DEPTH = 8, CREDIT_DLY = 2;
  localparam int unsigned G = N / S;
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, blocked;
  logic [1:0] phase;
  logic [S-1:0][G-1:0] voq_valid, voq_pop;
  logic [S-1:0][G-1:0][N-1:0] voq_dest;
  logic [S-1:0][G-1:0][DATA_W-1:0] voq_data;
  logic [G-1:0] recycle, bus_valid;
  logic [G-1:0][N-1:0] bus_dest;
  logic [G-1:0][DATA_W-1:0] bus_data;
  logic [G-1:0][CW-1:0] credit;

  row_serializer #(.N(N), .S(S), .DATA_W(DATA_W), .BUF_DEPTH(BUF_DEPTH),
                   .CREDIT_DLY(CREDIT_DLY)) dut (.*);

  int checks = 0, failures = 0;
  logic [N+DATA_W-1:0] voq[S][G][$];
  logic [N+DATA_W-1:0] sent_hist[$];   // one entry per cycle: flit or 0
  bit                  sent_v[$];
  int model_credit[G];
  int ret_q[G][$];                     // cycles until credit is returned (per stored flit)
  bit rec_hist[CREDIT_DLY+1][G];
  int total = 0, sent = 0, blocked_seen = 0, cyc = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  // present VOQ heads and recycle pulses (combinational from the model)
  always_comb begin
    for (int s = 0; s < int'(S); s++)
      for (int g = 0; g < int'(G); g++) begin
        voq_valid[s][g] = voq[s][g].size() > 0;
        {voq_dest[s][g], voq_data[s][g]} = voq_valid[s][g] ? voq[s][g][0] : '0;
      end
  end

  always @(negedge clk) if (!rst) begin
    // MBS sinks: return credits
    for (int g = 0; g < int'(G); g++) begin
      recycle[g] <= 0;
      if (ret_q[g].size() > 0) begin
        if (ret_q[g][0] <= 0) begin recycle[g] <= 1; void'(ret_q[g].pop_front()); end
        else ret_q[g][0]--;
      end
    end
  end

  always @(posedge clk) if (!rst) begin
    int pops, ps, pg;
    logic [N-1:0] d;
    cyc++;
    // credits before this edge match the model
    for (int g = 0; g < int'(G); g++)
      chk(int'(credit[g]) == model_credit[g], $sformatf("credit[%0d]=%0d model %0d", g, credit[g], model_credit[g]));
    pops = 0; ps = -1; pg = -1;
    for (int s = 0; s < int'(S); s++)
      for (int g = 0; g < int'(G); g++)
        if (voq_pop[s][g]) begin pops++; ps = s; pg = g; end
    chk(pops <= 1, "at most one pop per cycle");
    if (blocked) blocked_seen++;
    if (pops == 1) begin
      chk(ps == int'(phase), "pop by the slot owner only");
      chk(voq[ps][pg].size() > 0, "pop of a non-empty VOQ");
      d = voq[ps][pg][0][N+DATA_W-1:DATA_W];
      for (int p = 0; p < int'(N); p++)
        if (d[p]) chk(model_credit[p / int'(S)] > 0, "send only with credit");
      sent_hist.push_front(voq[ps][pg][0]); sent_v.push_front(1);
      void'(voq[ps][pg].pop_front());
      sent++;
    end else begin
      chk(!(voq_valid[phase] != '0 && !blocked), "blocked when the slot owner is stuck");
      sent_hist.push_front('0); sent_v.push_front(0);
    end
    // bus taps: tap k shows what was sent k+1 cycles ago (this cycle's
    // history entry 0 is being sent now, entry k+1 was sent k+1 edges ago)
    for (int k = 0; k < int'(G); k++)
      if (sent_v.size() > k + 1) begin
        chk(bus_valid[k] == sent_v[k+1], $sformatf("tap %0d valid", k));
        if (sent_v[k+1]) chk({bus_dest[k], bus_data[k]} == sent_hist[k+1], $sformatf("tap %0d flit", k));
        // the MBS at tap k stores flits for its group: schedule its credit return
        if (sent_v[k+1] && bus_valid[k] && bus_dest[k][k*S +: S] != '0)
          ret_q[k].push_back($urandom_range(0, 12));
      end
    if (sent_v.size() > 8) begin void'(sent_v.pop_back()); void'(sent_hist.pop_back()); end
    // model credits for the next cycle
    for (int g = 0; g < int'(G); g++) begin
      if (pops == 1 && d[g*S +: S] != '0) model_credit[g]--;
      if (rec_hist[CREDIT_DLY-1][g]) model_credit[g]++;
    end
    for (int i = CREDIT_DLY - 1; i > 0; i--) rec_hist[i] = rec_hist[i-1];
    for (int g = 0; g < int'(G); g++) rec_hist[0][g] = recycle[g];
    phase_model: chk(phase == 2'((cyc - 1) % S), "phase");
  end

  // slot counter driven by the testbench, as the switch top does
  always_ff @(posedge clk) phase <= rst ? 2'd0 : phase + 1'b1;

  initial begin
    rst = 1; recycle = '0;
    for (int g = 0; g < int'(G); g++) model_credit[g] = BUF_DEPTH;
    for (int i = 0; i < int'(CREDIT_DLY) + 1; i++) for (int g = 0; g < int'(G); g++) rec_hist[i][g] = 0;
    // 600 random flits spread over the VOQs (lowest group of the mask)
    for (int i = 0; i < 600; i++) begin
      logic [N-1:0] m;
      logic [DATA_W-1:0] w;
      int s, g;
      m = ($urandom_range(0, 3) == 0) ? (N'($urandom) | N'(1 << $urandom_range(0, N - 1)))
                                      : N'(1 << $urandom_range(0, N - 1));
      for (int j = 0; j < int'(DATA_W) / 32; j++) w[j*32 +: 32] = $urandom;
      s = $urandom_range(0, S - 1);
      g = -1;
      for (int p = 0; p < int'(N); p++) if (g < 0 && m[p]) g = p / int'(S);
      voq[s][g].push_back({m, w});
      total++;
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    wait (sent == total);
    repeat (60) @(posedge clk);
    chk(blocked_seen > 0, "credit stalls happened");
    for (int g = 0; g < int'(G); g++) chk(int'(credit[g]) == BUF_DEPTH, "all credits back");
    $display("sent %0d flits, %0d blocked slots", sent, blocked_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired, sent %0d of %0d", sent, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
