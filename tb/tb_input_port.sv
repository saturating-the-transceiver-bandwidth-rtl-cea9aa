// Self-checking test of one switch input (N = 16, S = 4, 16-entry VOQs).
// At 40 MHz the testbench offers flits with random unicast and multicast
// destination masks; at 160 MHz it pops the four VOQs at random. Every flit
// must come out of the VOQ of the lowest output group in its mask, in order,
// with mask and payload intact. Group 2 is then left unread so that its VOQ
// fills: 'in_ready' must drop for flits to group 2 while flits to other groups
// are still accepted.
module tb_input_port;
  localparam int unsigned N = 16, S = 4, DATA_W = 256, IQ_DEPTH = 16;
  localparam int unsigned G = N / S;

  logic clk_port = 0, clk_core = 0;
  always #12.5  clk_port = ~clk_port;
  always #3.125 clk_core = ~clk_core;

  logic rst_port, rst_core, in_valid, in_ready;
  logic [N-1:0] in_dest;
  logic [DATA_W-1:0] in_data;
  logic [G-1:0] voq_valid, voq_pop;
  logic [G-1:0][N-1:0] voq_dest;
  logic [G-1:0][DATA_W-1:0] voq_data;

  input_port #(.N(N), .S(S), .DATA_W(DATA_W), .IQ_DEPTH(IQ_DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [N+DATA_W-1:0] expq[G][$];
  bit hold_g2 = 0;
  bit rdy;
  int sent = 0, got = 0, blocked_g2 = 0, passed_other = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int low_group(input logic [N-1:0] m);
    for (int p = 0; p < int'(N); p++) if (m[p]) return p / int'(S);
    return -1;
  endfunction

  // core-side reader
  always @(negedge clk_core) begin
    voq_pop <= '0;
    if (!rst_core) begin
      logic [G-1:0] p;
      p = '0;
      for (int g = 0; g < int'(G); g++)
        if (voq_valid[g] && $urandom_range(0, 3) == 0 && !(hold_g2 && g == 2)) p[g] = 1'b1;
      voq_pop <= p;
    end
  end
  always @(posedge clk_core) if (!rst_core) begin
    for (int g = 0; g < int'(G); g++) if (voq_pop[g] && voq_valid[g]) begin
      logic [N+DATA_W-1:0] e;
      e = expq[g].pop_front();
      chk({voq_dest[g], voq_data[g]} == e, $sformatf("VOQ %0d flit order/content", g));
      got++;
    end
  end

  task automatic offer(input logic [N-1:0] m);
    @(negedge clk_port);
    in_valid = 1; in_dest = m;
    for (int i = 0; i < int'(DATA_W) / 32; i++) in_data[i*32 +: 32] = $urandom;
    #1;
  endtask

  initial begin
    rst_port = 1; rst_core = 1; in_valid = 0; in_dest = '0; in_data = '0;
    repeat (4) @(posedge clk_port);
    @(negedge clk_port); rst_port = 0; rst_core = 0;
    // random traffic
    while (sent < 400) begin
      logic [N-1:0] m;
      m = ($urandom_range(0, 3) == 0) ? N'($urandom) : N'(1 << $urandom_range(0, N - 1));
      if (m == '0) m = 1;
      offer(m);
      rdy = in_ready;
      @(posedge clk_port); #1;
      if (rdy) begin expq[low_group(m)].push_back({m, in_data}); sent++; end
      in_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk_port);
    end
    // fill group 2 while it is not read
    hold_g2 = 1;
    for (int i = 0; i < 40; i++) begin
      offer(N'(1 << 9));
      rdy = in_ready;
      @(posedge clk_port); #1;
      if (rdy) begin expq[2].push_back({in_dest, in_data}); sent++; end
      else blocked_g2++;
      in_valid = 0;
    end
    offer(N'(1 << 1));           // group 0 still accepted
    chk(in_ready, "other group accepted while group 2 is full");
    rdy = in_ready;
    @(posedge clk_port); #1;
    if (rdy) begin expq[0].push_back({in_dest, in_data}); sent++; end
    in_valid = 0;
    chk(blocked_g2 > 0, "in_ready dropped for a full VOQ");
    chk(expq[2].size() <= IQ_DEPTH, "no more than IQ_DEPTH flits held");
    hold_g2 = 0;
    repeat (200) @(posedge clk_port);
    chk(got == sent, $sformatf("all flits delivered: %0d of %0d", got, sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_port);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
