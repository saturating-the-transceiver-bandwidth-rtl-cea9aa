// Self-checking test of the per-input VOQ scheduler (N = 16, S = 4).
// Cycle by cycle, random slot, VOQ-occupancy, destination and credit
// patterns are applied; a reference model with its own round-robin pointer
// predicts whether a flit is sent and from which VOQ: nothing outside the
// slot, never a VOQ whose flit names a column without credit, and rotating
// priority among the rest. A fixed case checks that all four busy VOQs are
// served in turn.
module tb_voq_scheduler;
  localparam int unsigned N = 16, S = 4, G = N / S;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, slot, send;
  logic [G-1:0] voq_valid, credit_ok;
  logic [G-1:0][N-1:0] voq_dest;
  logic [1:0] sel;
  int checks = 0, failures = 0;
  int last = G - 1;

  voq_scheduler #(.N(N), .S(S)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step();
    bit elig[G];
    int exp_sel;
    #1;
    for (int v = 0; v < int'(G); v++) begin
      elig[v] = slot && voq_valid[v];
      for (int p = 0; p < int'(N); p++)
        if (voq_dest[v][p] && !credit_ok[p / int'(S)]) elig[v] = 0;
    end
    exp_sel = -1;
    for (int i = 1; i <= int'(G); i++)
      if (exp_sel < 0 && elig[(last + i) % G]) exp_sel = (last + i) % G;
    chk(send == (exp_sel >= 0), "send flag");
    if (exp_sel >= 0) begin
      chk(sel == 2'(exp_sel), $sformatf("sel %0d expected %0d", sel, exp_sel));
      last = exp_sel;
    end
    @(posedge clk);
  endtask

  initial begin
    rst = 1; slot = 0; voq_valid = '0; credit_ok = '0; voq_dest = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    // all four VOQs busy, all credits: strict rotation 0,1,2,3,0,...
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      slot = 1; voq_valid = '1; credit_ok = '1;
      for (int v = 0; v < int'(G); v++) voq_dest[v] = N'(1 << (4 * v));
      #1; chk(send && sel == 2'(i % G), "rotation with all VOQs busy");
      step();
    end
    // random
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      slot = ($urandom_range(0, 3) != 0);
      voq_valid = G'($urandom);
      credit_ok = G'($urandom) | G'($urandom);
      for (int v = 0; v < int'(G); v++)
        voq_dest[v] = ($urandom_range(0, 3) == 0) ? N'($urandom) | N'(1) : N'(1 << $urandom_range(0, N - 1));
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
