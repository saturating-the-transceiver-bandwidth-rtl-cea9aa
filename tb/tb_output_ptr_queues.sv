// Self-checking test of the output pointer queues (S = 4, 576 entries each).
// Random addresses are pushed with random, often multicast, destination masks
// while queues are popped in random slots; each queue's head and 'nonempty'
// flag are compared with four reference queues. One queue is then filled far
// beyond a quarter of the buffer to show that queue space is not partitioned.
module tb_output_ptr_queues;
  localparam int unsigned S     = 4;
  localparam int unsigned DEPTH = 576;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst, pop;
  logic [S-1:0]  push_mask, nonempty;
  logic [AW-1:0] push_addr, head_addr;
  logic [1:0]    pop_sel;
  int checks = 0, failures = 0;
  int mq[S][$];

  output_ptr_queues #(.S(S), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cycle(input logic [S-1:0] m, input int a, input bit p, input int sel);
    @(negedge clk);
    // compare state before the edge
    for (int q = 0; q < int'(S); q++)
      chk(nonempty[q] == (mq[q].size() > 0), $sformatf("nonempty[%0d]", q));
    push_mask = m; push_addr = AW'(a); pop_sel = 2'(sel);
    pop = p && (mq[sel].size() > 0);
    #1;
    if (pop) chk(head_addr == AW'(mq[sel][0]),
                 $sformatf("head of queue %0d: %0d expected %0d", sel, head_addr, mq[sel][0]));
    @(posedge clk);
    if (pop) void'(mq[sel].pop_front());
    for (int q = 0; q < int'(S); q++) if (m[q]) mq[q].push_back(a);
  endtask

  initial begin
    rst = 1; pop = 0; push_mask = '0; push_addr = '0; pop_sel = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++)
      cycle(($urandom_range(0, 2) == 0) ? '0 : S'($urandom_range(1, 15)),
            $urandom_range(0, DEPTH - 1), $urandom_range(0, 3) != 0, i % S);
    // drain
    for (int i = 0; i < 4 * DEPTH && (mq[0].size() + mq[1].size() + mq[2].size() + mq[3].size()) > 0; i++)
      cycle('0, 0, 1'b1, i % S);
    // one output takes 500 entries: more than DEPTH/S
    for (int i = 0; i < 500; i++) cycle(4'b0100, i, 1'b0, 0);
    chk(mq[2].size() == 500, "model holds 500");
    for (int i = 0; i < 500; i++) cycle('0, 0, 1'b1, 2);
    @(negedge clk);
    chk(nonempty == '0, "all queues empty at the end");
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
