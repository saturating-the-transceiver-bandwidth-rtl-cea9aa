// Self-checking test of the free address pool at its default size (576).
// After reset it must hand out 0..575 once each, report 'avail' low when all
// are taken, and then return recycled addresses in the order they came back,
// also when an allocation and a recycle happen in the same cycle.
// 'free_count' is compared with a count kept by the testbench.
module tb_free_addr_pool;
  localparam int unsigned DEPTH = 576;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst, alloc, avail, recycle;
  logic [AW-1:0] alloc_addr, recycle_addr;
  logic [CW-1:0] free_count;
  int checks = 0, failures = 0;
  int model_free;
  int q[$];

  free_addr_pool #(.DEPTH(DEPTH)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1; alloc = 0; recycle = 0; recycle_addr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    model_free = DEPTH;
    // Hand out every address.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      chk(avail, "avail while addresses left");
      chk(alloc_addr == AW'(a), $sformatf("fresh address %0d got %0d", a, alloc_addr));
      chk(free_count == CW'(model_free), "free_count while filling");
      alloc = 1;
      @(posedge clk); #1; alloc = 0; model_free--;
    end
    @(negedge clk);
    chk(!avail, "pool empty after all allocations");
    chk(free_count == 0, "free_count zero");
    // Recycle 40 addresses in a scrambled order.
    for (int i = 0; i < 40; i++) begin
      int a;
      a = (i * 37 + 11) % DEPTH;
      q.push_back(a);
      @(negedge clk); recycle = 1; recycle_addr = AW'(a);
      @(posedge clk); #1; recycle = 0; model_free++;
    end
    @(negedge clk);
    chk(free_count == CW'(model_free), "free_count after recycling");
    // Allocate and recycle in the same cycles: allocation order follows recycle order.
    for (int i = 0; i < 100; i++) begin
      int a, exp_a;
      @(negedge clk);
      exp_a = q.pop_front();
      chk(avail && alloc_addr == AW'(exp_a), $sformatf("recycled order: exp %0d got %0d", exp_a, alloc_addr));
      a = exp_a;                      // immediately give it back
      q.push_back(a);
      alloc = 1; recycle = 1; recycle_addr = AW'(a);
      @(posedge clk); #1; alloc = 0; recycle = 0;
    end
    @(negedge clk);
    chk(free_count == CW'(model_free), "free_count unchanged by alloc+recycle");
    // Drain.
    while (q.size() > 0) begin
      int exp_a;
      @(negedge clk);
      exp_a = q.pop_front();
      chk(alloc_addr == AW'(exp_a), "drain order");
      alloc = 1;
      @(posedge clk); #1; alloc = 0; model_free--;
    end
    @(negedge clk);
    chk(!avail && free_count == 0, "empty after drain");
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
