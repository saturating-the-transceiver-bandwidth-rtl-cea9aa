// Self-checking test of the dual-clock FIFO (16 entries). It runs twice, as
// the switch uses it: 40 MHz writer to 160 MHz reader (input queues) and
// 160 MHz writer to 40 MHz reader (output side). Random push and pop
// patterns must deliver every word once, in order; 'full' must appear when
// the reader stops, and the writer's 'wr_count' may never exceed the depth.
module tb_async_fifo;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 16;

  logic slow = 0, fast = 0;
  always #12.5 slow = ~slow;     // 40 MHz
  always #3.125 fast = ~fast;    // 160 MHz

  int checks = 0, failures = 0;
  int full_seen = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- instance A: slow -> fast
  logic a_rst, a_wr, a_full, a_rd, a_empty;
  logic [WIDTH-1:0] a_wd, a_rd_data;
  logic [$clog2(DEPTH):0] a_cnt;
  async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_a (
    .wclk(slow), .wrst(a_rst), .wr_en(a_wr), .wr_data(a_wd), .full(a_full), .wr_count(a_cnt),
    .rclk(fast), .rrst(a_rst), .rd_en(a_rd), .rd_data(a_rd_data), .empty(a_empty));

  // ---- instance B: fast -> slow
  logic b_wr, b_full, b_rd, b_empty;
  logic [WIDTH-1:0] b_wd, b_rd_data;
  logic [$clog2(DEPTH):0] b_cnt;
  async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_b (
    .wclk(fast), .wrst(a_rst), .wr_en(b_wr), .wr_data(b_wd), .full(b_full), .wr_count(b_cnt),
    .rclk(slow), .rrst(a_rst), .rd_en(b_rd), .rd_data(b_rd_data), .empty(b_empty));

  localparam int NWORDS = 600;
  int a_sent = 0, a_got = 0, b_sent = 0, b_got = 0;
  bit a_stop_rd = 0, b_stop_rd = 0;

  // writers
  always @(negedge slow) if (!a_rst) begin
    a_wr <= 0;
    if (a_sent < NWORDS && $urandom_range(0, 3) != 0 && !a_full) begin
      a_wr <= 1; a_wd <= 32'(a_sent * 7 + 1); a_sent <= a_sent + 1;
    end
  end
  always @(negedge fast) if (!a_rst) begin
    b_wr <= 0;
    if (b_sent < NWORDS && $urandom_range(0, 1) != 0 && !b_full) begin
      b_wr <= 1; b_wd <= 32'(b_sent * 13 + 3); b_sent <= b_sent + 1;
    end
  end
  // readers
  always @(negedge fast) if (!a_rst) begin
    a_rd <= 0;
    if (!a_stop_rd && !a_empty && $urandom_range(0, 2) == 0) a_rd <= 1;
  end
  always @(negedge slow) if (!a_rst) begin
    b_rd <= 0;
    if (!b_stop_rd && !b_empty && $urandom_range(0, 1) == 0) b_rd <= 1;
  end
  // checkers
  always @(posedge fast) if (!a_rst && a_rd && !a_empty) begin
    chk(a_rd_data == 32'(a_got * 7 + 1), $sformatf("A word %0d: %0d", a_got, a_rd_data));
    a_got <= a_got + 1;
  end
  always @(posedge slow) if (!a_rst && b_rd && !b_empty) begin
    chk(b_rd_data == 32'(b_got * 13 + 3), $sformatf("B word %0d: %0d", b_got, b_rd_data));
    b_got <= b_got + 1;
  end
  always @(posedge slow) if (!a_rst) begin
    if (a_cnt > (DEPTH)) begin failures++; $display("FAIL A count above depth"); end
    if (a_full) full_seen++;
  end
  always @(posedge fast) if (!a_rst) begin
    if (b_cnt > (DEPTH)) begin failures++; $display("FAIL B count above depth"); end
    if (b_full) full_seen++;
  end

  initial begin
    a_rst = 1; a_wr = 0; a_rd = 0; b_wr = 0; b_rd = 0; a_wd = '0; b_wd = '0;
    repeat (4) @(posedge slow);
    @(negedge slow); a_rst = 0;
    // stall both readers for a while so both FIFOs fill up
    a_stop_rd = 1; b_stop_rd = 1;
    repeat (80) @(posedge slow);
    chk(a_full && a_cnt == (DEPTH), "A full while the reader is stalled");
    chk(b_full && b_cnt == (DEPTH), "B full while the reader is stalled");
    a_stop_rd = 0; b_stop_rd = 0;
    wait (a_got == NWORDS && b_got == NWORDS);
    repeat (10) @(posedge slow);
    chk(a_empty && b_empty, "both empty at the end");
    chk(full_seen > 0, "full flag seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge slow);
    failures++;
    $display("watchdog expired a_got=%0d b_got=%0d", a_got, b_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
