// Self-checking test of the shared data buffer at its default size
// (576 x 256 bits): fills every address with a pseudo-random word while
// reading back earlier addresses in the same cycles, then reads the whole
// memory again. A reference array in the testbench supplies the expected
// words; the read data must appear exactly one cycle after the address.
module tb_shared_buffer;
  localparam int unsigned DEPTH = 576;
  localparam int unsigned WIDTH = 256;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;

  logic             wr_en, rd_en;
  logic [AW-1:0]    wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  shared_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  function automatic logic [WIDTH-1:0] rand_word();
    logic [WIDTH-1:0] w;
    for (int i = 0; i < WIDTH / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  task automatic expect_word(input logic [WIDTH-1:0] exp, input int a);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL addr %0d: got %h expected %h", a, rd_data, exp);
    end
  endtask

  initial begin
    int last_rd;
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    last_rd = -1;
    // Write every address; from address 8 on also read address-8 in parallel.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = rand_word();
      ref_mem[a] = wr_data;
      rd_en = (a >= 8); rd_addr = AW'(a - 8);
      @(posedge clk); #1;
      if (a >= 8) expect_word(ref_mem[a-8], a - 8);
    end
    @(negedge clk); wr_en = 0;
    // Read everything back in reverse order.
    for (int a = DEPTH - 1; a >= 0; a--) begin
      @(negedge clk); rd_en = 1; rd_addr = AW'(a);
      @(posedge clk); #1;
      expect_word(ref_mem[a], a);
    end
    // With rd_en low the output must hold.
    @(negedge clk); rd_en = 0; rd_addr = '0;
    @(posedge clk); #1; expect_word(ref_mem[0], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
