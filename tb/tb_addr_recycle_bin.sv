// Self-checking test of the address recycle bin.
// Part 1 replays the published timing example with 4-bit lanes: address
// 0x64 gets the vector 16'h1011 through port A, then three back-to-back
// port-B clears with lane enables 0001, 0010, 1000 must read back 16'h1010,
// 16'h1000 and 16'h0000 one cycle after each clear, and 'free' must rise only
// with the last one.
// Part 2 uses the default 1-bit lanes: random multicast vectors are stored at
// many addresses and cleared lane by lane in a random order, often several
// times in a row on one address; every read-back vector and every 'free'
// pulse is compared with a reference model. A second instance with 8-bit
// (byte-enable) lanes gets the same traffic, each set lane stored as 8'h01,
// and must return the same vectors widened to bytes and the same 'free'.
module tb_addr_recycle_bin;
  localparam int unsigned DEPTH = 576;
  localparam int unsigned S     = 4;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- instance with 4-bit lanes for the timing example
  logic           fa_en, fb_en, f_rd_valid, f_free;
  logic [AW-1:0]  fa_addr, fb_addr, f_free_addr;
  logic [15:0]    fa_vec, f_rd_vec;
  logic [S-1:0]   fb_be;

  addr_recycle_bin #(.DEPTH(DEPTH), .S(S), .LANE_W(4)) u_fig (
    .clk(clk), .rst(rst),
    .wr_en_a(fa_en), .addr_a(fa_addr), .wr_vec_a(fa_vec),
    .wr_en_b(fb_en), .addr_b(fb_addr), .be_b(fb_be),
    .rd_vec(f_rd_vec), .rd_valid(f_rd_valid), .free(f_free), .free_addr(f_free_addr));

  // ---- default instance (1-bit lanes)
  logic           a_en, b_en, d_rd_valid, d_free;
  logic [AW-1:0]  a_addr, b_addr, d_free_addr;
  logic [S-1:0]   a_vec, b_be, d_rd_vec;

  addr_recycle_bin #(.DEPTH(DEPTH), .S(S)) u_def (
    .clk(clk), .rst(rst),
    .wr_en_a(a_en), .addr_a(a_addr), .wr_vec_a(a_vec),
    .wr_en_b(b_en), .addr_b(b_addr), .be_b(b_be),
    .rd_vec(d_rd_vec), .rd_valid(d_rd_valid), .free(d_free), .free_addr(d_free_addr));

  // ---- byte-lane instance, driven like the default one
  logic              y_rd_valid, y_free;
  logic [AW-1:0]     y_free_addr;
  logic [S*8-1:0]    y_vec, y_rd_vec;

  always_comb
    for (int l = 0; l < int'(S); l++) y_vec[l*8 +: 8] = {7'd0, a_vec[l]};

  addr_recycle_bin #(.DEPTH(DEPTH), .S(S), .LANE_W(8)) u_byte (
    .clk(clk), .rst(rst),
    .wr_en_a(a_en), .addr_a(a_addr), .wr_vec_a(y_vec),
    .wr_en_b(b_en), .addr_b(b_addr), .be_b(b_be),
    .rd_vec(y_rd_vec), .rd_valid(y_rd_valid), .free(y_free), .free_addr(y_free_addr));

  function automatic logic [S*8-1:0] widen(input logic [S-1:0] v);
    logic [S*8-1:0] w;
    for (int l = 0; l < int'(S); l++) w[l*8 +: 8] = {7'd0, v[l]};
    return w;
  endfunction

  logic [S-1:0] model [DEPTH];

  initial begin
    logic [15:0] exp_seq [3];
    logic [S-1:0] be_seq [3];
    rst = 1; fa_en = 0; fb_en = 0; fa_addr = '0; fb_addr = '0; fa_vec = '0; fb_be = '0;
    a_en = 0; b_en = 0; a_addr = '0; b_addr = '0; a_vec = '0; b_be = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;

    // Part 1: the timing example.
    be_seq  = '{4'b0001, 4'b0010, 4'b1000};
    exp_seq = '{16'h1010, 16'h1000, 16'h0000};
    @(negedge clk); fa_en = 1; fa_addr = AW'('h64); fa_vec = 16'h1011;
    @(negedge clk); fa_en = 0;
    @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      fb_en = 1; fb_addr = AW'('h64); fb_be = be_seq[i];
      @(posedge clk); #1;
      chk(f_rd_valid && f_rd_vec == exp_seq[i],
          $sformatf("example step %0d: rd_vec %h expected %h", i, f_rd_vec, exp_seq[i]));
      chk(f_free == (i == 2), $sformatf("example step %0d: free %0b", i, f_free));
      chk(f_free_addr == AW'('h64), "example free_addr");
      @(negedge clk);
    end
    fb_en = 0;
    @(posedge clk); #1;
    chk(!f_rd_valid && !f_free, "no output after the burst");

    // Part 2: random multicast vectors and clears on the default instance.
    begin
      int live[$];
      // store 200 flits at random distinct addresses
      for (int i = 0; i < 200; i++) begin
        int a;
        a = (i * 97 + 5) % DEPTH;
        @(negedge clk);
        a_en = 1; a_addr = AW'(a);
        a_vec = S'($urandom_range(1, (1 << S) - 1));
        model[a] = a_vec;
        live.push_back(a);
        @(posedge clk); #1; a_en = 0;
      end
      @(negedge clk);
      // clear lanes: pick an address, clear its set lanes back to back
      while (live.size() > 0) begin
        int k, a;
        k = $urandom_range(0, live.size() - 1);
        a = live[k];
        live.delete(k);
        for (int l = 0; l < int'(S); l++) begin
          if (model[a][l]) begin
            logic [S-1:0] exp_v;
            b_en = 1; b_addr = AW'(a); b_be = S'(1 << l);
            model[a][l] = 1'b0;
            exp_v = model[a];
            @(posedge clk); #1;
            chk(d_rd_valid && d_rd_vec == exp_v,
                $sformatf("addr %0d lane %0d: rd_vec %b expected %b", a, l, d_rd_vec, exp_v));
            chk(d_free == (exp_v == '0), $sformatf("addr %0d free flag", a));
            if (d_free) chk(d_free_addr == AW'(a), "free_addr matches");
            chk(y_rd_valid && y_rd_vec == widen(exp_v) && y_free == d_free &&
                y_free_addr == AW'(a),
                $sformatf("byte lanes, addr %0d lane %0d: rd_vec %h", a, l, y_rd_vec));
            @(negedge clk);
          end
        end
        b_en = 0;
        if ($urandom_range(0, 1) == 1) @(negedge clk);
      end
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
