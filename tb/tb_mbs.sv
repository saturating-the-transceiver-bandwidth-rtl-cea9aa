// Self-checking test of one memory based switch (S = 4, 256-bit flits,
// 576-flit shared buffer, 1-bit recycle-bin lanes).
// The testbench acts as the row serializer (one flit per cycle, credit-based:
// one credit per free address, returned by 'recycle') and as the four output
// schedulers (output 'phase' may read in cycle 'phase', granted at random).
// A reference model keeps a queue of expected payloads per output: every
// flit, unicast or multicast, must leave each of its outputs once, in arrival
// order, one cycle after the grant. Further checks:
//  - a flit is visible to the output scheduler one cycle after it is written;
//  - a multicast flit uses one address ('free_count' drops by one);
//  - with all outputs but one stopped, that output's queue grows far beyond
//    576/4 flits, i.e. the buffer is shared, until every credit is used;
//  - after the run every address has been recycled exactly once per flit.
module tb_mbs;
  localparam int unsigned S = 4, DATA_W = 256, DEPTH = 576;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst, in_valid, out_grant, out_valid, recycle;
  logic [S-1:0]      in_dest, q_nonempty;
  logic [DATA_W-1:0] in_data, out_data;
  logic [1:0]        out_sel;
  logic [CW-1:0]     free_count;

  mbs #(.S(S), .DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] expq[S][$];
  int credits, sent = 0, recycled = 0, copies_out = 0;
  int last_read = -1;
  logic [S-1:0] out_enable = '1;
  bit  send_enable = 1;
  int  send_mask_mode = 0;     // 0: random, 1: only output 0
  int  max_q0 = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [DATA_W-1:0] payload(input int n);
    logic [DATA_W-1:0] w;
    for (int i = 0; i < int'(DATA_W) / 32; i++) w[i*32 +: 32] = 32'(n * 1000 + i);
    return w;
  endfunction

  // drive inputs at the falling edge
  always @(negedge clk) begin
    if (rst) begin
      in_valid <= 0; out_grant <= 0; out_sel <= 0;
    end else begin
      logic [S-1:0] m;
      out_sel <= out_sel + 1'b1;
      out_grant <= out_enable[out_sel + 1'b1] && ($urandom_range(0, 3) != 0);
      in_valid <= 0;
      if (send_enable && credits > 0 && $urandom_range(0, 3) != 0) begin
        m = (send_mask_mode == 1) ? 4'b0001 :
            ($urandom_range(0, 2) == 0) ? S'($urandom_range(1, 15)) : S'(1 << $urandom_range(0, 3));
        in_valid <= 1; in_dest <= m; in_data <= payload(sent);
        for (int q = 0; q < int'(S); q++) if (m[q]) expq[q].push_back(payload(sent));
        credits--; sent++;
      end
    end
  end

  // check outputs at the rising edge
  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      chk(last_read >= 0, "out_valid only after a read");
      if (last_read >= 0) begin
        logic [DATA_W-1:0] e;
        e = expq[last_read].pop_front();
        chk(out_data == e, $sformatf("output %0d payload", last_read));
        copies_out++;
      end
    end
    last_read = (out_grant && q_nonempty[out_sel]) ? int'(out_sel) : -1;
    if (recycle) begin credits++; recycled++; end
    if (expq[0].size() > max_q0) max_q0 = expq[0].size();
    for (int q = 0; q < int'(S); q++)
      if (q_nonempty[q] && expq[q].size() == 0) begin
        failures++; $display("FAIL queue %0d nonempty with nothing expected", q);
      end
  end

  initial begin
    rst = 1; in_dest = '0; in_data = '0; credits = DEPTH;
    send_enable = 0; out_enable = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    #1;
    chk(free_count == CW'(DEPTH), "all addresses free after reset");
    // single multicast flit into the empty switch
    @(negedge clk); #1;
    force in_valid = 1; force in_dest = 4'b1010; force in_data = payload(99999);
    expq[1].push_back(payload(99999)); expq[3].push_back(payload(99999));
    credits--; sent++;
    @(posedge clk); #1;
    release in_valid; release in_dest; release in_data;
    in_valid = 0;
    chk(q_nonempty == 4'b1010, "flit queued for both outputs one cycle after the write");
    @(posedge clk); #1;
    chk(free_count == CW'(DEPTH - 1), "multicast flit uses one address");
    out_enable = '1;
    repeat (20) @(posedge clk);
    chk(expq[1].size() == 0 && expq[3].size() == 0, "multicast copies left");
    // random traffic
    send_enable = 1;
    repeat (4000) @(posedge clk);
    // buffer sharing: only output 0 takes flits and no output reads
    send_enable = 0;
    repeat (50) @(posedge clk);
    out_enable = '0; send_mask_mode = 1; send_enable = 1;
    repeat (1500) @(posedge clk);
    chk(max_q0 > int'(DEPTH / S), $sformatf("one output holds %0d flits (> %0d)", max_q0, DEPTH / S));
    chk(credits == 0 && free_count == 0, "buffer full when every credit is used");
    chk(q_nonempty[0], "queue 0 holds the backlog");
    send_enable = 0; out_enable = '1;
    repeat (4 * DEPTH + 100) @(posedge clk);
    chk(expq[0].size() == 0 && expq[1].size() == 0 && expq[2].size() == 0 && expq[3].size() == 0,
        "everything delivered");
    chk(recycled == sent, $sformatf("recycled %0d of %0d flits", recycled, sent));
    chk(free_count == CW'(DEPTH), "all addresses free at the end");
    $display("flits %0d copies %0d", sent, copies_out);
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
