// Dual-clock first-word-fall-through FIFO for crossing between the port clock
// and the core clock.
//
// Write and read pointers are kept in binary and in Gray code; each side
// passes its Gray pointer through a two-flip-flop synchronizer into the other
// clock domain. 'full' and 'wr_count' are computed on the write side from the
// synchronized read pointer, so they are conservative (the FIFO may hold fewer
// entries than reported). 'empty' is likewise conservative on the read side.
// The head entry is visible on 'rd_data' while 'empty' is low; 'rd_en' pops it.
// DEPTH must be a power of two. The storage is an array with an asynchronous
// read, i.e. distributed RAM, as the input queues of the switch use.
// Each side has its own synchronous, active-high reset; both must be applied
// together before use.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       wclk,
  input  logic                       wrst,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  output logic                       full,
  output logic [$clog2(DEPTH):0]     wr_count,

  input  logic                       rclk,
  input  logic                       rrst,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in read domain
  logic [AW:0] rbin_w;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side
  logic do_wr;
  assign rbin_w   = gray2bin(rgray_w2);
  assign wr_count = wbin - rbin_w;
  assign full     = (wr_count == (AW+1)'(DEPTH));
  assign do_wr    = wr_en && !full;

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk)
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;

  // ---------------- read side
  logic do_rd;
  assign empty   = (rgray == wgray_r2);
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  a_no_overflow:  assert property (@(posedge wclk) disable iff (wrst) wr_en |-> !full);
  a_no_underflow: assert property (@(posedge rclk) disable iff (rrst) rd_en |-> !empty);

endmodule
