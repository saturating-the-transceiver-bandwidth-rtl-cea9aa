// Round-robin arbiter.
//
// Among the asserted 'req' bits it grants the first one after the index that
// won last time, so every requester is served within N grants. The grant is
// combinational; the priority pointer moves only when 'accept' confirms that
// the granted request was taken.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [N-1:0]                       req,
  input  logic                               accept,
  output logic                               gnt_valid,
  output logic [((N > 1) ? $clog2(N) : 1)-1:0] gnt_idx
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;

  always_comb begin
    logic [IW-1:0] c;
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int unsigned i = 1; i <= N; i++) begin
      c = IW'((int'(last) + i) % N);
      if (!gnt_valid && req[c]) begin
        gnt_valid = 1'b1;
        gnt_idx   = c;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                         last <= IW'(N - 1);
    else if (accept && gnt_valid)    last <= gnt_idx;
  end

endmodule
