// rr_arbiter: N-input round-robin arbiter with a one-hot grant.
//
// The grant is combinational from req. A priority pointer (one-hot "last
// winner") is held in a register; the request just after the last winner has
// the highest priority. When `update` is high at a clock edge the pointer moves
// to the current winner, so a requester that keeps losing is served within N
// grants. The router uses this arbiter for both allocation stages and for the
// candidate OVC choice. The published design names a fast arbiter from other work for
// this role; this plain masked round-robin form is this design's choice.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         update,  // advance priority past the current winner
  output logic [N-1:0] grant
);

  logic [N-1:0] last;            // one-hot: most recent winner
  logic [N-1:0] higher;          // requests strictly after `last`
  logic [N-1:0] mask_hi;

  // mask_hi[i] = 1 for every position above the last winner
  always_comb begin
    mask_hi = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < i; j++)
        if (last[j]) mask_hi[i] = 1'b1;
  end

  assign higher = req & mask_hi;

  // Lowest set bit of `higher`, else lowest set bit of `req`
  always_comb begin
    grant = '0;
    if (|higher) grant = higher & (~higher + 1'b1);
    else         grant = req & (~req + 1'b1);
  end

  always_ff @(posedge clk) begin
    if (rst)                     last <= N'(1) << (N-1);  // index 0 first after reset
    else if (update && |grant)   last <= grant;
  end

endmodule
