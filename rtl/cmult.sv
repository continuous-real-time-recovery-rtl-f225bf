// cmult: pipelined complex multiplier.
//
// p = a * b for complex a = ar + j*ai and b = br + j*bi, all W-bit signed.
// Each output word is the sum or difference of two W x W products, so it is
// kept at the full 2W+1 bits (33 bits for 16-bit operands, as the source
// states). Two register stages: the four products, then their sum and
// difference; outputs appear two clocks after the operands. The pipeline
// depth is this design's choice.
module cmult #(
  parameter int unsigned W = 16
) (
  input  logic                  clk,
  input  logic signed [W-1:0]   ar,
  input  logic signed [W-1:0]   ai,
  input  logic signed [W-1:0]   br,
  input  logic signed [W-1:0]   bi,
  output logic signed [2*W:0]   pr,
  output logic signed [2*W:0]   pi
);
  logic signed [2*W-1:0] rr, ii, ri, ir;

  always_ff @(posedge clk) begin
    rr <= ar * br;
    ii <= ai * bi;
    ri <= ar * bi;
    ir <= ai * br;
    pr <= (2*W+1)'(rr) - (2*W+1)'(ii);
    pi <= (2*W+1)'(ri) + (2*W+1)'(ir);
  end
endmodule
