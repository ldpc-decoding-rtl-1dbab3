// bm2: two-input bitonic merge cell of the parallel Min1-Min2 finder.
//
// Compares A and B and outputs the pair sorted: in increasing order (lo, hi) for the BM2+
// variant (DESC = 0) or decreasing order (hi, lo) for BM2- (DESC = 1), together with the
// comparison flag c (A < B for BM2+, A > B for BM2-). On a tie B is taken as the minimum.
// Combinational.
module bm2 #(
  parameter int W    = 4,
  parameter bit DESC = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] o0,     // min for BM2+, max for BM2-
  output logic [W-1:0] o1,     // max for BM2+, min for BM2-
  output logic         c       // comparison flag
);

  always_comb begin
    if (!DESC) begin
      c  = (a < b);
      o0 = c ? a : b;
      o1 = c ? b : a;
    end else begin
      c  = (a > b);
      o0 = c ? a : b;
      o1 = c ? b : a;
    end
  end

endmodule
