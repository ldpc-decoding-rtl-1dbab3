// pbm4: PBM4+ cell, merges two sorted pairs into the two smallest values and the position of
// the smallest.
//
// Inputs r <= s form an increasing pair and t >= u a decreasing pair (each carrying the index
// of its minimum inside its half). Min1 = min(r, u); Min2 is the smaller of the loser of that
// comparison and the other pair's minimum partner: min(s, u) when r wins, min(r, t) when u
// wins. The Min1 index gets one more bit saying which half won (0 = r side). Ties go to the
// r side. Combinational.
module pbm4 #(
  parameter int W   = 4,
  parameter int IW  = 1      // index width of each half
) (
  input  logic [W-1:0]  r,
  input  logic [W-1:0]  s,
  input  logic [W-1:0]  t,
  input  logic [W-1:0]  u,
  input  logic [IW-1:0] idx_r,
  input  logic [IW-1:0] idx_u,
  output logic [W-1:0]  m1,
  output logic [W-1:0]  m2,
  output logic [IW:0]   m1_idx
);

  always_comb begin
    if (r <= u) begin
      m1     = r;
      m2     = (s < u) ? s : u;
      m1_idx = {1'b0, idx_r};
    end else begin
      m1     = u;
      m2     = (r < t) ? r : t;
      m1_idx = {1'b1, idx_u};
    end
  end

endmodule
