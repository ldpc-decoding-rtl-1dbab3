// min1min2_par: parallel Min1-Min2 finder for N = 2^K magnitudes (PBM8+ for N = 8).
//
// Level 1 sorts neighbouring pairs with BM2+ (even pairs, increasing) and BM2- (odd pairs,
// decreasing) cells, so that each pair of pairs forms the bitonic input r < s, t > u of a PBM4+
// cell. Each further level merges two (Min1, Min2) results with another PBM4+ cell, the left
// result taken as the increasing pair (r = Min1, s = Min2) and the right one as the decreasing
// pair (t = Min2, u = Min1), adding one index bit per level. The result is the smallest value,
// the second smallest value and the input position of the smallest. Purely combinational with
// depth 1 + log2(N/2) cells; the hierarchical construction follows the document.
module min1min2_par #(
  parameter int W = 4,
  parameter int N = 8,                          // power of two, at least 4
  parameter int K = $clog2(N)
) (
  input  logic [N-1:0][W-1:0] a,
  output logic [W-1:0]        m1,
  output logic [W-1:0]        m2,
  output logic [K-1:0]        m1_idx
);

  // Results of level j (j = 1..K): N >> j groups, index width j.
  logic [N-1:0][W-1:0] lv_m1  [K+1];
  logic [N-1:0][W-1:0] lv_m2  [K+1];
  logic [N-1:0][K-1:0] lv_idx [K+1];

  // Level 0 is unused; keep it defined.
  assign lv_m1[0]  = a;
  assign lv_m2[0]  = a;
  assign lv_idx[0] = '0;

  // Level 1: BM2+ / BM2- pairs. An increasing pair gives (min, max), a decreasing one
  // (max, min); both are stored as (Min1, Min2) with the index of Min1.
  for (genvar g = 0; g < N / 2; g++) begin : g_l1
    logic [W-1:0] o0, o1;
    logic         c;
    bm2 #(.W(W), .DESC(g % 2 == 1)) u_bm2 (
      .a(a[2*g]), .b(a[2*g+1]), .o0(o0), .o1(o1), .c(c));
    if (g % 2 == 0) begin : g_inc
      assign lv_m1[1][g] = o0;
      assign lv_m2[1][g] = o1;
    end else begin : g_dec
      assign lv_m1[1][g] = o1;
      assign lv_m2[1][g] = o0;
    end
    // The minimum is input b when BM2+ finds a < b false, or when BM2- finds a > b true.
    assign lv_idx[1][g] = K'((g % 2 == 1) ? c : !c);
  end
  for (genvar g = N / 2; g < N; g++) begin : g_l1_pad
    assign lv_m1[1][g]  = '0;
    assign lv_m2[1][g]  = '0;
    assign lv_idx[1][g] = '0;
  end

  // Levels 2..K: PBM4+ merges.
  for (genvar j = 2; j <= K; j++) begin : g_lv
    for (genvar g = 0; g < (N >> j); g++) begin : g_m
      logic [j-1:0] idx;
      pbm4 #(.W(W), .IW(j - 1)) u_pbm4 (
        .r(lv_m1[j-1][2*g]),   .s(lv_m2[j-1][2*g]),
        .t(lv_m2[j-1][2*g+1]), .u(lv_m1[j-1][2*g+1]),
        .idx_r(lv_idx[j-1][2*g][j-2:0]), .idx_u(lv_idx[j-1][2*g+1][j-2:0]),
        .m1(lv_m1[j][g]), .m2(lv_m2[j][g]), .m1_idx(idx));
      assign lv_idx[j][g] = K'(idx);
    end
    for (genvar g = (N >> j); g < N; g++) begin : g_pad
      assign lv_m1[j][g]  = '0;
      assign lv_m2[j][g]  = '0;
      assign lv_idx[j][g] = '0;
    end
  end

  assign m1     = lv_m1[K][0];
  assign m2     = lv_m2[K][0];
  assign m1_idx = lv_idx[K][0];

endmodule
