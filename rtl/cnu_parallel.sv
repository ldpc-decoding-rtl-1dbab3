// cnu_parallel: fully parallel min-sum check node unit for check degree DC (a power of two).
//
// All DC incoming Q messages (two's complement) arrive together. The ABS stage takes their
// magnitudes (saturated to MAG_W bits), the parallel Min1-Min2 finder returns the two smallest
// magnitudes and the position of the smallest, and the sign logic XORs all Q signs. The R
// selector then gives every edge magnitude Min2 if it holds Min1 and Min1 otherwise, with sign
// equal to the total sign XOR its own Q sign, converted back to two's complement. This is the
// compressed form of R = product of the other signs times the minimum of the other magnitudes.
// Combinational; scaling is expected on the Q side.
module cnu_parallel #(
  parameter int DC    = 8,
  parameter int Q_W   = 5,
  parameter int MAG_W = 4,
  parameter int K     = $clog2(DC)
) (
  input  logic [DC-1:0][Q_W-1:0]   q,
  output logic [DC-1:0][MAG_W:0]   r,
  output logic [MAG_W-1:0]         m1,
  output logic [MAG_W-1:0]         m2,
  output logic [K-1:0]             m1_idx
);

  localparam int MAXMAG = (1 << MAG_W) - 1;

  logic [DC-1:0][MAG_W-1:0] mag;
  logic [DC-1:0]            sgn;
  logic                     tot;

  always_comb begin
    tot = 1'b0;
    for (int i = 0; i < DC; i++) begin
      logic [Q_W-1:0] a;
      sgn[i] = q[i][Q_W-1];
      a      = sgn[i] ? -q[i] : q[i];
      mag[i] = (a > Q_W'(MAXMAG)) ? MAG_W'(MAXMAG) : a[MAG_W-1:0];
      tot    = tot ^ sgn[i];
    end
  end

  min1min2_par #(.W(MAG_W), .N(DC)) u_find (.a(mag), .m1(m1), .m2(m2), .m1_idx(m1_idx));

  always_comb begin
    for (int i = 0; i < DC; i++) begin
      logic [MAG_W-1:0] v;
      v    = (K'(i) == m1_idx) ? m2 : m1;
      r[i] = (tot ^ sgn[i]) ? -{1'b0, v} : {1'b0, v};
    end
  end

endmodule
