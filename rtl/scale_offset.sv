// scale_offset: turns SC 8-bit Q messages into the 5-bit sign-magnitude inputs of the check
// node units.
//
// The magnitude is multiplied by SCALE_NUM / 2^SCALE_SHIFT, reduced by OFFSET (clipped at 0)
// and saturated to MAG_W bits; the sign is the Q sign bit. Because min() commutes with any
// monotonic map, scaling the Q magnitudes before the minimum search gives the same R messages as
// scaling the minima (scaled or offset min-sum). Q is assumed symmetric (-127..127), as the
// Q subtractor saturates that way. The factor 3/4 and offset 0 are this design's defaults.
// Combinational.
module scale_offset
  import ldpc_pkg::*;
#(
  parameter int SC          = 96,
  parameter int SCALE_NUM   = 3,
  parameter int SCALE_SHIFT = 2,
  parameter int OFFSET      = 0
) (
  input  logic [SC-1:0][Q_W-1:0]   q,
  output logic [SC-1:0][MAG_W-1:0] mag,
  output logic [SC-1:0]            sign
);

  localparam int MAXMAG = (1 << MAG_W) - 1;

  always_comb begin
    for (int i = 0; i < SC; i++) begin
      logic [Q_W-1:0]  a;
      logic [Q_W+7:0]  prod;
      logic [Q_W+7:0]  sc;
      a       = q[i][Q_W-1] ? -q[i] : q[i];
      prod    = (Q_W + 8)'(a) * (Q_W + 8)'(SCALE_NUM);
      sc      = prod >> SCALE_SHIFT;
      sc      = (sc > (Q_W + 8)'(OFFSET)) ? sc - (Q_W + 8)'(OFFSET) : '0;
      mag[i]  = (sc > (Q_W + 8)'(MAXMAG)) ? MAG_W'(MAXMAG) : sc[MAG_W-1:0];
      sign[i] = q[i][Q_W-1];
    end
  end

endmodule
