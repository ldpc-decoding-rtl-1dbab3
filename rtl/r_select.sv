// r_select: rebuilds the check-to-variable messages R of one circulant from the compressed
// final state of its layer.
//
// Each of the SC check rows keeps only Min1, Min2, the block number of Min1 and the XOR of all Q
// signs. For the circulant with block number bn, lane r gets magnitude Min2 if bn is the Min1
// position and Min1 otherwise, and sign = cumulative sign XOR the stored sign of this
// circulant's own Q. The result is converted from sign-magnitude to two's complement (the
// SM-TC step of the check node unit). The same unit serves as R NEW select and R OLD select.
// Combinational.
module r_select
  import ldpc_pkg::*;
#(
  parameter int SC = 96
) (
  input  fs_t  [SC-1:0]          fs,      // final state of the layer, per row
  input  logic [SC-1:0]          qsign,   // stored Q sign of this circulant, per row
  input  logic [IDX_W-1:0]       bn,      // block number of this circulant in its layer
  output logic [SC-1:0][R_W-1:0] r        // R in two's complement
);

  always_comb begin
    for (int i = 0; i < SC; i++) begin
      logic [MAG_W-1:0] mag;
      logic             sgn;
      mag  = (fs[i].idx == bn) ? fs[i].m2 : fs[i].m1;
      sgn  = fs[i].sign ^ qsign[i];
      r[i] = sgn ? -{1'b0, mag} : {1'b0, mag};
    end
  end

endmodule
