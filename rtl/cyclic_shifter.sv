// cyclic_shifter: rotates a vector of SC lanes so that out[r] = in[(r + shift) mod SC].
//
// In the layered decoder a circulant with shift s connects row r of its block row to column
// (r + s) mod SC. Storing each block column in the domain of the last circulant that updated it
// means moving from one circulant's domain to the next needs only the delta shift
// dsm = (s_new - s_old) mod SC, which this unit applies. It is a logarithmic barrel rotator: stage
// b rotates by (2^b mod SC) when bit b of the shift is set, so any SC (not only powers of two)
// works as long as shift < SC. Purely combinational; the barrel structure is this design's choice.
module cyclic_shifter #(
  parameter int SC = 96,                       // circulant size (lanes)
  parameter int W  = 9,                        // bits per lane
  parameter int SH_W = (SC <= 2) ? 1 : $clog2(SC)
) (
  input  logic [SC-1:0][W-1:0] din,
  input  logic [SH_W-1:0]      shift,          // 0 .. SC-1
  output logic [SC-1:0][W-1:0] dout
);

  always_comb begin
    logic [SC-1:0][W-1:0] cur, nxt;
    cur = din;
    for (int b = 0; b < SH_W; b++) begin
      for (int r = 0; r < SC; r++)
        nxt[r] = shift[b] ? cur[(r + ((1 << b) % SC)) % SC] : cur[r];
      cur = nxt;
    end
    dout = cur;
  end

endmodule
