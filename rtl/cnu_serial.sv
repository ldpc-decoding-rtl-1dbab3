// cnu_serial: an array of SC serial min-sum check node units, one per row of a block row.
//
// Each circulant of a layer delivers one Q per row per clock (valid). The partial state keeps,
// per row, the smallest magnitude Min1, the second smallest Min2, the block number of Min1 and
// the running XOR of the Q signs. A new magnitude below Min1 pushes Min1 into Min2 and records
// its block number; one below Min2 only replaces Min2 (ties keep the earlier value, which gives
// the same R messages). 'first' restarts the partial state with the incoming value (Min2 = max);
// 'last' copies the updated partial state into the final-state register, which is valid for one
// clock (fs_valid) in the cycle after the last input. Because the partial state is restarted by
// 'first' and the final state is a separate register, the next layer can start streaming the
// clock after 'last'. The structure (partial state, final state, sign processing) follows the
// check node micro-architecture; the first/last framing is this design's interface.
module cnu_serial
  import ldpc_pkg::*;
#(
  parameter int SC = 96
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     valid,
  input  logic                     first,
  input  logic                     last,
  input  logic [SC-1:0][MAG_W-1:0] mag,
  input  logic [SC-1:0]            sign,
  input  logic [IDX_W-1:0]         bn,
  output fs_t  [SC-1:0]            fs,
  output logic                     fs_valid
);

  fs_t [SC-1:0] ps, ps_next;

  always_comb begin
    for (int i = 0; i < SC; i++) begin
      if (first) begin
        ps_next[i].m1   = mag[i];
        ps_next[i].m2   = '1;
        ps_next[i].idx  = bn;
        ps_next[i].sign = sign[i];
      end else begin
        ps_next[i]      = ps[i];
        ps_next[i].sign = ps[i].sign ^ sign[i];
        if (mag[i] < ps[i].m1) begin
          ps_next[i].m2  = ps[i].m1;
          ps_next[i].m1  = mag[i];
          ps_next[i].idx = bn;
        end else if (mag[i] < ps[i].m2) begin
          ps_next[i].m2  = mag[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps       <= '0;
      fs       <= '0;
      fs_valid <= 1'b0;
    end else begin
      fs_valid <= valid && last;
      if (valid) begin
        ps <= ps_next;
        if (last) fs <= ps_next;
      end
    end
  end

endmodule
