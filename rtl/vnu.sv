// vnu: variable node unit of the non-layered (flooding) decoder.
//
// For one bit node of column degree DV it adds the DV incoming check messages R_1..R_DV, scales
// the sum (E_tmp), adds the channel LLR L to obtain the posterior P, takes the hard decision
// from the sign (MSB) of P, and forms each outgoing message Q_i = P - scaled(R_i), i.e. the
// posterior without the contribution of check i. E_tmp saturated to E_W bits is also output
// as the extrinsic value E for a detector. Each Q_i is saturated to Q_OUT_W bits. The adder
// tree, scaling points and saturations follow the VNU micro-architecture; the widths and the
// scaling factor (SCALE_NUM / 2^SCALE_SHIFT, floor) are this design's choices. Combinational.
module vnu #(
  parameter int DV          = 4,   // column degree
  parameter int R_W         = 5,   // check message width
  parameter int L_W         = 5,   // channel LLR width
  parameter int Q_OUT_W     = 5,   // outgoing Q width
  parameter int E_W         = 5,   // extrinsic output width
  parameter int SCALE_NUM   = 3,
  parameter int SCALE_SHIFT = 2
) (
  input  logic signed [DV-1:0][R_W-1:0]     r,
  input  logic signed [L_W-1:0]             l,
  output logic signed [DV-1:0][Q_OUT_W-1:0] q,
  output logic signed [E_W-1:0]             e,
  output logic                              hd
);

  localparam int S_W = R_W + $clog2(DV) + 4;   // internal sum width with headroom

  function automatic logic signed [S_W-1:0] scale(input logic signed [S_W-1:0] x);
    logic signed [S_W+7:0] m;
    m = (S_W+8)'(x) * (S_W+8)'(signed'(SCALE_NUM));
    return S_W'(m >>> SCALE_SHIFT);
  endfunction

  function automatic logic signed [S_W-1:0] sat(input logic signed [S_W-1:0] x, input int w);
    logic signed [S_W-1:0] hi, lo;
    hi = S_W'((1 << (w - 1)) - 1);
    lo = -hi;
    return (x > hi) ? hi : (x < lo) ? lo : x;
  endfunction

  logic signed [S_W-1:0] sum, e_tmp, p;

  always_comb begin
    sum = '0;
    for (int i = 0; i < DV; i++) sum = sum + S_W'(signed'(r[i]));
    e_tmp = scale(sum);
    p     = e_tmp + S_W'(l);
    hd    = p[S_W-1];
    e     = E_W'(sat(e_tmp, E_W));
    for (int i = 0; i < DV; i++)
      q[i] = Q_OUT_W'(sat(p - scale(S_W'(signed'(r[i]))), Q_OUT_W));
  end

endmodule
