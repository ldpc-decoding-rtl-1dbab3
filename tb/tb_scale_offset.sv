// tb_scale_offset: every Q value from -127 to 127 through the default (3/4, offset 0) unit
// and an offset-only unit (1/1, offset 2); magnitudes must be the scaled, offset and
// 4-bit-saturated |Q|, signs the Q sign.
module tb_scale_offset;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic [0:0][Q_W-1:0] q;
  logic [0:0][MAG_W-1:0] mag_a, mag_b;
  logic [0:0] sign_a, sign_b;

  scale_offset #(.SC(1)) dut_a (.q(q), .mag(mag_a), .sign(sign_a));
  scale_offset #(.SC(1), .SCALE_NUM(1), .SCALE_SHIFT(0), .OFFSET(2)) dut_b (.q(q), .mag(mag_b), .sign(sign_b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -127; v <= 127; v++) begin
      int a, ea, eb;
      q[0] = Q_W'(v);
      #1;
      a  = (v < 0) ? -v : v;
      ea = (a * 3) / 4;  if (ea > 15) ea = 15;
      eb = a - 2;        if (eb < 0) eb = 0;  if (eb > 15) eb = 15;
      checks += 2;
      if (int'(mag_a[0]) != ea || sign_a[0] != (v < 0)) begin failures++; $display("3/4: q=%0d mag=%0d exp %0d", v, mag_a[0], ea); end
      if (int'(mag_b[0]) != eb || sign_b[0] != (v < 0)) begin failures++; $display("off: q=%0d mag=%0d exp %0d", v, mag_b[0], eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
