// tb_min1min2_par: the 8-input (PBM8+) and a 16-input finder on random magnitudes with many
// ties; Min1 and Min2 must be the two smallest values (Min2 = Min1 when it occurs twice) and
// the index must point at an input holding Min1.
module tb_min1min2_par;
  int checks = 0, failures = 0;
  logic [7:0][3:0]  a8;
  logic [3:0]       m1_8, m2_8;
  logic [2:0]       ix8;
  logic [15:0][3:0] a16;
  logic [3:0]       m1_16, m2_16;
  logic [3:0]       ix16;

  min1min2_par #(.W(4), .N(8))  dut8  (.a(a8),  .m1(m1_8),  .m2(m2_8),  .m1_idx(ix8));
  min1min2_par #(.W(4), .N(16)) dut16 (.a(a16), .m1(m1_16), .m2(m2_16), .m1_idx(ix16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int e1, e2, f1, f2;
      int rng;
      rng = (t % 3 == 0) ? 3 : 15;
      e1 = 99; e2 = 99; f1 = 99; f2 = 99;
      for (int i = 0; i < 8; i++) begin
        int v;
        v = int'($urandom_range(0, rng));
        a8[i] = 4'(v);
        if (v < e1) begin e2 = e1; e1 = v; end else if (v < e2) e2 = v;
      end
      for (int i = 0; i < 16; i++) begin
        int v;
        v = int'($urandom_range(0, rng));
        a16[i] = 4'(v);
        if (v < f1) begin f2 = f1; f1 = v; end else if (v < f2) f2 = v;
      end
      #1;
      checks += 2;
      if (int'(m1_8) != e1 || int'(m2_8) != e2 || a8[ix8] != m1_8) begin
        failures++;
        $display("N=8: got %0d %0d idx %0d, expected %0d %0d", m1_8, m2_8, ix8, e1, e2);
      end
      if (int'(m1_16) != f1 || int'(m2_16) != f2 || a16[ix16] != m1_16) begin
        failures++;
        $display("N=16: got %0d %0d idx %0d, expected %0d %0d", m1_16, m2_16, ix16, f1, f2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
