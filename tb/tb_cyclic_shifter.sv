// tb_cyclic_shifter: full-size (96 lanes) and a non-power-of-two small instance; every shift
// value is tried with random data and out[r] must equal in[(r + shift) mod SC].
module tb_cyclic_shifter;
  int checks = 0, failures = 0;
  logic [95:0][8:0] din_a, dout_a;
  logic [6:0]       sh_a;
  logic [11:0][3:0] din_b, dout_b;
  logic [3:0]       sh_b;

  cyclic_shifter #(.SC(96), .W(9)) dut_a (.din(din_a), .shift(sh_a), .dout(dout_a));
  cyclic_shifter #(.SC(12), .W(4)) dut_b (.din(din_b), .shift(sh_b), .dout(dout_b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int s = 0; s < 96; s++) begin
        for (int i = 0; i < 96; i++) din_a[i] = 9'($urandom);
        sh_a = 7'(s);
        #1;
        for (int i = 0; i < 96; i++) begin
          checks++;
          if (dout_a[i] != din_a[(i + s) % 96]) failures++;
        end
      end
      for (int s = 0; s < 12; s++) begin
        for (int i = 0; i < 12; i++) din_b[i] = 4'($urandom);
        sh_b = 4'(s);
        #1;
        for (int i = 0; i < 12; i++) begin
          checks++;
          if (dout_b[i] != din_b[(i + s) % 12]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
