// tb_cnu_parallel: random 5-bit Q vectors into the degree-8 parallel check node; each R_i
// must equal the product of the other seven signs times the smallest of the other seven
// magnitudes (magnitudes saturated to 15).
module tb_cnu_parallel;
  int checks = 0, failures = 0;
  logic [7:0][4:0] q;
  logic [7:0][4:0] r;
  logic [3:0] m1, m2;
  logic [2:0] m1_idx;

  cnu_parallel dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int qv [8];
      for (int i = 0; i < 8; i++) begin
        qv[i] = int'($urandom_range(0, 31)) - 16;
        q[i] = 5'(qv[i]);
      end
      #1;
      for (int i = 0; i < 8; i++) begin
        int mn, e;
        bit s;
        mn = 99; s = 0;
        for (int j = 0; j < 8; j++) if (j != i) begin
          int a;
          a = (qv[j] < 0) ? -qv[j] : qv[j];
          if (a > 15) a = 15;
          if (a < mn) mn = a;
          s ^= (qv[j] < 0);
        end
        e = s ? -mn : mn;
        checks++;
        if (int'(signed'(r[i])) != e) begin
          failures++;
          $display("R%0d = %0d expected %0d", i, signed'(r[i]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
