// tb_r_select: random final states, Q signs and block numbers; every lane must give
// magnitude Min2 at the Min1 position and Min1 elsewhere, with sign = cumulative sign XOR own
// sign, in two's complement.
module tb_r_select;
  import ldpc_pkg::*;
  localparam int SC = 8;
  int checks = 0, failures = 0;
  fs_t [SC-1:0] fs;
  logic [SC-1:0] qsign;
  logic [IDX_W-1:0] bn;
  logic [SC-1:0][R_W-1:0] r;

  r_select #(.SC(SC)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      bn = IDX_W'($urandom_range(0, 9));
      for (int i = 0; i < SC; i++) begin
        fs[i].m1 = MAG_W'($urandom); fs[i].m2 = MAG_W'($urandom);
        fs[i].idx = IDX_W'($urandom_range(0, 9)); fs[i].sign = 1'($urandom);
        qsign[i] = 1'($urandom);
      end
      #1;
      for (int i = 0; i < SC; i++) begin
        int mg, e;
        mg = (fs[i].idx == bn) ? int'(fs[i].m2) : int'(fs[i].m1);
        e  = (fs[i].sign ^ qsign[i]) ? -mg : mg;
        checks++;
        if (int'(signed'(r[i])) != e) begin
          failures++;
          $display("lane %0d: got %0d expected %0d", i, signed'(r[i]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
