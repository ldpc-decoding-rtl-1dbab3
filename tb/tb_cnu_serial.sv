// tb_cnu_serial: checks the serial check node array against a direct computation.
// Random layers of 2..12 blocks are streamed (sometimes back to back, sometimes with idle
// clocks between them); after each layer the final state must equal the smallest and second
// smallest magnitudes, the block number of the first smallest and the XOR of the signs, and it
// must be flagged valid exactly one clock after the last input.
module tb_cnu_serial;
  import ldpc_pkg::*;
  localparam int SC = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid, first, last;
  logic [SC-1:0][MAG_W-1:0] mag;
  logic [SC-1:0] sign;
  logic [IDX_W-1:0] bn;
  fs_t [SC-1:0] fs;
  logic fs_valid;

  cnu_serial #(.SC(SC)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m1 [SC], m2 [SC], ix [SC];
    bit sg [SC];
    int dc;
    valid = 0; first = 0; last = 0; mag = '0; sign = '0; bn = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int layer = 0; layer < 200; layer++) begin
      dc = 2 + int'($urandom_range(0, 10));
      for (int i = 0; i < SC; i++) begin m1[i] = 99; m2[i] = 99; ix[i] = 0; sg[i] = 0; end
      for (int k = 0; k < dc; k++) begin
        @(negedge clk);
        valid = 1; first = (k == 0); last = (k == dc - 1); bn = IDX_W'(k);
        for (int i = 0; i < SC; i++) begin
          int v;
          v = int'($urandom_range(0, 15));
          mag[i] = MAG_W'(v); sign[i] = 1'($urandom);
          sg[i] ^= sign[i];
          if (v < m1[i]) begin m2[i] = m1[i]; m1[i] = v; ix[i] = k; end
          else if (v < m2[i]) m2[i] = v;
        end
      end
      @(negedge clk);
      valid = 0; first = 0; last = 0;
      checks++;
      if (!fs_valid) begin failures++; $display("layer %0d: fs_valid missing", layer); end
      for (int i = 0; i < SC; i++) begin
        checks++;
        if (fs[i].m1 != MAG_W'(m1[i]) || fs[i].m2 != MAG_W'(m2[i]) ||
            fs[i].idx != IDX_W'(ix[i]) || fs[i].sign != sg[i]) begin
          failures++;
          $display("layer %0d row %0d: got %0d %0d %0d %0d exp %0d %0d %0d %0d", layer, i,
                   fs[i].m1, fs[i].m2, fs[i].idx, fs[i].sign, m1[i], m2[i], ix[i], sg[i]);
        end
      end
      if ($urandom_range(0, 1) == 1) begin
        @(negedge clk);
        checks++;
        if (fs_valid) begin failures++; $display("fs_valid held too long"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
