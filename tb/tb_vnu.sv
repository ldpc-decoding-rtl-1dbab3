// tb_vnu: random check messages and channel LLRs, including extremes. Expected values are
// computed with integer arithmetic: E_tmp = floor(3/4 * sum R), P = E_tmp + L,
// Q_i = sat5(P - floor(3/4 * R_i)), E = sat5(E_tmp), HD = (P < 0).
module tb_vnu;
  int checks = 0, failures = 0;
  logic signed [3:0][4:0] r;
  logic signed [4:0] l;
  logic signed [3:0][4:0] q;
  logic signed [4:0] e;
  logic hd;

  vnu dut (.*);

  function automatic int fl34(int x);   // floor(3x/4)
    int m = 3 * x;
    return (m >= 0) ? m / 4 : -((-m + 3) / 4);
  endfunction
  function automatic int sat5(int x);
    return (x > 15) ? 15 : (x < -15) ? -15 : x;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int rv [4], lv, sum, et, p;
      sum = 0;
      for (int i = 0; i < 4; i++) begin
        rv[i] = (t < 10) ? ((t % 2) ? -15 : 15) : int'($urandom_range(0, 30)) - 15;
        r[i] = 5'(rv[i]);
        sum += rv[i];
      end
      lv = int'($urandom_range(0, 31)) - 16;
      l = 5'(lv);
      #1;
      et = fl34(sum);
      p  = et + lv;
      checks += 2;
      if (hd != (p < 0)) begin failures++; $display("hd wrong: sum %0d l %0d", sum, lv); end
      if (int'(e) != sat5(et)) begin failures++; $display("e=%0d exp %0d", e, sat5(et)); end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(signed'(q[i])) != sat5(p - fl34(rv[i]))) begin
          failures++;
          $display("q%0d=%0d exp %0d", i, signed'(q[i]), sat5(p - fl34(rv[i])));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
