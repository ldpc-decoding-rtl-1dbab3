// tb_layered_decoder: self-checking test of the layered decoder at a reduced circulant size.
//
// Two decoders run the same frames: one with the out-of-order schedule and one with natural
// block order. A behavioural reference decoder in this file performs the same fixed-point
// layered min-sum (8-bit saturated Q, 3/4-scaled 4-bit magnitudes, R as the minimum and sign
// product over the other blocks of the row, syndrome taken from P entering each layer, stop on
// an all-zero iteration or at MAX_ITER). Hard decisions, iteration count and the converged flag
// must match the reference bit for bit. Frames are the all-zero codeword with noise of growing
// strength, so both early termination and the iteration limit occur. The test also checks
// that the out-of-order decoder never stalls, that the natural-order one does, and that a
// frame takes exactly (NCIRC + 5) clocks per iteration plus a fixed overhead.
module tb_layered_decoder;
  import ldpc_pkg::*;

  localparam int SC       = 16;
  localparam int MAX_ITER = 6;
  localparam int COL_W    = clog2_min1(NB);
  localparam int NFRAMES  = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                     llr_we;
  logic [COL_W-1:0]         llr_addr;
  logic [SC-1:0][LLR_W-1:0] llr_data;
  logic                     start;
  logic [COL_W-1:0]         hd_raddr;
  logic                     busy [2], done [2], converged [2];
  logic [7:0]               iterations [2];
  logic [SC-1:0]            hd_rdata [2];
  logic [31:0]              stalls [2], drains [2], reorders [2];

  layered_decoder #(.SC(SC), .MAX_ITER(MAX_ITER), .OOO(1'b1)) dut_ooo (
    .clk, .rst_n, .llr_we, .llr_addr, .llr_data, .start,
    .busy(busy[0]), .done(done[0]), .converged(converged[0]), .iterations(iterations[0]),
    .hd_raddr, .hd_rdata(hd_rdata[0]),
    .dep_stall_cycles(stalls[0]), .drain_cycles(drains[0]), .reorder_issues(reorders[0]));

  layered_decoder #(.SC(SC), .MAX_ITER(MAX_ITER), .OOO(1'b0)) dut_nat (
    .clk, .rst_n, .llr_we, .llr_addr, .llr_data, .start,
    .busy(busy[1]), .done(done[1]), .converged(converged[1]), .iterations(iterations[1]),
    .hd_raddr, .hd_rdata(hd_rdata[1]),
    .dep_stall_cycles(stalls[1]), .drain_cycles(drains[1]), .reorder_issues(reorders[1]));

  // ---------------------------------------------------------------- reference model
  int llr   [NB*SC];
  int P     [NB*SC];
  int R     [MB][NB][SC];
  bit ref_hd [NB*SC];
  int ref_iters;
  bit ref_conv;

  function automatic int sat127(int x);
    return (x > 127) ? 127 : (x < -127) ? -127 : x;
  endfunction

  function automatic int cnu_mag(int q);
    int a = (q < 0) ? -q : q;
    a = (a * 3) >> 2;
    return (a > 15) ? 15 : a;
  endfunction

  // Loop bounds are run-time variables so the reference model stays a loop in simulation.
  int nb_rt, mb_rt, sc_rt, it_rt;
  int hb_rt [MB][NB];

  task automatic ref_decode();
    int q [NB][SC];
    bit ok;
    for (int v = 0; v < nb_rt*sc_rt; v++) P[v] = llr[v];
    for (int l = 0; l < mb_rt; l++) for (int n = 0; n < nb_rt; n++) for (int r = 0; r < sc_rt; r++) R[l][n][r] = 0;
    ref_iters = 0;
    ref_conv  = 0;
    for (int it = 0; it < it_rt; it++) begin
      ok = 1;
      for (int l = 0; l < mb_rt; l++) begin
        for (int r = 0; r < sc_rt; r++) begin
          bit syn = 0;
          for (int n = 0; n < nb_rt; n++) if (hb_rt[l][n] >= 0) begin
            int v = n*sc_rt + (r + hb_rt[l][n] % sc_rt) % SC;
            syn ^= (P[v] < 0);
            q[n][r] = sat127(P[v] - R[l][n][r]);
          end
          if (syn) ok = 0;
          for (int n = 0; n < nb_rt; n++) if (hb_rt[l][n] >= 0) begin
            int mn = 15;
            bit sg = 0;
            int v = n*sc_rt + (r + hb_rt[l][n] % sc_rt) % SC;
            for (int m = 0; m < nb_rt; m++) if (hb_rt[l][m] >= 0 && m != n) begin
              if (cnu_mag(q[m][r]) < mn) mn = cnu_mag(q[m][r]);
              sg ^= (q[m][r] < 0);
            end
            R[l][n][r] = sg ? -mn : mn;
            P[v] = q[n][r] + R[l][n][r];
          end
        end
      end
      ref_iters = it + 1;
      if (ok) begin
        ref_conv = 1;
        break;
      end
    end
    for (int v = 0; v < nb_rt*sc_rt; v++) ref_hd[v] = (P[v] < 0);
  endtask

  // ---------------------------------------------------------------- stimulus
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_conv = 0, n_limit = 0;

  initial begin
    int t0, t1 [2];
    nb_rt = NB; mb_rt = MB; sc_rt = SC; it_rt = MAX_ITER;
    for (int l = 0; l < MB; l++) for (int n = 0; n < NB; n++) hb_rt[l][n] = HB[l][n];
    llr_we = 0; llr_addr = '0; llr_data = '0; start = 0; hd_raddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      int pe;
      pe = (f == 0) ? 0 : (f < 4) ? 2 * f : 15 * f;   // percent of received bits in error
      for (int v = 0; v < NB*SC; v++) begin
        int x;
        if (int'($urandom_range(0, 99)) < pe) x = -1 - int'($urandom_range(0, 3));
        else                                  x = 2 + int'($urandom_range(0, 9));
        llr[v] = (x > 15) ? 15 : (x < -16) ? -16 : x;
      end
      ref_decode();
      begin
        int nneg, nhd;
        nneg = 0; nhd = 0;
        for (int v = 0; v < NB*SC; v++) begin
          if (llr[v] < 0) nneg++;
          if (ref_hd[v]) nhd++;
        end
        $display("frame %0d: %0d negative LLRs, %0d ones after reference decoding", f, nneg, nhd);
      end
      for (int n = 0; n < NB; n++) begin
        @(negedge clk);
        llr_we = 1; llr_addr = COL_W'(n);
        for (int r = 0; r < SC; r++) llr_data[r] = LLR_W'(llr[n*SC + r]);
      end
      @(negedge clk);
      llr_we = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      t0 = cyc;
      t1[0] = -1; t1[1] = -1;
      while (t1[0] < 0 || t1[1] < 0) begin
        @(posedge clk);
        #1;
        if (done[0] && t1[0] < 0) t1[0] = cyc;
        if (done[1] && t1[1] < 0) t1[1] = cyc;
      end
      for (int d = 0; d < 2; d++) begin
        int errs;
        errs = 0;
        checks++;
        if (iterations[d] != 8'(ref_iters) || converged[d] != ref_conv) begin
          failures++;
          $display("frame %0d dut %0d: iterations %0d conv %0d, expected %0d %0d",
                   f, d, iterations[d], converged[d], ref_iters, ref_conv);
        end
        for (int n = 0; n < NB; n++) begin
          @(negedge clk);
          hd_raddr = COL_W'(n);
          @(negedge clk);
          for (int r = 0; r < SC; r++) if (hd_rdata[d][r] != ref_hd[n*SC + r]) errs++;
        end
        checks++;
        if (errs != 0) begin
          failures++;
          $display("frame %0d dut %0d: %0d hard decisions differ", f, d, errs);
        end
      end
      // Out-of-order schedule: no dependency stall, one circulant per clock.
      checks++;
      if (stalls[0] != 0) begin
        failures++;
        $display("frame %0d: out-of-order decoder stalled %0d cycles", f, stalls[0]);
      end
      checks++;
      if (t1[0] - t0 != ref_iters * (NCIRC + 5) + NB + 6) begin
        failures++;
        $display("frame %0d: %0d cycles, expected %0d", f, t1[0] - t0, ref_iters * (NCIRC + 5) + NB + 6);
      end
      checks++;
      if (stalls[1] == 0 || reorders[0] == 0 || reorders[1] != 0) begin
        failures++;
        $display("frame %0d: natural-order stalls %0d, reorders %0d/%0d", f, stalls[1], reorders[0], reorders[1]);
      end
      if (ref_conv) n_conv++; else n_limit++;
      $display("frame %0d: iterations %0d converged %0d, cycles %0d, natural-order stalls %0d",
               f, ref_iters, ref_conv, t1[0] - t0, stalls[1]);
    end
    checks++;
    if (n_conv == 0 || n_limit == 0) begin
      failures++;
      $display("frames did not cover both early termination (%0d) and the iteration limit (%0d)", n_conv, n_limit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
