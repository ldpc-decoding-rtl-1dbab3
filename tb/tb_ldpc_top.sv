// tb_ldpc_top: end-to-end test of the top level with every parameter at its default
// (96x96 circulants, 2304-bit frames, at most 10 iterations).
//
// Frames of the all-zero codeword with channel errors are loaded block column by block column,
// decoded, and the hard decisions, iteration count and converged flag are compared bit for bit
// with a behavioural layered min-sum reference using the same fixed-point rules. The frames are
// chosen so that each mechanism of the decoder occurs: out-of-order issue inside layers, early
// termination on a zero syndrome, stopping at the iteration limit, and the pipeline drain at
// each iteration boundary; each is counted and a failure is recorded for one that never occurs.
// The out-of-order schedule must never stall, and a frame must take (80 + 5) clocks per
// iteration plus a fixed overhead, i.e. one circulant per clock.
//
// The non-layered decoder (4 x 36 blocks of 128x128, 4608-bit frames) decodes frames of the
// all-zero codeword that are compared bit for bit with a behavioural flooding min-sum model;
// each frame is loaded while the previous one decodes (ping-pong L memory), and early
// termination, the iteration limit and the overlapped load are counted. The side-by-side variable node
// unit and parallel check node unit are also driven with a few vectors checked against direct
// computations.
module tb_ldpc_top;
  import ldpc_pkg::*;

  localparam int SC       = 96;
  localparam int MAX_ITER = 10;
  localparam int COL_W    = clog2_min1(NB);
  localparam int NFRAMES  = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                     llr_we;
  logic [COL_W-1:0]         llr_addr;
  logic [SC-1:0][LLR_W-1:0] llr_data;
  logic                     start;
  logic [COL_W-1:0]         hd_raddr;
  logic                     busy, done, converged;
  logic [7:0]               iterations;
  logic [SC-1:0]            hd_rdata;
  logic [31:0]              stalls, drains, reorders;
  logic [3:0][4:0]          vnu_r, vnu_q;
  logic [4:0]               vnu_l, vnu_e;
  logic                     vnu_hd;
  logic [7:0][4:0]          pcnu_q, pcnu_r;
  logic [3:0]               pcnu_m1, pcnu_m2;
  logic [2:0]               pcnu_m1_idx;

  localparam int NL_SC = 128, NL_NBC = 36, NL_NBR = 4, NL_COL_W = clog2_min1(NL_NBC);
  localparam int NL_FRAMES = 3;
  logic                        nl_llr_we = 1'b0, nl_start = 1'b0;
  logic [NL_COL_W-1:0]         nl_llr_addr = '0, nl_hd_raddr = '0;
  logic [NL_SC-1:0][LLR_W-1:0] nl_llr_data = '0;
  logic                        nl_busy, nl_done, nl_converged, nl_ext_valid;
  logic [7:0]                  nl_iterations;
  logic [NL_SC-1:0]            nl_hd_rdata;
  logic [NL_COL_W-1:0]         nl_ext_col;
  logic [NL_SC-1:0][4:0]       nl_ext_data;

  ldpc_top dut (
    .nl_llr_we, .nl_llr_addr, .nl_llr_data, .nl_start, .nl_busy, .nl_done, .nl_converged,
    .nl_iterations, .nl_hd_raddr, .nl_hd_rdata, .nl_ext_valid, .nl_ext_col, .nl_ext_data,
    .clk, .rst_n, .llr_we, .llr_addr, .llr_data, .start, .busy, .done, .converged,
    .iterations, .hd_raddr, .hd_rdata,
    .dep_stall_cycles(stalls), .drain_cycles(drains), .reorder_issues(reorders),
    .vnu_r, .vnu_l, .vnu_q, .vnu_e, .vnu_hd, .pcnu_q, .pcnu_r, .pcnu_m1, .pcnu_m2, .pcnu_m1_idx);

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

  // ---------------------------------------------------------------- non-layered reference model
  int nl_sc_rt = NL_SC, nl_nbc_rt = NL_NBC, nl_nbr_rt = NL_NBR;
  int nl_llr [NL_FRAMES][];
  int nl_hd  [NL_FRAMES][];
  int nl_conv [NL_FRAMES], nl_iter [NL_FRAMES];

  function automatic int sat15(int x);
    return (x > 15) ? 15 : (x < -15) ? -15 : x;
  endfunction

  function automatic int sc34(int x);
    return (x * 3) >>> 2;
  endfunction

  // Column lane k of block (i, j) meets row lane (k - (SC - i*j mod SC)) mod SC.
  function automatic int nl_trot(int i, int j);
    return (nl_sc_rt - (i * j) % nl_sc_rt) % nl_sc_rt;
  endfunction

  task automatic nl_model(input int f);
    int n, nr, sweep, k, r, i, j, sum, p, mag, q, v, ok;
    int m1[], m2[], idx[], sg[], qs[], nm1[], nm2[], nidx[], nsg[], nqs[], syn[], rv[];
    n  = nl_nbc_rt * nl_sc_rt;
    nr = nl_nbr_rt * nl_sc_rt;
    m1 = new[nr]; m2 = new[nr]; idx = new[nr]; sg = new[nr];
    nm1 = new[nr]; nm2 = new[nr]; nidx = new[nr]; nsg = new[nr]; syn = new[nr];
    qs = new[nl_nbr_rt * n]; nqs = new[nl_nbr_rt * n];
    rv = new[nl_nbr_rt];
    nl_hd[f] = new[n];
    for (sweep = 0; ; sweep++) begin
      for (v = 0; v < nr; v++) syn[v] = 0;
      for (j = 0; j < nl_nbc_rt; j++) begin
        for (k = 0; k < nl_sc_rt; k++) begin
          sum = 0;
          for (i = 0; i < nl_nbr_rt; i++) begin
            r = (k - nl_trot(i, j) + nl_sc_rt) % nl_sc_rt;
            if (sweep == 0) rv[i] = 0;
            else begin
              v     = i * nl_sc_rt + r;
              mag   = (idx[v] == j) ? m2[v] : m1[v];
              rv[i] = (sg[v] ^ qs[(i * nl_nbc_rt + j) * nl_sc_rt + r]) ? -mag : mag;
            end
            sum += rv[i];
          end
          p = sc34(sum) + nl_llr[f][j * nl_sc_rt + k];
          nl_hd[f][j * nl_sc_rt + k] = (p < 0);
          for (i = 0; i < nl_nbr_rt; i++) begin
            r   = (k - nl_trot(i, j) + nl_sc_rt) % nl_sc_rt;
            v   = i * nl_sc_rt + r;
            q   = sat15(p - sc34(rv[i]));
            mag = (q < 0) ? -q : q;
            nqs[(i * nl_nbc_rt + j) * nl_sc_rt + r] = (q < 0);
            syn[v] ^= (p < 0);
            if (j == 0) begin
              nm1[v] = mag; nm2[v] = 15; nidx[v] = 0; nsg[v] = (q < 0);
            end else begin
              nsg[v] ^= (q < 0);
              if (mag < nm1[v]) begin
                nm2[v] = nm1[v]; nm1[v] = mag; nidx[v] = j;
              end else if (mag < nm2[v]) nm2[v] = mag;
            end
          end
        end
      end
      ok = 1;
      for (v = 0; v < nr; v++) if (syn[v]) ok = 0;
      if (ok || sweep >= it_rt) begin
        nl_conv[f] = ok;
        nl_iter[f] = sweep;
        return;
      end
      m1 = nm1; m2 = nm2; idx = nidx; sg = nsg; qs = nqs;
    end
  endtask

  task automatic nl_load(input int f);
    for (int j = 0; j < nl_nbc_rt; j++) begin
      @(negedge clk);
      nl_llr_we   = 1'b1;
      nl_llr_addr = NL_COL_W'(j);
      for (int k = 0; k < nl_sc_rt; k++) nl_llr_data[k] = LLR_W'(nl_llr[f][j * nl_sc_rt + k]);
    end
    @(negedge clk);
    nl_llr_we = 1'b0;
  endtask

  // ---------------------------------------------------------------- stimulus
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_conv = 0, n_limit = 0, n_reorder = 0, n_drain = 0;
  int n_nl_conv = 0, n_nl_limit = 0, n_nl_overlap = 0;

  // nl_done is a one-clock pulse; a short frame could end while the next one is being loaded.
  logic nl_done_seen = 1'b0;
  always @(posedge clk) if (nl_done) nl_done_seen <= 1'b1;

  function automatic int pm_of(int f);
    return (f == 0) ? 3 : (f == 1) ? 8 : 40;
  endfunction

  initial begin
    int t0, t1;
    nb_rt = NB; mb_rt = MB; sc_rt = SC; it_rt = MAX_ITER;
    for (int l = 0; l < MB; l++) for (int n = 0; n < NB; n++) hb_rt[l][n] = HB[l][n];
    llr_we = 0; llr_addr = '0; llr_data = '0; start = 0; hd_raddr = '0;
    vnu_r = '0; vnu_l = '0; pcnu_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // side-by-side units: a few directed vectors
    vnu_r = {5'd3, 5'd2, 5'd1, 5'd2};  // R = 2, 1, 2, 3 -> sum 8, E_tmp 6
    vnu_l = 5'(-4);
    #1;
    checks++;
    if (signed'(vnu_e) != 6 || vnu_hd != 1'b0 || signed'(vnu_q[0]) != 1 || signed'(vnu_q[3]) != 0) begin
      failures++;
      $display("vnu: e %0d hd %0d q0 %0d q3 %0d", signed'(vnu_e), vnu_hd, signed'(vnu_q[0]), signed'(vnu_q[3]));
    end
    pcnu_q = {5'd7, 5'(-2), 5'd9, 5'd4, 5'(-6), 5'd5, 5'd3, 5'd8};
    #1;
    checks++;
    // |Q| = 8 3 5 6 4 9 2 7 (index 0..7); Min1 2 at index 6, Min2 3; two negative signs.
    if (pcnu_m1 != 4'd2 || pcnu_m2 != 4'd3 || pcnu_m1_idx != 3'd6 ||
        signed'(pcnu_r[6]) != -3 || signed'(pcnu_r[0]) != 2 || signed'(pcnu_r[3]) != -2) begin
      failures++;
      $display("pcnu: m1 %0d m2 %0d idx %0d r6 %0d r0 %0d r3 %0d", pcnu_m1, pcnu_m2, pcnu_m1_idx,
               signed'(pcnu_r[6]), signed'(pcnu_r[0]), signed'(pcnu_r[3]));
    end

    for (int f = 0; f < NFRAMES; f++) begin
      int pe;
      pe = (f == 0) ? 3 : (f == 1) ? 6 : 30;   // percent of received bits in error
      for (int v = 0; v < NB*SC; v++) begin
        int x;
        if (int'($urandom_range(0, 99)) < pe) x = -1 - int'($urandom_range(0, 3));
        else                                  x = 2 + int'($urandom_range(0, 9));
        llr[v] = x;
      end
      ref_decode();
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
      t1 = -1;
      while (t1 < 0) begin
        @(posedge clk);
        #1;
        if (done) t1 = cyc;
      end
      begin
        int errs, ones;
        errs = 0; ones = 0;
        checks++;
        if (iterations != 8'(ref_iters) || converged != ref_conv) begin
          failures++;
          $display("frame %0d: iterations %0d conv %0d, expected %0d %0d", f, iterations, converged, ref_iters, ref_conv);
        end
        for (int n = 0; n < NB; n++) begin
          @(negedge clk);
          hd_raddr = COL_W'(n);
          @(negedge clk);
          for (int r = 0; r < SC; r++) begin
            if (hd_rdata[r] != ref_hd[n*SC + r]) errs++;
            if (hd_rdata[r]) ones++;
          end
        end
        checks++;
        if (errs != 0) begin
          failures++;
          $display("frame %0d: %0d hard decisions differ from the reference", f, errs);
        end
        checks++;
        if (converged && ones != 0) begin
          failures++;
          $display("frame %0d: converged but %0d bits are not the transmitted zero", f, ones);
        end
        $display("frame %0d: %0d%% channel errors, %0d iterations, converged %0d, %0d bit errors left, %0d clocks",
                 f, pe, iterations, converged, ones, t1 - t0);
      end
      checks++;
      if (stalls != 0) begin failures++; $display("frame %0d: %0d dependency stall cycles", f, stalls); end
      checks++;
      if (t1 - t0 != ref_iters * (NCIRC + 5) + NB + 6) begin
        failures++;
        $display("frame %0d: %0d clocks, expected %0d", f, t1 - t0, ref_iters * (NCIRC + 5) + NB + 6);
      end
      if (ref_conv) n_conv++; else n_limit++;
      if (reorders != 0) n_reorder++;
      if (drains != 0) n_drain++;
    end
    $display("mechanisms: early termination %0d, iteration limit %0d, out-of-order issue %0d, drain %0d",
             n_conv, n_limit, n_reorder, n_drain);

    // non-layered decoder: channel errors in per mille; an erroneous bit has low reliability
    for (int f = 0; f < NL_FRAMES; f++) begin
      int pm;
      pm = pm_of(f);
      nl_llr[f] = new[nl_nbc_rt * nl_sc_rt];
      for (int b = 0; b < nl_nbc_rt * nl_sc_rt; b++) begin
        int m;
        m = 1 + int'($urandom_range(0, 7));
        nl_llr[f][b] = (int'($urandom_range(0, 999)) < pm) ? -(1 + m / 3) : m;
      end
      nl_model(f);
    end
    nl_load(0);
    for (int f = 0; f < NL_FRAMES; f++) begin
      int errs, ones, wait_cyc;
      @(negedge clk);
      nl_done_seen = 1'b0;
      nl_start = 1'b1;
      @(negedge clk);
      nl_start = 1'b0;
      if (f + 1 < NL_FRAMES) begin
        nl_load(f + 1);
        checks++;
        if (nl_busy !== 1'b1) begin
          failures++;
          $display("non-layered frame %0d: next frame was not loaded during decoding", f);
        end else n_nl_overlap++;
      end
      wait_cyc = 0;
      while (nl_done_seen !== 1'b1 && wait_cyc < 20000) begin
        @(negedge clk);
        wait_cyc++;
      end
      checks++;
      if (nl_done_seen !== 1'b1 || int'(nl_iterations) != nl_iter[f] || int'(nl_converged) != nl_conv[f]) begin
        failures++;
        $display("non-layered frame %0d: done %0d iterations %0d conv %0d, expected %0d %0d", f,
                 nl_done_seen, nl_iterations, nl_converged, nl_iter[f], nl_conv[f]);
      end
      errs = 0; ones = 0;
      for (int j = 0; j < nl_nbc_rt; j++) begin
        @(negedge clk);
        nl_hd_raddr = NL_COL_W'(j);
        @(negedge clk);
        for (int k = 0; k < nl_sc_rt; k++) begin
          if (int'(nl_hd_rdata[k]) != nl_hd[f][j * nl_sc_rt + k]) errs++;
          if (nl_hd_rdata[k]) ones++;
        end
      end
      checks++;
      if (errs != 0) begin
        failures++;
        $display("non-layered frame %0d: %0d hard decisions differ from the reference", f, errs);
      end
      checks++;
      if (nl_conv[f] && ones != 0) begin
        failures++;
        $display("non-layered frame %0d: converged but %0d bits are not zero", f, ones);
      end
      $display("non-layered frame %0d: %0d per mille channel errors, %0d iterations, converged %0d, %0d bit errors left, %0d clocks",
               f, pm_of(f), nl_iterations, nl_converged, ones, wait_cyc);
      if (nl_conv[f]) n_nl_conv++; else n_nl_limit++;
    end
    $display("non-layered mechanisms: early termination %0d, iteration limit %0d, overlapped load %0d",
             n_nl_conv, n_nl_limit, n_nl_overlap);
    checks += 3;
    if (n_nl_conv == 0)    begin failures++; $display("non-layered: early termination never happened"); end
    if (n_nl_limit == 0)   begin failures++; $display("non-layered: iteration limit never reached"); end
    if (n_nl_overlap == 0) begin failures++; $display("non-layered: no overlapped load"); end
    checks += 4;
    if (n_conv == 0)    begin failures++; $display("early termination never happened"); end
    if (n_limit == 0)   begin failures++; $display("iteration limit never reached"); end
    if (n_reorder == 0) begin failures++; $display("no out-of-order issue"); end
    if (n_drain == 0)   begin failures++; $display("no pipeline drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
