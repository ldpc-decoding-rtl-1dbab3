// tb_nonlayered_decoder: decodes frames of the array code with 3 block rows, 32 block columns and
// 61 x 61 circulants (1952-bit frames) with the
// block-serial flooding decoder and compares hard decisions, convergence and iteration count
// with a behavioural flooding min-sum model using the same fixed-point arithmetic. The next
// frame is loaded while the current one decodes, and the previous frame's decisions are read
// back while the next one decodes, to exercise the ping-pong L and HD memories.
module tb_nonlayered_decoder;
  import ldpc_pkg::*;

  localparam int SC = 61, NBC = 32, NBR = 3, MAX_ITER = 8;
  localparam int COL_W = clog2_min1(NBC);
  localparam int NF = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic llr_we = 1'b0, start = 1'b0;
  logic [COL_W-1:0] llr_addr = '0, hd_raddr = '0;
  logic [SC-1:0][LLR_W-1:0] llr_data = '0;
  logic busy, done, converged, ext_valid;
  logic [7:0] iterations;
  logic [SC-1:0] hd_rdata;
  logic [COL_W-1:0] ext_col;
  logic [SC-1:0][4:0] ext_data;

  int checks = 0, failures = 0;

  nonlayered_decoder #(.SC(SC), .NBC(NBC), .NBR(NBR), .MAX_ITER(MAX_ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout");
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ---------------------------------------------------------------- reference model
  int sc_rt = SC, nbc_rt = NBC, nbr_rt = NBR, it_rt = MAX_ITER;
  int llr  [NF][];
  int m_hd [NF][];
  int m_conv[NF], m_iter[NF];

  function automatic int sat15(int x);
    return (x > 15) ? 15 : (x < -15) ? -15 : x;
  endfunction

  function automatic int sc34(int x);
    return (x * 3) >>> 2;
  endfunction

  function automatic int trot(int i, int j);
    return (sc_rt - (i * j) % sc_rt) % sc_rt;
  endfunction

  task automatic model(input int f);
    int n, sweep, k, r, i, j, sum, p, mag, rr, q, v, ok;
    int m1[], m2[], idx[], sg[], qs[], nm1[], nm2[], nidx[], nsg[], nqs[], syn[], rv[];
    n = nbc_rt * sc_rt;
    m1 = new[nbr_rt * sc_rt]; m2 = new[nbr_rt * sc_rt]; idx = new[nbr_rt * sc_rt]; sg = new[nbr_rt * sc_rt];
    nm1 = new[nbr_rt * sc_rt]; nm2 = new[nbr_rt * sc_rt]; nidx = new[nbr_rt * sc_rt]; nsg = new[nbr_rt * sc_rt];
    syn = new[nbr_rt * sc_rt];
    qs = new[nbr_rt * n]; nqs = new[nbr_rt * n];
    rv = new[nbr_rt];
    m_hd[f] = new[n];
    for (sweep = 0; ; sweep++) begin
      for (v = 0; v < nbr_rt * sc_rt; v++) syn[v] = 0;
      for (j = 0; j < nbc_rt; j++) begin
        for (k = 0; k < sc_rt; k++) begin
          sum = 0;
          for (i = 0; i < nbr_rt; i++) begin
            r = (k - trot(i, j) + sc_rt) % sc_rt;     // row lane of (i, j) connected to lane k
            if (sweep == 0) rv[i] = 0;
            else begin
              v   = i * sc_rt + r;
              mag = (idx[v] == j) ? m2[v] : m1[v];
              rv[i] = (sg[v] ^ qs[(i * nbc_rt + j) * sc_rt + r]) ? -mag : mag;
            end
            sum += rv[i];
          end
          p = sc34(sum) + llr[f][j * sc_rt + k];
          m_hd[f][j * sc_rt + k] = (p < 0);
          for (i = 0; i < nbr_rt; i++) begin
            r   = (k - trot(i, j) + sc_rt) % sc_rt;
            v   = i * sc_rt + r;
            q   = sat15(p - sc34(rv[i]));
            mag = (q < 0) ? -q : q;
            nqs[(i * nbc_rt + j) * sc_rt + r] = (q < 0);
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
      for (v = 0; v < nbr_rt * sc_rt; v++) if (syn[v]) ok = 0;
      if (ok || sweep >= it_rt) begin
        m_conv[f] = ok;
        m_iter[f] = sweep;
        return;
      end
      m1 = nm1; m2 = nm2; idx = nidx; sg = nsg; qs = nqs;
    end
  endtask

  // ---------------------------------------------------------------- stimulus helpers
  // All-zero codeword. A received bit is in error with probability pct per mille; an erroneous bit gets
  // a low-reliability negative LLR, a correct bit a positive LLR of magnitude 1 to 8.
  task automatic make_frame(input int f, input int pct);
    int n, b, mag;
    n = nbc_rt * sc_rt;
    llr[f] = new[n];
    for (b = 0; b < n; b++) begin
      mag = 1 + $urandom_range(0, 7);
      llr[f][b] = ($urandom_range(0, 999) < pct) ? -(1 + mag / 3) : mag;
    end
  endtask

  task automatic load_frame(input int f);
    int j, k;
    for (j = 0; j < nbc_rt; j++) begin
      @(negedge clk);
      llr_we   = 1'b1;
      llr_addr = COL_W'(j);
      for (k = 0; k < sc_rt; k++) llr_data[k] = LLR_W'(llr[f][j * sc_rt + k]);
    end
    @(negedge clk);
    llr_we = 1'b0;
  endtask

  task automatic read_hd(input int f, input string tag);
    int j, k, bad;
    bad = 0;
    for (j = 0; j < nbc_rt; j++) begin
      @(negedge clk);
      hd_raddr = COL_W'(j);
      @(negedge clk);
      for (k = 0; k < sc_rt; k++) if (int'(hd_rdata[k]) != m_hd[f][j * sc_rt + k]) bad++;
    end
    check(bad == 0, $sformatf("frame %0d %s: %0d hard decisions differ", f, tag, bad));
  endtask

  // done is a one-clock pulse; a short frame can end while the next one is still being loaded.
  logic done_seen = 1'b0;
  always @(posedge clk) if (done) done_seen <= 1'b1;

  task automatic pulse_start();
    @(negedge clk);
    done_seen = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  // Count extrinsic outputs during one frame: every sweep presents each column once.
  int ext_count = 0;
  always @(posedge clk) if (ext_valid) ext_count++;

  int pcts[NF] = '{0, 1, 2, 4, 40};   // per mille
  int saw_conv_iter = 0, saw_limit = 0, saw_zero = 0;
  int cyc;

  initial begin
    for (int f = 0; f < NF; f++) begin
      make_frame(f, pcts[f]);
      model(f);
      $display("model frame %0d: converged=%0d iterations=%0d", f, m_conv[f], m_iter[f]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_frame(0);
    for (int f = 0; f < NF; f++) begin
      ext_count = 0;
      pulse_start();
      check(busy === 1'b1, $sformatf("frame %0d: busy after start", f));
      // Overlap: load the next frame and read back the previous frame's decisions.
      if (f + 1 < NF) load_frame(f + 1);
      // The previous frame's decisions stay readable until this frame ends (>= 3 passes here).
      if (f > 0 && m_iter[f] >= 3) begin
        check(busy === 1'b1, $sformatf("frame %0d: still decoding during read-back", f));
        read_hd(f - 1, "read during next decode");
      end
      cyc = 0;
      while (done_seen !== 1'b1) begin
        @(negedge clk);
        cyc++;
        if (cyc > 10000) break;
      end
      check(done_seen === 1'b1, $sformatf("frame %0d: done", f));
      check(int'(converged) == m_conv[f], $sformatf("frame %0d: converged %0d model %0d", f, converged, m_conv[f]));
      check(int'(iterations) == m_iter[f], $sformatf("frame %0d: iterations %0d model %0d", f, iterations, m_iter[f]));
      check(ext_count == (m_iter[f] + 1) * nbc_rt, $sformatf("frame %0d: %0d extrinsic columns", f, ext_count));
      read_hd(f, "after done");
      if (m_conv[f] && m_iter[f] == 0) saw_zero++;
      if (m_conv[f] && m_iter[f] > 0) saw_conv_iter++;
      if (!m_conv[f]) saw_limit++;
      // Every transmitted word is all-zero: a converged frame must decode to it.
      if (m_conv[f]) begin
        int ones = 0;
        for (int b = 0; b < nbc_rt * sc_rt; b++) ones += m_hd[f][b];
        check(ones == 0, $sformatf("frame %0d: converged to a non-zero word", f));
      end
      $display("frame %0d: converged=%0d iterations=%0d", f, converged, iterations);
    end
    check(saw_zero > 0, "a frame converged with no check update");
    check(saw_conv_iter > 0, "a frame converged after iterating");
    check(saw_limit > 0, "a frame reached the iteration limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
