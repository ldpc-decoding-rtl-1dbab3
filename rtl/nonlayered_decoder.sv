// nonlayered_decoder: block-serial flooding (non-layered) min-sum decoder for array LDPC
// codes with NBR block rows, NBC block columns and SC x SC circulants (default 4 x 36 x 128,
// N = 4608 bits).
//
// Block (i, j) of the parity-check matrix is sigma^(i*j), where sigma is the single-step
// cyclic permutation; in this design's rotation convention rot(x, a)[r] = x[(r + a) mod SC]
// the row domain of block (i, j) is reached by rotating a column vector by t = -(i*j) mod SC.
//
// One block column is processed per clock, in a sweep over j = 0 .. NBC-1 that forms one
// iteration:
//   S0  read the channel LLRs of column j (L memory) and the stored Q signs of column j.
//   S1  for each block row i, select R from that row's CNU final state (Min2 at the Min1
//       position, else Min1, sign = cumulative sign XOR stored Q sign), rotate it back to the
//       column domain, and run the SC variable node units: P = L + 3/4 sum R,
//       Q_i = sat(P - 3/4 R_i), HD = sign(P).
//   S2  rotate each Q_i into its row domain and feed the four serial CNU arrays (partial state
//       of the next iteration), store the Q signs, write the hard decisions to HD memory and
//       accumulate the row syndromes.
// At the end of a sweep the CNU arrays latch their final state, which drives R selection in the
// next sweep. In the first sweep R is forced to zero, so Q = L. Decoding stops after a sweep
// whose hard decisions satisfy every check (all row syndromes zero), or when MAX_ITER check
// updates have been applied; iterations reports the number of check updates used.
//
// The L and HD memories are ping-pong: each has two banks of NBC words, so the next frame can be
// loaded, and the previous frame's decisions read, while a frame is decoded. start takes the
// bank last loaded (load bank flips at start); the HD read port reads the bank of the last frame
// finished. The data path (shifters, CNU arrays, VNU array, L and HD memory sizes) follows the
// non-layered decoder architecture; the explicit Q sign memory, the three-clock pipeline gap between
// sweeps and the stopping rule are this design's choices.
module nonlayered_decoder
  import ldpc_pkg::*;
#(
  parameter int SC       = 128,   // circulant size
  parameter int NBC      = 36,    // block columns (check node degree r)
  parameter int NBR      = 4,     // block rows (variable node degree c)
  parameter int MAX_ITER = 10,
  localparam int COL_W   = clog2_min1(NBC),
  localparam int SH_W    = clog2_min1(SC),
  localparam int V_W     = 5      // VNU message width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     llr_we,
  input  logic [COL_W-1:0]         llr_addr,
  input  logic [SC-1:0][LLR_W-1:0] llr_data,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic                     converged,
  output logic [7:0]               iterations,
  input  logic [COL_W-1:0]         hd_raddr,
  output logic [SC-1:0]            hd_rdata,
  // Extrinsic VNU output E of every column as it passes S2, for each sweep.
  output logic                     ext_valid,
  output logic [COL_W-1:0]         ext_col,
  output logic [SC-1:0][V_W-1:0]   ext_data
);

  typedef enum logic [1:0] {N_IDLE, N_SWEEP, N_WAIT} nstate_t;

  nstate_t          state;
  logic [COL_W-1:0] col;
  logic [7:0]       sweep;
  logic             load_bank, dec_bank, out_bank;
  logic             all_ok;
  logic [NBR-1:0]   fs_valid;   // CNU arrays' final state latched this clock

  // Pipeline control.
  logic             v1, v2;
  logic [COL_W-1:0] col1, col2;
  logic             first1, first2, last1, last2;

  // Rotation that takes column j into the row domain of block row i.
  function automatic logic [SH_W-1:0] to_row(int i, logic [COL_W-1:0] j);
    return SH_W'((SC - (i * int'(j)) % SC) % SC);
  endfunction

  // ------------------------------------------------------------------ control
  logic issue;
  assign issue = (state == N_SWEEP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= N_IDLE;
      col        <= '0;
      sweep      <= '0;
      load_bank  <= 1'b0;
      dec_bank   <= 1'b0;
      out_bank   <= 1'b0;
      done       <= 1'b0;
      converged  <= 1'b0;
      iterations <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        N_IDLE: if (start) begin
          dec_bank  <= load_bank;
          load_bank <= ~load_bank;
          col       <= '0;
          sweep     <= '0;
          state     <= N_SWEEP;
        end
        N_SWEEP: begin
          if (col == COL_W'(NBC - 1)) begin
            col   <= '0;
            state <= N_WAIT;
          end else begin
            col <= col + 1'b1;
          end
        end
        N_WAIT: begin
          // The last column of the sweep has left S2 and the CNUs hold the new final state.
          if (&fs_valid) begin
            if (all_ok || int'(sweep) >= MAX_ITER) begin
              converged  <= all_ok;
              iterations <= sweep;
              out_bank   <= dec_bank;
              done       <= 1'b1;
              state      <= N_IDLE;
            end else begin
              sweep <= sweep + 1'b1;
              state <= N_SWEEP;
            end
          end
        end
        default: state <= N_IDLE;
      endcase
    end
  end

  assign busy = (state != N_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0;
      col1 <= '0; col2 <= '0;
      first1 <= 1'b0; first2 <= 1'b0; last1 <= 1'b0; last2 <= 1'b0;
    end else begin
      v1     <= issue;
      col1   <= col;
      first1 <= issue && (col == '0);
      last1  <= issue && (col == COL_W'(NBC - 1));
      v2     <= v1;
      col2   <= col1;
      first2 <= first1;
      last2  <= last1;
    end
  end

  // ------------------------------------------------------------------ memories
  logic [SC-1:0][LLR_W-1:0]  l_rdata;
  logic [NBR-1:0][SC-1:0]    qs_rdata, qs_wdata;
  logic [SC-1:0]             hd2;

  // Bank b of a ping-pong memory occupies words b*NBC .. b*NBC + NBC-1.
  function automatic logic [COL_W:0] bank_addr(logic bank, logic [COL_W-1:0] c);
    return bank ? (COL_W+1)'(NBC) + (COL_W+1)'(c) : (COL_W+1)'(c);
  endfunction

  sdp_ram #(.DEPTH(2 * NBC), .WIDTH(SC * LLR_W)) u_lmem (
    .clk, .we(llr_we), .waddr(bank_addr(load_bank, llr_addr)), .wdata(llr_data),
    .re(issue), .raddr(bank_addr(dec_bank, col)), .rdata(l_rdata)
  );

  sdp_ram #(.DEPTH(NBC), .WIDTH(NBR * SC)) u_qsign (
    .clk, .we(v2), .waddr(col2), .wdata(qs_wdata),
    .re(issue), .raddr(col), .rdata(qs_rdata)
  );

  sdp_ram #(.DEPTH(2 * NBC), .WIDTH(SC)) u_hdmem (
    .clk, .we(v2), .waddr(bank_addr(dec_bank, col2)), .wdata(hd2),
    .re(1'b1), .raddr(bank_addr(out_bank, hd_raddr)), .rdata(hd_rdata)
  );

  // ------------------------------------------------------------------ S1: R select, VNU
  fs_t  [NBR-1:0][SC-1:0]          fs;
  logic [NBR-1:0][SC-1:0][R_W-1:0] r_row, r_col;
  logic [SC-1:0][NBR-1:0][V_W-1:0] vnu_r, vnu_q;
  logic [SC-1:0]                   vnu_hd;
  logic [SC-1:0][V_W-1:0]          vnu_e;

  for (genvar i = 0; i < NBR; i++) begin : g_rsel
    r_select #(.SC(SC)) u_rsel (.fs(fs[i]), .qsign(qs_rdata[i]), .bn(IDX_W'(col1)), .r(r_row[i]));
    cyclic_shifter #(.SC(SC), .W(R_W)) u_rshift (
      .din(r_row[i]), .shift(SH_W'((SC - int'(to_row(i, col1))) % SC)), .dout(r_col[i]));
  end

  always_comb begin
    for (int k = 0; k < SC; k++)
      for (int i = 0; i < NBR; i++)
        vnu_r[k][i] = (sweep == 8'd0) ? '0 : r_col[i][k];
  end

  for (genvar k = 0; k < SC; k++) begin : g_vnu
    vnu #(.DV(NBR), .R_W(R_W), .L_W(LLR_W), .Q_OUT_W(V_W), .E_W(V_W)) u_vnu (
      .r(vnu_r[k]), .l(l_rdata[k]), .q(vnu_q[k]), .e(vnu_e[k]), .hd(vnu_hd[k]));
  end

  logic [NBR-1:0][SC-1:0][V_W-1:0] q_col, q2;

  always_comb begin
    for (int i = 0; i < NBR; i++)
      for (int k = 0; k < SC; k++)
        q_col[i][k] = vnu_q[k][i];
  end

  always_ff @(posedge clk) begin
    q2       <= q_col;
    hd2      <= vnu_hd;
    ext_data <= vnu_e;
  end

  assign ext_valid = v2;
  assign ext_col   = col2;

  // ------------------------------------------------------------------ S2: shift, CNU, syndrome
  logic [NBR-1:0][SC-1:0][V_W-1:0]   q_row;
  logic [NBR-1:0][SC-1:0][MAG_W-1:0] q_mag;
  logic [NBR-1:0][SC-1:0]            hd_row, synd, synd_next;
  logic [NBR-1:0]                    row_ok;

  for (genvar i = 0; i < NBR; i++) begin : g_cnu
    cyclic_shifter #(.SC(SC), .W(V_W)) u_qshift (.din(q2[i]), .shift(to_row(i, col2)), .dout(q_row[i]));
    cyclic_shifter #(.SC(SC), .W(1)) u_hshift (.din(hd2), .shift(to_row(i, col2)), .dout(hd_row[i]));

    always_comb begin
      for (int k = 0; k < SC; k++) begin
        logic [V_W-1:0] a;
        a            = q_row[i][k][V_W-1] ? -q_row[i][k] : q_row[i][k];
        q_mag[i][k]  = (a > V_W'((1 << MAG_W) - 1)) ? MAG_W'((1 << MAG_W) - 1) : a[MAG_W-1:0];
        qs_wdata[i][k] = q_row[i][k][V_W-1];
      end
    end

    cnu_serial #(.SC(SC)) u_cnu (
      .clk, .rst_n, .valid(v2), .first(first2), .last(last2),
      .mag(q_mag[i]), .sign(qs_wdata[i]), .bn(IDX_W'(col2)),
      .fs(fs[i]), .fs_valid(fs_valid[i]));

    assign synd_next[i] = first2 ? hd_row[i] : (synd[i] ^ hd_row[i]);
    assign row_ok[i]    = (synd_next[i] == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      synd   <= '0;
      all_ok <= 1'b0;
    end else if (v2) begin
      synd <= synd_next;
      if (last2) all_ok <= &row_ok;
    end
  end

endmodule
