// layered_decoder: layered min-sum decoder for the irregular QC-LDPC code of ldpc_pkg,
// processing one SC x SC circulant per clock.
//
// Algorithm. P starts as the channel LLR L and all R as 0. For each layer l and each non-zero
// block (l, n) with shift s: Q = [P_n]^s - R_old; the layer's check node units then compute new
// R from all Q of the layer, and P_n = Q + R_new. The [.]^s operator is a cyclic shift, so each
// block column is stored in Q memory in the domain of the circulant that last updated it.
//
// Datapath (one circulant per clock, five stages):
//   S0 issue   : the controller picks the next circulant and reads Q memory (block column n) and
//                the two copies of the Q sign memory (own circulant ci for R_old, dependent
//                circulant dci for R_new).
//   S1         : R_new of the dependent circulant is rebuilt from the final state (FS) of the
//                dependent layer; P = Q_old + R_new (or the channel value in the first
//                iteration when ucvf is set); P is rotated by the delta shift dsm = s - s_dep
//                (s when the channel value is used); R_old of this circulant is rebuilt from its
//                own layer's FS of the previous iteration.
//   S2         : Q = sat(P_shifted - R_old) to 8 bits, then scaling to the 5-bit CNU input.
//   S3         : Q written back to Q memory, Q signs to the Q sign memory, Q into the serial CNU
//                array; the layer syndrome is accumulated from the signs of P_shifted.
//   S4         : at the end of a layer the CNU final state is written to the FS register file.
// One memory (the LPQ memory) holds L, then Q, per block column; P is never stored.
//
// Schedule. Layers run in natural order with no gap between them. A circulant whose dependent
// layer has not yet written its final state must wait (a dependency stall). With OOO = 1 each
// layer's circulants are reordered so that those depending on the immediately preceding layer
// come last; for this code every layer has at least five independent circulants, enough to
// cover the 4-clock gap between the last issue of a layer and its FS being readable, so no
// dependency stall occurs. After the last layer of an iteration the pipeline drains, the
// iteration is declared converged if every layer's syndrome (computed from the P values
// entering the layer) was zero, and decoding stops on convergence or after MAX_ITER iterations.
// An output pass then reads, per block column, Q + R_new of the column's last circulant,
// rotates it back to natural order and writes the hard decisions to HD memory.
//
// Interface. Load LLRs while idle (llr_we, one block column of SC 5-bit LLRs per write, lane r
// is bit n*SC + r), pulse start, wait for done; converged and iterations are then valid and the
// hard decisions are read one block column per read, one clock after hd_raddr (bit value 1 means
// P < 0). Drain after each iteration, the early-termination rule and the load/unload protocol
// are this design's choices; the pipeline organisation, memories and out-of-order schedule follow
// the document's layered decoder for irregular codes.
module layered_decoder
  import ldpc_pkg::*;
#(
  parameter int SC          = 96,   // circulant size
  parameter int MAX_ITER    = 10,   // maximum number of iterations
  parameter bit OOO         = 1'b1, // out-of-order processing inside a layer
  parameter int SCALE_NUM   = 3,
  parameter int SCALE_SHIFT = 2,
  parameter int OFFSET      = 0,
  localparam int COL_W = clog2_min1(NB),
  localparam int CI_W  = clog2_min1(NCIRC),
  localparam int L_W   = clog2_min1(MB),
  localparam int SH_W  = clog2_min1(SC)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // channel LLR load
  input  logic                     llr_we,
  input  logic [COL_W-1:0]         llr_addr,
  input  logic [SC-1:0][LLR_W-1:0] llr_data,
  // control
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic                     converged,
  output logic [7:0]               iterations,
  // hard decision read
  input  logic [COL_W-1:0]         hd_raddr,
  output logic [SC-1:0]            hd_rdata,
  // activity counters (cleared by start)
  output logic [31:0]              dep_stall_cycles,
  output logic [31:0]              drain_cycles,
  output logic [31:0]              reorder_issues
);

  // ------------------------------------------------------------------ schedule ROM
  logic [COL_W-1:0] rom_col   [NCIRC];
  logic [L_W-1:0]   rom_l     [NCIRC];
  logic [CI_W-1:0]  rom_ci    [NCIRC];
  logic [IDX_W-1:0] rom_bn    [NCIRC];
  logic [SH_W-1:0]  rom_s     [NCIRC];
  logic [CI_W-1:0]  rom_dci   [NCIRC];
  logic [L_W-1:0]   rom_dl    [NCIRC];
  logic [IDX_W-1:0] rom_dbn   [NCIRC];
  logic [SH_W-1:0]  rom_ds    [NCIRC];
  logic [L_W:0]     rom_dist  [NCIRC];
  logic             rom_ucvf  [NCIRC];
  logic             rom_first [NCIRC];
  logic             rom_last  [NCIRC];
  logic             rom_moved [NCIRC];

  for (genvar k = 0; k < NCIRC; k++) begin : g_rom
    localparam int LN  = slot_circ(k, OOO);
    localparam int L   = LN / NB;
    localparam int N   = LN % NB;
    localparam int DL  = dep_layer(L, N);
    localparam int POS = k - layer_start(L);
    assign rom_col[k]   = COL_W'(N);
    assign rom_l[k]     = L_W'(L);
    assign rom_ci[k]    = CI_W'(circ_index(L, N));
    assign rom_bn[k]    = IDX_W'(block_number(L, N));
    assign rom_s[k]     = SH_W'(HB[L][N] % SC);
    assign rom_dci[k]   = CI_W'(circ_index(DL, N));
    assign rom_dl[k]    = L_W'(DL);
    assign rom_dbn[k]   = IDX_W'(block_number(DL, N));
    assign rom_ds[k]    = SH_W'(HB[DL][N] % SC);
    assign rom_dist[k]  = (L_W+1)'(dep_dist(L, N));
    assign rom_ucvf[k]  = ucvf(L, N);
    assign rom_first[k] = (POS == 0);
    assign rom_last[k]  = (POS == layer_weight(L) - 1);
    assign rom_moved[k] = (LN != slot_circ(k, 1'b0));
  end

  // Output pass: per block column, the circulant of its last layer.
  logic [CI_W-1:0]  out_ci [NB];
  logic [L_W-1:0]   out_l  [NB];
  logic [IDX_W-1:0] out_bn [NB];
  logic [SH_W-1:0]  out_sh [NB];

  for (genvar n = 0; n < NB; n++) begin : g_out_rom
    localparam int LL = last_layer(n);
    assign out_ci[n] = CI_W'(circ_index(LL, n));
    assign out_l[n]  = L_W'(LL);
    assign out_bn[n] = IDX_W'(block_number(LL, n));
    assign out_sh[n] = SH_W'((SC - (HB[LL][n] % SC)) % SC);
  end

  // ------------------------------------------------------------------ control
  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_RUN, S_DRAIN, S_OUT, S_OUT_DRAIN} state_t;

  // Per-stage control word.
  typedef struct packed {
    logic             v;        // valid circulant
    logic             out;      // output pass (write HD memory instead of Q / CNU)
    logic [COL_W-1:0] col;
    logic [L_W-1:0]   l;
    logic [CI_W-1:0]  ci;
    logic [IDX_W-1:0] bn;
    logic [L_W-1:0]   dl;
    logic [IDX_W-1:0] dbn;
    logic             use_l;    // take the channel value, R_new = 0
    logic [SH_W-1:0]  dsm;      // delta shift
    logic             first;
    logic             last;
  } ctl_t;

  state_t            state;
  logic [CI_W:0]     slot;
  logic [7:0]        iter;
  logic [15:0]       fs_done_cnt;   // layers whose FS has been written in this frame
  logic              iter_ok;       // all layer syndromes zero so far in this iteration
  logic [2:0]        out_wait;

  ctl_t              s0, s1, s2, s3;
  logic              issue;
  logic              dep_ready;
  logic [CI_W-1:0]   s0_dci;

  always_comb begin
    int g, need;
    s0        = '0;
    s0_dci    = '0;
    issue     = 1'b0;
    dep_ready = 1'b0;
    g         = int'(iter) * MB + int'(rom_l[slot[CI_W-1:0]]);
    need      = g - int'(rom_dist[slot[CI_W-1:0]]) + 1;
    if (state == S_RUN) begin
      s0.col   = rom_col[slot[CI_W-1:0]];
      s0.l     = rom_l[slot[CI_W-1:0]];
      s0.ci    = rom_ci[slot[CI_W-1:0]];
      s0.bn    = rom_bn[slot[CI_W-1:0]];
      s0.dl    = rom_dl[slot[CI_W-1:0]];
      s0.dbn   = rom_dbn[slot[CI_W-1:0]];
      s0.use_l = (iter == 8'd0) && rom_ucvf[slot[CI_W-1:0]];
      s0.dsm   = s0.use_l ? rom_s[slot[CI_W-1:0]]
                          : SH_W'((int'(rom_s[slot[CI_W-1:0]]) - int'(rom_ds[slot[CI_W-1:0]]) + SC) % SC);
      s0.first = rom_first[slot[CI_W-1:0]];
      s0.last  = rom_last[slot[CI_W-1:0]];
      s0_dci   = rom_dci[slot[CI_W-1:0]];
      dep_ready = s0.use_l || (int'(fs_done_cnt) >= need);
      issue    = dep_ready;
      s0.v     = issue;
    end else if (state == S_OUT) begin
      s0.out   = 1'b1;
      s0.col   = slot[COL_W-1:0];
      s0.dl    = out_l[slot[COL_W-1:0]];
      s0.dbn   = out_bn[slot[COL_W-1:0]];
      s0.dsm   = out_sh[slot[COL_W-1:0]];
      s0_dci   = out_ci[slot[COL_W-1:0]];
      issue    = 1'b1;
      s0.v     = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      slot             <= '0;
      iter             <= '0;
      out_wait         <= '0;
      done             <= 1'b0;
      converged        <= 1'b0;
      iterations       <= '0;
      dep_stall_cycles <= '0;
      drain_cycles     <= '0;
      reorder_issues   <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state            <= S_CLEAR;
          slot             <= '0;
          iter             <= '0;
          dep_stall_cycles <= '0;
          drain_cycles     <= '0;
          reorder_issues   <= '0;
        end
        S_CLEAR: state <= S_RUN;
        S_RUN: begin
          if (issue) begin
            if (rom_moved[slot[CI_W-1:0]]) reorder_issues <= reorder_issues + 1;
            if (slot == (CI_W+1)'(NCIRC - 1)) begin
              slot  <= '0;
              state <= S_DRAIN;
            end else begin
              slot <= slot + 1'b1;
            end
          end else begin
            dep_stall_cycles <= dep_stall_cycles + 1;
          end
        end
        S_DRAIN: begin
          if (int'(fs_done_cnt) == (int'(iter) + 1) * MB) begin
            if (iter_ok || (int'(iter) + 1 >= MAX_ITER)) begin
              converged  <= iter_ok;
              iterations <= iter + 1'b1;
              state      <= S_OUT;
            end else begin
              iter  <= iter + 1'b1;
              state <= S_RUN;
            end
          end else begin
            drain_cycles <= drain_cycles + 1;
          end
        end
        S_OUT: begin
          if (slot == (CI_W+1)'(NB - 1)) begin
            slot     <= '0;
            out_wait <= 3'd4;
            state    <= S_OUT_DRAIN;
          end else begin
            slot <= slot + 1'b1;
          end
        end
        S_OUT_DRAIN: begin
          if (out_wait == 3'd0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            out_wait <= out_wait - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ------------------------------------------------------------------ memories
  logic [SC-1:0][Q_W-1:0] q_rdata, q_wdata, llr_ext;
  logic                   q_we;
  logic [COL_W-1:0]       q_waddr;
  logic [SC-1:0]          qs_old, qs_dep;
  logic [SC-1:0][Q_W-1:0] s3_q;
  logic [SC-1:0]          s3_sign, s3_hd;
  logic [SC-1:0][MAG_W-1:0] s3_mag;

  always_comb begin
    for (int i = 0; i < SC; i++)
      llr_ext[i] = Q_W'(signed'(llr_data[i]));
  end

  always_comb begin
    if (state == S_IDLE) begin
      q_we    = llr_we;
      q_waddr = llr_addr;
      q_wdata = llr_ext;
    end else begin
      q_we    = s3.v && !s3.out;
      q_waddr = s3.col;
      q_wdata = s3_q;
    end
  end

  sdp_ram #(.DEPTH(NB), .WIDTH(SC * Q_W)) u_qmem (
    .clk, .we(q_we), .waddr(q_waddr), .wdata(q_wdata),
    .re(issue), .raddr(s0.col), .rdata(q_rdata)
  );

  // Two copies of the Q sign memory: one read port for R_old, one for R_new.
  sdp_ram #(.DEPTH(NCIRC), .WIDTH(SC)) u_qsign_old (
    .clk, .we(s3.v && !s3.out), .waddr(s3.ci), .wdata(s3_sign),
    .re(issue), .raddr(s0.ci), .rdata(qs_old)
  );
  sdp_ram #(.DEPTH(NCIRC), .WIDTH(SC)) u_qsign_dep (
    .clk, .we(s3.v && !s3.out), .waddr(s3.ci), .wdata(s3_sign),
    .re(issue), .raddr(s0_dci), .rdata(qs_dep)
  );

  sdp_ram #(.DEPTH(NB), .WIDTH(SC)) u_hdmem (
    .clk, .we(s3.v && s3.out), .waddr(s3.col), .wdata(s3_hd),
    .re(1'b1), .raddr(hd_raddr), .rdata(hd_rdata)
  );

  // FS register file, one entry of SC final states per layer.
  fs_t [SC-1:0] fs_rf [MB];
  fs_t [SC-1:0] cnu_fs;
  logic         cnu_fs_valid;
  logic [L_W-1:0] fs_layer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs_done_cnt <= '0;
      fs_layer    <= '0;
      for (int l = 0; l < MB; l++) fs_rf[l] <= '0;
    end else if (state == S_CLEAR) begin
      fs_done_cnt <= '0;
      for (int l = 0; l < MB; l++) fs_rf[l] <= '0;
    end else begin
      if (s3.v && !s3.out && s3.last) fs_layer <= s3.l;
      if (cnu_fs_valid) begin
        fs_rf[fs_layer] <= cnu_fs;
        fs_done_cnt     <= fs_done_cnt + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------ S1: R_new, P, shift, R_old
  logic [SC-1:0][R_W-1:0] rnew, rold;
  logic [SC-1:0][P_W-1:0] p, p_sh;
  fs_t  [SC-1:0]          fs_dep, fs_own;

  assign fs_dep = fs_rf[s1.dl];
  assign fs_own = fs_rf[s1.l];

  r_select #(.SC(SC)) u_rnew (.fs(fs_dep), .qsign(qs_dep), .bn(s1.dbn), .r(rnew));
  r_select #(.SC(SC)) u_rold (.fs(fs_own), .qsign(qs_old), .bn(s1.bn),  .r(rold));

  always_comb begin
    for (int i = 0; i < SC; i++)
      p[i] = P_W'(signed'(q_rdata[i])) + (s1.use_l ? '0 : P_W'(signed'(rnew[i])));
  end

  cyclic_shifter #(.SC(SC), .W(P_W)) u_shift (.din(p), .shift(s1.dsm), .dout(p_sh));

  logic [SC-1:0][P_W-1:0] s2_p;
  logic [SC-1:0][R_W-1:0] s2_rold;

  // ------------------------------------------------------------------ S2: Q subtractor, scaling
  logic [SC-1:0][Q_W-1:0]   qsub;
  logic [SC-1:0][MAG_W-1:0] mag;
  logic [SC-1:0]            sgn;

  always_comb begin
    for (int i = 0; i < SC; i++) begin
      logic signed [P_W:0] d;
      d = (P_W+1)'(signed'(s2_p[i])) - (P_W+1)'(signed'(s2_rold[i]));
      if (d > (P_W+1)'(127))       qsub[i] = Q_W'(127);
      else if (d < -(P_W+1)'(127)) qsub[i] = Q_W'(-127);
      else                         qsub[i] = d[Q_W-1:0];
    end
  end

  scale_offset #(.SC(SC), .SCALE_NUM(SCALE_NUM), .SCALE_SHIFT(SCALE_SHIFT), .OFFSET(OFFSET))
    u_scale (.q(qsub), .mag(mag), .sign(sgn));

  // ------------------------------------------------------------------ pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else begin
      s1 <= s0;
      s2 <= s1;
      s3 <= s2;
    end
  end

  always_ff @(posedge clk) begin
    s2_p    <= p_sh;
    s2_rold <= s1.out ? '0 : rold;
    s3_q    <= qsub;
    s3_mag  <= mag;
    s3_sign <= sgn;
    for (int i = 0; i < SC; i++) s3_hd[i] <= s2_p[i][P_W-1];
  end

  // ------------------------------------------------------------------ S3: CNU, syndrome
  cnu_serial #(.SC(SC)) u_cnu (
    .clk, .rst_n,
    .valid(s3.v && !s3.out), .first(s3.first), .last(s3.last),
    .mag(s3_mag), .sign(s3_sign), .bn(s3.bn),
    .fs(cnu_fs), .fs_valid(cnu_fs_valid)
  );

  logic [SC-1:0] synd, synd_next;
  assign synd_next = s3.first ? s3_hd : (synd ^ s3_hd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      synd    <= '0;
      iter_ok <= 1'b1;
    end else begin
      if (state == S_DRAIN && int'(fs_done_cnt) == (int'(iter) + 1) * MB)
        iter_ok <= 1'b1;
      else if (s3.v && !s3.out) begin
        synd <= synd_next;
        if (s3.last && (synd_next != '0)) iter_ok <= 1'b0;
      end
    end
  end

  // A circulant may only issue once its dependent layer's final state is stored.
  always_ff @(posedge clk) begin
    if (state == S_RUN && issue && !s0.use_l)
      assert (int'(fs_done_cnt) >= int'(iter) * MB + int'(s0.l) - int'(rom_dist[slot[CI_W-1:0]]) + 1)
        else $error("layered_decoder: circulant issued before its dependent layer finished");
  end

endmodule
