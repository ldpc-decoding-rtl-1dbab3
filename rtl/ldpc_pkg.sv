// ldpc_pkg: shared constants, the base (shift) matrix and the schedule compiler of the
// layered decoder.
//
// The code is the rate 2/3 irregular QC-LDPC code with 8 layers (block rows) and 24 block
// columns whose shift matrix is printed below (shift values for a 96x96 circulant; -1 marks an
// all-zero block). Row weight is 10 in every layer and column weight ranges from 2 to 6, giving
// 80 non-zero circulants. For a smaller circulant size SC the shift is taken modulo SC.
//
// The schedule compiler is a set of constant functions evaluated at elaboration. For every
// non-zero circulant it derives what the controller needs: circulant index ci (row-major
// numbering), block number bn (position within its layer), dependent layer dl (the previous
// layer, cyclically, that touches the same block column and therefore produced the P value this
// circulant consumes), the dependent circulant index, and the use-channel-value flag ucvf (first
// circulant of its block column, which takes the channel LLR in the first iteration). It also
// produces the processing order inside each layer: with out-of-order processing enabled, the
// circulants whose P value has been available longest come first and those that depend on the
// immediately preceding layer come last, so that the pipeline latency is hidden.
// Fixed-point widths follow the data-flow description: 5-bit channel LLR, 8-bit Q, 5-bit R
// (sign plus 4-bit magnitude), 6-bit Min1 index in the final state.
package ldpc_pkg;

  localparam int MB = 8;     // layers (block rows)
  localparam int NB = 24;    // block columns

  localparam int LLR_W = 5;  // channel LLR width
  localparam int Q_W   = 8;  // Q message width held in Q memory
  localparam int P_W   = 9;  // P = Q + R width before the subtractor
  localparam int MAG_W = 4;  // R / CNU input magnitude width
  localparam int R_W   = MAG_W + 1;
  localparam int IDX_W = 6;  // Min1 index width in the final state

  // Shift matrix: entry >= 0 is the right cyclic shift of an identity block, -1 a zero block.
  localparam int HB [MB][NB] = '{
    '{ 3,  0, -1, -1,  2,  0, -1,  3,  7, -1,  1,  1, -1, -1, -1, -1,  1,  0, -1, -1, -1, -1, -1, -1},
    '{-1, -1,  1, -1, 36, -1, -1, 34, 10, -1, -1, 18,  2, -1,  3,  0, -1,  0,  0, -1, -1, -1, -1, -1},
    '{-1, -1, 12,  2, -1, 15, -1, 40, -1,  3, -1, 15, -1,  2, 13, -1, -1, -1,  0,  0, -1, -1, -1, -1},
    '{-1, -1, 19, 24, -1,  3,  0, -1,  6, -1, 17, -1, -1, -1,  8, 39, -1, -1, -1,  0,  0, -1, -1, -1},
    '{20, -1,  6, -1, -1, 10, 29, -1, -1, 28, -1, 14, -1, 38, -1, -1,  0, -1, -1, -1,  0,  0, -1, -1},
    '{-1, -1, 10, -1, 28, 20, -1, -1,  8, -1, 36, -1,  9, -1, 21, 45, -1, -1, -1, -1, -1,  0,  0, -1},
    '{35, 25, -1, 37, -1, 21, -1, -1,  5, -1, -1,  0, -1,  4, 20, -1, -1, -1, -1, -1, -1, -1,  0,  0},
    '{-1,  6,  6, -1, -1, -1,  4, -1, 14, 30, -1,  3, 36, -1, 14, -1,  1, -1, -1, -1, -1, -1, -1,  0}
  };

  function automatic bit nz(int l, int n);
    return HB[l][n] >= 0;
  endfunction

  // Number of non-zero circulants.
  function automatic int count_circ();
    int c = 0;
    for (int l = 0; l < MB; l++)
      for (int n = 0; n < NB; n++)
        if (nz(l, n)) c++;
    return c;
  endfunction

  localparam int NCIRC = count_circ();

  // Row-major index of circulant (l, n).
  function automatic int circ_index(int l, int n);
    int c = 0;
    for (int ll = 0; ll < MB; ll++)
      for (int nn = 0; nn < NB; nn++)
        if (ll * NB + nn < l * NB + n && nz(ll, nn)) c++;
    return c;
  endfunction

  // Position of circulant (l, n) among the non-zero circulants of its layer.
  function automatic int block_number(int l, int n);
    int c = 0;
    for (int nn = 0; nn < n; nn++)
      if (nz(l, nn)) c++;
    return c;
  endfunction

  function automatic int layer_weight(int l);
    int c = 0;
    for (int n = 0; n < NB; n++)
      if (nz(l, n)) c++;
    return c;
  endfunction

  // First schedule slot of layer l.
  function automatic int layer_start(int l);
    int c = 0;
    for (int ll = 0; ll < l; ll++) c += layer_weight(ll);
    return c;
  endfunction

  // Distance, in layers, back to the previous layer (cyclically) that touches column n.
  function automatic int dep_dist(int l, int n);
    for (int d = 1; d < MB; d++)
      if (nz((l - d + MB) % MB, n)) return d;
    return MB;
  endfunction

  function automatic int dep_layer(int l, int n);
    return (l - dep_dist(l, n) + MB) % MB;
  endfunction

  // Use-channel-value flag: no earlier layer touches column n.
  function automatic bit ucvf(int l, int n);
    for (int ll = 0; ll < l; ll++)
      if (nz(ll, n)) return 1'b0;
    return 1'b1;
  endfunction

  // Last layer touching column n (its circulant holds the final P of that column).
  function automatic int last_layer(int n);
    int r = 0;
    for (int l = 0; l < MB; l++)
      if (nz(l, n)) r = l;
    return r;
  endfunction

  // Schedule slot k -> encoded circulant l*NB+n. Layers are processed in natural order; inside a
  // layer the order is natural (ooo = 0) or sorted by decreasing dependency distance (ooo = 1).
  function automatic int slot_circ(int k, bit ooo);
    int l   = 0;
    int pos = 0;
    for (int ll = 0; ll < MB; ll++)
      if (k >= layer_start(ll)) l = ll;
    pos = k - layer_start(l);
    if (!ooo) begin
      for (int n = 0; n < NB; n++)
        if (nz(l, n)) begin
          if (pos == 0) return l * NB + n;
          pos--;
        end
    end else begin
      for (int d = MB; d >= 1; d--)
        for (int n = 0; n < NB; n++)
          if (nz(l, n) && dep_dist(l, n) == d) begin
            if (pos == 0) return l * NB + n;
            pos--;
          end
    end
    return l * NB;
  endfunction

  // Width helper.
  function automatic int clog2_min1(int v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

  // Final state of one check row: Min1, Min2, index of Min1 and the cumulative sign.
  typedef struct packed {
    logic [MAG_W-1:0] m1;
    logic [MAG_W-1:0] m2;
    logic [IDX_W-1:0] idx;
    logic             sign;
  } fs_t;

endpackage
