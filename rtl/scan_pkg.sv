// scan_pkg: types and position helpers shared by the multi-function scan network.
//
// The network is a Benes-Waksman permutation network of N inputs (N a power of two),
// with L = log2(N) and NSTG = 2L-1 stages of N/2 two-input cells. Stages are counted
// from 0 here. Stage t belongs to recursion level t+1 when t <= L-1 (forward half,
// including the middle stage L-1) and to level 2L-1-t in the backward half. At level l
// the network is split into sub-networks of size N >> (l-1); the first of them in cell
// order is the "upper" one, the last the "lowest" one, whose right-most output carries
// the running reduction.
//
// A cell's role follows only from three facts about its place in the net (the cell
// position {i, j} used for position-dependent synthesis):
//   fwd    - the stage is in the forward half or is the middle stage
//   lowest - the cell lies in the lowest sub-network of its level
//   first  - the cell is the first (upper-most) cell of its sub-network
// giving the five cell types of the design:
//   reduction cell : fwd &  lowest          (n-1 cells)
//   pack cell      : fwd & !lowest          (1-n+0.5 n log n cells)
//   dummy cell     : !fwd & first           (n/2-1 cells, Waksman's fixed switches)
//   subtract cell  : !fwd & lowest & !first (n-1-log n cells)
//   permute cell   : !fwd & !lowest & !first
// The wiring between stages is the unshuffle of the recursive Benes definition:
// a forward stage whose sub-networks have size m sends port b of local cell lc of
// sub-network k to position k*m + b*m/2 + lc of the next stage; the backward half
// uses the inverse mapping.
package scan_pkg;

  // Function codes carried by every cell along with the data (funcIn/funcOut).
  typedef enum logic [2:0] {
    OP_PERMUTE    = 3'd0,
    OP_PACK       = 3'd1,
    OP_PREFIX_ADD = 3'd2,
    OP_REDUCE_ADD = 3'd3,
    OP_REDUCE_MIN = 3'd4,
    OP_REDUCE_MAX = 3'd5
  } op_e;

  // Place of a cell in the net; constant in the pipelined net, driven by the stage
  // counter in the sequential version.
  typedef struct packed {
    logic fwd;
    logic lowest;
    logic first;
  } cell_pos_t;

  function automatic bit is_reduce(op_e op);
    return op == OP_REDUCE_ADD || op == OP_REDUCE_MIN || op == OP_REDUCE_MAX;
  endfunction

  // Recursion level (1..L) of stage t (0..2L-2).
  function automatic int unsigned stage_level(int unsigned lg, int unsigned t);
    return (t < lg) ? t + 1 : 2 * lg - 1 - t;
  endfunction

  // Role of cell c at stage t in an n-input net with lg = log2(n).
  function automatic cell_pos_t cell_pos(int unsigned n, int unsigned lg,
                                         int unsigned t, int unsigned c);
    cell_pos_t   p;
    int unsigned half;
    half     = (n >> stage_level(lg, t)); // cells per sub-network = m/2
    p.fwd    = (t < lg);
    p.lowest = (c >= n / 2 - half);
    p.first  = ((c % half) == 0);
    return p;
  endfunction

  // Unshuffle: position q at the output of a stage opening sub-networks of size m,
  // mapped to the position it feeds in the following stage.
  function automatic int unsigned unshuffle(int unsigned m, int unsigned q);
    int unsigned c, b, k, lc;
    c  = q / 2;
    b  = q % 2;
    k  = c / (m / 2);
    lc = c % (m / 2);
    return k * m + b * (m / 2) + lc;
  endfunction

  // Position of stage t's output that feeds input position q of stage t+1.
  function automatic int unsigned link_src(int unsigned n, int unsigned lg,
                                           int unsigned t, int unsigned q);
    int unsigned r, m;
    if (t + 1 < lg) begin
      // forward half: stage t opens sub-networks of size n >> t
      m = n >> t;
      for (r = 0; r < n; r++)
        if (unshuffle(m, r) == q) return r;
      return 0;
    end else begin
      // backward half: stage t+1 closes sub-networks of size n >> (level-1)
      m = n >> (stage_level(lg, t + 1) - 1);
      return unshuffle(m, q);
    end
  endfunction

endpackage
