// scan_ref_pkg: reference models for the scan network testbenches.
//
// scan_ref#(N, W) computes, without reference to the network's structure, what each
// function must return, and routes permutations for a Benes-Waksman net with the
// classic looping algorithm (the first output switch of every sub-network fixed
// straight). route() returns, for every input element, the word of per-stage output
// choices that the network expects on its destination input.
package scan_ref_pkg;

  class scan_ref #(int unsigned N = 8, int unsigned W = 32);
    localparam int unsigned LG   = $clog2(N);
    localparam int unsigned NSTG = 2 * LG - 1;

    typedef logic [W-1:0]    vec_t  [N];
    typedef logic            bvec_t [N];
    typedef logic [NSTG-1:0] dvec_t [N];
    typedef int unsigned     ivec_t [N];

    // Inclusive prefix sum of the enabled elements.
    static function void prefix(input vec_t d, input bvec_t e, output vec_t y);
      logic [W-1:0] acc = '0;
      for (int i = 0; i < N; i++) begin
        if (e[i]) acc = acc + d[i];
        y[i] = acc;
      end
    endfunction

    // kind: 0 add, 1 signed min, 2 signed max. any = some element enabled.
    static function void reduce(input vec_t d, input bvec_t e, input int kind,
                                output logic [W-1:0] y, output logic any);
      logic [W-1:0] acc = '0;
      any = 1'b0;
      for (int i = 0; i < N; i++) begin
        if (!e[i]) continue;
        if (kind == 0)             acc = acc + d[i];
        else if (!any)             acc = d[i];
        else if (kind == 1 && $signed(d[i]) < $signed(acc)) acc = d[i];
        else if (kind == 2 && $signed(d[i]) > $signed(acc)) acc = d[i];
        any = 1'b1;
      end
      y = acc;
    endfunction

    // Pack destinations: running count of enabled elements minus one.
    static function void pack_dest(input bvec_t e, output dvec_t dst);
      int unsigned cnt = 0;
      for (int i = 0; i < N; i++) begin
        dst[i] = NSTG'($urandom);       // ignored for disabled elements
        if (e[i]) begin
          dst[i] = NSTG'(cnt);
          cnt++;
        end
      end
    endfunction

    // Random permutation: input i goes to output perm[i].
    static function void rand_perm(output ivec_t perm);
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int unsigned j = $urandom_range(i, 0);
        int unsigned t = perm[i];
        perm[i] = perm[j];
        perm[j] = t;
      end
    endfunction

    // Looping algorithm, level by level; sub-networks occupy contiguous positions.
    static function void route(input ivec_t perm, output dvec_t word);
      int unsigned elem [N], tgt [N], nelem [N], ntgt [N], inv [N];
      int          side [N];
      for (int p = 0; p < N; p++) begin
        elem[p] = p;
        tgt[p]  = perm[p];
        word[p] = '0;
      end
      for (int l = 1; l < LG; l++) begin
        int unsigned m = N >> (l - 1);
        int unsigned h = m / 2;
        for (int base = 0; base < N; base += m) begin
          for (int i = 0; i < m; i++) begin
            inv[tgt[base+i]] = i;
            side[i] = -1;
          end
          for (int o = 0; o < m; o++) begin
            int unsigned cur;
            if (side[inv[o]] != -1) continue;
            // the element bound for output o (output 0 first) takes the upper half
            cur = inv[o];
            forever begin
              int unsigned nxt;
              side[cur]   = 0;
              side[cur^1] = 1;
              nxt = inv[tgt[base + (cur ^ 1)] ^ 1];
              if (side[nxt] != -1) break;
              cur = nxt;
            end
          end
          for (int i = 0; i < m; i++) begin
            int unsigned e = elem[base+i];
            int unsigned b = side[i];
            int unsigned np = base + b * h + i / 2;
            word[e][l-1]          = b[0];
            word[e][2*LG-1-l]     = tgt[base+i][0];
            nelem[np] = e;
            ntgt[np]  = tgt[base+i] / 2;
          end
        end
        elem = nelem;
        tgt  = ntgt;
      end
      for (int p = 0; p < N; p++) word[elem[p]][LG-1] = tgt[p][0];
    endfunction
  endclass

endpackage
