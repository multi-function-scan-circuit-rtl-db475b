// tb_scan_system: end-to-end testbench of the scan system at its default size (N = 8).
//
// A small model of the MAP array and the control processor runs the applications of
// the scan circuit on the top module and checks every result against values computed
// here from the inputs:
//   - select: sel(i, V) by enabling only cell i and reducing with add;
//   - matrix-vector product: one matrix row of products per cycle into reduce-add,
//     inner products pushed into a queue as they leave REDUCE (n + log2(n) cycles);
//   - pooling line compaction: prefix add over the activation vector, destinations =
//     prefix - 1, then pack (2 network latencies);
//   - matrix transpose: n rotation permutations issued back to back;
//   - FFT data exchange: log2(n) partner swaps at distances 1, 2, 4, ...;
//   - min/max reductions, including the empty reduction;
//   - random permutations routed with the looping algorithm;
//   - back-to-back mixed functions in the pipe;
//   - the same functions on the sequential version, compared with the pipelined one;
//   - the or-prefix net over the activation vector.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_scan_system;
  import scan_pkg::*;
  import scan_ref_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned W    = 32;
  localparam int unsigned LG   = $clog2(N);
  localparam int unsigned NSTG = 2 * LG - 1;
  typedef scan_ref#(N, W) ref_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            map_valid_i;
  op_e             map_func_i;
  logic [W-1:0]    map_data_i [N];
  logic            map_en_i   [N];
  logic [NSTG-1:0] map_dest_i [N];
  logic            scan_valid_o;
  op_e             scan_func_o;
  logic [W-1:0]    scan_data_o [N];
  logic            scan_en_o   [N];
  logic            reduce_valid_o;
  op_e             reduce_func_o;
  logic [W-1:0]    reduce_o;
  logic            reduce_en_o;
  logic            act_valid_i;
  logic [N-1:0]    act_i;
  logic            act_or_valid_o;
  logic [N-1:0]    act_or_o;
  logic            seq_start_i;
  op_e             seq_func_i;
  logic [W-1:0]    seq_data_i [N];
  logic            seq_en_i   [N];
  logic [NSTG-1:0] seq_dest_i [N];
  logic            seq_busy_o, seq_done_o;
  op_e             seq_func_o;
  logic [W-1:0]    seq_data_o [N];
  logic            seq_en_o   [N];
  logic [W-1:0]    seq_reduce_o;
  logic            seq_reduce_en_o;

  scan_system dut (.*);

  int checks = 0, failures = 0;

  // mechanisms
  typedef enum int {
    M_PERMUTE, M_PACK, M_PREFIX, M_RED_ADD, M_RED_MIN, M_RED_MAX, M_RED_EMPTY,
    M_BACK_TO_BACK, M_SELECT, M_MATVEC, M_TRANSPOSE, M_SEQ_VECTOR, M_SEQ_REDUCE,
    M_OR_PREFIX, M_FFT_EXCHANGE, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- capture
  int unsigned cyc = 0;
  localparam int CAP = 64;
  ref_t::vec_t  cap_v    [CAP];
  ref_t::bvec_t cap_e    [CAP];
  int unsigned  cap_cyc  [CAP];
  int unsigned  cap_n = 0;
  logic [W-1:0] red_v    [CAP];
  logic         red_e    [CAP];
  int unsigned  red_cyc  [CAP];
  int unsigned  red_n = 0;

  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (scan_valid_o && cap_n < CAP) begin
      cap_v[cap_n]   = scan_data_o;
      cap_e[cap_n]   = scan_en_o;
      cap_cyc[cap_n] = cyc;
      cap_n++;
    end
    if (reduce_valid_o && red_n < CAP) begin
      red_v[red_n]   = reduce_o;
      red_e[red_n]   = reduce_en_o;
      red_cyc[red_n] = cyc;
      red_n++;
    end
  end

  // Drive one vector in the coming cycle (call at a negedge); returns its cycle.
  task automatic issue(input op_e op, input ref_t::vec_t d, input ref_t::bvec_t e,
                       input ref_t::dvec_t t, output int unsigned at);
    map_valid_i = 1'b1;
    map_func_i  = op;
    map_data_i  = d;
    map_en_i    = e;
    map_dest_i  = t;
    at          = cyc;
    @(negedge clk);
    map_valid_i = 1'b0;
  endtask

  task automatic clear_caps();
    repeat (NSTG + 2) @(negedge clk);
    cap_n = 0;
    red_n = 0;
  endtask

  ref_t::dvec_t zero_t;
  ref_t::bvec_t all_e;

  // ---------------------------------------------------------------- select
  task automatic do_select();
    ref_t::vec_t  v;
    ref_t::bvec_t b;
    int unsigned  at, i;
    for (int k = 0; k < N; k++) v[k] = $urandom;
    i = $urandom_range(N - 1, 0);
    for (int k = 0; k < N; k++) b[k] = (k == i);    // IX == i in every MAP cell
    clear_caps();
    issue(OP_REDUCE_ADD, v, b, zero_t, at);
    repeat (NSTG) @(negedge clk);
    check(red_n == 1 && red_v[0] == v[i] && red_e[0], "select");
    check(red_cyc[0] - at == LG, "select: REDUCE latency log2(n)");
    mech[M_SELECT]++;
    mech[M_RED_ADD]++;
  endtask

  // ---------------------------------------------------------------- matrix-vector
  task automatic do_matvec();
    logic [W-1:0] a [N][N];
    logic [W-1:0] x [N];
    logic [W-1:0] ip;
    ref_t::vec_t  prod;
    int unsigned  first, at;
    for (int r = 0; r < N; r++)
      for (int k = 0; k < N; k++) a[r][k] = $urandom_range(2000, 0) - 1000;
    for (int k = 0; k < N; k++) x[k] = $urandom_range(2000, 0) - 1000;
    clear_caps();
    for (int r = 0; r < N; r++) begin
      for (int k = 0; k < N; k++) prod[k] = a[r][k] * x[k];   // MAP: one row per cycle
      issue(OP_REDUCE_ADD, prod, all_e, zero_t, at);
      if (r == 0) first = at;
      if (r > 0) mech[M_BACK_TO_BACK]++;
    end
    repeat (NSTG) @(negedge clk);
    check(red_n == N, "matvec: one inner product per row");
    for (int r = 0; r < N && r < int'(red_n); r++) begin
      ip = '0;
      for (int k = 0; k < N; k++) ip += a[r][k] * x[k];
      check(red_v[r] == ip, "matvec: inner product");
    end
    // queue complete after n + log2(n) cycles
    check(red_cyc[N-1] - first == N - 1 + LG, "matvec: n + log2(n) cycles");
    mech[M_MATVEC]++;
  endtask

  // ---------------------------------------------------------------- pooling pack
  task automatic do_pack(input int mode);
    ref_t::vec_t  v, bvec, exp_y;
    ref_t::bvec_t b;
    ref_t::dvec_t dst;
    int unsigned  t0, t1, q;
    for (int k = 0; k < N; k++) begin
      v[k] = $urandom;
      b[k] = (mode == 0) ? (k % 2 == 0) : (mode == 1) ? 1'b1 : ($urandom_range(1, 0) == 1);
      bvec[k] = W'(b[k]);
    end
    clear_caps();
    // SCAN(B, B, prefix add)
    issue(OP_PREFIX_ADD, bvec, b, zero_t, t0);
    act_valid_i = 1'b1;
    for (int k = 0; k < N; k++) act_i[k] = b[k];
    while (cap_n == 0 && cyc < t0 + 40) @(negedge clk);
    act_valid_i = 1'b0;
    check(cap_cyc[0] - t0 == NSTG, "prefix latency 2log2(n)-1");
    ref_t::prefix(bvec, b, exp_y);
    for (int k = 0; k < N; k++) check(cap_v[0][k] == exp_y[k], "prefix of activation");
    mech[M_PREFIX]++;
    // DEST <= SCANout - 1
    for (int k = 0; k < N; k++) dst[k] = NSTG'(cap_v[0][k] - 1);
    // SCAN(V, B, DEST, pack)
    issue(OP_PACK, v, b, dst, t1);
    while (cap_n < 2 && cyc < t1 + 40) @(negedge clk);
    check(cap_n == 2 && cap_cyc[1] - t0 == 2 * NSTG + 1, "pack algorithm time 2(2log2(n)-1)+1");
    q = 0;
    for (int k = 0; k < N; k++)
      if (b[k]) begin
        check(cap_v[1][q] == v[k] && cap_e[1][q], "pack: kept values left aligned, in order");
        q++;
      end
    for (int k = q; k < N; k++) check(!cap_e[1][k], "pack: discarded values on the right");
    mech[M_PACK]++;
  endtask

  // ---------------------------------------------------------------- transpose
  task automatic do_transpose();
    logic [W-1:0] m [N][N];     // m[cell][reg]: cell j holds column j, reg i row i
    logic [W-1:0] w [N][N];
    ref_t::vec_t  send;
    ref_t::ivec_t perm;
    ref_t::dvec_t dst;
    int unsigned  at, first;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) m[j][i] = $urandom;
    clear_caps();
    // iteration k: cell i sends v(i+k, i) to cell i+k (rotation by k)
    for (int k = 0; k < N; k++) begin
      for (int i = 0; i < N; i++) begin
        send[i] = m[i][(i + k) % N];
        perm[i] = (i + k) % N;
      end
      ref_t::route(perm, dst);
      issue(OP_PERMUTE, send, all_e, dst, at);
      if (k == 0) first = at;
    end
    repeat (NSTG + 1) @(negedge clk);
    check(cap_n == N, "transpose: n permutations");
    // cell r stores what it received in iteration k in register (r - k) mod n
    for (int k = 0; k < N && k < int'(cap_n); k++)
      for (int r = 0; r < N; r++) w[r][(r + N - k) % N] = cap_v[k][r];
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) check(w[j][i] == m[i][j], "transpose");
    check(cap_cyc[N-1] - first == N - 1 + NSTG, "transpose: n + 2log2(n)-1 cycles");
    mech[M_TRANSPOSE]++;
    mech[M_PERMUTE]++;
  endtask

  // ---------------------------------------------------------------- FFT exchange
  // Small-distance butterflies: in pass k every cell swaps its value with the cell at
  // distance 2^k (i <-> i xor 2^k); the log2(n) passes are issued back to back.
  task automatic do_fft_exchange();
    ref_t::vec_t  v [LG];
    ref_t::ivec_t perm [LG];
    ref_t::dvec_t dst;
    int unsigned  at;
    clear_caps();
    for (int k = 0; k < LG; k++) begin
      for (int i = 0; i < N; i++) begin
        v[k][i]    = $urandom;
        perm[k][i] = i ^ (1 << k);
      end
      ref_t::route(perm[k], dst);
      issue(OP_PERMUTE, v[k], all_e, dst, at);
    end
    repeat (NSTG + 1) @(negedge clk);
    check(cap_n == LG, "fft exchange: log2(n) permutations");
    for (int k = 0; k < LG && k < int'(cap_n); k++)
      for (int i = 0; i < N; i++)
        check(cap_v[k][i ^ (1 << k)] == v[k][i], "fft exchange: partner value");
    mech[M_FFT_EXCHANGE]++;
  endtask

  // ---------------------------------------------------------------- min/max + mixed pipe
  task automatic do_mixed();
    ref_t::vec_t  v [6];
    ref_t::bvec_t e [6];
    ref_t::dvec_t t [6];
    ref_t::ivec_t perm;
    op_e          ops [6];
    ref_t::vec_t  y;
    logic [W-1:0] r;
    logic         any;
    int unsigned  at [6];
    int unsigned  nv, nr;
    ops = '{OP_REDUCE_MIN, OP_PERMUTE, OP_REDUCE_MAX, OP_PREFIX_ADD, OP_REDUCE_MIN, OP_PACK};
    ref_t::rand_perm(perm);
    for (int s = 0; s < 6; s++) begin
      for (int k = 0; k < N; k++) begin
        v[s][k] = $urandom;
        e[s][k] = (s == 4) ? 1'b0 : ($urandom_range(3, 0) != 0);
      end
      if (ops[s] == OP_PERMUTE) ref_t::route(perm, t[s]);
      else                      ref_t::pack_dest(e[s], t[s]);
    end
    clear_caps();
    for (int s = 0; s < 6; s++) issue(ops[s], v[s], e[s], t[s], at[s]);
    mech[M_BACK_TO_BACK] += 5;
    repeat (NSTG + 1) @(negedge clk);
    check(cap_n == 6 && red_n == 3, "mixed: every result came out");
    nv = 0;
    nr = 0;
    for (int s = 0; s < 6 && nv < cap_n; s++) begin
      check(cap_cyc[nv] - at[s] == NSTG, "mixed: vector latency");
      if (is_reduce(ops[s])) begin
        ref_t::reduce(v[s], e[s], int'(ops[s]) - int'(OP_REDUCE_ADD), r, any);
        check(red_cyc[nr] - at[s] == LG, "mixed: reduce latency");
        check(red_e[nr] == any && (!any || red_v[nr] == r), "mixed: min/max");
        if (!any) mech[M_RED_EMPTY]++;
        else if (ops[s] == OP_REDUCE_MIN) mech[M_RED_MIN]++;
        else mech[M_RED_MAX]++;
        nr++;
      end else if (ops[s] == OP_PERMUTE) begin
        for (int k = 0; k < N; k++) check(cap_v[nv][perm[k]] == v[s][k], "mixed: permute");
        mech[M_PERMUTE]++;
      end else if (ops[s] == OP_PREFIX_ADD) begin
        ref_t::prefix(v[s], e[s], y);
        for (int k = 0; k < N; k++) check(cap_v[nv][k] == y[k], "mixed: prefix");
        mech[M_PREFIX]++;
      end else begin
        int unsigned q = 0;
        for (int k = 0; k < N; k++)
          if (e[s][k]) begin
            check(cap_v[nv][q] == v[s][k], "mixed: pack");
            q++;
          end
        mech[M_PACK]++;
      end
      nv++;
    end
  endtask

  // ---------------------------------------------------------------- sequential version
  task automatic do_seq(input op_e op);
    ref_t::vec_t  v, y;
    ref_t::bvec_t e;
    ref_t::dvec_t t;
    ref_t::ivec_t perm;
    logic [W-1:0] r;
    logic         any;
    int unsigned  at, n = 0;
    for (int k = 0; k < N; k++) begin
      v[k] = $urandom;
      e[k] = ($urandom_range(3, 0) != 0);
    end
    ref_t::rand_perm(perm);
    if (op == OP_PERMUTE) ref_t::route(perm, t);
    else                  ref_t::pack_dest(e, t);
    seq_start_i = 1'b1;
    seq_func_i  = op;
    seq_data_i  = v;
    seq_en_i    = e;
    seq_dest_i  = t;
    @(negedge clk);
    seq_start_i = 1'b0;
    n = 1;
    while (!seq_done_o && n < 40) begin
      @(negedge clk);
      n++;
    end
    check(n == (is_reduce(op) ? LG : NSTG), "sequential: log-step latency");
    unique case (op)
      OP_PERMUTE:    for (int k = 0; k < N; k++) check(seq_data_o[perm[k]] == v[k], "seq permute");
      OP_PREFIX_ADD: begin
        ref_t::prefix(v, e, y);
        for (int k = 0; k < N; k++) check(seq_data_o[k] == y[k], "seq prefix");
      end
      OP_PACK: begin
        int unsigned q = 0;
        for (int k = 0; k < N; k++)
          if (e[k]) begin
            check(seq_data_o[q] == v[k] && seq_en_o[q], "seq pack");
            q++;
          end
      end
      default: begin
        ref_t::reduce(v, e, int'(op) - int'(OP_REDUCE_ADD), r, any);
        check(seq_reduce_en_o == any && (!any || seq_reduce_o == r), "seq reduce");
      end
    endcase
    if (is_reduce(op)) mech[M_SEQ_REDUCE]++;
    else               mech[M_SEQ_VECTOR]++;
  endtask

  // ---------------------------------------------------------------- or-prefix check
  logic [N-1:0] act_prev;
  logic         act_vprev = 1'b0;
  always @(negedge clk) begin
    if (act_vprev) begin
      logic acc;
      logic [N-1:0] y;
      acc = 1'b0;
      for (int k = 0; k < N; k++) begin
        acc  = acc | act_prev[k];
        y[k] = acc;
      end
      check(act_or_valid_o && act_or_o == y, "or-prefix of activation vector");
      mech[M_OR_PREFIX]++;
    end
    act_vprev <= act_valid_i;
    act_prev  <= act_i;
  end

  initial begin
    map_valid_i = 1'b0;
    map_func_i  = OP_PERMUTE;
    act_valid_i = 1'b0;
    act_i       = '0;
    seq_start_i = 1'b0;
    seq_func_i  = OP_PERMUTE;
    for (int k = 0; k < N; k++) begin
      map_data_i[k] = '0; map_en_i[k] = 1'b0; map_dest_i[k] = '0;
      seq_data_i[k] = '0; seq_en_i[k] = 1'b0; seq_dest_i[k] = '0;
      zero_t[k] = '0;
      all_e[k]  = 1'b1;
    end
    for (int k = 0; k < M_COUNT; k++) mech[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int rep = 0; rep < 4; rep++) begin
      do_select();
      do_matvec();
      do_pack(rep % 3);
      do_transpose();
      do_fft_exchange();
      do_mixed();
      for (int k = 0; k < 6; k++) do_seq(op_e'(k));
    end
    for (int k = 0; k < M_COUNT; k++) begin
      check(mech[k] > 0, "mechanism exercised");
      if (mech[k] == 0) $display("mechanism %s never happened", mech_e'(k));
    end
    $display("mechanisms: perm %0d pack %0d prefix %0d add %0d min %0d max %0d empty %0d b2b %0d",
             mech[M_PERMUTE], mech[M_PACK], mech[M_PREFIX], mech[M_RED_ADD], mech[M_RED_MIN],
             mech[M_RED_MAX], mech[M_RED_EMPTY], mech[M_BACK_TO_BACK]);
    $display("            select %0d matvec %0d transpose %0d seq-vector %0d seq-reduce %0d or-prefix %0d fft %0d",
             mech[M_SELECT], mech[M_MATVEC], mech[M_TRANSPOSE], mech[M_SEQ_VECTOR],
             mech[M_SEQ_REDUCE], mech[M_OR_PREFIX], mech[M_FFT_EXCHANGE]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
