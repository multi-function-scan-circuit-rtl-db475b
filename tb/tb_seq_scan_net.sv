// tb_seq_scan_net: self-checking testbench of the sequential scan network (N = 16).
//
// Runs random operations of every function one after the other. For each, it counts
// the cycles from the start to done (2*log2(N)-1 for vector functions, log2(N) for
// reductions), keeps start_i high while the net is busy to check that it is ignored,
// and compares the result with scan_ref, computed from the inputs alone.
module tb_seq_scan_net;
  import scan_pkg::*;
  import scan_ref_pkg::*;

  localparam int unsigned N    = 16;
  localparam int unsigned W    = 32;
  localparam int unsigned LG   = $clog2(N);
  localparam int unsigned NSTG = 2 * LG - 1;
  localparam int unsigned OPS  = 300;
  typedef scan_ref#(N, W) ref_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            start_i, busy_o, done_o, reduce_en_o;
  op_e             func_i, func_o;
  logic [W-1:0]    data_i [N];
  logic            en_i   [N];
  logic [NSTG-1:0] dest_i [N];
  logic [W-1:0]    data_o [N];
  logic            en_o   [N];
  logic [W-1:0]    reduce_o;

  seq_scan_net #(.N(N), .DATA_W(W)) dut (.*);

  int checks = 0, failures = 0;
  int op_count [6];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_one();
    ref_t::vec_t  d, y;
    ref_t::bvec_t e;
    ref_t::dvec_t dst;
    ref_t::ivec_t perm;
    op_e          op;
    logic [W-1:0] r;
    logic         any;
    int           mode = $urandom_range(9, 0);
    int           cyc = 0;
    op = op_e'($urandom_range(5, 0));
    for (int i = 0; i < N; i++) begin
      d[i] = ($urandom_range(3, 0) == 0) ? W'($urandom_range(3, 0)) - W'(2) : $urandom;
      e[i] = (mode == 0) ? 1'b0 : (mode == 1) ? 1'b1 : ($urandom_range(1, 0) == 1);
    end
    ref_t::rand_perm(perm);
    if (op == OP_PERMUTE) ref_t::route(perm, dst);
    else                  ref_t::pack_dest(e, dst);
    op_count[op]++;
    @(negedge clk);
    start_i = 1'b1;
    func_i  = op;
    data_i  = d;
    en_i    = e;
    dest_i  = dst;
    // start_i stays high for a few cycles with other data: must be ignored
    do begin
      @(negedge clk);
      cyc++;
      if (cyc == 1) begin
        func_i = op_e'($urandom_range(5, 0));
        for (int i = 0; i < N; i++) data_i[i] = $urandom;
      end
      if (cyc == 3) start_i = 1'b0;
    end while (!done_o && cyc < 40);
    start_i = 1'b0;
    check(cyc == (is_reduce(op) ? LG : NSTG), "cycles from start to done");
    check(func_o == op, "function held");
    unique case (op)
      OP_PERMUTE:
        for (int i = 0; i < N; i++)
          check(data_o[perm[i]] == d[i] && en_o[perm[i]] == e[i], "permute");
      OP_PACK: begin
        int unsigned q = 0;
        for (int i = 0; i < N; i++)
          if (e[i]) begin
            check(data_o[q] == d[i] && en_o[q], "pack: enabled in order");
            q++;
          end
        for (int k = q; k < N; k++) check(!en_o[k], "pack: right part disabled");
      end
      OP_PREFIX_ADD: begin
        ref_t::prefix(d, e, y);
        for (int i = 0; i < N; i++) check(data_o[i] == y[i], "prefix add");
      end
      default: begin
        ref_t::reduce(d, e, int'(op) - int'(OP_REDUCE_ADD), r, any);
        check(reduce_en_o == any, "reduce enable");
        if (any) check(reduce_o == r, "reduce value");
      end
    endcase
    @(negedge clk);
    check(!done_o && !busy_o, "done is a single pulse");
  endtask

  initial begin
    start_i = 1'b0;
    func_i  = OP_PERMUTE;
    for (int i = 0; i < N; i++) begin
      data_i[i] = '0;
      en_i[i]   = 1'b0;
      dest_i[i] = '0;
    end
    for (int k = 0; k < 6; k++) op_count[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < OPS; k++) run_one();
    for (int k = 0; k < 6; k++) check(op_count[k] > 5, "every function exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (OPS * 40 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
