// tb_scan_net: self-checking testbench of the pipelined scan network (N = 16).
//
// Every cycle a random vector enters with a random function (permute, pack, prefix
// add, reduce add/min/max), so functions of all kinds follow each other through the
// pipe. Each result is compared with scan_ref, worked out from the inputs alone: the
// vector output must appear exactly 2*log2(N)-1 cycles after its input and the REDUCE
// output exactly log2(N) cycles after it. Edge cases (no element or every element
// enabled, extreme values for min/max) are mixed in.
module tb_scan_net;
  import scan_pkg::*;
  import scan_ref_pkg::*;

  localparam int unsigned N      = 16;
  localparam int unsigned W      = 32;
  localparam int unsigned LG     = $clog2(N);
  localparam int unsigned NSTG   = 2 * LG - 1;
  localparam int unsigned CYCLES = 400;
  typedef scan_ref#(N, W) ref_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            valid_i;
  op_e             func_i;
  logic [W-1:0]    data_i [N];
  logic            en_i   [N];
  logic [NSTG-1:0] dest_i [N];
  logic            valid_o, reduce_valid_o, reduce_en_o;
  op_e             func_o, reduce_func_o;
  logic [W-1:0]    data_o [N];
  logic            en_o   [N];
  logic [W-1:0]    reduce_o;

  scan_net #(.N(N), .DATA_W(W)) dut (.*);

  int checks = 0, failures = 0;
  int op_count [6];

  // Inputs per cycle, kept for the checks.
  logic            h_valid [CYCLES];
  op_e             h_func  [CYCLES];
  ref_t::vec_t     h_data  [CYCLES];
  ref_t::bvec_t    h_en    [CYCLES];
  ref_t::ivec_t    h_perm  [CYCLES];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic make_input(input int cyc);
    ref_t::vec_t  d;
    ref_t::bvec_t e;
    ref_t::dvec_t dst;
    ref_t::ivec_t perm;
    op_e          op;
    int           mode = $urandom_range(9, 0);
    int           pick;
    op = op_e'($urandom_range(5, 0));
    for (int i = 0; i < N; i++) begin
      d[i] = $urandom;
      pick = $urandom_range(7, 0);
      if (pick < 4)
        case (pick)
          0: d[i] = {1'b1, {(W-1){1'b0}}};   // most negative
          1: d[i] = {1'b0, {(W-1){1'b1}}};   // most positive
          2: d[i] = '0;
          default: d[i] = '1;
        endcase
      e[i] = (mode == 0) ? 1'b0 : (mode == 1) ? 1'b1 : ($urandom_range(1, 0) == 1);
    end
    ref_t::rand_perm(perm);
    if (op == OP_PERMUTE) ref_t::route(perm, dst);
    else                  ref_t::pack_dest(e, dst);
    valid_i = ($urandom_range(7, 0) != 0) && cyc < CYCLES - 40;
    func_i  = op;
    data_i  = d;
    en_i    = e;
    dest_i  = dst;
    h_valid[cyc] = valid_i;
    h_func[cyc]  = op;
    h_data[cyc]  = d;
    h_en[cyc]    = e;
    h_perm[cyc]  = perm;
    if (valid_i) op_count[op]++;
  endtask

  task automatic check_vector(input int src);
    ref_t::vec_t y;
    logic [W-1:0] r;
    logic any;
    check(valid_o == h_valid[src], "vector valid / latency");
    if (!h_valid[src]) return;
    check(func_o == h_func[src], "func travels with data");
    unique case (h_func[src])
      OP_PERMUTE:
        for (int i = 0; i < N; i++)
          check(data_o[h_perm[src][i]] == h_data[src][i] && en_o[h_perm[src][i]] == h_en[src][i],
                "permute");
      OP_PACK: begin
        int unsigned q = 0;
        int unsigned used [N];
        for (int i = 0; i < N; i++) used[i] = 0;
        for (int i = 0; i < N; i++)
          if (h_en[src][i]) begin
            check(data_o[q] == h_data[src][i] && en_o[q], "pack: enabled in order");
            q++;
          end
        // disabled elements fill positions q..N-1, each exactly once
        for (int k = q; k < N; k++) begin
          bit found = 0;
          check(!en_o[k], "pack: right part disabled");
          for (int i = 0; i < N; i++)
            if (!found && !h_en[src][i] && used[i] == 0 && h_data[src][i] == data_o[k]) begin
              used[i] = 1;
              found = 1;
            end
          check(found, "pack: right part holds the disabled elements");
        end
      end
      OP_PREFIX_ADD: begin
        ref_t::prefix(h_data[src], h_en[src], y);
        for (int i = 0; i < N; i++) check(data_o[i] == y[i], "prefix add");
      end
      default: begin
        ref_t::reduce(h_data[src], h_en[src], int'(h_func[src]) - int'(OP_REDUCE_ADD), r, any);
        check(en_o[N-1] == any, "reduce on last output: enable");
        if (any) check(data_o[N-1] == r, "reduce on last output");
      end
    endcase
  endtask

  task automatic check_reduce(input int src);
    logic [W-1:0] r;
    logic any;
    bit exp_v = h_valid[src] && is_reduce(h_func[src]);
    check(reduce_valid_o == exp_v, "reduce valid / latency");
    if (!exp_v) return;
    check(reduce_func_o == h_func[src], "reduce func");
    ref_t::reduce(h_data[src], h_en[src], int'(h_func[src]) - int'(OP_REDUCE_ADD), r, any);
    check(reduce_en_o == any, "reduce: enable");
    if (any) check(reduce_o == r, "reduce value");
  endtask

  initial begin
    valid_i = 1'b0;
    func_i  = OP_PERMUTE;
    for (int i = 0; i < N; i++) begin
      data_i[i] = '0;
      en_i[i]   = 1'b0;
      dest_i[i] = '0;
    end
    for (int k = 0; k < 6; k++) op_count[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      if (cyc >= NSTG) check_vector(cyc - NSTG);
      if (cyc >= LG)   check_reduce(cyc - LG);
      make_input(cyc);
    end
    for (int k = 0; k < 6; k++) check(op_count[k] > 5, "every function exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
