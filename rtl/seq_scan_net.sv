// seq_scan_net: log-step sequential version of the multi-function scan network.
//
// Instead of 2*log2(N)-1 stages of cells, a single column of N/2 fully equipped
// multi-function cells (mf_cell) is used once per stage. The cells' registered outputs
// loop back to their inputs through multiplexers; a stage counter j selects, for every
// cell input, the output that the Benes-Waksman wiring between stage j-1 and stage j
// connects to it, and also tells each cell which role (reduction, pack, subtract,
// permute, dummy) it plays at stage j. The results are those of scan_net.
//
// Interface and timing: when idle, start_i loads a vector and a function code (same
// encoding and meaning of data_i, en_i and dest_i as scan_net). The function is held
// for the whole operation. Stage 0 is computed in the start cycle, then one stage per
// cycle: a vector function takes 2*log2(N)-1 cycles, a reduction log2(N) cycles (it
// stops after the middle stage). done_o is high for one cycle, the cycle after the last
// stage, and data_o/en_o (vector functions) or reduce_o/reduce_en_o (reductions) are
// valid in that cycle only. start_i is ignored while busy_o is high.
// The hand-shake (start/busy/done) and the single-cycle result window are choices of
// this design.
module seq_scan_net
  import scan_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned LG     = $clog2(N),
  localparam int unsigned NSTG   = 2 * LG - 1,
  localparam int unsigned DEST_W = NSTG
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  op_e               func_i,
  input  logic [DATA_W-1:0] data_i [N],
  input  logic              en_i   [N],
  input  logic [DEST_W-1:0] dest_i [N],
  output logic              busy_o,
  output logic              done_o,
  output op_e               func_o,
  output logic [DATA_W-1:0] data_o [N],
  output logic              en_o   [N],
  output logic [DATA_W-1:0] reduce_o,
  output logic              reduce_en_o
);

  localparam int unsigned SW = $clog2(NSTG);

  logic          busy, done;
  logic [SW-1:0] stage;      // stage computed in the current cycle when busy
  op_e           op_r;

  // Cell column: inputs by position (ci_*), registered outputs by position (co_*).
  logic [DATA_W-1:0] ci_data [N];
  logic              ci_en   [N];
  logic [DEST_W-1:0] ci_dest [N];
  logic [DATA_W-1:0] co_data [N];
  logic              co_en   [N];
  logic [DEST_W-1:0] co_dest [N];
  cell_pos_t         pos     [N/2];
  logic              cv      [N/2];
  op_e               cf      [N/2];
  op_e               op_cur;
  logic [SW-1:0]     stage_cur;

  assign op_cur    = busy ? op_r : func_i;
  assign stage_cur = busy ? stage : '0;

  // Loop multiplexers: stage 0 reads the input vector, stage j the outputs of stage j-1
  // as wired in the pipelined net.
  for (genvar q = 0; q < N; q++) begin : g_mux
    always_comb begin
      ci_data[q] = data_i[q];
      ci_en[q]   = en_i[q];
      ci_dest[q] = dest_i[q];
      for (int j = 1; j < NSTG; j++) begin
        if (busy && stage == SW'(j)) begin
          ci_data[q] = co_data[link_src(N, LG, j - 1, q)];
          ci_en[q]   = co_en[link_src(N, LG, j - 1, q)];
          ci_dest[q] = co_dest[link_src(N, LG, j - 1, q)];
        end
      end
    end
  end

  for (genvar c = 0; c < N / 2; c++) begin : g_cell
    // role of this cell at the current stage
    always_comb begin
      pos[c] = cell_pos(N, LG, 0, c);
      for (int j = 1; j < NSTG; j++)
        if (stage_cur == SW'(j)) pos[c] = cell_pos(N, LG, j, c);
    end
    mf_cell #(.DATA_W(DATA_W), .DEST_W(DEST_W)) u_cell (
      .clk     (clk),
      .rst_n   (rst_n),
      .pos     (pos[c]),
      .valid_i (busy | start_i),
      .func_i  (op_cur),
      .a_data_i(ci_data[2*c]),
      .a_en_i  (ci_en[2*c]),
      .a_dest_i(ci_dest[2*c]),
      .b_data_i(ci_data[2*c+1]),
      .b_en_i  (ci_en[2*c+1]),
      .b_dest_i(ci_dest[2*c+1]),
      .valid_o (cv[c]),
      .func_o  (cf[c]),
      .a_data_o(co_data[2*c]),
      .a_en_o  (co_en[2*c]),
      .a_dest_o(co_dest[2*c]),
      .b_data_o(co_data[2*c+1]),
      .b_en_o  (co_en[2*c+1]),
      .b_dest_o(co_dest[2*c+1])
    );
  end

  // Stage sequencing.
  logic [SW-1:0] last;
  assign last = is_reduce(op_cur) ? SW'(LG - 1) : SW'(NSTG - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= '0;
      op_r  <= OP_PERMUTE;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start_i) begin
          busy  <= 1'b1;
          stage <= SW'(1);
          op_r  <= func_i;
        end
      end else if (stage == last) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        stage <= stage + SW'(1);
      end
    end
  end

  assign busy_o      = busy;
  assign done_o      = done;
  assign func_o      = cf[0];
  assign data_o      = co_data;
  assign en_o        = co_en;
  assign reduce_o    = co_data[N-1];
  assign reduce_en_o = co_en[N-1];

  // The cells saw a valid operation in the cycle before done.
  a_cell_valid: assert property (@(posedge clk) done |-> cv[N/2-1]);

  initial begin
    assert (N >= 4 && (1 << LG) == N)
      else $error("seq_scan_net: N must be a power of two, at least 4");
  end

endmodule
