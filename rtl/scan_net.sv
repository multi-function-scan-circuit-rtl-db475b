// scan_net: log-depth pipelined multi-function scan network.
//
// An N-input Benes-Waksman permutation network (2*log2(N)-1 stages of N/2 cells) whose
// cells are multi-function cells (mf_cell), so that the same net computes
//   permute     : element j carries a (2*log2(N)-1)-bit word in dest_i, bit t telling
//                 which output (0 upper, 1 lower) it takes at stage t;
//   pack        : enabled elements go to position dest_i (log2(N) bits, 0-based and
//                 in order of appearance); the others fill the right-hand positions;
//   prefix add  : out[k] = sum of the enabled data_i[0..k];
//   reduce      : add, signed min or signed max over the enabled inputs, delivered on
//                 reduce_o from the right-most output of the middle stage.
// Each cell's role is fixed by its position (see scan_pkg); the Waksman dummy cells are
// the first cells of the last stage of every sub-network of size 4 and more.
//
// Interface and timing: one vector per cycle may enter (valid_i, func_i, data_i, en_i,
// dest_i); the function code travels with the data, so different functions can follow
// each other back to back. The vector result leaves 2*log2(N)-1 cycles later with
// valid_o/func_o, the reduction result log2(N) cycles later with reduce_valid_o (only
// for the reduce functions). reduce_en_o is low when no input was enabled. The final
// output N-1 also carries the reduction result, 2*log2(N)-1 cycles after the input.
module scan_net
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
  input  logic              valid_i,
  input  op_e               func_i,
  input  logic [DATA_W-1:0] data_i [N],
  input  logic              en_i   [N],
  input  logic [DEST_W-1:0] dest_i [N],
  output logic              valid_o,
  output op_e               func_o,
  output logic [DATA_W-1:0] data_o [N],
  output logic              en_o   [N],
  output logic              reduce_valid_o,
  output op_e               reduce_func_o,
  output logic [DATA_W-1:0] reduce_o,
  output logic              reduce_en_o
);

  // Stage inputs (si_*) and registered stage outputs (so_*), by position.
  logic [DATA_W-1:0] si_data [NSTG][N];
  logic              si_en   [NSTG][N];
  logic [DEST_W-1:0] si_dest [NSTG][N];
  logic [DATA_W-1:0] so_data [NSTG][N];
  logic              so_en   [NSTG][N];
  logic [DEST_W-1:0] so_dest [NSTG][N];
  // Valid and function code, one copy per cell as in the cell definition.
  logic              sv      [NSTG][N/2];
  op_e               sf      [NSTG][N/2];

  for (genvar q = 0; q < N; q++) begin : g_in
    assign si_data[0][q] = data_i[q];
    assign si_en[0][q]   = en_i[q];
    assign si_dest[0][q] = dest_i[q];
  end

  for (genvar t = 0; t < NSTG; t++) begin : g_stage
    // inter-stage links
    if (t > 0) begin : g_link
      for (genvar q = 0; q < N; q++) begin : g_q
        localparam int unsigned SRC = link_src(N, LG, t - 1, q);
        assign si_data[t][q] = so_data[t-1][SRC];
        assign si_en[t][q]   = so_en[t-1][SRC];
        assign si_dest[t][q] = so_dest[t-1][SRC];
      end
    end
    for (genvar c = 0; c < N / 2; c++) begin : g_cell
      localparam cell_pos_t POS = cell_pos(N, LG, t, c);
      logic vin;
      op_e  fin;
      if (t == 0) begin : g_first
        assign vin = valid_i;
        assign fin = func_i;
      end else begin : g_next
        assign vin = sv[t-1][c];
        assign fin = sf[t-1][c];
      end
      mf_cell #(.DATA_W(DATA_W), .DEST_W(DEST_W)) u_cell (
        .clk     (clk),
        .rst_n   (rst_n),
        .pos     (POS),
        .valid_i (vin),
        .func_i  (fin),
        .a_data_i(si_data[t][2*c]),
        .a_en_i  (si_en[t][2*c]),
        .a_dest_i(si_dest[t][2*c]),
        .b_data_i(si_data[t][2*c+1]),
        .b_en_i  (si_en[t][2*c+1]),
        .b_dest_i(si_dest[t][2*c+1]),
        .valid_o (sv[t][c]),
        .func_o  (sf[t][c]),
        .a_data_o(so_data[t][2*c]),
        .a_en_o  (so_en[t][2*c]),
        .a_dest_o(so_dest[t][2*c]),
        .b_data_o(so_data[t][2*c+1]),
        .b_en_o  (so_en[t][2*c+1]),
        .b_dest_o(so_dest[t][2*c+1])
      );
    end
  end

  for (genvar q = 0; q < N; q++) begin : g_out
    assign data_o[q] = so_data[NSTG-1][q];
    assign en_o[q]   = so_en[NSTG-1][q];
  end
  assign valid_o = sv[NSTG-1][0];
  assign func_o  = sf[NSTG-1][0];

  // REDUCE: right-most output of the middle stage (stage log2(N), counted from 1).
  assign reduce_func_o  = sf[LG-1][N/2-1];
  assign reduce_valid_o = sv[LG-1][N/2-1] & is_reduce(sf[LG-1][N/2-1]);
  assign reduce_o       = so_data[LG-1][N-1];
  assign reduce_en_o    = so_en[LG-1][N-1];

  initial begin
    assert (N >= 4 && (1 << LG) == N)
      else $error("scan_net: N must be a power of two, at least 4");
  end

endmodule
