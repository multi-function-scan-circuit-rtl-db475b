// scan_system: the SCAN side of a Map-Scan-Reduce cellular machine.
//
// A linear MAP array of N cells hands the scan circuit one N-component vector per
// cycle (scalar, activation/enable bit and destination word per cell) with a function
// code. The pipelined multi-function network (scan_net) returns a vector to the MAP
// array (permute, pack, prefix add), closing the first global loop, and a REDUCE scalar
// (add, min, max) for the control processor, closing the second loop. Beside it:
//   - the or-prefix network over the cells' activation bits (or_prefix);
//   - the log-step sequential version of the same scan circuit (seq_scan_net), an
//     N/2-cell alternative that trades throughput for size, with its own ports.
// The control processor, the DISTRIBUTE broadcast net and the MAP cells are outside
// this module; their connections are the ports below.
//
// Timing: map_* in, scan_* out 2*log2(N)-1 cycles later, reduce_* out log2(N) cycles
// later, one vector per cycle; act_or_* one cycle after act_*; seq_* as seq_scan_net.
// Defaults: N = 8 cells (the size of the worked examples), 32-bit scalars.
module scan_system
  import scan_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned LG     = $clog2(N),
  localparam int unsigned DEST_W = 2 * LG - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // MAP -> SCAN (pipelined network)
  input  logic              map_valid_i,
  input  op_e               map_func_i,
  input  logic [DATA_W-1:0] map_data_i [N],
  input  logic              map_en_i   [N],
  input  logic [DEST_W-1:0] map_dest_i [N],
  // SCAN -> MAP
  output logic              scan_valid_o,
  output op_e               scan_func_o,
  output logic [DATA_W-1:0] scan_data_o [N],
  output logic              scan_en_o   [N],
  // REDUCE -> CONTROL
  output logic              reduce_valid_o,
  output op_e               reduce_func_o,
  output logic [DATA_W-1:0] reduce_o,
  output logic              reduce_en_o,
  // activation vector or-prefix
  input  logic              act_valid_i,
  input  logic [N-1:0]      act_i,
  output logic              act_or_valid_o,
  output logic [N-1:0]      act_or_o,
  // sequential (log-step) scan circuit
  input  logic              seq_start_i,
  input  op_e               seq_func_i,
  input  logic [DATA_W-1:0] seq_data_i [N],
  input  logic              seq_en_i   [N],
  input  logic [DEST_W-1:0] seq_dest_i [N],
  output logic              seq_busy_o,
  output logic              seq_done_o,
  output op_e               seq_func_o,
  output logic [DATA_W-1:0] seq_data_o [N],
  output logic              seq_en_o   [N],
  output logic [DATA_W-1:0] seq_reduce_o,
  output logic              seq_reduce_en_o
);

  scan_net #(.N(N), .DATA_W(DATA_W)) u_scan (
    .clk           (clk),
    .rst_n         (rst_n),
    .valid_i       (map_valid_i),
    .func_i        (map_func_i),
    .data_i        (map_data_i),
    .en_i          (map_en_i),
    .dest_i        (map_dest_i),
    .valid_o       (scan_valid_o),
    .func_o        (scan_func_o),
    .data_o        (scan_data_o),
    .en_o          (scan_en_o),
    .reduce_valid_o(reduce_valid_o),
    .reduce_func_o (reduce_func_o),
    .reduce_o      (reduce_o),
    .reduce_en_o   (reduce_en_o)
  );

  or_prefix #(.N(N)) u_or_prefix (
    .clk    (clk),
    .rst_n  (rst_n),
    .valid_i(act_valid_i),
    .b_i    (act_i),
    .valid_o(act_or_valid_o),
    .y_o    (act_or_o)
  );

  seq_scan_net #(.N(N), .DATA_W(DATA_W)) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .start_i    (seq_start_i),
    .func_i     (seq_func_i),
    .data_i     (seq_data_i),
    .en_i       (seq_en_i),
    .dest_i     (seq_dest_i),
    .busy_o     (seq_busy_o),
    .done_o     (seq_done_o),
    .func_o     (seq_func_o),
    .data_o     (seq_data_o),
    .en_o       (seq_en_o),
    .reduce_o   (seq_reduce_o),
    .reduce_en_o(seq_reduce_en_o)
  );

endmodule
