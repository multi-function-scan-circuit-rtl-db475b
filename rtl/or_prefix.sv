// or_prefix: or-prefix network over the Boolean activation vector.
//
// y_o[i] = b_i[0] | b_i[1] | ... | b_i[i]: for a vector of cell activation bits it
// marks every cell at or to the right of the first active one. The network is a
// log-depth (Kogge-Stone) prefix of OR gates, log2(N) levels in which bit i takes the
// OR with bit i-2^k, followed by one output register.
//
// Interface and timing: valid_i/b_i in, valid_o/y_o one cycle later, one vector per
// cycle. The structure (log depth, a single register) is this design's own choice;
// only the function of the network is given.
module or_prefix #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic [N-1:0] b_i,
  output logic         valid_o,
  output logic [N-1:0] y_o
);

  localparam int unsigned LG = $clog2(N);

  logic [N-1:0] y_d;
  always_comb begin
    logic [N-1:0] lvl;
    lvl = b_i;
    for (int k = 0; k < LG; k++)
      lvl = lvl | (lvl << (1 << k));
    y_d = lvl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= valid_i;
  end

  always_ff @(posedge clk) y_o <= y_d;

endmodule
