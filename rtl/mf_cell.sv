// mf_cell: the multi-function 2x2 cell of the scan network, with its pipeline registers.
//
// Each of the two inputs carries a scalar, an enable bit and a destination word; input
// a is the upper one (x_{2i-1}) and input b the lower one (x_{2i}). A small DECODE looks
// at the function code, the two enables and the least significant destination bits and
// the cell's place in the net (pos), and sets the datapath:
//   permute   : swap when the upper input's destination LSB is 1 (every element
//               carries, one bit per stage, the output it must leave each cell by);
//               the Waksman dummy cells never swap.
//   pack      : forward half only. No input enabled: straight. One enabled: that
//               input's destination LSB selects its output. Both enabled: the upper
//               input's LSB decides. The backward half passes straight.
//   prefix add: reduction cells give {a, a+b} (first cell of a sub-network) or
//               {b, a+b}; subtract cells give {b-a, b}; all others pass straight.
//               A disabled input counts as zero and results are marked enabled.
//   reduce    : reduction cells put add/min/max of the enabled inputs on the lower
//               output (enable = either input enabled); all others pass straight.
// Destination words are shifted right by one in every cell, whatever the function.
// min/max compare two's-complement signed scalars.
//
// Timing: all outputs are registered (one cycle per cell). valid is reset; the data
// registers are not, as they are only read together with valid.
//
// The five cell types of the design are this one cell with pos tied to constants;
// synthesis removes the parts a given position cannot use. The treatment of disabled
// inputs in the arithmetic functions and the signed compare are choices of this design.
module mf_cell
  import scan_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEST_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cell_pos_t         pos,
  input  logic              valid_i,
  input  op_e               func_i,
  input  logic [DATA_W-1:0] a_data_i,
  input  logic              a_en_i,
  input  logic [DEST_W-1:0] a_dest_i,
  input  logic [DATA_W-1:0] b_data_i,
  input  logic              b_en_i,
  input  logic [DEST_W-1:0] b_dest_i,
  output logic              valid_o,
  output op_e               func_o,
  output logic [DATA_W-1:0] a_data_o,
  output logic              a_en_o,
  output logic [DEST_W-1:0] a_dest_o,
  output logic [DATA_W-1:0] b_data_o,
  output logic              b_en_o,
  output logic [DEST_W-1:0] b_dest_o
);

  // Derived cell type at this position.
  logic reduction_cell, subtract_cell, dummy_cell;
  assign reduction_cell = pos.fwd & pos.lowest;
  assign subtract_cell  = ~pos.fwd & pos.lowest & ~pos.first;
  assign dummy_cell     = ~pos.fwd & pos.first;

  // Masked operands: a disabled input is zero for the additive functions.
  logic [DATA_W-1:0] ma, mb, sum, diff, red;
  logic              a_lt_b;
  assign ma     = a_en_i ? a_data_i : '0;
  assign mb     = b_en_i ? b_data_i : '0;
  assign sum    = ma + mb;
  assign diff   = mb - ma;
  assign a_lt_b = $signed(a_data_i) < $signed(b_data_i);

  // Reduction result (3-input selection: a, b or the sum).
  always_comb begin
    unique case (func_i)
      OP_REDUCE_MIN: red = (a_en_i & (~b_en_i | a_lt_b))  ? a_data_i : b_data_i;
      OP_REDUCE_MAX: red = (a_en_i & (~b_en_i | ~a_lt_b)) ? a_data_i : b_data_i;
      default:       red = sum;
    endcase
  end

  // DECODE: swap decision for the routing functions.
  logic swap;
  always_comb begin
    swap = 1'b0;
    unique case (func_i)
      OP_PERMUTE: swap = ~dummy_cell & a_dest_i[0];
      OP_PACK: begin
        if (pos.fwd) begin
          unique case ({a_en_i, b_en_i})
            2'b00:   swap = 1'b0;
            2'b10:   swap = a_dest_i[0];
            2'b01:   swap = ~b_dest_i[0];
            default: swap = a_dest_i[0];
          endcase
        end
      end
      default: swap = 1'b0;
    endcase
  end

  // Datapath and destination shift.
  logic [DATA_W-1:0] ya_d, yb_d;
  logic              ya_e, yb_e;
  logic [DEST_W-1:0] ya_t, yb_t;
  always_comb begin
    // straight or swapped routing, the default for every function
    ya_d = swap ? b_data_i : a_data_i;
    ya_e = swap ? b_en_i   : a_en_i;
    ya_t = (swap ? b_dest_i : a_dest_i) >> 1;
    yb_d = swap ? a_data_i : b_data_i;
    yb_e = swap ? a_en_i   : b_en_i;
    yb_t = (swap ? a_dest_i : b_dest_i) >> 1;
    if (func_i == OP_PREFIX_ADD) begin
      if (reduction_cell) begin
        ya_d = pos.first ? ma : mb;
        ya_e = 1'b1;
        yb_d = sum;
        yb_e = 1'b1;
      end else if (subtract_cell) begin
        ya_d = diff;
        ya_e = 1'b1;
        yb_d = mb;
        yb_e = 1'b1;
      end
    end else if (is_reduce(func_i) && reduction_cell) begin
      yb_d = red;
      yb_e = a_en_i | b_en_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= valid_i;
  end

  always_ff @(posedge clk) begin
    func_o   <= func_i;
    a_data_o <= ya_d;
    a_en_o   <= ya_e;
    a_dest_o <= ya_t;
    b_data_o <= yb_d;
    b_en_o   <= yb_e;
    b_dest_o <= yb_t;
  end

endmodule
