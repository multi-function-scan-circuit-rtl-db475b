// tb_mf_cell: self-checking testbench of the multi-function cell.
//
// Every cycle drives a random position (covering the five cell types), a random
// function and random inputs, and checks the registered outputs one cycle later
// against the cell tables: permute/pack switching rules, the three prefix cell kinds
// {a, a+b}, {b, a+b}, {b-a, b}, the add/min/max reduction on the lower output, and the
// one-bit right shift of the destination words.
module tb_mf_cell;
  import scan_pkg::*;

  localparam int unsigned W  = 16;
  localparam int unsigned DW = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  cell_pos_t     pos;
  logic          valid_i, valid_o;
  op_e           func_i, func_o;
  logic [W-1:0]  a_data_i, b_data_i, a_data_o, b_data_o;
  logic          a_en_i, b_en_i, a_en_o, b_en_o;
  logic [DW-1:0] a_dest_i, b_dest_i, a_dest_o, b_dest_o;

  mf_cell #(.DATA_W(W), .DEST_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  int kind_seen [5];   // reduction, pack, dummy, subtract, permute

  typedef struct {
    logic [W-1:0]  ad, bd;
    logic          ae, be;
    logic [DW-1:0] at, bt;
    logic          v;
    op_e           f;
  } exp_t;

  function automatic exp_t model(cell_pos_t p, op_e f, logic v,
                                 logic [W-1:0] ad, logic ae, logic [DW-1:0] at,
                                 logic [W-1:0] bd, logic be, logic [DW-1:0] bt);
    exp_t x;
    bit   sw = 0;
    logic [W-1:0] ma = ae ? ad : '0;
    logic [W-1:0] mb = be ? bd : '0;
    if (f == OP_PERMUTE) sw = !(!p.fwd && p.first) && at[0];
    if (f == OP_PACK && p.fwd) begin
      if (ae && be)      sw = at[0];
      else if (ae)       sw = (at[0] == 1'b1);
      else if (be)       sw = (bt[0] == 1'b0);
    end
    x.v = v;
    x.f = f;
    if (sw) begin
      x.ad = bd; x.ae = be; x.at = bt >> 1;
      x.bd = ad; x.be = ae; x.bt = at >> 1;
    end else begin
      x.ad = ad; x.ae = ae; x.at = at >> 1;
      x.bd = bd; x.be = be; x.bt = bt >> 1;
    end
    if (f == OP_PREFIX_ADD && p.fwd && p.lowest) begin
      x.ad = p.first ? ma : mb;
      x.bd = ma + mb;
      x.ae = 1; x.be = 1;
    end
    if (f == OP_PREFIX_ADD && !p.fwd && p.lowest && !p.first) begin
      x.ad = mb - ma;
      x.bd = mb;
      x.ae = 1; x.be = 1;
    end
    if (p.fwd && p.lowest && (f == OP_REDUCE_ADD || f == OP_REDUCE_MIN || f == OP_REDUCE_MAX)) begin
      x.be = ae | be;
      if (f == OP_REDUCE_ADD) x.bd = ma + mb;
      else if (!ae)           x.bd = bd;
      else if (!be)           x.bd = ad;
      else if (f == OP_REDUCE_MIN) x.bd = ($signed(ad) <= $signed(bd)) ? ad : bd;
      else                         x.bd = ($signed(ad) >= $signed(bd)) ? ad : bd;
    end
    return x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  exp_t e;
  initial begin
    for (int k = 0; k < 5; k++) kind_seen[k] = 0;
    pos = '0; valid_i = 0; func_i = OP_PERMUTE;
    a_data_i = '0; b_data_i = '0; a_en_i = 0; b_en_i = 0; a_dest_i = '0; b_dest_i = '0;
    repeat (2) @(negedge clk);
    check(valid_o == 1'b0, "valid reset");
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (cyc > 0) begin
        check(valid_o == e.v && func_o == e.f, "valid/func registered");
        check(a_data_o == e.ad && a_en_o == e.ae && a_dest_o == e.at, "upper output");
        check(b_data_o == e.bd && b_en_o == e.be && b_dest_o == e.bt, "lower output");
      end
      pos      = cell_pos_t'($urandom_range(7, 0));
      func_i   = op_e'($urandom_range(5, 0));
      valid_i  = $urandom_range(1, 0);
      a_data_i = ($urandom_range(3, 0) == 0) ? b_data_i : W'($urandom);
      b_data_i = W'($urandom);
      a_en_i   = $urandom_range(1, 0);
      b_en_i   = $urandom_range(1, 0);
      a_dest_i = DW'($urandom);
      b_dest_i = DW'($urandom);
      e = model(pos, func_i, valid_i, a_data_i, a_en_i, a_dest_i, b_data_i, b_en_i, b_dest_i);
      if (pos.fwd && pos.lowest)                    kind_seen[0]++;
      else if (pos.fwd)                             kind_seen[1]++;
      else if (pos.first)                           kind_seen[2]++;
      else if (pos.lowest)                          kind_seen[3]++;
      else                                          kind_seen[4]++;
    end
    for (int k = 0; k < 5; k++) check(kind_seen[k] > 100, "every cell type exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
