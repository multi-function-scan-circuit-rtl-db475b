// tb_or_prefix: self-checking testbench of the or-prefix network (N = 32).
//
// Drives a random activation vector each cycle (sparse, dense, all-zero and single-bit
// ones mixed in) and compares the output, one cycle later, with a bit-serial OR scan.
module tb_or_prefix;
  localparam int unsigned N = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         valid_i, valid_o;
  logic [N-1:0] b_i, y_o;

  or_prefix #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  logic [N-1:0] prev_b;
  logic         prev_v;
  int           pick;
  logic [N-1:0] r0, r1, r2;

  function automatic logic [N-1:0] ref_scan(logic [N-1:0] b);
    logic acc = 1'b0;
    logic [N-1:0] y;
    for (int i = 0; i < N; i++) begin
      acc  = acc | b[i];
      y[i] = acc;
    end
    return y;
  endfunction

  initial begin
    valid_i = 1'b0;
    b_i     = '0;
    prev_v  = 1'b0;
    prev_b  = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 500; cyc++) begin
      @(negedge clk);
      if (cyc > 0) begin
        checks++;
        if (valid_o != prev_v || (prev_v && y_o != ref_scan(prev_b))) begin
          failures++;
          if (failures < 10) $display("FAIL b=%h y=%h", prev_b, y_o);
        end
      end
      valid_i = ($urandom_range(3, 0) != 0);
      pick = $urandom_range(3, 0);
      r0 = $urandom;
      r1 = $urandom;
      r2 = $urandom;
      case (pick)
        0: b_i = '0;
        1: b_i = N'(1) << (r0 % N);
        2: b_i = r0 & r1 & r2;
        default: b_i = r0;
      endcase
      prev_v = valid_i;
      prev_b = b_i;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
