// tb_ssa_extract_digit: loads operands into the register and checks that
// the digit vector re-assembles into the operand (sum of digit_i * 2^(14 i)),
// that every digit is below the base, that the upper half of the vector is
// zero padding, and that the register holds its value while load is low.
module tb_ssa_extract_digit;
  import ssa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [OP_W-1:0] op = '0, op_q;
  res_t dig [N_PTS];
  int checks = 0, failures = 0;

  ssa_extract_digit dut (.clk, .rst_n, .load_i(load), .operand_i(op),
                         .operand_o(op_q), .digits_o(dig));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [OP_W-1:0] v);
    logic [127:0] sum;
    @(negedge clk);
    op = v;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    op = ~v;      // must not reach the register without load
    @(negedge clk);
    checks++;
    if (op_q != v) begin
      failures++;
      $display("FAIL register %h expected %h", op_q, v);
    end
    sum = '0;
    for (int i = 0; i < N_PTS; i++) begin
      sum += 128'(dig[i]) << (i * DIGIT_W);
      checks++;
      if (dig[i] >= res_t'(1 << DIGIT_W) || (i >= N_PTS / 2 && dig[i] != '0)) begin
        failures++;
        $display("FAIL digit %0d = %h for %h", i, dig[i], v);
      end
    end
    checks++;
    if (sum != 128'(v)) begin
      failures++;
      $display("FAIL reassembly %h != %h", sum, v);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check('0);
    check('1);
    for (int i = 0; i < OP_W; i++) check(OP_W'(1) << i);
    for (int i = 0; i < 200; i++) check(OP_W'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
