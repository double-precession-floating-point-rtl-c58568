// tb_ssa_recombine: checks the carry recombination against the plain sum
// sum_i z_i * 2^(14 i), truncated to 106 bits, for random coefficients up
// to the largest that a 53 x 53 product can produce (4 * (2^14-1)^2) and for
// coefficients that force long carry chains.
module tb_ssa_recombine;
  import ssa_pkg::*;

  res_t coef [N_PTS];
  logic [PROD_W-1:0] prod;
  int checks = 0, failures = 0;

  ssa_recombine dut (.coef_i(coef), .prod_o(prod));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [159:0] sum;
    #1;
    sum = '0;
    for (int i = 0; i < N_PTS; i++) sum += 160'(coef[i]) << (i * DIGIT_W);
    checks++;
    if (prod != sum[PROD_W-1:0]) begin
      failures++;
      $display("FAIL %h expected %h", prod, sum[PROD_W-1:0]);
    end
  endtask

  localparam res_t ZMAX = res_t'(4 * ((1 << DIGIT_W) - 1) * ((1 << DIGIT_W) - 1));

  initial begin
    for (int i = 0; i < N_PTS; i++) coef[i] = '0;
    check();
    for (int i = 0; i < N_PTS; i++) coef[i] = ZMAX;
    check();
    for (int i = 0; i < N_PTS; i++) coef[i] = res_t'((1 << DIGIT_W) - 1);
    coef[0] = res_t'(1 << DIGIT_W);
    check();
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < N_PTS; i++) coef[i] = res_t'($urandom % (int'(ZMAX) + 1));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
