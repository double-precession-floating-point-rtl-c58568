// tb_fermat_modmul: checks a*b mod (2^32+1) against wide integer arithmetic
// for edge residues (0, 1, 2^32 = -1, 2^32 - 1) and random residues.
module tb_fermat_modmul;
  import ssa_pkg::*;

  res_t a, b, p;
  int checks = 0, failures = 0;
  localparam logic [127:0] QW = (128'd1 << 32) + 128'd1;

  fermat_modmul dut (.a_i(a), .b_i(b), .p_o(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input res_t x, input res_t y);
    logic [127:0] r;
    a = x; b = y;
    #1;
    r = (128'(x) * 128'(y)) % QW;
    checks++;
    if (128'(p) != r) begin
      failures++;
      $display("FAIL %h * %h = %h expected %h", x, y, p, r);
    end
  endtask

  initial begin
    res_t edge_v [4];
    edge_v = '{res_t'(0), res_t'(1), Q - 1, Q - 2};
    foreach (edge_v[i]) foreach (edge_v[j]) check(edge_v[i], edge_v[j]);
    for (int t = 0; t < 2000; t++) begin
      res_t x, y;
      x = res_t'({1'($urandom), $urandom}); if (x >= Q) x = x - Q;
      y = res_t'({1'($urandom), $urandom}); if (y >= Q) y = y - Q;
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
