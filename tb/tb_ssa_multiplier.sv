// tb_ssa_multiplier: self-checking test of the 53x53 SSA multiplier.
// Applies corner operands (0, 1, all ones, single bits) and random ones,
// compares each product with the simulator's own 106-bit multiplication and
// checks that done arrives exactly SSA_LATENCY cycles after start and that
// start is ignored while busy.
module tb_ssa_multiplier;
  import ssa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [OP_W-1:0] x, y;
  logic busy, done;
  logic [PROD_W-1:0] prod;
  int checks = 0, failures = 0;

  ssa_multiplier dut (.clk, .rst_n, .start_i(start), .x_i(x), .y_i(y),
                      .busy_o(busy), .done_o(done), .prod_o(prod));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [OP_W-1:0] a, input logic [OP_W-1:0] b);
    logic [PROD_W-1:0] ref_p;
    int cyc;
    ref_p = PROD_W'(a) * PROD_W'(b);
    @(negedge clk);
    x = a; y = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // a second start while busy must be ignored
    x = ~a; y = ~b;
    cyc = 0;
    while (!done) begin
      if (cyc == 2) start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    checks++;
    if (prod !== ref_p) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", a, b, prod, ref_p);
    end
    checks++;
    if (cyc != SSA_LATENCY) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, SSA_LATENCY);
    end
    @(negedge clk);
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL multiplier restarted while busy");
    end
  endtask

  initial begin
    x = '0; y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run('0, '0);
    run(53'd1, 53'd1);
    run('1, '1);
    run('1, 53'd1);
    run(53'h10_0000_0000_0000, 53'h10_0000_0000_0000);
    run(53'h1F_FFFF_FFFF_FFFF, 53'h10_0000_0000_0001);
    for (int i = 0; i < OP_W; i++) run(OP_W'(1) << i, '1);
    for (int i = 0; i < 300; i++)
      run(OP_W'({$urandom, $urandom}), OP_W'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
