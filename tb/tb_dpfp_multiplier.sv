// tb_dpfp_multiplier: self-checking test of the double precision multiplier.
// The reference is the simulator's own IEEE double multiplication
// ($bitstoreal / $realtobits), adjusted for the flush-to-zero rule: a
// subnormal operand counts as zero and a subnormal result is expected as a
// signed zero. Covers random normal operands, operands chosen to overflow and
// underflow, zeros, infinities and NaNs; checks flags and the fixed latency.
module tb_dpfp_multiplier;
  import fp64_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [63:0] a, b, res;
  logic busy, done;
  fp_flags_t flags;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_nan = 0;

  dpfp_multiplier dut (.clk, .rst_n, .start_i(start), .a_i(a), .b_i(b),
                       .busy_o(busy), .done_o(done), .result_o(res), .flags_o(flags));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ftz(input logic [63:0] x);
    return (x[62:52] == '0) ? {x[63], 63'd0} : x;
  endfunction

  task automatic run(input logic [63:0] x, input logic [63:0] y);
    logic [63:0] ref_v;
    logic ref_nan, ref_ovf, ref_unf, finite_in, nonzero_in;
    int cyc;
    ref_v = $realtobits($bitstoreal(ftz(x)) * $bitstoreal(ftz(y)));
    finite_in  = (x[62:52] != '1) && (y[62:52] != '1);
    nonzero_in = (x[62:52] != '0) && (y[62:52] != '0);
    ref_nan = (ref_v[62:52] == '1) && (ref_v[51:0] != '0);
    ref_ovf = finite_in && ref_v[62:52] == '1;
    ref_unf = finite_in && nonzero_in && ref_v[62:52] == '0;
    if (ref_unf) ref_v = {ref_v[63], 63'd0};
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (ref_nan ? !(res[62:52] == '1 && res[51:0] != '0) : res !== ref_v) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, res, ref_v);
    end
    checks++;
    if (flags !== '{invalid: ref_nan, overflow: ref_ovf, underflow: ref_unf}) begin
      failures++;
      $display("FAIL flags %b for %h * %h", flags, x, y);
    end
    checks++;
    if (cyc != ssa_pkg::SSA_LATENCY + 1) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
    n_ovf += int'(ref_ovf);
    n_unf += int'(ref_unf);
    n_nan += int'(ref_nan);
  endtask

  function automatic logic [63:0] rnd(input int emin, input int emax);
    logic [10:0] e;
    e = 11'(emin + int'($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 20'($urandom), $urandom};
  endfunction

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // exact and simple values
    run($realtobits(1.0), $realtobits(1.0));
    run($realtobits(1.5), $realtobits(-2.25));
    run($realtobits(3.0), $realtobits(0.1));
    run($realtobits(-0.0), $realtobits(7.0));
    run(64'h3FFF_FFFF_FFFF_FFFF, 64'h3FFF_FFFF_FFFF_FFFF);   // round up into carry
    run(64'h3FF0_0000_0000_0001, 64'h3FF0_0000_0000_0001);
    // specials
    run(64'h7FF0_0000_0000_0000, $realtobits(-3.0));         // inf
    run(64'h7FF0_0000_0000_0000, 64'h0);                     // inf * 0
    run(64'h7FF8_0000_0000_0000, $realtobits(1.0));          // NaN
    run(64'h0000_0000_0000_0001, $realtobits(1.0e300));      // subnormal in
    run(64'h7FE0_0000_0000_0000, 64'h4010_0000_0000_0000);   // overflow
    run(64'h0010_0000_0000_0000, 64'h3C00_0000_0000_0000);   // underflow
    // random, mostly in range
    for (int i = 0; i < 400; i++) run(rnd(700, 1346), rnd(700, 1346));
    // random near the top and bottom of the range
    for (int i = 0; i < 100; i++) run(rnd(1500, 2046), rnd(1500, 2046));
    for (int i = 0; i < 100; i++) run(rnd(1, 400), rnd(1, 400));
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_nan == 0) begin
      failures++;
      $display("FAIL coverage ovf=%0d unf=%0d nan=%0d", n_ovf, n_unf, n_nan);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
