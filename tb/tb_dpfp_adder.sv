// tb_dpfp_adder: self-checking test of the pipelined double precision adder.
// The reference is the simulator's own IEEE double addition, adjusted for
// flush-to-zero (subnormal operands count as zero, subnormal results are
// expected as signed zero). Operations are issued back to back, one per
// cycle, so the test also checks the pipeline's throughput and its fixed
// two-edge latency. Covers same and opposite signs, near cancellation, large
// exponent gaps, overflow, underflow, zeros, infinities and NaNs.
module tb_dpfp_adder;
  import fp64_pkg::*;

  localparam int N_OPS = 4000;

  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0, vout;
  logic [63:0] a, b, res;
  fp_flags_t flags;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_nan = 0, n_cancel = 0;

  logic [63:0] ref_q [$];
  fp_flags_t   flg_q [$];
  int          t_q [$];
  int          cycle = 0;

  dpfp_adder dut (.clk, .rst_n, .valid_i(vin), .a_i(a), .b_i(b),
                  .valid_o(vout), .result_o(res), .flags_o(flags));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (N_OPS * 4 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ftz(input logic [63:0] x);
    return (x[62:52] == '0) ? {x[63], 63'd0} : x;
  endfunction

  task automatic issue(input logic [63:0] x, input logic [63:0] y);
    logic [63:0] r;
    logic finite_in, r_nan, r_ovf, r_unf;
    r = $realtobits($bitstoreal(ftz(x)) + $bitstoreal(ftz(y)));
    finite_in = (x[62:52] != '1) && (y[62:52] != '1);
    r_nan = (r[62:52] == '1) && (r[51:0] != '0);
    r_ovf = finite_in && r[62:52] == '1;
    r_unf = finite_in && r[62:52] == '0 && r[51:0] != '0;
    if (r_unf) r = {r[63], 63'd0};
    if (r_nan) r = QNAN;
    n_ovf += int'(r_ovf);
    n_unf += int'(r_unf);
    n_nan += int'(r_nan);
    if (finite_in && x[62:52] != '0 && x[62:52] == y[62:52] && x[63] != y[63]) n_cancel++;
    ref_q.push_back(r);
    flg_q.push_back('{invalid: r_nan, overflow: r_ovf, underflow: r_unf});
    @(negedge clk);
    a = x; b = y; vin = 1'b1;
    t_q.push_back(cycle);
  endtask

  // output checker
  always @(negedge clk) begin
    if (vout) begin
      logic [63:0] r;
      fp_flags_t f;
      int t;
      r = ref_q.pop_front();
      f = flg_q.pop_front();
      t = t_q.pop_front();
      checks++;
      if (res !== r) begin
        failures++;
        $display("FAIL result %h expected %h", res, r);
      end
      checks++;
      if (flags !== f) begin
        failures++;
        $display("FAIL flags %b expected %b (result %h)", flags, f, r);
      end
      checks++;
      if (cycle - t != 2) begin
        failures++;
        $display("FAIL latency %0d", cycle - t);
      end
    end
  end

  function automatic logic [63:0] rnd(input int emin, input int emax);
    logic [10:0] e;
    e = 11'(emin + int'($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 20'($urandom), $urandom};
  endfunction

  initial begin
    logic [63:0] x, y;
    int unsigned kind;
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    issue($realtobits(1.0), $realtobits(1.0));
    issue($realtobits(1.0), $realtobits(-1.0));
    issue($realtobits(-0.0), $realtobits(-0.0));
    issue($realtobits(1.0), $realtobits(1.0e-30));
    issue($realtobits(1.0), 64'hBCA0_0000_0000_0000);        // 1 - 2^-53: tie
    issue(64'h7FF0_0000_0000_0000, 64'hFFF0_0000_0000_0000); // inf - inf
    issue(64'h7FF0_0000_0000_0000, $realtobits(5.0));
    issue(64'hFFF8_0000_0000_0001, $realtobits(5.0));
    issue(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF); // overflow
    issue(64'h0010_0000_0000_0001, 64'h8010_0000_0000_0000); // underflow
    issue(64'h0000_0000_0000_0005, $realtobits(2.0));        // subnormal in
    for (int i = 0; i < N_OPS; i++) begin
      kind = $urandom % 5;
      unique case (kind)
        0: begin x = rnd(900, 1150); y = rnd(900, 1150); end
        1: begin x = rnd(1000, 1010); y = {~x[63], x[62:52], x[51:8], 8'($urandom)}; end
        2: begin x = rnd(1, 2046); y = rnd(1, 2046); end
        3: begin x = rnd(2040, 2046); y = rnd(2040, 2046); y[63] = x[63]; end
        default: begin x = rnd(1, 8); y = rnd(1, 8); end
      endcase
      issue(x, y);
    end
    @(negedge clk);
    vin = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (ref_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", ref_q.size());
    end
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_nan == 0 || n_cancel == 0) begin
      failures++;
      $display("FAIL coverage ovf=%0d unf=%0d nan=%0d cancel=%0d", n_ovf, n_unf, n_nan, n_cancel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
