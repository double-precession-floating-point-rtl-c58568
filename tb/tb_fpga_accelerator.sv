// tb_fpga_accelerator: end-to-end test of the accelerator at its default
// size (four PEs), with the testbench acting as the host CPU.
// It hands work over (task -> req -> ack), writes operands and commands for
// a stream of double precision adds and multiplies, and compares every
// result (value, tag, flags) with the simulator's IEEE double arithmetic
// under the flush-to-zero rule. It first times one isolated add and one
// isolated multiply from command write to result (4 and 16 clock edges), then
// runs a random stream with bursts of back-to-back commands. Every mechanism must occur at least once: CPU stalled
// by a full accelerator, all PEs busy together, adds, multiplies, overflow,
// underflow, invalid (NaN) results, and release and renewed hand-over.
module tb_fpga_accelerator;
  import fp64_pkg::*;

  localparam int N_TASKS  = 300;
  localparam int ADD_EDGES = 4;
  localparam int MUL_EDGES = ssa_pkg::SSA_LATENCY + 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_task = 1'b0, cpu_req, cpu_ack = 1'b0, wr_en = 1'b0, cpu_ready;
  logic [15:0] addr = '0;
  logic [31:0] wdata = '0;
  logic [63:0] acc_out;
  logic acc_valid;
  logic [TAG_W-1:0] acc_tag;
  fp_flags_t acc_flags;
  logic [2:0] active;

  int checks = 0, failures = 0;
  int n_stall = 0, max_active = 0, n_release = 0, n_results = 0;
  int n_bursts = 0, n_add = 0, n_mul = 0, n_ovf = 0, n_unf = 0, n_nan = 0;
  int cycle = 0;
  logic [63:0] expect_v [256];
  fp_flags_t   expect_f [256];
  bit          outstanding [256];
  int          last_result_cycle = 0;

  fpga_accelerator dut (
    .clk, .rst_n, .cpu_task_i(cpu_task), .cpu_req_o(cpu_req), .cpu_ack_i(cpu_ack),
    .wr_en_i(wr_en), .addr_i(addr), .wdata_i(wdata), .cpu_ready_o(cpu_ready),
    .accel_out_o(acc_out), .accel_valid_o(acc_valid), .accel_tag_o(acc_tag),
    .accel_flags_o(acc_flags), .active_pes_o(active));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (int'(active) > max_active) max_active = int'(active);
      if (acc_valid) begin
        checks++;
        n_results++;
        last_result_cycle = cycle;
        if (!outstanding[acc_tag] || acc_out !== expect_v[acc_tag] ||
            acc_flags !== expect_f[acc_tag]) begin
          failures++;
          $display("FAIL tag %0d: %h flags %b, expected %h flags %b", acc_tag,
                   acc_out, acc_flags, expect_v[acc_tag], expect_f[acc_tag]);
        end
        outstanding[acc_tag] = 0;
      end
    end
  end

  function automatic logic [63:0] ftz(input logic [63:0] x);
    return (x[62:52] == '0) ? {x[63], 63'd0} : x;
  endfunction

  // reference result and flags under round-to-nearest-even and flush-to-zero
  task automatic reference(input logic op, input logic [63:0] x, input logic [63:0] y,
                           output logic [63:0] r, output fp_flags_t f);
    logic finite_in, nonzero_in;
    r = op ? $realtobits($bitstoreal(ftz(x)) * $bitstoreal(ftz(y)))
           : $realtobits($bitstoreal(ftz(x)) + $bitstoreal(ftz(y)));
    finite_in  = (x[62:52] != '1) && (y[62:52] != '1);
    nonzero_in = op ? (x[62:52] != '0 && y[62:52] != '0) : 1'b1;
    f.invalid   = (r[62:52] == '1) && (r[51:0] != '0);
    f.overflow  = finite_in && r[62:52] == '1;
    f.underflow = finite_in && nonzero_in && r[62:52] == '0 && (op || r[51:0] != '0);
    if (f.underflow) r = {r[63], 63'd0};
    if (f.invalid) r = QNAN;
  endtask

  task automatic write(input logic [15:0] a, input logic [31:0] d);
    wr_en = 1'b1; addr = a; wdata = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic engage();
    cpu_task = 1'b1;
    while (!cpu_req) @(negedge clk);
    cpu_ack = 1'b1;
    @(negedge clk);
  endtask

  // returns the cycle at which the command write is sampled
  task automatic send(input logic op, input logic [63:0] x, input logic [63:0] y,
                      input logic [7:0] tag, output int t_cmd);
    logic [63:0] r;
    fp_flags_t f;
    while (outstanding[tag]) @(negedge clk);
    reference(op, x, y, r, f);
    write(16'h0000, x[31:0]);
    write(16'h0004, x[63:32]);
    write(16'h0008, y[31:0]);
    write(16'h000C, y[63:32]);
    if (!cpu_ready) n_stall++;
    while (!cpu_ready) @(negedge clk);
    expect_v[tag] = r;
    expect_f[tag] = f;
    outstanding[tag] = 1;
    t_cmd = cycle + 1;
    write(16'h0010, {16'd0, tag, 7'd0, op});
    if (op) n_mul++; else n_add++;
    n_ovf += int'(f.overflow);
    n_unf += int'(f.underflow);
    n_nan += int'(f.invalid);
  endtask

  // burst of multiplies on the operands already written: commands only, so
  // the CPU outruns the PEs and has to wait for cpu_ready
  task automatic burst(input logic [63:0] x, input logic [63:0] y, input int base_tag);
    logic [63:0] r;
    fp_flags_t f;
    reference(1'b1, x, y, r, f);
    for (int k = 0; k < 6; k++) begin
      while (outstanding[base_tag + k]) @(negedge clk);
      if (!cpu_ready) n_stall++;
      while (!cpu_ready) @(negedge clk);
      expect_v[base_tag + k] = r;
      expect_f[base_tag + k] = f;
      outstanding[base_tag + k] = 1;
      write(16'h0010, {16'd0, 8'(base_tag + k), 7'd0, 1'b1});
      n_mul++;
      n_bursts++;
    end
  endtask

  function automatic logic [63:0] rnd(input int emin, input int emax);
    logic [10:0] e;
    e = 11'(emin + int'($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 20'($urandom), $urandom};
  endfunction

  task automatic timed(input logic op, input logic [63:0] x, input logic [63:0] y,
                       input logic [7:0] tag, input int edges);
    int t0;
    send(op, x, y, tag, t0);
    while (outstanding[tag]) @(negedge clk);
    checks++;
    if (last_result_cycle - t0 != edges) begin
      failures++;
      $display("FAIL %s took %0d edges, expected %0d", op ? "multiply" : "add",
               last_result_cycle - t0, edges);
    end
  endtask

  initial begin
    int t0;
    logic [63:0] x, y;
    int unsigned kind;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    engage();
    timed(1'b0, $realtobits(1.25), $realtobits(-3.5), 8'd250, ADD_EDGES);
    timed(1'b1, $realtobits(1.25), $realtobits(-3.5), 8'd251, MUL_EDGES);
    for (int t = 0; t < N_TASKS; t++) begin
      kind = $urandom % 10;
      case (kind)
        0: begin x = rnd(1900, 2046); y = rnd(1900, 2046); end       // overflow
        1: begin x = rnd(1, 100); y = rnd(1, 900); end               // underflow
        2: begin x = 64'h7FF0_0000_0000_0000; y = {1'($urandom), 63'd0}; end // inf*0
        default: begin x = rnd(800, 1250); y = rnd(800, 1250); end
      endcase
      if (kind == 2 || kind == 1) send(1'b1, x, y, 8'(t % 200), t0);
      else send(1'($urandom), x, y, 8'(t % 200), t0);
      if (t % 25 == 24) begin
        x = rnd(900, 1100);
        y = rnd(900, 1100);
        send(1'b1, x, y, 8'(200 + t % 2), t0);
        burst(x, y, 210 + 6 * ((t / 25) % 4));
      end
      if (t % 100 == 99) begin
        cpu_ack = 1'b0;
        cpu_task = 1'b0;
        repeat (3) @(negedge clk);
        n_release++;
        engage();
      end
    end
    repeat (100) @(negedge clk);
    foreach (outstanding[i]) begin
      checks++;
      if (outstanding[i]) begin
        failures++;
        $display("FAIL tag %0d never returned", i);
      end
    end
    $display("results=%0d adds=%0d muls=%0d stalls=%0d max_active=%0d releases=%0d ovf=%0d unf=%0d nan=%0d",
             n_results, n_add, n_mul, n_stall, max_active, n_release, n_ovf, n_unf, n_nan);
    checks++;
    if (n_results != N_TASKS + 2 + n_bursts + N_TASKS / 25 || n_stall == 0 || max_active != 4 || n_release == 0 ||
        n_add == 0 || n_mul == 0 || n_ovf == 0 || n_unf == 0 || n_nan == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
