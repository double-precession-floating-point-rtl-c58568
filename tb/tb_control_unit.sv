// tb_control_unit: plays the host CPU towards the control unit, with four
// behavioural PEs behind it. Checks the request/acknowledge hand-over
// (cpu_req only while the CPU reports work; writes ignored before the
// acknowledge and outside the address window), that every task comes back
// exactly once with its tag and the value the PE model computes, that the
// CPU is held off (cpu_ready low) while a command waits for a PE, that all
// PEs get used at once, that results of several PEs are all collected, and
// that hand-over can be released and taken again.
module tb_control_unit;
  import fp64_pkg::*;

  localparam int unsigned NUM_PE = 4;
  localparam int N_TASKS = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_task = 1'b0, cpu_req, cpu_ack = 1'b0, wr_en = 1'b0, cpu_ready;
  logic [15:0] addr = '0;
  logic [31:0] wdata = '0;
  logic [63:0] acc_out;
  logic acc_valid;
  logic [TAG_W-1:0] acc_tag;
  fp_flags_t acc_flags;
  logic [$clog2(NUM_PE+1)-1:0] active;
  logic [NUM_PE-1:0] pe_req, pe_ready, pe_op_valid, pe_res_valid, pe_res_ack;
  pe_op_t pe_op;
  pe_res_t pe_res [NUM_PE];
  int pe_err [NUM_PE];

  int checks = 0, failures = 0;
  int n_stall = 0, max_active = 0, n_release = 0, n_results = 0;
  logic [63:0] expect_v [256];
  bit          outstanding [256];

  control_unit dut (
    .clk, .rst_n, .cpu_task_i(cpu_task), .cpu_req_o(cpu_req), .cpu_ack_i(cpu_ack),
    .wr_en_i(wr_en), .addr_i(addr), .wdata_i(wdata), .cpu_ready_o(cpu_ready),
    .accel_out_o(acc_out), .accel_valid_o(acc_valid), .accel_tag_o(acc_tag),
    .accel_flags_o(acc_flags), .active_pes_o(active),
    .pe_req_o(pe_req), .pe_ready_i(pe_ready), .pe_op_valid_o(pe_op_valid),
    .pe_op_o(pe_op), .pe_res_valid_i(pe_res_valid), .pe_res_i(pe_res),
    .pe_res_ack_o(pe_res_ack));

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    tb_pe_model u_pe (.clk, .rst_n, .req_i(pe_req[i]), .ready_o(pe_ready[i]),
      .op_valid_i(pe_op_valid[i]), .op_i(pe_op), .res_valid_o(pe_res_valid[i]),
      .res_o(pe_res[i]), .res_ack_i(pe_res_ack[i]), .errors_o(pe_err[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result monitor
  always @(negedge clk) begin
    if (rst_n) begin
      if (int'(active) > max_active) max_active = int'(active);
      if (acc_valid) begin
        checks++;
        n_results++;
        if (!outstanding[acc_tag] || acc_out !== expect_v[acc_tag]) begin
          failures++;
          $display("FAIL result tag %0d value %h", acc_tag, acc_out);
        end
        outstanding[acc_tag] = 0;
      end
    end
  end

  // called at a falling edge; the write is sampled at the next rising edge
  task automatic write(input logic [15:0] a, input logic [31:0] d);
    wr_en = 1'b1; addr = a; wdata = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic engage();
    @(negedge clk);
    cpu_task = 1'b1;
    while (!cpu_req) @(negedge clk);
    cpu_ack = 1'b1;
    @(negedge clk);
    checks++;
    if (cpu_req) begin
      failures++;
      $display("FAIL request not withdrawn after acknowledge");
    end
  endtask

  task automatic task_out(input int t);
    logic [63:0] a, b;
    logic op;
    logic [7:0] tag;
    a = {$urandom, $urandom};
    b = {$urandom, $urandom};
    op = 1'($urandom);
    tag = 8'(t);
    while (outstanding[tag]) @(negedge clk);
    write(16'h0000, a[31:0]);
    write(16'h0004, a[63:32]);
    write(16'h0008, b[31:0]);
    write(16'h000C, b[63:32]);
    // a write outside the window must not disturb operand A
    if (t % 8 == 0) write(16'h0100, 32'hDEAD_BEEF);
    if (!cpu_ready) n_stall++;
    while (!cpu_ready) @(negedge clk);
    expect_v[tag] = op ? (a ^ b) : (a + b);
    outstanding[tag] = 1;
    write(16'h0010, {16'd0, tag, 7'd0, op});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    checks++;
    if (cpu_req || cpu_ready) begin
      failures++;
      $display("FAIL request or ready without pending work");
    end
    // a command before the hand-over is ignored
    @(negedge clk);
    write(16'h0010, 32'h0000_0701);
    engage();
    for (int t = 0; t < N_TASKS; t++) begin
      task_out(t);
      if (t % 100 == 99) begin
        // release the hand-over, then take it up again
        @(negedge clk);
        cpu_ack = 1'b0;
        cpu_task = 1'b0;
        repeat (3) @(negedge clk);
        checks++;
        if (cpu_ready) begin
          failures++;
          $display("FAIL still ready after release");
        end
        n_release++;
        engage();
      end
    end
    repeat (200) @(negedge clk);
    foreach (outstanding[i]) begin
      checks++;
      if (outstanding[i]) begin
        failures++;
        $display("FAIL tag %0d never returned", i);
      end
    end
    foreach (pe_err[i]) begin
      checks++;
      if (pe_err[i] != 0) begin
        failures++;
        $display("FAIL PE %0d saw %0d protocol errors", i, pe_err[i]);
      end
    end
    checks++;
    if (n_results != N_TASKS || n_stall == 0 || max_active != NUM_PE || n_release == 0) begin
      failures++;
      $display("FAIL results=%0d stalls=%0d max_active=%0d releases=%0d",
               n_results, n_stall, max_active, n_release);
    end
    $display("results=%0d stalls=%0d max_active=%0d releases=%0d",
             n_results, n_stall, max_active, n_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
