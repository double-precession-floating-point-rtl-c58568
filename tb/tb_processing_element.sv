// tb_processing_element: plays the control unit towards one PE. For each
// task it raises req, waits for ready, sends the operation with a one-cycle
// op_valid, waits for the result and acknowledges it after a random delay.
// Results are compared with the simulator's IEEE double add / multiply; the
// clock edges after the accepting edge until the result shows are checked (2 for an add,
// 14 for a multiply), as are ready staying low while busy and the result
// being held until acknowledged.
module tb_processing_element;
  import fp64_pkg::*;

  localparam int ADD_CYC = 2;
  localparam int MUL_CYC = ssa_pkg::SSA_LATENCY + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, ready, op_valid = 1'b0, res_valid, res_ack = 1'b0, busy;
  pe_op_t op;
  pe_res_t res;
  int checks = 0, failures = 0, n_add = 0, n_mul = 0;

  processing_element dut (.clk, .rst_n, .req_i(req), .ready_o(ready),
    .op_valid_i(op_valid), .op_i(op), .res_valid_o(res_valid), .res_o(res),
    .res_ack_i(res_ack), .busy_o(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd();
    logic [10:0] e;
    e = 11'(700 + $urandom % 600);
    return {1'($urandom), e, 20'($urandom), $urandom};
  endfunction

  task automatic run(input op_e kind, input logic [63:0] x, input logic [63:0] y,
                     input logic [7:0] tag);
    logic [63:0] r;
    int cyc, hold;
    r = (kind == OP_ADD) ? $realtobits($bitstoreal(x) + $bitstoreal(y))
                         : $realtobits($bitstoreal(x) * $bitstoreal(y));
    @(negedge clk);
    req = 1'b1;
    while (!ready) @(negedge clk);
    req = 1'b0;
    op = '{op: kind, tag: tag, a: x, b: y};
    op_valid = 1'b1;
    @(negedge clk);
    op_valid = 1'b0;
    op = '0;
    cyc = 0;
    while (!res_valid) begin
      checks++;
      if (ready || !busy) begin
        failures++;
        $display("FAIL ready/busy while computing");
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != (kind == OP_ADD ? ADD_CYC : MUL_CYC)) begin
      failures++;
      $display("FAIL latency %0d for op %s", cyc, kind.name());
    end
    hold = $urandom % 4;
    repeat (hold) begin
      @(negedge clk);
      checks++;
      if (!res_valid) begin
        failures++;
        $display("FAIL result dropped before acknowledge");
      end
    end
    checks++;
    if (res.value !== r || res.tag !== tag || res.flags !== '0) begin
      failures++;
      $display("FAIL %s %h %h -> %h tag %h, expected %h tag %h", kind.name(), x, y,
               res.value, res.tag, r, tag);
    end
    res_ack = 1'b1;
    @(negedge clk);
    res_ack = 1'b0;
    checks++;
    if (res_valid || busy) begin
      failures++;
      $display("FAIL result not released");
    end
    if (kind == OP_ADD) n_add++; else n_mul++;
  endtask

  initial begin
    op = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(OP_ADD, $realtobits(1.5), $realtobits(2.25), 8'h01);
    run(OP_MUL, $realtobits(1.5), $realtobits(2.25), 8'h02);
    for (int i = 0; i < 300; i++)
      run(op_e'($urandom % 2), rnd(), rnd(), 8'(i));
    checks++;
    if (n_add == 0 || n_mul == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
