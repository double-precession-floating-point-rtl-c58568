// processing_element: one processing element (PE) of the accelerator. It
// holds a double precision adder and a double precision multiplier whose
// significand product is computed by the Schonhage-Strassen multiplier, and
// carries out one add or multiply at a time for the control unit (CU).
//
// Handshake with the CU, in the order the source paper gives it:
//   1. the CU raises req_i;
//   2. an idle PE answers with ready_o (registered, held);
//   3. the CU sends the whole operation with a one-cycle op_valid_i pulse;
//   4. the PE runs it on the adder (2 cycles) or the multiplier (13 cycles);
//   5. it raises res_valid_o with res_o and holds them until res_ack_i.
// busy_o is high from the accepted operation until the result is taken.
// The req/ready order follows the source paper; the result handshake, the
// single operation in flight and the registered ready are this design's.
module processing_element
  import fp64_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_i,
  output logic    ready_o,
  input  logic    op_valid_i,
  input  pe_op_t  op_i,
  output logic    res_valid_o,
  output pe_res_t res_o,
  input  logic    res_ack_i,
  output logic    busy_o
);
  typedef enum logic [1:0] {S_IDLE, S_GRANT, S_EXEC, S_RESULT} state_t;
  state_t state;

  pe_op_t    op_q;
  logic      add_v, add_done, mul_start, mul_busy, mul_done;
  logic [63:0] add_res, mul_res;
  fp_flags_t add_flg, mul_flg;

  wire accept = (state == S_GRANT) && op_valid_i;

  assign add_v     = accept && op_i.op == OP_ADD;
  assign mul_start = accept && op_i.op == OP_MUL;

  dpfp_adder u_add (
    .clk, .rst_n, .valid_i(add_v), .a_i(op_i.a), .b_i(op_i.b),
    .valid_o(add_done), .result_o(add_res), .flags_o(add_flg));

  dpfp_multiplier u_mul (
    .clk, .rst_n, .start_i(mul_start), .a_i(op_i.a), .b_i(op_i.b),
    .busy_o(mul_busy), .done_o(mul_done), .result_o(mul_res), .flags_o(mul_flg));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= '0;
      res_o <= '0;
    end else begin
      unique case (state)
        S_IDLE:   if (req_i) state <= S_GRANT;
        S_GRANT:  if (op_valid_i) begin
                    op_q  <= op_i;
                    state <= S_EXEC;
                  end
        S_EXEC:   if (op_q.op == OP_ADD ? add_done : mul_done) begin
                    res_o.tag   <= op_q.tag;
                    res_o.value <= (op_q.op == OP_ADD) ? add_res : mul_res;
                    res_o.flags <= (op_q.op == OP_ADD) ? add_flg : mul_flg;
                    state       <= S_RESULT;
                  end
        S_RESULT: if (res_ack_i) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign ready_o     = (state == S_GRANT);
  assign res_valid_o = (state == S_RESULT);
  assign busy_o      = (state == S_EXEC) || (state == S_RESULT);

  // the CU may only send an operation to a PE that has said it is ready
  a_op_after_ready: assert property (@(posedge clk) disable iff (!rst_n)
    op_valid_i |-> state == S_GRANT);
  // a result is only acknowledged while it is offered
  a_ack_with_result: assert property (@(posedge clk) disable iff (!rst_n)
    res_ack_i |-> state == S_RESULT);

  logic unused;
  assign unused = ^{mul_busy, op_q.a, op_q.b};
endmodule
