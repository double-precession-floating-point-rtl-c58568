// tb_pe_model: behavioural stand-in for a processing element, used to test
// the control unit on its own. It follows the PE handshake (req -> ready ->
// op_valid, result held until acknowledged) and returns, after a random
// delay of 10 to 39 cycles, a value that is easy to predict: a + b as 64-bit
// integers for an add, a ^ b for a multiply. It flags protocol errors.
module tb_pe_model
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
  output int      errors_o
);
  typedef enum logic [1:0] {S_IDLE, S_GRANT, S_EXEC, S_RESULT} state_t;
  state_t state = S_IDLE;
  int wait_cnt = 0;

  initial errors_o = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
    end else begin
      if (op_valid_i && state != S_GRANT) errors_o <= errors_o + 1;
      if (res_ack_i && state != S_RESULT) errors_o <= errors_o + 1;
      case (state)
        S_IDLE:   if (req_i) state <= S_GRANT;
        S_GRANT:  if (op_valid_i) begin
                    res_o.tag   <= op_i.tag;
                    res_o.value <= (op_i.op == OP_ADD) ? op_i.a + op_i.b : op_i.a ^ op_i.b;
                    res_o.flags <= '0;
                    wait_cnt    <= 10 + int'($urandom % 30);
                    state       <= S_EXEC;
                  end
        S_EXEC:   begin
                    wait_cnt <= wait_cnt - 1;
                    if (wait_cnt == 1) state <= S_RESULT;
                  end
        S_RESULT: if (res_ack_i) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign ready_o     = (state == S_GRANT);
  assign res_valid_o = (state == S_RESULT);
endmodule
