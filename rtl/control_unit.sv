// control_unit: the accelerator's control unit (CU). It takes arithmetic
// work over from the host CPU and spreads it across NUM_PE processing
// elements (PEs), returning each result to the CPU as soon as it is ready.
//
// CPU side. While the CPU signals pending arithmetic work (cpu_task_i) the CU
// requests it (cpu_req_o). Once the CPU acknowledges (cpu_ack_i, held high
// for as long as it hands work over) the CU accepts 32-bit register writes
// (wr_en_i, addr_i, wdata_i). Register map, byte offsets from ADDR_BASE:
//   0x00 / 0x04  operand A, low / high word
//   0x08 / 0x0C  operand B, low / high word
//   0x10         command: bit 0 = operation (0 add, 1 multiply),
//                bits 15:8 = tag returned with the result; writing it
//                launches the task with the current A and B
// cpu_ready_o is high when a command may be written; a command written while
// it is low is a protocol error (asserted). Each result leaves on
// accel_out_o with accel_valid_o for one cycle, with its tag and flags.
// Dropping cpu_ack_i ends the hand-over; tasks in flight still complete.
//
// PE side. The CU picks the lowest-numbered free PE, raises pe_req_o[i] and
// waits for pe_ready_i[i]; it does this ahead of time, so that a command
// the CPU writes is sent in the next cycle on the shared pe_op_o bus with a
// one-cycle pe_op_valid_o[i]. Every further
// task that arrives while earlier ones run is given to one more PE, up to
// NUM_PE (active_pes_o counts them). Results are collected one per cycle,
// round robin, by acknowledging pe_res_valid_i[i] with pe_res_ack_o[i].
// The request/acknowledge exchanges with CPU and PEs follow the source paper;
// the register map, the tag, the allocation order and requesting a PE
// before a command is there are this design's.
module control_unit
  import fp64_pkg::*;
#(
  parameter int unsigned NUM_PE    = 4,
  parameter logic [15:0] ADDR_BASE = 16'h0000
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // CPU
  input  logic                        cpu_task_i,
  output logic                        cpu_req_o,
  input  logic                        cpu_ack_i,
  input  logic                        wr_en_i,
  input  logic [15:0]                 addr_i,
  input  logic [31:0]                 wdata_i,
  output logic                        cpu_ready_o,
  output logic [63:0]                 accel_out_o,
  output logic                        accel_valid_o,
  output logic [TAG_W-1:0]            accel_tag_o,
  output fp_flags_t                   accel_flags_o,
  output logic [$clog2(NUM_PE+1)-1:0] active_pes_o,
  // PEs
  output logic [NUM_PE-1:0]           pe_req_o,
  input  logic [NUM_PE-1:0]           pe_ready_i,
  output logic [NUM_PE-1:0]           pe_op_valid_o,
  output pe_op_t                      pe_op_o,
  input  logic [NUM_PE-1:0]           pe_res_valid_i,
  input  pe_res_t                     pe_res_i [NUM_PE],
  output logic [NUM_PE-1:0]           pe_res_ack_o
);
  localparam int unsigned PE_IDX_W = (NUM_PE > 1) ? $clog2(NUM_PE) : 1;

  localparam logic [4:0] REG_A_LO = 5'h00, REG_A_HI = 5'h04,
                         REG_B_LO = 5'h08, REG_B_HI = 5'h0C, REG_CMD = 5'h10;

  // ---- hand-over from the CPU ---------------------------------------------
  typedef enum logic {C_SEARCH, C_DIVERT} cpu_state_t;
  cpu_state_t cpu_state;

  logic [63:0] opa_q, opb_q;
  logic        cmd_pending;
  pe_op_t      cmd_q;
  logic        hit, cmd_wr;

  assign hit    = wr_en_i && cpu_state == C_DIVERT && (addr_i & ~16'h001F) == ADDR_BASE;
  assign cmd_wr = hit && addr_i[4:0] == REG_CMD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpu_state <= C_SEARCH;
      cpu_req_o <= 1'b0;
      opa_q     <= '0;
      opb_q     <= '0;
    end else begin
      unique case (cpu_state)
        C_SEARCH: begin
          cpu_req_o <= cpu_task_i && !cpu_ack_i;
          if (cpu_req_o && cpu_ack_i) begin
            cpu_req_o <= 1'b0;
            cpu_state <= C_DIVERT;
          end
        end
        C_DIVERT: if (!cpu_ack_i) cpu_state <= C_SEARCH;
        default:  cpu_state <= C_SEARCH;
      endcase
      if (hit) begin
        unique case (addr_i[4:0])
          REG_A_LO: opa_q[31:0]  <= wdata_i;
          REG_A_HI: opa_q[63:32] <= wdata_i;
          REG_B_LO: opb_q[31:0]  <= wdata_i;
          REG_B_HI: opb_q[63:32] <= wdata_i;
          default: ;
        endcase
      end
    end
  end

  assign cpu_ready_o = (cpu_state == C_DIVERT) && !cmd_pending;

  // ---- dispatch to a free PE ----------------------------------------------
  // The CU requests the next free PE ahead of time: once that PE answers
  // ready it waits, armed, and a command written by the CPU is sent to it in
  // the very next cycle.
  typedef enum logic [1:0] {D_IDLE, D_REQ, D_ARMED} disp_state_t;
  disp_state_t         disp_state;
  logic [NUM_PE-1:0]   alloc;        // PE holds a task (sent, result not yet taken)
  logic [PE_IDX_W-1:0] sel, free_idx;
  logic                free_any, send;

  always_comb begin
    free_any = 1'b0;
    free_idx = '0;
    for (int i = NUM_PE - 1; i >= 0; i--)
      if (!alloc[i]) begin
        free_any = 1'b1;
        free_idx = PE_IDX_W'(i);
      end
  end

  assign send = (disp_state == D_ARMED) && cmd_pending;

  // ---- result collection, round robin -------------------------------------
  logic [PE_IDX_W-1:0] rr_ptr, take_idx;
  logic                take_any;

  always_comb begin
    int unsigned k;
    take_any = 1'b0;
    take_idx = '0;
    for (int j = NUM_PE - 1; j >= 0; j--) begin
      k = (int'(rr_ptr) + j) % NUM_PE;
      if (pe_res_valid_i[k]) begin
        take_any = 1'b1;
        take_idx = PE_IDX_W'(k);
      end
    end
    pe_res_ack_o = '0;
    if (take_any) pe_res_ack_o[take_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disp_state    <= D_IDLE;
      sel           <= '0;
      alloc         <= '0;
      cmd_pending   <= 1'b0;
      cmd_q         <= '0;
      rr_ptr        <= '0;
      accel_valid_o <= 1'b0;
      accel_out_o   <= '0;
      accel_tag_o   <= '0;
      accel_flags_o <= '0;
    end else begin
      if (cmd_wr && !cmd_pending) begin
        cmd_pending <= 1'b1;
        cmd_q       <= '{op: op_e'(wdata_i[0]), tag: wdata_i[15:8], a: opa_q, b: opb_q};
      end
      unique case (disp_state)
        D_IDLE:  if (free_any) begin
                   sel        <= free_idx;
                   disp_state <= D_REQ;
                 end
        D_REQ:   if (pe_ready_i[sel]) disp_state <= D_ARMED;
        D_ARMED: if (send) begin
                   cmd_pending <= 1'b0;
                   disp_state  <= D_IDLE;
                 end
        default: disp_state <= D_IDLE;
      endcase

      accel_valid_o <= take_any;
      if (take_any) begin
        accel_out_o   <= pe_res_i[take_idx].value;
        accel_tag_o   <= pe_res_i[take_idx].tag;
        accel_flags_o <= pe_res_i[take_idx].flags;
        rr_ptr        <= (take_idx == PE_IDX_W'(NUM_PE - 1)) ? '0 : take_idx + 1'b1;
      end

      for (int i = 0; i < NUM_PE; i++) begin
        if (send && sel == PE_IDX_W'(i)) alloc[i] <= 1'b1;
        else if (pe_res_ack_o[i])                        alloc[i] <= 1'b0;
      end
    end
  end

  always_comb begin
    pe_req_o      = '0;
    pe_op_valid_o = '0;
    if (disp_state == D_REQ)  pe_req_o[sel]      = 1'b1;
    if (send)                 pe_op_valid_o[sel] = 1'b1;
  end
  assign pe_op_o = cmd_q;

  always_comb begin
    active_pes_o = '0;
    for (int i = 0; i < NUM_PE; i++)
      active_pes_o = active_pes_o + ($clog2(NUM_PE+1))'(alloc[i]);
  end

  // the CPU writes a command only when the CU can take it
  a_cmd_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_wr |-> !cmd_pending);
endmodule
