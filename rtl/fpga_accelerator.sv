// fpga_accelerator: top level of the double precision arithmetic
// accelerator. A control unit (CU) takes add and multiply tasks over from a
// host CPU through a 16-bit address / 32-bit write-data port and farms them
// out to NUM_PE processing elements (PEs), each with a double precision
// adder and a double precision multiplier built on a Schonhage-Strassen
// significand multiplier. Results come back on the 64-bit accel_out port.
//
// Interface and timing are those of control_unit: the CPU sees cpu_req_o
// while it reports work (cpu_task_i), holds cpu_ack_i while handing work
// over, writes A, B and a command per task, and receives each result with a
// one-cycle accel_valid_o pulse carrying the task's tag. With a PE free, an
// add's result appears 4 clock edges after the edge that takes the command
// write, a multiply's 16 (dispatch, unit latency, collection); with NUM_PE
// elements up to NUM_PE tasks run at once. The CU/PE split, the port widths and the SSA multiplier
// follow the source paper; NUM_PE = 4 is this design's choice (the source paper
// bounds it only by the device's I/O).
module fpga_accelerator
  import fp64_pkg::*;
#(
  parameter int unsigned NUM_PE    = 4,
  parameter logic [15:0] ADDR_BASE = 16'h0000
) (
  input  logic                        clk,
  input  logic                        rst_n,
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
  output logic [$clog2(NUM_PE+1)-1:0] active_pes_o
);
  logic [NUM_PE-1:0] pe_req, pe_ready, pe_op_valid, pe_res_valid, pe_res_ack, pe_busy;
  pe_op_t            pe_op;
  pe_res_t           pe_res [NUM_PE];

  control_unit #(.NUM_PE(NUM_PE), .ADDR_BASE(ADDR_BASE)) u_cu (
    .clk, .rst_n,
    .cpu_task_i, .cpu_req_o, .cpu_ack_i, .wr_en_i, .addr_i, .wdata_i,
    .cpu_ready_o, .accel_out_o, .accel_valid_o, .accel_tag_o, .accel_flags_o,
    .active_pes_o,
    .pe_req_o(pe_req), .pe_ready_i(pe_ready), .pe_op_valid_o(pe_op_valid),
    .pe_op_o(pe_op), .pe_res_valid_i(pe_res_valid), .pe_res_i(pe_res),
    .pe_res_ack_o(pe_res_ack));

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    processing_element u_pe (
      .clk, .rst_n,
      .req_i(pe_req[i]), .ready_o(pe_ready[i]),
      .op_valid_i(pe_op_valid[i]), .op_i(pe_op),
      .res_valid_o(pe_res_valid[i]), .res_o(pe_res[i]),
      .res_ack_i(pe_res_ack[i]), .busy_o(pe_busy[i]));
  end

  // per-PE busy flags are for observation only; the CU tracks allocation itself
  logic unused;
  assign unused = ^pe_busy;
endmodule
