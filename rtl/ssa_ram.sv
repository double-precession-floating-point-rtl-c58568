// ssa_ram: small register-file RAM that holds one transform vector of the
// SSA multiplier (N_PTS residues).
//
// Two ways to write, one clock edge each: the whole vector at once (we_all_i,
// used when a transform result is stored) or one word at a time (we_i at
// waddr_i, used for the pointwise products that the counter sequences).
// Word-write has priority. One asynchronous read port (raddr_i -> rdata_o)
// serves the counter-addressed pointwise stage, and the whole contents are
// visible on mem_o for the next transform. No reset: contents are always
// written before they are read. The source paper only names a RAM between the
// FFT and the modular stage; its organisation is this design's choice.
module ssa_ram
  import ssa_pkg::*;
(
  input  logic               clk,
  input  logic               we_all_i,
  input  res_t               wdata_all_i [N_PTS],
  input  logic               we_i,
  input  logic [LOG_N-1:0]   waddr_i,
  input  res_t               wdata_i,
  input  logic [LOG_N-1:0]   raddr_i,
  output res_t               rdata_o,
  output res_t               mem_o [N_PTS]
);
  res_t mem [N_PTS];

  always_ff @(posedge clk) begin
    if (we_i)          mem[waddr_i] <= wdata_i;
    else if (we_all_i) mem <= wdata_all_i;
  end

  assign rdata_o = mem[raddr_i];
  assign mem_o   = mem;
endmodule
