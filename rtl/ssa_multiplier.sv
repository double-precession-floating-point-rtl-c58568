// ssa_multiplier: 53 x 53 -> 106-bit unsigned multiplier by the
// Schonhage-Strassen algorithm (SSA), number theoretic transform modulo
// 2^32 + 1 with N = 8 points of 14-bit digits (see ssa_pkg).
//
// Datapath, in the order the source paper draws it: operand registers, digit
// extraction, a mux that feeds either operand's digit vector into one shared
// forward transform (FFT), a RAM that stores the transformed vectors, the
// modular pointwise multiplier ("mod") stepped over the N points by a 3-bit
// counter, the inverse transform (IFFT) and the carry recombination adder.
//
// Sequence after a one-cycle start pulse (operands sampled with it):
//   FFT_X : NTT(digits of x)       -> RAM bank A           1 cycle
//   FFT_Y : NTT(digits of y)       -> RAM bank B           1 cycle
//   MUL   : A[cnt]*B[cnt] mod q    -> RAM bank C[cnt]      N cycles
//   IFFT  : INTT(bank C)           -> RAM bank A           1 cycle
//   REC   : carry recombination    -> product register     1 cycle
// done_o pulses SSA_LATENCY = 12 cycles after the start edge, with prod_o
// valid from then until the next operation completes. busy_o is high from
// the cycle after start until done; start is ignored while busy.
// The block order follows the source paper; the sequencing, the one shared
// forward transform and the latency are this design's choices.
module ssa_multiplier
  import ssa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [OP_W-1:0]   x_i,
  input  logic [OP_W-1:0]   y_i,
  output logic              busy_o,
  output logic              done_o,
  output logic [PROD_W-1:0] prod_o
);
  typedef enum logic [2:0] {S_IDLE, S_FFT_X, S_FFT_Y, S_MUL, S_IFFT, S_REC} state_t;
  state_t state;

  logic [OP_W-1:0]  x_q, y_q;
  logic             load;
  logic [LOG_N-1:0] cnt;
  res_t dig_x [N_PTS], dig_y [N_PTS], fft_in [N_PTS], fft_out [N_PTS];
  res_t ifft_out [N_PTS];
  res_t mem_a [N_PTS], mem_b [N_PTS], mem_c [N_PTS];
  res_t rd_a, rd_b, rd_c, prod_pt;
  logic [PROD_W-1:0] rec_prod;

  // ---- control: state machine and 3-bit point counter --------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      done_o <= 1'b0;
      prod_o <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        S_IDLE:  if (start_i) state <= S_FFT_X;
        S_FFT_X: state <= S_FFT_Y;
        S_FFT_Y: begin
                   cnt   <= '0;
                   state <= S_MUL;
                 end
        S_MUL:   begin
                   cnt <= cnt + 1'b1;
                   if (cnt == LOG_N'(N_PTS - 1)) state <= S_IFFT;
                 end
        S_IFFT:  state <= S_REC;
        S_REC:   begin
                   prod_o <= rec_prod;
                   done_o <= 1'b1;
                   state  <= S_IDLE;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state != S_IDLE);

  // ---- datapath -----------------------------------------------------------
  // operand registers with digit extraction, loaded by the start pulse
  assign load = (state == S_IDLE) && start_i;

  ssa_extract_digit u_ext_x (.clk, .rst_n, .load_i(load), .operand_i(x_i),
                             .operand_o(x_q), .digits_o(dig_x));
  ssa_extract_digit u_ext_y (.clk, .rst_n, .load_i(load), .operand_i(y_i),
                             .operand_o(y_q), .digits_o(dig_y));

  // mux: one forward transform shared by both operands
  always_comb begin
    for (int i = 0; i < N_PTS; i++)
      fft_in[i] = (state == S_FFT_Y) ? dig_y[i] : dig_x[i];
  end

  fermat_ntt #(.INVERSE(1'b0)) u_fft (.x_i(fft_in), .y_o(fft_out));

  res_t wr_a [N_PTS];
  always_comb begin
    for (int i = 0; i < N_PTS; i++)
      wr_a[i] = (state == S_IFFT) ? ifft_out[i] : fft_out[i];
  end

  // bank A: X transform, later reused for the inverse-transform coefficients
  ssa_ram u_ram_a (
    .clk, .we_all_i(state == S_FFT_X || state == S_IFFT),
    .wdata_all_i(wr_a),
    .we_i(1'b0), .waddr_i('0), .wdata_i('0),
    .raddr_i(cnt), .rdata_o(rd_a), .mem_o(mem_a));

  ssa_ram u_ram_b (
    .clk, .we_all_i(state == S_FFT_Y), .wdata_all_i(fft_out),
    .we_i(1'b0), .waddr_i('0), .wdata_i('0),
    .raddr_i(cnt), .rdata_o(rd_b), .mem_o(mem_b));

  fermat_modmul u_mod (.a_i(rd_a), .b_i(rd_b), .p_o(prod_pt));

  ssa_ram u_ram_c (
    .clk, .we_all_i(1'b0), .wdata_all_i(fft_out),
    .we_i(state == S_MUL), .waddr_i(cnt), .wdata_i(prod_pt),
    .raddr_i(cnt), .rdata_o(rd_c), .mem_o(mem_c));

  fermat_ntt #(.INVERSE(1'b1)) u_ifft (.x_i(mem_c), .y_o(ifft_out));

  ssa_recombine u_rec (.coef_i(mem_a), .prod_o(rec_prod));

  // the whole contents of bank B and the read port of bank C are not needed
  logic unused;
  assign unused = ^{rd_c, mem_b[0], x_q, y_q};
endmodule
