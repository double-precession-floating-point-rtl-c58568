// tb_fermat_ntt: checks the forward and inverse transforms against a direct
// O(N^2) evaluation of C_j = sum_i c_i g^(ij) mod (2^32+1), g = 2^8, done with
// wide integer arithmetic, and checks that inverse(forward(x)) == x.
module tb_fermat_ntt;
  import ssa_pkg::*;

  res_t x [N_PTS], fy [N_PTS], iy [N_PTS], rt [N_PTS];
  int checks = 0, failures = 0;

  fermat_ntt #(.INVERSE(1'b0)) u_fwd (.x_i(x), .y_o(fy));
  fermat_ntt #(.INVERSE(1'b1)) u_inv (.x_i(fy), .y_o(rt));
  fermat_ntt #(.INVERSE(1'b1)) u_inv2 (.x_i(x), .y_o(iy));

  localparam logic [127:0] QW = (128'd1 << 32) + 128'd1;

  function automatic logic [127:0] pow2(input int e);
    return 128'd1 << (e % 64);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec();
    logic [127:0] accf, acci, ninv;
    #1;
    ninv = pow2(64 - 3);   // 8^-1 = 2^61 mod q
    for (int j = 0; j < N_PTS; j++) begin
      accf = '0;
      acci = '0;
      for (int i = 0; i < N_PTS; i++) begin
        accf = (accf + (128'(x[i]) * pow2(8 * i * j)) % QW) % QW;
        acci = (acci + (128'(x[i]) * pow2(64 - (8 * i * j) % 64)) % QW) % QW;
      end
      acci = (acci * ninv) % QW;
      checks += 3;
      if (128'(fy[j]) != accf) begin
        failures++;
        $display("FAIL forward[%0d] %h expected %h", j, fy[j], accf);
      end
      if (128'(iy[j]) != acci) begin
        failures++;
        $display("FAIL inverse[%0d] %h expected %h", j, iy[j], acci);
      end
      if (rt[j] != x[j]) begin
        failures++;
        $display("FAIL round trip[%0d] %h expected %h", j, rt[j], x[j]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N_PTS; i++) x[i] = '0;
    check_vec();
    for (int k = 0; k < N_PTS; k++) begin
      for (int i = 0; i < N_PTS; i++) x[i] = (i == k) ? res_t'(1) : '0;
      check_vec();
    end
    for (int i = 0; i < N_PTS; i++) x[i] = Q - 1;   // all -1 = 2^32
    check_vec();
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N_PTS; i++) begin
        x[i] = res_t'({1'($urandom), $urandom});
        if (x[i] >= Q) x[i] = x[i] - Q;
      end
      check_vec();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
