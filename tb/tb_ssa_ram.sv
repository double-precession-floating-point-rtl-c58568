// tb_ssa_ram: checks whole-vector writes, single-word writes, the priority
// of a word write over a vector write in the same cycle, the asynchronous
// read port and the contents output, against a shadow copy.
module tb_ssa_ram;
  import ssa_pkg::*;

  logic clk = 1'b0, we_all = 1'b0, we = 1'b0;
  logic [LOG_N-1:0] waddr = '0, raddr = '0;
  res_t wdata = '0, rdata;
  res_t wall [N_PTS], mem [N_PTS], shadow [N_PTS];
  int checks = 0, failures = 0;

  ssa_ram dut (.clk, .we_all_i(we_all), .wdata_all_i(wall), .we_i(we),
               .waddr_i(waddr), .wdata_i(wdata), .raddr_i(raddr),
               .rdata_o(rdata), .mem_o(mem));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < N_PTS; i++) begin
      raddr = LOG_N'(i);
      #1;
      checks += 2;
      if (rdata != shadow[i]) begin
        failures++;
        $display("FAIL read[%0d] %h expected %h", i, rdata, shadow[i]);
      end
      if (mem[i] != shadow[i]) begin
        failures++;
        $display("FAIL contents[%0d] %h expected %h", i, mem[i], shadow[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N_PTS; i++) wall[i] = '0;
    @(negedge clk);
    we_all = 1'b1;
    @(negedge clk);
    we_all = 1'b0;
    for (int i = 0; i < N_PTS; i++) shadow[i] = '0;
    compare();
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we_all = 1'($urandom);
      we     = 1'($urandom);
      waddr  = LOG_N'($urandom);
      wdata  = res_t'({1'($urandom), $urandom});
      for (int i = 0; i < N_PTS; i++) wall[i] = res_t'({1'($urandom), $urandom});
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      else if (we_all) shadow = wall;
      @(negedge clk);
      we = 1'b0;
      we_all = 1'b0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
