// tb_arch_regfile: self-checking test of the architectural register file.
//
// Checks that every register reads zero after reset, then applies random
// writes on both ports (including both ports to the same register, where the
// second port, the younger instruction, must win) and compares all four read
// ports against a copy kept in the testbench.
module tb_arch_regfile;
  import rr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] wr_valid;
  areg_t [1:0] wr_addr;
  data_t [1:0] wr_data;
  areg_t [3:0] rd_addr;
  data_t [3:0] rd_data;
  int checks = 0, failures = 0, n_same = 0;
  data_t m[NUM_AREG];

  arch_regfile dut (.*);
  always #5 clk = ~clk;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    foreach (m[i]) m[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int r = 0; r < NUM_AREG; r += 4) begin
      for (int p = 0; p < 4; p++) rd_addr[p] = areg_t'(r + p);
      #1;
      for (int p = 0; p < 4; p++) check("reset value", rd_data[p] == '0);
    end
    for (int c = 0; c < 5000; c++) begin
      for (int k = 0; k < 2; k++) begin
        wr_valid[k] = ($urandom_range(0, 99) < 60);
        wr_addr[k]  = areg_t'($urandom_range(0, NUM_AREG - 1));
        wr_data[k]  = $urandom();
      end
      if ($urandom_range(0, 9) == 0) begin wr_addr[1] = wr_addr[0]; wr_valid = 2'b11; n_same++; end
      for (int p = 0; p < 4; p++) rd_addr[p] = areg_t'($urandom_range(0, NUM_AREG - 1));
      #1;
      for (int p = 0; p < 4; p++) check("read", rd_data[p] == m[rd_addr[p]]);
      @(posedge clk);
      for (int k = 0; k < 2; k++) if (wr_valid[k]) m[wr_addr[k]] = wr_data[k];
      #1;
    end
    check("same-register writes seen", n_same > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
