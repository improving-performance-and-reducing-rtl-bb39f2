// tb_bypass_net: self-checking test of the two-level result bypass.
//
// Random result broadcasts (tags from a small set, so that matches are
// frequent) and random operands are applied. The testbench remembers the
// broadcasts of the last two cycles and works out, for every operand, which
// value must come out: the level-1 result if the tag matches a broadcast of
// the previous cycle, else the level-2 result if it matches one of the cycle
// before, else the register-file value; operands from the architectural file
// always pass through. Output values and hit flags are compared every cycle.
module tb_bypass_net;
  import rr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] wb_valid;
  preg_t [1:0] wb_preg;
  data_t [1:0] wb_data;
  logic [1:0][1:0] src_use;
  preg_t [1:0][1:0] src_preg;
  data_t [1:0][1:0] src_rf;
  data_t [1:0][1:0] src_out;
  logic [1:0][1:0] hit_l1, hit_l2;
  int checks = 0, failures = 0, n1 = 0, n2 = 0;

  bypass_net dut (.*);
  always #5 clk = ~clk;

  bit [1:0] h1v, h2v; preg_t [1:0] h1p, h2p; data_t [1:0] h1d, h2d;

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
    wb_valid = 0; wb_preg = '0; wb_data = '0; src_use = '0; src_preg = '0; src_rf = '0;
    h1v = 0; h2v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int c = 0; c < 20000; c++) begin
      for (int k = 0; k < 2; k++) begin
        wb_valid[k] = ($urandom_range(0, 99) < 60);
        wb_preg[k]  = preg_t'($urandom_range(0, 7));
        wb_data[k]  = $urandom();
      end
      if (wb_preg[0] == wb_preg[1]) wb_valid[1] = 0;  // a register is written once
      for (int l = 0; l < 2; l++) for (int s = 0; s < 2; s++) begin
        src_use[l][s]  = ($urandom_range(0, 9) != 0);
        src_preg[l][s] = preg_t'($urandom_range(0, 7));
        src_rf[l][s]   = $urandom();
      end
      #1;
      for (int l = 0; l < 2; l++) for (int s = 0; s < 2; s++) begin
        data_t e; bit e1, e2;
        e = src_rf[l][s]; e1 = 0; e2 = 0;
        if (src_use[l][s]) begin
          for (int k = 0; k < 2; k++) if (h2v[k] && h2p[k] == src_preg[l][s]) begin e = h2d[k]; e2 = 1; end
          for (int k = 0; k < 2; k++) if (h1v[k] && h1p[k] == src_preg[l][s]) begin e = h1d[k]; e1 = 1; e2 = 0; end
        end
        check("src_out", src_out[l][s] == e);
        check("hit_l1", hit_l1[l][s] == e1);
        check("hit_l2", hit_l2[l][s] == e2);
        n1 += int'(e1); n2 += int'(e2);
      end
      @(posedge clk);
      h2v = h1v; h2p = h1p; h2d = h1d;
      h1v = wb_valid; h1p = wb_preg; h1d = wb_data;
      #1;
    end
    check("level-1 hits seen", n1 > 0);
    check("level-2 hits seen", n2 > 0);
    $display("level1=%0d level2=%0d", n1, n2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
