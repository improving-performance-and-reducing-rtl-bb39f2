// tb_rf_freelist: self-checking test of rename-register allocation and the
// upper-segment occupancy bits.
//
// The testbench keeps a taken bit per register and applies random
// allocations (0..2 per cycle) and releases of taken registers, in phases with
// and without `grow`. Every cycle it checks that the offered registers are the
// lowest free ones inside the enabled range, the availability flags, the
// count, the upper-segment taken bits and their OR (segment empty).
module tb_rf_freelist;
  import rr_pkg::*;
  localparam int SZ = 64, BS = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic grow;
  logic [1:0] alloc_avail;
  preg_t [1:0] alloc_preg;
  logic [1:0] alloc_n;
  logic [1:0] rel_valid;
  preg_t [1:0] rel_preg;
  logic [31:0] upper_taken;
  logic upper_empty;
  logic [6:0] count;
  int checks = 0, failures = 0;
  bit m_taken[SZ];
  int max_grow = 0, n_empty_after_grow = 0;

  rf_freelist dut (.*);
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
    grow = 0; alloc_n = 0; rel_valid = 0; rel_preg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int c = 0; c < 20000; c++) begin
      int fr[$];
      int taken[$];
      int cnt, ucnt, na;
      logic [31:0] ut;
      fr.delete(); taken.delete();
      grow = ((c / 800) % 2) == 1;
      cnt = 0; ucnt = 0; ut = '0;
      for (int i = 0; i < SZ; i++) begin
        if (m_taken[i]) begin
          cnt++;
          taken.push_back(i);
          if (i >= BS) begin ucnt++; ut[i-BS] = 1; end
        end else if (grow || i < BS) fr.push_back(i);
      end
      #1;
      for (int k = 0; k < 2; k++) begin
        check("alloc_avail", alloc_avail[k] == (fr.size() > k));
        if (fr.size() > k) check("alloc_preg", int'(alloc_preg[k]) == fr[k]);
      end
      check("count", int'(count) == cnt);
      check("upper_taken", upper_taken == ut);
      check("upper_empty", upper_empty == (ucnt == 0));
      if (grow && cnt > max_grow) max_grow = cnt;
      if (!grow && ucnt == 0 && (c % 800) > 0) n_empty_after_grow++;
      // stimulus: allocation outpaces release while growing
      na = ($urandom_range(0, 99) < (grow ? 80 : 50)) ? $urandom_range(1, 2) : 0;
      if (na > fr.size()) na = fr.size();
      alloc_n = 2'(na);
      rel_valid = '0;
      taken.shuffle();
      for (int k = 0; k < 2; k++)
        if (taken.size() > k && $urandom_range(0, 99) < (grow ? 30 : 60)) begin
          rel_valid[k] = 1;
          rel_preg[k]  = preg_t'(taken[k]);
        end
      @(posedge clk);
      for (int k = 0; k < 2; k++) if (rel_valid[k]) m_taken[rel_preg[k]] = 0;
      for (int k = 0; k < na; k++) m_taken[fr[k]] = 1;
      #1;
    end
    check("upper segment filled while growing", max_grow > BS);
    check("upper segment emptied afterwards", n_empty_after_grow > 0);
    $display("max taken %0d", max_grow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
