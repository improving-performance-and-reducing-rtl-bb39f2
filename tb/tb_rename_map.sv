// tb_rename_map: self-checking test of register renaming.
//
// The testbench plays front end, free list, execution and retirement: it
// renames random two-instruction groups onto free rename registers, writes
// results back at random, and retires instructions in program order. Its own
// map (newest in-flight producer of each architectural register) and ready
// bits give the expected renamed sources, including a source produced by the
// first instruction of the same group and a map entry that retirement must
// not clear because a younger instruction renamed the register again.
module tb_rename_map;
  import rr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  inst_t [1:0] ren_inst;
  logic [1:0] ren_fire;
  preg_t [1:0] ren_dst;
  src_t [1:0] ren_s1, ren_s2;
  logic [1:0] wb_valid;
  preg_t [1:0] wb_preg;
  logic [1:0] cm_valid;
  rob_entry_t [1:0] cm_entry;
  int checks = 0, failures = 0, n_group_dep = 0, n_keep = 0;

  rename_map dut (.*);
  always #5 clk = ~clk;

  bit    m_infl[NUM_AREG];
  preg_t m_map[NUM_AREG];
  bit    m_ready[RF_SIZE];
  bit    m_free[RF_SIZE];
  rob_entry_t q[$];
  preg_t pend_wb[$];

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic src_t exp_src(areg_t a, int i);
    src_t r;
    r.areg = a;
    r.preg = m_map[a];
    r.in_arf = !m_infl[a];
    r.rdy = !m_infl[a] || m_ready[m_map[a]];
    if (i == 1 && ren_inst[0].has_dst && ren_inst[0].dst == a) begin
      r.preg = ren_dst[0]; r.in_arf = 0; r.rdy = 0;
    end
    return r;
  endfunction

  function automatic bit same(src_t a, src_t b);
    // the rename register number does not matter for a source in the architectural file
    if (a.in_arf != b.in_arf || a.rdy != b.rdy || a.areg != b.areg) return 0;
    return a.in_arf || a.preg == b.preg;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ren_inst = '0; ren_fire = 0; ren_dst = '0; wb_valid = 0; wb_preg = '0; cm_valid = 0; cm_entry = '0;
    foreach (m_free[i]) m_free[i] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int c = 0; c < 20000; c++) begin
      int nf;
      int ncm;
      // group: small register set so that dependences are frequent
      for (int i = 0; i < 2; i++) begin
        ren_inst[i].op = op_e'($urandom_range(0, 3));
        ren_inst[i].has_dst = ($urandom_range(0, 9) != 0);
        ren_inst[i].dst  = areg_t'($urandom_range(0, 5));
        ren_inst[i].src1 = areg_t'($urandom_range(0, 5));
        ren_inst[i].src2 = areg_t'($urandom_range(0, 5));
        ren_inst[i].imm  = $urandom();
      end
      nf = 0;
      for (int p = 0; p < RF_SIZE && nf < 2; p++) if (m_free[p]) begin ren_dst[nf] = preg_t'(p); nf++; end
      ren_fire = (nf == 2 && q.size() < 40 && $urandom_range(0, 99) < 70) ? 2'b11 : 2'b00;
      // writeback of up to two produced registers
      wb_valid = 0;
      pend_wb.shuffle();
      for (int k = 0; k < 2; k++) if (pend_wb.size() > k && $urandom_range(0, 99) < 50) begin
        wb_valid[k] = 1; wb_preg[k] = pend_wb[k];
      end
      // retirement of the oldest written instructions
      cm_valid = 0; ncm = 0;
      for (int k = 0; k < 2; k++)
        if (q.size() > k && ncm == k && (!q[k].has_dst || m_ready[q[k].preg]) && $urandom_range(0, 99) < 60) begin
          cm_valid[k] = 1; cm_entry[k] = q[k]; ncm++;
        end
      #1;
      for (int i = 0; i < 2; i++) begin
        check("src1", same(ren_s1[i], exp_src(ren_inst[i].src1, i)));
        check("src2", same(ren_s2[i], exp_src(ren_inst[i].src2, i)));
        if (i == 1 && ren_inst[0].has_dst && (ren_inst[0].dst == ren_inst[1].src1)) n_group_dep++;
      end
      @(posedge clk);
      // model update in the same order as the hardware
      for (int k = 0; k < ncm; k++) begin
        rob_entry_t e;
        e = q.pop_front();
        if (e.has_dst) begin
          if (m_infl[e.areg] && m_map[e.areg] == e.preg) m_infl[e.areg] = 0;
          else n_keep++;
          m_free[e.preg] = 1;
        end
      end
      for (int k = 0; k < 2; k++) if (wb_valid[k]) begin
        m_ready[wb_preg[k]] = 1;
        foreach (pend_wb[j]) if (pend_wb[j] == wb_preg[k]) begin pend_wb.delete(j); break; end
      end
      for (int i = 0; i < 2; i++) if (ren_fire[i]) begin
        rob_entry_t e;
        e.has_dst = ren_inst[i].has_dst; e.areg = ren_inst[i].dst; e.preg = ren_dst[i];
        q.push_back(e);
        if (e.has_dst) begin
          m_infl[e.areg] = 1; m_map[e.areg] = e.preg; m_ready[e.preg] = 0; m_free[e.preg] = 0;
          pend_wb.push_back(e.preg);
        end
      end
      #1;
    end
    check("in-group dependence seen", n_group_dep > 0);
    check("retire of a re-renamed register seen", n_keep > 0);
    $display("group deps=%0d kept mappings=%0d", n_group_dep, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
