// tb_rob: self-checking test of the resizable reorder buffer.
//
// A reference model in the testbench keeps the entries in program order as a
// queue together with its own head/tail pointers and wrap rule (after entry
// BASE-1 go on to BASE only while the extension may grow). Random allocation
// of 0..2 entries, random out-of-order completion and phases with and without
// `grow` are applied; every cycle the allocation slots, the retiring entries
// (in order, payload included), the occupancy and the extension-empty flag are
// compared with the model. The test also checks that the buffer really holds
// 48 entries while growing and never more than 32 once the extension drained.
module tb_rob;
  import rr_pkg::*;
  localparam int SZ = 48, BS = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic grow;
  logic [1:0][5:0] alloc_idx;
  logic [1:0] alloc_free;
  logic [1:0] alloc_n;
  rob_entry_t [1:0] alloc_entry;
  logic [1:0] cmpl_valid;
  logic [1:0][5:0] cmpl_idx;
  logic [1:0] cm_valid;
  rob_entry_t [1:0] cm_entry;
  logic upper_empty;
  logic [6:0] count;
  int checks = 0, failures = 0;

  rob dut (.*);
  always #5 clk = ~clk;

  // model
  int q_idx[$];
  rob_entry_t q_ent[$];
  bit m_valid[SZ];
  bit m_done[SZ];
  int m_tail = 0, m_head = 0;
  bit m_after = 0;
  int max_grow = 0, max_nogrow_drained = 0;

  function automatic int stepm(int i, bit ext);
    if (i == BS - 1) return ext ? BS : 0;
    if (i == SZ - 1) return 0;
    return i + 1;
  endfunction

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
    grow = 0; alloc_n = 0; alloc_entry = '0; cmpl_valid = '0; cmpl_idx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int c = 0; c < 30000; c++) begin
      int exp_cm;
      int nalloc;
      int p;
      bit m_upper_empty;
      // phases of 1500 cycles
      grow = ((c / 1500) % 2) == 1;
      // expected allocation slots
      p = m_tail;
      for (int i = 0; i < 2; i++) begin
        check("alloc_idx", int'(alloc_idx[i]) == p);
        check("alloc_free", alloc_free[i] == !m_valid[p]);
        p = stepm(p, grow);
      end
      // expected retirement
      exp_cm = 0;
      for (int i = 0; i < 2 && i < q_idx.size(); i++) begin
        if (m_done[q_idx[i]] && exp_cm == i) exp_cm++;
      end
      for (int i = 0; i < 2; i++) begin
        check("cm_valid", cm_valid[i] == (i < exp_cm));
        if (i < exp_cm) check("cm_entry", cm_entry[i] == q_ent[i]);
      end
      check("count", int'(count) == q_idx.size());
      m_upper_empty = (m_tail < BS) && (m_head < BS);
      foreach (q_idx[i]) if (q_idx[i] >= BS) m_upper_empty = 0;
      check("upper_empty", upper_empty == m_upper_empty);
      if (grow && q_idx.size() > max_grow) max_grow = q_idx.size();
      if (!grow && m_upper_empty && q_idx.size() > max_nogrow_drained) max_nogrow_drained = q_idx.size();
      // stimulus: allocation (fills faster than it retires in grow phases)
      nalloc = 0;
      if ($urandom_range(0, 99) < (grow ? 85 : 60)) nalloc = $urandom_range(1, 2);
      if (nalloc >= 1 && !alloc_free[0]) nalloc = 0;
      if (nalloc == 2 && !alloc_free[1]) nalloc = 1;
      alloc_n = 2'(nalloc);
      for (int i = 0; i < 2; i++) alloc_entry[i] = rob_entry_t'($urandom());
      // completion of random outstanding entries
      cmpl_valid = '0;
      for (int k = 0; k < 2; k++) begin
        if (q_idx.size() > 0 && $urandom_range(0, 99) < 45) begin
          int j;
          bit hold_head;
          j = $urandom_range(0, q_idx.size() - 1);
          hold_head = grow && (c % 1500) < 400 && j == 0;  // a load missing at the head
          if (!hold_head && !m_done[q_idx[j]] && !(k == 1 && cmpl_valid[0] && int'(cmpl_idx[0]) == q_idx[j])) begin
            cmpl_valid[k] = 1;
            cmpl_idx[k] = 6'(q_idx[j]);
          end
        end
      end
      @(posedge clk);
      // model update
      for (int i = 0; i < exp_cm; i++) begin
        m_valid[q_idx[0]] = 0;
        m_head = stepm(q_idx[0], m_after);
        void'(q_idx.pop_front());
        void'(q_ent.pop_front());
      end
      for (int k = 0; k < 2; k++) if (cmpl_valid[k]) m_done[cmpl_idx[k]] = 1;
      for (int i = 0; i < nalloc; i++) begin
        if (m_tail == BS - 1) m_after = grow;
        m_valid[m_tail] = 1;
        m_done[m_tail] = 0;
        q_idx.push_back(m_tail);
        q_ent.push_back(alloc_entry[i]);
        m_tail = stepm(m_tail, grow);
      end
      #1;
    end
    check("holds 48 while growing", max_grow == SZ);
    check("at most 32 when drained", max_nogrow_drained <= BS && max_nogrow_drained > 0);
    $display("max occupancy grow=%0d drained-normal=%0d", max_grow, max_nogrow_drained);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
