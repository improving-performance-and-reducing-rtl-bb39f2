// tb_issue_queue: self-checking test of the resizable issue queue.
//
// The testbench keeps its own copy of every entry (slot, payload, readiness of
// both sources) and applies the documented rules: new entries take the
// lowest free slots inside the enabled size, result broadcasts wake matching
// sources in the same cycle, retirement broadcasts move a source to the
// architectural file, and up to two ready entries leave per cycle, lowest slot
// first. Every cycle it compares the selected entries, the free-entry flags,
// the occupancy and the extension-empty flag. Tags are drawn from a small set
// so that wakeups hit often; phases with and without `grow` check that the
// extension is used only while growing.
module tb_issue_queue;
  import rr_pkg::*;
  localparam int SZ = 24, BS = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic grow;
  logic [1:0] alloc_avail;
  logic [1:0] alloc_n;
  iq_entry_t [1:0] alloc_entry;
  logic [1:0] wb_valid;
  preg_t [1:0] wb_preg;
  logic [1:0] cm_valid;
  preg_t [1:0] cm_preg;
  logic issue_en;
  logic [1:0] iss_valid;
  iq_entry_t [1:0] iss_entry;
  logic upper_empty;
  logic [4:0] count;
  int checks = 0, failures = 0;

  issue_queue dut (.*);
  always #5 clk = ~clk;

  bit        m_v[SZ];
  iq_entry_t m_e[SZ];
  int max_occ_grow = 0, max_upper_nogrow = 0, n_b2b = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic src_t trk(src_t s);
    src_t r = s;
    for (int k = 0; k < 2; k++) begin
      if (wb_valid[k] && !r.in_arf && wb_preg[k] == r.preg) r.rdy = 1;
      if (cm_valid[k] && !r.in_arf && cm_preg[k] == r.preg) begin r.rdy = 1; r.in_arf = 1; end
    end
    return r;
  endfunction

  function automatic src_t rnd_src();
    src_t s;
    s.areg   = areg_t'($urandom());
    s.preg   = preg_t'($urandom_range(0, 15));
    s.in_arf = ($urandom_range(0, 9) == 0);
    s.rdy    = s.in_arf || ($urandom_range(0, 3) == 0);
    return s;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    grow = 0; alloc_n = 0; alloc_entry = '0; wb_valid = 0; wb_preg = '0; cm_valid = 0; cm_preg = '0; issue_en = 1;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int c = 0; c < 30000; c++) begin
      int free_slots[$];
      int sel[$];
      int occ, up_occ, nalloc;
      iq_entry_t cur[SZ];
      free_slots.delete();
      sel.delete();
      grow = ((c / 1000) % 2) == 1;
      issue_en = ($urandom_range(0, 9) != 0);
      // broadcasts
      for (int k = 0; k < 2; k++) begin
        wb_valid[k] = ($urandom_range(0, 99) < 40);
        wb_preg[k]  = preg_t'($urandom_range(0, 15));
        cm_valid[k] = ($urandom_range(0, 99) < 10);
        cm_preg[k]  = preg_t'($urandom_range(0, 15));
      end
      #1;
      // model: current view and selection
      occ = 0; up_occ = 0;
      for (int i = 0; i < SZ; i++) begin
        cur[i] = m_e[i];
        cur[i].s1 = trk(m_e[i].s1);
        cur[i].s2 = trk(m_e[i].s2);
        if (m_v[i]) begin
          occ++;
          if (i >= BS) up_occ++;
          if (issue_en && cur[i].s1.rdy && cur[i].s2.rdy && sel.size() < 2) begin
            sel.push_back(i);
            if (!(m_e[i].s1.rdy && m_e[i].s2.rdy)) n_b2b++;
          end
        end else if (grow || i < BS) free_slots.push_back(i);
      end
      for (int k = 0; k < 2; k++) begin
        check("alloc_avail", alloc_avail[k] == (free_slots.size() > k));
        check("iss_valid", iss_valid[k] == (sel.size() > k));
        if (sel.size() > k) check("iss_entry", iss_entry[k] == cur[sel[k]]);
      end
      check("count", int'(count) == occ);
      check("upper_empty", upper_empty == (up_occ == 0));
      if (grow && occ > max_occ_grow) max_occ_grow = occ;
      if (!grow && (c % 1000) > 900 && up_occ > max_upper_nogrow) max_upper_nogrow = up_occ;
      // allocation
      nalloc = $urandom_range(0, 2);
      if (nalloc > free_slots.size()) nalloc = free_slots.size();
      alloc_n = 2'(nalloc);
      for (int k = 0; k < 2; k++) begin
        alloc_entry[k]    = iq_entry_t'({$urandom(), $urandom(), $urandom()});
        alloc_entry[k].s1 = rnd_src();
        alloc_entry[k].s2 = rnd_src();
      end
      #1;
      @(posedge clk);
      foreach (sel[k]) m_v[sel[k]] = 0;
      for (int i = 0; i < SZ; i++) m_e[i] = cur[i];
      for (int k = 0; k < nalloc; k++) begin
        m_v[free_slots[k]] = 1;
        m_e[free_slots[k]] = alloc_entry[k];
        m_e[free_slots[k]].s1 = trk(alloc_entry[k].s1);
        m_e[free_slots[k]].s2 = trk(alloc_entry[k].s2);
      end
      #1;
    end
    check("extension used while growing", max_occ_grow > BS);
    check("extension drained when not growing", max_upper_nogrow == 0);
    check("same-cycle wakeup seen", n_b2b > 0);
    $display("max occupancy %0d, back-to-back issues %0d", max_occ_grow, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
