// tb_rr_policies: runs one memory-bound program under both resizing policies.
//
// The same random program of NINST instructions is executed twice on rr_core
// at its full size, first with L2RS (upsize only while an L2 miss is pending),
// then, after a reset, with L2ML1RS (also while two or more L1 data-cache
// misses are pending). Whether a load hits, misses in the L1 data cache
// (12 cycles) or misses in the L2 (60 cycles) is a hash of its address, so
// both runs see exactly the same misses; ALU operations take 1 cycle and L1
// hits 2. The testbench plays front end, execution units and memory system
// as in the end-to-end test.
//
// Checked in every cycle of both runs:
//  * the miss-period signal follows the selected policy's rule exactly, from
//    the pending-miss counts the testbench keeps itself;
//  * no extension holds entries while its resource is at base size;
//  * every retired value matches an in-order reference.
// Checked at the end:
//  * both runs retire the whole program and return to base size;
//  * L2ML1RS spends at least as many cycles upsized as L2RS and has miss
//    periods with no L2 miss pending, which L2RS never has.
// Cycle counts, IPC and the upsized fraction of both runs are printed. Which
// policy is faster depends on the program, so the speed is reported, not
// checked. The miss rates are this testbench's choice (about 3 % of loads
// miss in L2 and 25 % in the L1 data cache). The latencies are those of the
// evaluated core.
module tb_rr_policies;
  import rr_pkg::*;
  localparam int NINST = 4000;
  localparam int NREG  = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  policy_e policy;
  logic [1:0] disp_valid;
  inst_t [1:0] disp_inst;
  logic disp_ready, stall_rob, stall_iq, stall_rf;
  logic [1:0] iss_valid;
  issued_t [1:0] iss_op;
  logic [1:0] wb_valid, wb_wr;
  robidx_t [1:0] wb_rob;
  preg_t [1:0] wb_preg;
  data_t [1:0] wb_data;
  logic l2_miss_start, l2_miss_done, dl1_miss_start, dl1_miss_done;
  logic [1:0] cm_valid, cm_has_dst;
  areg_t [1:0] cm_areg;
  data_t [1:0] cm_data;
  logic miss_period, rob_up, iq_up, rf_up, issue_hold;
  logic [1:0][1:0] byp_l1, byp_l2;
  logic [6:0] rob_count;
  logic [4:0] iq_count;
  logic [6:0] rf_count;
  logic [3:0] l2_pending, dl1_pending;
  logic rf_upper_busy;

  rr_core dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ program
  inst_t prog[NINST];
  data_t ref_val[NINST];
  data_t ref_regs[NUM_AREG];

  function automatic data_t load_value(data_t addr);
    return (addr * 32'h9E37_79B1) ^ 32'h5BD1_E995;
  endfunction

  function automatic data_t exec(op_e op, data_t a, data_t b, data_t imm);
    case (op)
      OP_ADD:  return a + b + imm;
      OP_SUB:  return a - b - imm;
      OP_XOR:  return a ^ b ^ imm;
      default: return load_value(a + imm);
    endcase
  endfunction

  // 0: hit, 1: L1 data-cache miss, 2: L2 miss; a function of the address only
  function automatic int miss_kind(data_t addr);
    data_t h;
    h = (addr ^ (addr >> 13)) * 32'h85EB_CA6B;
    h = h ^ (h >> 16);
    if (h % 1000 < 30)  return 2;
    if (h % 1000 < 280) return 1;
    return 0;
  endfunction

  // ------------------------------------------------------------ one run
  typedef struct { int due; robidx_t rob; logic wr; preg_t preg; data_t val; int kind; } res_t;
  res_t pend[$];
  int cyc;
  int l2_start_q, l2_done_q, d1_start_q, d1_done_q;
  int l2_out, d1_out;            // misses started and not yet done (own count)
  int next_disp, next_commit, last_commit_cyc;
  int n_up_cycles, n_l1_only;

  task automatic cycle_step();
    disp_valid = '0;
    for (int i = 0; i < 2; i++)
      if (next_disp + i < NINST) begin
        disp_valid[i] = 1;
        disp_inst[i] = prog[next_disp + i];
      end
    wb_valid = '0; wb_wr = '0;
    pend.sort(x) with (x.due);
    for (int k = 0; k < 2; k++)
      if (pend.size() > 0 && pend[0].due <= cyc) begin
        res_t r;
        r = pend.pop_front();
        wb_valid[k] = 1; wb_wr[k] = r.wr; wb_rob[k] = r.rob; wb_preg[k] = r.preg; wb_data[k] = r.val;
        if (r.kind == 1) d1_done_q++;
        if (r.kind == 2) l2_done_q++;
      end
    l2_miss_start  = (l2_start_q > 0);
    dl1_miss_start = (d1_start_q > 0);
    l2_miss_done   = (l2_done_q > 0) && (l2_out > 0);
    dl1_miss_done  = (d1_done_q > 0) && (d1_out > 0);
    #1;
    // policy rule, from the testbench's own pending counts
    if (policy == POLICY_L2RS)
      check("L2RS miss period", miss_period == (l2_out > 0));
    else
      check("L2ML1RS miss period", miss_period == (l2_out > 0 || d1_out >= 2));
    check("ROB within size", rob_up || rob_count <= 7'(ROB_BASE));
    check("IQ within size", iq_up || iq_count <= 5'(IQ_BASE));
    check("RF upper segment only when connected", rf_up || !rf_upper_busy);
    if (rob_up || iq_up || rf_up) n_up_cycles++;
    if (miss_period && l2_out == 0) n_l1_only++;
    for (int k = 0; k < 2; k++)
      if (cm_valid[k]) begin
        check("commit in range", next_commit < NINST);
        if (next_commit < NINST && prog[next_commit].has_dst) begin
          check("commit register", cm_areg[k] == prog[next_commit].dst);
          check("commit value", cm_data[k] == ref_val[next_commit]);
        end
        next_commit++;
        last_commit_cyc = cyc;
      end
    for (int l = 0; l < 2; l++)
      if (iss_valid[l]) begin
        res_t r;
        int lat;
        r.kind = 0;
        lat = 1;
        if (iss_op[l].op == OP_LOAD) begin
          r.kind = miss_kind(iss_op[l].a + iss_op[l].imm);
          lat = (r.kind == 2) ? 60 : (r.kind == 1) ? 12 : 2;
          if (r.kind == 2) l2_start_q++;
          if (r.kind == 1) d1_start_q++;
        end
        r.due = cyc + lat;
        r.rob = iss_op[l].rob; r.wr = iss_op[l].has_dst; r.preg = iss_op[l].dst;
        r.val = exec(iss_op[l].op, iss_op[l].a, iss_op[l].b, iss_op[l].imm);
        pend.push_back(r);
      end
    if (disp_ready) next_disp += (disp_valid == 2'b11) ? 2 : (disp_valid[0] ? 1 : 0);
    if (l2_miss_start)  begin l2_start_q--; l2_out++; end
    if (dl1_miss_start) begin d1_start_q--; d1_out++; end
    if (l2_miss_done)   begin l2_done_q--;  l2_out--; end
    if (dl1_miss_done)  begin d1_done_q--;  d1_out--; end
    @(posedge clk);
    cyc++;
    #1;
  endtask

  task automatic run(input policy_e pol, output int cycles, output int up_cycles, output int l1_only);
    policy = pol;
    rst_n = 0;
    disp_valid = '0; disp_inst = '0; wb_valid = '0; wb_wr = '0; wb_rob = '0; wb_preg = '0; wb_data = '0;
    l2_miss_start = 0; l2_miss_done = 0; dl1_miss_start = 0; dl1_miss_done = 0;
    pend.delete();
    cyc = 0; l2_start_q = 0; l2_done_q = 0; d1_start_q = 0; d1_done_q = 0; l2_out = 0; d1_out = 0;
    next_disp = 0; next_commit = 0; last_commit_cyc = 0; n_up_cycles = 0; n_l1_only = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    while (next_commit < NINST && cyc - last_commit_cyc < 2000) cycle_step();
    check("all instructions retired", next_commit == NINST);
    cycles = cyc;
    up_cycles = n_up_cycles;
    l1_only = n_l1_only;
    repeat (100) cycle_step();
    check("back to base size", !rob_up && !iq_up && !rf_up);
    check("no miss outstanding", l2_pending == 0 && dl1_pending == 0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: policy %0d committed %0d", policy, next_commit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c_l2, c_ml, up_l2, up_ml, l1_l2, l1_ml;
    foreach (ref_regs[r]) ref_regs[r] = '0;
    for (int i = 0; i < NINST; i++) begin
      prog[i].op      = op_e'($urandom_range(0, 3));
      prog[i].has_dst = ($urandom_range(0, 9) != 0);
      prog[i].dst     = areg_t'($urandom_range(0, NREG - 1));
      prog[i].src1    = areg_t'($urandom_range(0, NREG - 1));
      prog[i].src2    = areg_t'($urandom_range(0, NREG - 1));
      prog[i].imm     = $urandom();
    end
    for (int i = 0; i < NINST; i++) begin
      ref_val[i] = exec(prog[i].op, ref_regs[prog[i].src1], ref_regs[prog[i].src2], prog[i].imm);
      if (prog[i].has_dst) ref_regs[prog[i].dst] = ref_val[i];
    end

    run(POLICY_L2RS, c_l2, up_l2, l1_l2);
    run(POLICY_L2ML1RS, c_ml, up_ml, l1_ml);

    check("L2RS never upsizes on L1 misses alone", l1_l2 == 0);
    check("L2ML1RS upsizes on L1 misses alone", l1_ml > 0);
    check("L2ML1RS upsized at least as long as L2RS", up_ml >= up_l2);
    $display("L2RS   : cycles=%0d IPC=%0.3f upsized %0.1f %%", c_l2,
             real'(NINST) / real'(c_l2), 100.0 * real'(up_l2) / real'(c_l2));
    $display("L2ML1RS: cycles=%0d IPC=%0.3f upsized %0.1f %% (L1-only periods %0d cycles)", c_ml,
             real'(NINST) / real'(c_ml), 100.0 * real'(up_ml) / real'(c_ml), l1_ml);
    $display("L2ML1RS speed-up over L2RS: %0.2f %%", 100.0 * (real'(c_l2) / real'(c_ml) - 1.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
