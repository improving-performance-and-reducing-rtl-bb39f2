// tb_rr_core: end-to-end test of the adaptive-resizing instruction window.
//
// The testbench plays the rest of the core around rr_core:
//  * front end: a random program of NINST instructions over 16 registers
//    (adds, subtracts, xors and loads, ~10 % without a destination) is
//    offered two at a time;
//  * execution units: an issued operation's result is computed from the
//    operand values the window delivered and written back after 1 cycle (ALU)
//    or, for a load, 2 cycles on a hit, 12 on an L1 data-cache miss and 60 on
//    an L2 miss; at most two results per cycle;
//  * memory system: miss start/done pulses for every missing load.
// A reference model executes the same program in order; every retiring
// instruction's register and value are compared with it, so a wrong operand
// anywhere (rename, register file, bypass, architectural file) shows.
// Directed phases first measure the dispatch-to-issue time of a lone
// instruction in both register-file modes (2 and 3 cycles: one extra cycle
// for the two-cycle access). The random run uses the L2RS policy for the first
// half and L2ML1RS for the second, and every mechanism of the design is
// counted and must occur: stalls on each resource, upsizing and downsizing of
// each resource, occupancy above the base size, a miss period from L1 misses
// alone, two-cycle reads, both bypass levels and the issue hold.
module tb_rr_core;
  import rr_pkg::*;
  localparam int NINST = 6000;
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
  data_t ref_val[NINST];     // value each instruction writes
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

  // ------------------------------------------------------------ execution units
  typedef struct { int due; robidx_t rob; logic wr; preg_t preg; data_t val; int kind; } res_t;
  res_t pend[$];
  int l2_start_q = 0, l2_done_q = 0, d1_start_q = 0, d1_done_q = 0;
  int l2_started = 0, l2_finished = 0, d1_started = 0, d1_finished = 0;
  int cyc = 0;

  // ------------------------------------------------------------ counters
  int n_stall_rob = 0, n_stall_iq = 0, n_stall_rf = 0;
  int n_up[3] = '{0, 0, 0}, n_down[3] = '{0, 0, 0};
  int max_rob = 0, max_iq = 0, max_rf = 0;
  int n_dl1_period = 0, n_slow_iss = 0, n_l1 = 0, n_l2 = 0, n_hold = 0, n_dual_commit = 0;
  int n_l2_miss = 0, n_d1_miss = 0;
  logic [2:0] prev_up = '0;

  int next_disp = 0, next_commit = 0, last_commit_cyc = 0;
  bit random_misses = 0;

  task automatic cycle_step();
    res_t due[$];
    // drive dispatch
    disp_valid = '0;
    for (int i = 0; i < 2; i++)
      if (next_disp + i < NINST) begin
        disp_valid[i] = 1;
        disp_inst[i] = prog[next_disp + i];
      end
    // drive writeback: oldest due results first
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
    // drive miss events, one of each kind per cycle
    l2_miss_start  = (l2_start_q > 0);
    dl1_miss_start = (d1_start_q > 0);
    l2_miss_done   = (l2_done_q > 0) && (l2_finished < l2_started);
    dl1_miss_done  = (d1_done_q > 0) && (d1_finished < d1_started);
    #1;
    // observe
    if (stall_rob) n_stall_rob++;
    if (stall_iq)  n_stall_iq++;
    if (stall_rf)  n_stall_rf++;
    if (issue_hold) n_hold++;
    if (miss_period && l2_pending == 0) n_dl1_period++;
    if (int'(rob_count) > max_rob) max_rob = int'(rob_count);
    if (int'(iq_count)  > max_iq)  max_iq  = int'(iq_count);
    if (int'(rf_count)  > max_rf)  max_rf  = int'(rf_count);
    for (int l = 0; l < 2; l++) for (int s = 0; s < 2; s++) begin
      n_l1 += int'(byp_l1[l][s]);
      n_l2 += int'(byp_l2[l][s]);
    end
    check("rob occupancy within size", rob_count <= 7'(ROB_SIZE) && (rob_up || rob_count <= 7'(ROB_BASE)));
    check("iq occupancy within size", iq_count <= 5'(IQ_SIZE) && (iq_up || iq_count <= 5'(IQ_BASE)));
    check("rf upper segment used only when connected", rf_up || !rf_upper_busy);
    // retirement against the reference
    if (cm_valid == 2'b11) n_dual_commit++;
    for (int k = 0; k < 2; k++)
      if (cm_valid[k]) begin
        check("commit in range", next_commit < NINST);
        if (next_commit < NINST) begin
          check("commit has_dst", cm_has_dst[k] == prog[next_commit].has_dst);
          if (prog[next_commit].has_dst) begin
            check("commit register", cm_areg[k] == prog[next_commit].dst);
            check("commit value", cm_data[k] == ref_val[next_commit]);
          end
        end
        next_commit++;
        last_commit_cyc = cyc;
      end
    // issued operations go to the execution units
    for (int l = 0; l < 2; l++)
      if (iss_valid[l]) begin
        res_t r;
        int lat;
        r.kind = 0;
        lat = 1;
        if (iss_op[l].op == OP_LOAD) begin
          lat = 2;
          if (random_misses) begin
            int u;
            u = $urandom_range(0, 999);
            if (u < 40) begin lat = 60; r.kind = 2; l2_start_q++; n_l2_miss++; end
            else if (u < 300) begin lat = 12; r.kind = 1; d1_start_q++; n_d1_miss++; end
          end
        end
        if (rf_up) n_slow_iss++;
        r.due = cyc + lat;
        r.rob = iss_op[l].rob; r.wr = iss_op[l].has_dst; r.preg = iss_op[l].dst;
        r.val = exec(iss_op[l].op, iss_op[l].a, iss_op[l].b, iss_op[l].imm);
        pend.push_back(r);
      end
    if (disp_ready) next_disp += (disp_valid == 2'b11) ? 2 : (disp_valid[0] ? 1 : 0);
    if (l2_miss_start)  begin l2_start_q--; l2_started++; end
    if (dl1_miss_start) begin d1_start_q--; d1_started++; end
    if (l2_miss_done)   begin l2_done_q--;  l2_finished++; end
    if (dl1_miss_done)  begin d1_done_q--;  d1_finished++; end
    @(posedge clk);
    cyc++;
    for (int r = 0; r < 3; r++) begin
      logic u;
      u = (r == 0) ? rob_up : (r == 1) ? iq_up : rf_up;
      if (u && !prev_up[r]) n_up[r]++;
      if (!u && prev_up[r]) n_down[r]++;
      prev_up[r] = u;
    end
    #1;
  endtask

  // dispatch-to-issue time of a lone instruction
  task automatic lone_latency(input int idx, output int lat);
    int t0;
    lat = -1;
    disp_valid = 2'b01; disp_inst[0] = prog[idx];
    #1;
    check("lone dispatch accepted", disp_ready);
    t0 = cyc;
    @(posedge clk); cyc++; #1;
    disp_valid = '0;
    for (int w = 0; w < 10 && lat < 0; w++) begin
      #1;
      if (iss_valid[0]) lat = cyc - t0;
      @(posedge clk); cyc++; #1;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: dispatched %0d committed %0d", next_disp, next_commit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat_fast, lat_slow;
    // program and reference results
    foreach (ref_regs[r]) ref_regs[r] = '0;
    for (int i = 0; i < NINST; i++) begin
      prog[i].op      = op_e'($urandom_range(0, 3));
      prog[i].has_dst = ($urandom_range(0, 9) != 0);
      prog[i].dst     = areg_t'($urandom_range(0, NREG - 1));
      prog[i].src1    = areg_t'($urandom_range(0, NREG - 1));
      prog[i].src2    = areg_t'($urandom_range(0, NREG - 1));
      prog[i].imm     = $urandom();
    end
    // the two directed instructions are independent ALU operations
    for (int i = 0; i < 2; i++) begin
      prog[i].op = OP_ADD; prog[i].has_dst = 1; prog[i].dst = areg_t'(i + 1);
      prog[i].src1 = '0; prog[i].src2 = '0;
    end
    for (int i = 0; i < NINST; i++) begin
      ref_val[i] = exec(prog[i].op, ref_regs[prog[i].src1], ref_regs[prog[i].src2], prog[i].imm);
      if (prog[i].has_dst) ref_regs[prog[i].dst] = ref_val[i];
    end

    policy = POLICY_L2RS;
    disp_valid = '0; disp_inst = '0; wb_valid = '0; wb_wr = '0; wb_rob = '0; wb_preg = '0; wb_data = '0;
    l2_miss_start = 0; l2_miss_done = 0; dl1_miss_start = 0; dl1_miss_done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;

    // directed: one-cycle register file
    lone_latency(0, lat_fast);
    check("dispatch-to-issue with one-cycle RF is 2 cycles", lat_fast == 2);
    repeat (3) begin
      wb_valid = '0;
      if (cyc >= 0) begin
        wb_valid[0] = 1; wb_wr[0] = 1; wb_rob[0] = iss_op[0].rob; wb_preg[0] = iss_op[0].dst;
        wb_data[0] = exec(iss_op[0].op, iss_op[0].a, iss_op[0].b, iss_op[0].imm);
      end
      @(posedge clk); cyc++; #1;
      wb_valid = '0;
      break;
    end
    // directed: force a miss period, then the two-cycle register file
    l2_miss_start = 1; @(posedge clk); cyc++; #1; l2_miss_start = 0;
    repeat (2) begin @(posedge clk); cyc++; #1; end
    check("upsized during an L2 miss", rob_up && iq_up && rf_up);
    lone_latency(1, lat_slow);
    check("dispatch-to-issue with two-cycle RF is 3 cycles", lat_slow == 3);
    wb_valid[0] = 1; wb_wr[0] = 1; wb_rob[0] = iss_op[0].rob; wb_preg[0] = iss_op[0].dst;
    wb_data[0] = exec(iss_op[0].op, iss_op[0].a, iss_op[0].b, iss_op[0].imm);
    l2_miss_done = 1;
    @(posedge clk); cyc++; #1;
    wb_valid = '0; l2_miss_done = 0;
    repeat (4) begin @(posedge clk); cyc++; #1; end
    next_disp = 2;
    next_commit = 2;
    prev_up = {rf_up, iq_up, rob_up};
    $display("lone dispatch-to-issue: %0d cycles (base), %0d cycles (upsized)", lat_fast, lat_slow);

    // random run
    random_misses = 1;
    while (next_commit < NINST && cyc - last_commit_cyc < 2000) begin
      if (next_disp >= NINST / 2) policy = POLICY_L2ML1RS;
      cycle_step();
    end
    check("all instructions retired", next_commit == NINST);
    // drain: every extension switched off again
    repeat (100) cycle_step();
    check("back to base size", !rob_up && !iq_up && !rf_up);
    check("no miss outstanding", l2_pending == 0 && dl1_pending == 0);

    // every mechanism must have happened
    check("ROB-full stall", n_stall_rob > 0);
    check("IQ-full stall", n_stall_iq > 0);
    check("RF-full stall", n_stall_rf > 0);
    for (int r = 0; r < 3; r++) begin
      check("upsizing", n_up[r] > 0);
      check("downsizing", n_down[r] > 0);
    end
    check("ROB above base size", max_rob > int'(ROB_BASE));
    check("IQ above base size", max_iq > int'(IQ_BASE));
    check("RF upper segment used", max_rf > int'(RF_BASE));
    check("miss period from L1 misses alone", n_dl1_period > 0);
    check("two-cycle RF reads", n_slow_iss > 0);
    check("bypass level 1", n_l1 > 0);
    check("bypass level 2", n_l2 > 0);
    check("issue hold on access-time change", n_hold > 0);
    check("two retirements in one cycle", n_dual_commit > 0);
    $display("cycles=%0d committed=%0d IPC=%0.3f", cyc, next_commit, real'(next_commit) / real'(cyc));
    $display("misses: L2=%0d DL1=%0d", n_l2_miss, n_d1_miss);
    $display("stalls: rob=%0d iq=%0d rf=%0d  hold=%0d", n_stall_rob, n_stall_iq, n_stall_rf, n_hold);
    $display("upsize rob/iq/rf=%0d/%0d/%0d downsize=%0d/%0d/%0d", n_up[0], n_up[1], n_up[2], n_down[0], n_down[1], n_down[2]);
    $display("max occupancy rob=%0d iq=%0d rf=%0d", max_rob, max_iq, max_rf);
    $display("dl1-only period cycles=%0d slow issues=%0d bypass l1=%0d l2=%0d", n_dl1_period, n_slow_iss, n_l1, n_l2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
