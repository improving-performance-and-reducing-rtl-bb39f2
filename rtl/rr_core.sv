// rr_core: out-of-order instruction window whose resources grow during cache
// misses.
//
// The window of a 2-wide out-of-order embedded core (reorder buffer, issue
// queue and rename register file) fills up behind a load that misses in the
// cache, and the core stalls. Making these structures larger all the time
// would lengthen the register-file access and cost clock frequency. This
// window therefore runs at its base size (ROB 32, IQ 12, RF 32) in normal
// operation and switches in an extension part of each (ROB +16, IQ +12,
// RF +32) only during a cache-miss period: while an L2 miss is pending, or,
// under the L2ML1RS policy, also while two or more L1 data-cache misses are
// pending. During that period the register file takes two cycles per access
// and a second bypass level covers the extra cycle. A part is switched off
// again once the misses are serviced and it holds no data.
//
// Blocks: resize_ctrl (miss counting, sizing state), rename_map, rf_freelist
// (rename-register allocation and upper-segment occupancy bits), rob,
// issue_queue, seg_regfile (segmented rename register file), bypass_net and
// arch_regfile (retired state).
//
// Interface, all synchronous to `clk`:
//  * dispatch: up to WIDTH instructions per cycle, packed from slot 0
//    (`disp_valid` must be contiguous from slot 0). The whole group is taken
//    when `disp_ready` is 1, otherwise held; `stall_*` say which resource was
//    full.
//  * issue: `iss_valid`/`iss_op` carry operations with their operand values
//    to the execution units, one (base size) or two (upsized RF) cycles after
//    they are selected.
//  * writeback: `wb_valid` completes the ROB entry `wb_rob`; with `wb_wr` the
//    result `wb_data` is written to rename register `wb_preg` and broadcast
//    to waiting instructions.
//  * memory-system events: one-cycle pulses for the start and the servicing
//    of L2 and L1 data-cache misses.
//  * retirement: `cm_*` show up to WIDTH instructions retiring in program
//    order with the value they write.
// The execution units, caches and front end are outside this block.
module rr_core
  import rr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  policy_e           policy,
  // dispatch
  input  logic    [WIDTH-1:0] disp_valid,
  input  inst_t   [WIDTH-1:0] disp_inst,
  output logic                disp_ready,
  output logic                stall_rob,
  output logic                stall_iq,
  output logic                stall_rf,
  // issue to the execution units
  output logic    [WIDTH-1:0] iss_valid,
  output issued_t [WIDTH-1:0] iss_op,
  // writeback from the execution units
  input  logic    [WIDTH-1:0] wb_valid,
  input  robidx_t [WIDTH-1:0] wb_rob,
  input  logic    [WIDTH-1:0] wb_wr,
  input  preg_t   [WIDTH-1:0] wb_preg,
  input  data_t   [WIDTH-1:0] wb_data,
  // memory-system events
  input  logic                l2_miss_start,
  input  logic                l2_miss_done,
  input  logic                dl1_miss_start,
  input  logic                dl1_miss_done,
  // retirement
  output logic    [WIDTH-1:0] cm_valid,
  output logic    [WIDTH-1:0] cm_has_dst,
  output areg_t   [WIDTH-1:0] cm_areg,
  output data_t   [WIDTH-1:0] cm_data,
  // status
  output logic                miss_period,
  output logic                rob_up,
  output logic                iq_up,
  output logic                rf_up,
  output logic                issue_hold,      // issue held for an RF access-time change
  output logic    [WIDTH-1:0][1:0] byp_l1,     // operand taken from bypass level 1
  output logic    [WIDTH-1:0][1:0] byp_l2,     // operand taken from bypass level 2
  output logic    [ROB_W:0]   rob_count,
  output logic    [$clog2(IQ_SIZE+1)-1:0] iq_count,
  output logic    [$clog2(RF_SIZE+1)-1:0] rf_count,
  output logic    [3:0]       l2_pending,
  output logic    [3:0]       dl1_pending,
  output logic                rf_upper_busy    // OR of the upper-segment occupancy bits
);

  localparam int unsigned NW = $clog2(WIDTH + 1);

  // ---------------------------------------------------------------- sizing
  logic rob_grow, iq_grow, rf_grow;
  logic rob_upper_empty, iq_upper_empty, rf_upper_empty;
  logic [RF_SIZE-RF_BASE-1:0] rf_upper_taken;

  resize_ctrl u_ctrl (
    .clk, .rst_n, .policy,
    .l2_miss_start, .l2_miss_done, .dl1_miss_start, .dl1_miss_done,
    .rob_upper_empty, .iq_upper_empty, .rf_upper_empty,
    .miss_period, .rob_up, .iq_up, .rf_up,
    .rob_grow, .iq_grow, .rf_grow,
    .l2_pending, .dl1_pending
  );

  // ---------------------------------------------------------------- retirement
  logic       [WIDTH-1:0] rob_cm_valid;
  rob_entry_t [WIDTH-1:0] rob_cm_entry;
  logic       [WIDTH-1:0] cm_wr;
  preg_t      [WIDTH-1:0] cm_preg;
  preg_t      [WIDTH-1:0] cr_addr;
  data_t      [WIDTH-1:0] cr_data;

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      cm_wr[i]      = rob_cm_valid[i] && rob_cm_entry[i].has_dst;
      cm_preg[i]    = rob_cm_entry[i].preg;
      cr_addr[i]    = rob_cm_entry[i].preg;
      cm_valid[i]   = rob_cm_valid[i];
      cm_has_dst[i] = rob_cm_entry[i].has_dst;
      cm_areg[i]    = rob_cm_entry[i].areg;
      cm_data[i]    = cr_data[i];
    end
  end

  // ---------------------------------------------------------------- dispatch
  logic [WIDTH-1:0][ROB_W-1:0] rob_idx;
  logic [WIDTH-1:0] rob_free, iq_avail, fl_avail;
  preg_t [WIDTH-1:0] fl_preg;
  logic [NW-1:0] n_req, n_dst, alloc_n, dst_n;
  preg_t [WIDTH-1:0] inst_dst;
  src_t  [WIDTH-1:0] ren_s1, ren_s2;
  logic  [WIDTH-1:0] fire;
  rob_entry_t [WIDTH-1:0] rob_new;
  iq_entry_t  [WIDTH-1:0] iq_new;
  logic ok_rob, ok_iq, ok_rf;

  always_comb begin
    n_req = '0;
    n_dst = '0;
    inst_dst = '0;
    for (int i = 0; i < WIDTH; i++) begin
      if (disp_valid[i]) begin
        n_req = n_req + 1'b1;
        if (disp_inst[i].has_dst) begin
          inst_dst[i] = fl_preg[n_dst];
          n_dst = n_dst + 1'b1;
        end
      end
    end
    ok_rob = 1'b1;
    ok_iq  = 1'b1;
    ok_rf  = 1'b1;
    for (int i = 0; i < WIDTH; i++) begin
      if (NW'(i) < n_req && !rob_free[i]) ok_rob = 1'b0;
      if (NW'(i) < n_req && !iq_avail[i]) ok_iq  = 1'b0;
      if (NW'(i) < n_dst && !fl_avail[i]) ok_rf  = 1'b0;
    end
    disp_ready = ok_rob && ok_iq && ok_rf;
    stall_rob  = (n_req != '0) && !ok_rob;
    stall_iq   = (n_req != '0) && !ok_iq;
    stall_rf   = (n_req != '0) && !ok_rf;
    fire       = disp_ready ? disp_valid : '0;
    alloc_n    = disp_ready ? n_req : '0;
    dst_n      = disp_ready ? n_dst : '0;
    for (int i = 0; i < WIDTH; i++) begin
      rob_new[i].has_dst = disp_inst[i].has_dst;
      rob_new[i].areg    = disp_inst[i].dst;
      rob_new[i].preg    = inst_dst[i];
      iq_new[i].op       = disp_inst[i].op;
      iq_new[i].imm      = disp_inst[i].imm;
      iq_new[i].rob      = rob_idx[i];
      iq_new[i].has_dst  = disp_inst[i].has_dst;
      iq_new[i].dst      = inst_dst[i];
      iq_new[i].s1       = ren_s1[i];
      iq_new[i].s2       = ren_s2[i];
    end
  end

  logic [WIDTH-1:0] wb_bcast;
  assign wb_bcast = wb_valid & wb_wr;

  rename_map u_ren (
    .clk, .rst_n,
    .ren_inst (disp_inst), .ren_fire(fire), .ren_dst(inst_dst),
    .ren_s1, .ren_s2,
    .wb_valid (wb_bcast), .wb_preg,
    .cm_valid (rob_cm_valid), .cm_entry(rob_cm_entry)
  );

  rf_freelist u_fl (
    .clk, .rst_n, .grow(rf_grow),
    .alloc_avail(fl_avail), .alloc_preg(fl_preg), .alloc_n(dst_n),
    .rel_valid(cm_wr), .rel_preg(cm_preg),
    .upper_taken(rf_upper_taken), .upper_empty(rf_upper_empty), .count(rf_count)
  );

  rob u_rob (
    .clk, .rst_n, .grow(rob_grow),
    .alloc_idx(rob_idx), .alloc_free(rob_free), .alloc_n, .alloc_entry(rob_new),
    .cmpl_valid(wb_valid), .cmpl_idx(wb_rob),
    .cm_valid(rob_cm_valid), .cm_entry(rob_cm_entry),
    .upper_empty(rob_upper_empty), .count(rob_count)
  );

  // ---------------------------------------------------------------- issue
  logic      [WIDTH-1:0] sel_valid;
  iq_entry_t [WIDTH-1:0] sel_entry;
  logic                  rd_ready;

  issue_queue u_iq (
    .clk, .rst_n, .grow(iq_grow),
    .alloc_avail(iq_avail), .alloc_n, .alloc_entry(iq_new),
    .wb_valid(wb_bcast), .wb_preg,
    .cm_valid(cm_wr), .cm_preg,
    .issue_en(rd_ready), .iss_valid(sel_valid), .iss_entry(sel_entry),
    .upper_empty(iq_upper_empty), .count(iq_count)
  );

  assign issue_hold    = !rd_ready;
  assign rf_upper_busy = |rf_upper_taken;

  // ---------------------------------------------------------------- register read
  preg_t     [WIDTH-1:0][1:0] rd_addr;
  logic      [WIDTH-1:0]      rr_valid;
  preg_t     [WIDTH-1:0][1:0] rr_addr;
  data_t     [WIDTH-1:0][1:0] rr_data;
  iq_entry_t [WIDTH-1:0]      rr_tag;

  always_comb
    for (int l = 0; l < WIDTH; l++) begin
      // operands held in the architectural file do not address the RF
      rd_addr[l][0] = sel_entry[l].s1.in_arf ? '0 : sel_entry[l].s1.preg;
      rd_addr[l][1] = sel_entry[l].s2.in_arf ? '0 : sel_entry[l].s2.preg;
    end

  seg_regfile #(.TAG_T(iq_entry_t)) u_rf (
    .clk, .rst_n, .upper_en(rf_up),
    .rd_ready, .rd_valid(sel_valid), .rd_addr, .rd_tag(sel_entry),
    .out_valid(rr_valid), .out_addr(rr_addr), .out_data(rr_data), .out_tag(rr_tag), .out_slow(),
    .wr_valid(wb_bcast), .wr_addr(wb_preg), .wr_data(wb_data),
    .cr_addr, .cr_data
  );

  logic  [WIDTH-1:0][1:0] src_use;
  data_t [WIDTH-1:0][1:0] byp_data;
  areg_t [2*WIDTH-1:0]    arf_addr;
  data_t [2*WIDTH-1:0]    arf_data;

  always_comb
    for (int l = 0; l < WIDTH; l++) begin
      src_use[l][0]     = !rr_tag[l].s1.in_arf;
      src_use[l][1]     = !rr_tag[l].s2.in_arf;
      arf_addr[2*l]     = rr_tag[l].s1.areg;
      arf_addr[2*l + 1] = rr_tag[l].s2.areg;
    end

  bypass_net u_byp (
    .clk, .rst_n,
    .wb_valid(wb_bcast), .wb_preg, .wb_data,
    .src_use, .src_preg(rr_addr), .src_rf(rr_data),
    .src_out(byp_data), .hit_l1(byp_l1), .hit_l2(byp_l2)
  );

  arch_regfile u_arf (
    .clk, .rst_n,
    .wr_valid(cm_wr), .wr_addr(cm_areg), .wr_data(cr_data),
    .rd_addr(arf_addr), .rd_data(arf_data)
  );

  always_comb
    for (int l = 0; l < WIDTH; l++) begin
      iss_valid[l]      = rr_valid[l];
      iss_op[l].op      = rr_tag[l].op;
      iss_op[l].imm     = rr_tag[l].imm;
      iss_op[l].rob     = rr_tag[l].rob;
      iss_op[l].has_dst = rr_tag[l].has_dst;
      iss_op[l].dst     = rr_tag[l].dst;
      iss_op[l].a       = src_use[l][0] ? byp_data[l][0] : arf_data[2*l];
      iss_op[l].b       = src_use[l][1] ? byp_data[l][1] : arf_data[2*l + 1];
    end

  // Dispatch slots are filled from slot 0 upwards.
  for (genvar g = 1; g < WIDTH; g++) begin : g_chk
    a_packed : assert property (@(posedge clk) disable iff (!rst_n)
      disp_valid[g] |-> disp_valid[g-1]);
  end

endmodule
