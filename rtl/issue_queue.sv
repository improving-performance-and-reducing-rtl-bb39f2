// issue_queue: instruction queue with a base partition and a power-gated
// extension.
//
// SIZE entries, of which 0..BASE-1 are the base partition and BASE..SIZE-1
// the extension (24 = 12 + 12 in the main configuration). New instructions go
// into the lowest-numbered free entries; entries of the extension are used
// only while `grow` is set. Each entry waits until both source operands are
// ready. A result broadcast (`wb_*`, rename-register tag) marks matching
// sources ready, in the same cycle as the broadcast, so a dependent
// instruction can be selected in the cycle its producer's result appears. A
// retirement broadcast (`cm_*`) tells waiting sources that the value has moved
// into the architectural register file, so the rename register can be
// released safely. Up to W ready entries are selected per cycle, lowest index
// first (the document gives no select policy; this one is this design's
// choice), and leave the queue at the next edge.
//
// `upper_empty` is the OR-reduced occupancy of the extension: the extension
// can be switched off when it is 1.
//
// Timing: `alloc_avail`, the selection and `upper_empty` are combinational
// from the registered entries and this cycle's broadcasts; all updates happen
// at the clock edge.
module issue_queue
  import rr_pkg::*;
#(
  parameter int unsigned SIZE = IQ_SIZE,
  parameter int unsigned BASE = IQ_BASE,
  parameter int unsigned W    = WIDTH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   grow,
  // dispatch
  output logic [W-1:0]           alloc_avail,   // at least i+1 entries are free
  input  logic [$clog2(W+1)-1:0] alloc_n,
  input  iq_entry_t [W-1:0]      alloc_entry,
  // result broadcast
  input  logic [W-1:0]           wb_valid,
  input  preg_t [W-1:0]          wb_preg,
  // retirement broadcast
  input  logic [W-1:0]           cm_valid,
  input  preg_t [W-1:0]          cm_preg,
  // select
  input  logic                   issue_en,
  output logic [W-1:0]           iss_valid,
  output iq_entry_t [W-1:0]      iss_entry,
  output logic                   upper_empty,
  output logic [$clog2(SIZE+1)-1:0] count
);

  localparam int unsigned IW = $clog2(SIZE);

  logic [SIZE-1:0] valid_q;
  iq_entry_t       ent_q [SIZE];

  function automatic src_t track(input src_t s, input logic [W-1:0] wv, input preg_t [W-1:0] wp,
                                 input logic [W-1:0] cv, input preg_t [W-1:0] cp);
    src_t r = s;
    for (int k = 0; k < W; k++) begin
      if (wv[k] && !r.in_arf && wp[k] == r.preg) r.rdy = 1'b1;
      if (cv[k] && !r.in_arf && cp[k] == r.preg) begin
        r.rdy    = 1'b1;
        r.in_arf = 1'b1;
      end
    end
    return r;
  endfunction

  // entries as seen this cycle, after this cycle's broadcasts
  iq_entry_t cur [SIZE];
  logic [SIZE-1:0] ready;
  always_comb begin
    for (int i = 0; i < SIZE; i++) begin
      cur[i]    = ent_q[i];
      cur[i].s1 = track(ent_q[i].s1, wb_valid, wb_preg, cm_valid, cm_preg);
      cur[i].s2 = track(ent_q[i].s2, wb_valid, wb_preg, cm_valid, cm_preg);
      ready[i]  = valid_q[i] && cur[i].s1.rdy && cur[i].s2.rdy;
    end
  end

  // select: lowest-index ready entries
  logic [W-1:0][IW-1:0] sel_idx;
  always_comb begin
    logic [SIZE-1:0] avail;
    avail     = issue_en ? ready : '0;
    iss_valid = '0;
    sel_idx   = '0;
    for (int k = 0; k < W; k++) begin
      for (int i = SIZE - 1; i >= 0; i--) begin
        if (avail[i]) begin
          iss_valid[k] = 1'b1;
          sel_idx[k]   = IW'(i);
        end
      end
      if (iss_valid[k]) avail[sel_idx[k]] = 1'b0;
      iss_entry[k] = cur[sel_idx[k]];
    end
  end

  // allocation: lowest-index free entries within the enabled size
  logic [W-1:0][IW-1:0] free_idx;
  always_comb begin
    logic [SIZE-1:0] fr;
    fr = ~valid_q;
    if (!grow) fr[SIZE-1:BASE] = '0;
    alloc_avail = '0;
    free_idx    = '0;
    for (int k = 0; k < W; k++) begin
      for (int i = SIZE - 1; i >= 0; i--) begin
        if (fr[i]) begin
          alloc_avail[k] = 1'b1;
          free_idx[k]    = IW'(i);
        end
      end
      if (alloc_avail[k]) fr[free_idx[k]] = 1'b0;
    end
  end

  always_comb begin
    upper_empty = (valid_q[SIZE-1:BASE] == '0);
    count = '0;
    for (int i = 0; i < SIZE; i++) count = count + ($clog2(SIZE+1))'(valid_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      for (int k = 0; k < W; k++) if (iss_valid[k]) valid_q[sel_idx[k]] <= 1'b0;
      for (int k = 0; k < W; k++) if (k < int'(alloc_n)) valid_q[free_idx[k]] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < SIZE; i++) ent_q[i] <= cur[i];
    for (int k = 0; k < W; k++) begin
      if (k < int'(alloc_n)) begin
        ent_q[free_idx[k]]    <= alloc_entry[k];
        ent_q[free_idx[k]].s1 <= track(alloc_entry[k].s1, wb_valid, wb_preg, cm_valid, cm_preg);
        ent_q[free_idx[k]].s2 <= track(alloc_entry[k].s2, wb_valid, wb_preg, cm_valid, cm_preg);
      end
    end
  end

  for (genvar g = 0; g < W; g++) begin : g_chk
    a_alloc : assert property (@(posedge clk) disable iff (!rst_n)
      (g < int'(alloc_n)) |-> alloc_avail[g]);
  end

endmodule
