// resize_ctrl: decides when the window resources run at their upsized size.
//
// The controller counts outstanding L2 misses and outstanding L1 data-cache
// misses from start/done pulses sent by the memory system. A cache-miss period
// is in force while at least one L2 miss is pending (both policies) or, under
// the L2ML1RS policy, while at least two L1 data-cache misses are pending.
// The policy is an input so that the same hardware can run either technique.
//
// Each resource (ROB, IQ, rename RF) has its own "up" state. All three are
// switched up together in the cycle after a miss period begins. A resource
// returns to its base size when the miss period is over and its extension
// part reports that it holds no data (the OR of its per-entry occupancy bits
// is 0). Following that rule, each resource may be allocated into its
// extension part only while it is up and the miss period still lasts
// (`*_grow`): once the miss period ends no new data goes into the extension
// part, so it is guaranteed to drain. Restricting allocation during the drain
// is this design's choice; the rest of the behaviour follows the two
// techniques as described.
//
// `*_up` also drives the extension part's power gate (off while not up) and,
// for the register file, the segment-select pass gates.
//
// Timing: the miss counters and up states are registered; miss_period and the
// grow enables are combinational from the registered counters and up states.
module resize_ctrl
  import rr_pkg::*;
#(
  parameter int unsigned CNT_W = 4    // width of each pending-miss counter
) (
  input  logic    clk,
  input  logic    rst_n,
  input  policy_e policy,
  input  logic    l2_miss_start,   // a new L2 miss was sent to memory
  input  logic    l2_miss_done,    // an L2 miss was serviced
  input  logic    dl1_miss_start,  // a new L1 data-cache miss
  input  logic    dl1_miss_done,   // an L1 data-cache miss was serviced
  input  logic    rob_upper_empty,
  input  logic    iq_upper_empty,
  input  logic    rf_upper_empty,
  output logic    miss_period,
  output logic    rob_up,
  output logic    iq_up,
  output logic    rf_up,
  output logic    rob_grow,
  output logic    iq_grow,
  output logic    rf_grow,
  output logic [CNT_W-1:0] l2_pending,
  output logic [CNT_W-1:0] dl1_pending
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l2_pending  <= '0;
      dl1_pending <= '0;
    end else begin
      l2_pending  <= l2_pending  + CNT_W'(l2_miss_start)  - CNT_W'(l2_miss_done);
      dl1_pending <= dl1_pending + CNT_W'(dl1_miss_start) - CNT_W'(dl1_miss_done);
    end
  end

  always_comb begin
    miss_period = (l2_pending != '0);
    if (policy == POLICY_L2ML1RS && dl1_pending >= CNT_W'(2))
      miss_period = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rob_up <= 1'b0;
      iq_up  <= 1'b0;
      rf_up  <= 1'b0;
    end else begin
      rob_up <= miss_period | (rob_up & ~rob_upper_empty);
      iq_up  <= miss_period | (iq_up  & ~iq_upper_empty);
      rf_up  <= miss_period | (rf_up  & ~rf_upper_empty);
    end
  end

  assign rob_grow = rob_up & miss_period;
  assign iq_grow  = iq_up  & miss_period;
  assign rf_grow  = rf_up  & miss_period;

  // A miss cannot be serviced that was never started.
  a_l2_underflow : assert property (@(posedge clk) disable iff (!rst_n)
    l2_miss_done |-> (l2_pending != '0 || l2_miss_start));
  a_dl1_underflow : assert property (@(posedge clk) disable iff (!rst_n)
    dl1_miss_done |-> (dl1_pending != '0 || dl1_miss_start));

endmodule
