// rf_freelist: allocation of rename registers and the occupancy bits of the
// register file's upper segment.
//
// One "taken" bit per rename register. Up to W registers are handed out per
// cycle, the lowest-numbered free ones; registers of the upper segment
// (BASE..SIZE-1) are handed out only while `grow` is set. Up to W registers
// are given back per cycle when the instructions that produced them retire.
// The taken bits of the upper segment are the per-entry "free/taken" bits of
// the segmented register file; their OR says whether the upper segment holds
// any live value, and `upper_empty` is its inverse. The lowest-free-first
// search is this design's choice.
//
// Timing: `alloc_avail` and `alloc_preg` are combinational from the taken
// bits; allocation and release take effect at the clock edge. A register
// released in a cycle is not handed out again in the same cycle.
module rf_freelist
  import rr_pkg::*;
#(
  parameter int unsigned SIZE = RF_SIZE,
  parameter int unsigned BASE = RF_BASE,
  parameter int unsigned W    = WIDTH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   grow,
  output logic [W-1:0]           alloc_avail,  // at least i+1 registers are free
  output preg_t [W-1:0]          alloc_preg,
  input  logic [$clog2(W+1)-1:0] alloc_n,
  input  logic [W-1:0]           rel_valid,
  input  preg_t [W-1:0]          rel_preg,
  output logic [SIZE-BASE-1:0]   upper_taken,  // occupancy bits of the upper segment
  output logic                   upper_empty,
  output logic [$clog2(SIZE+1)-1:0] count      // registers taken
);

  logic [SIZE-1:0] taken_q;

  always_comb begin
    logic [SIZE-1:0] fr;
    fr = ~taken_q;
    if (!grow) fr[SIZE-1:BASE] = '0;
    alloc_avail = '0;
    alloc_preg  = '0;
    for (int k = 0; k < W; k++) begin
      for (int i = SIZE - 1; i >= 0; i--) begin
        if (fr[i]) begin
          alloc_avail[k] = 1'b1;
          alloc_preg[k]  = preg_t'(i);
        end
      end
      if (alloc_avail[k]) fr[alloc_preg[k]] = 1'b0;
    end
  end

  assign upper_taken = taken_q[SIZE-1:BASE];
  assign upper_empty = ~|upper_taken;

  always_comb begin
    count = '0;
    for (int i = 0; i < SIZE; i++) count = count + ($clog2(SIZE+1))'(taken_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taken_q <= '0;
    end else begin
      for (int k = 0; k < W; k++) if (rel_valid[k]) taken_q[rel_preg[k]] <= 1'b0;
      for (int k = 0; k < W; k++) if (k < int'(alloc_n)) taken_q[alloc_preg[k]] <= 1'b1;
    end
  end

  for (genvar g = 0; g < W; g++) begin : g_chk
    a_alloc : assert property (@(posedge clk) disable iff (!rst_n)
      (g < int'(alloc_n)) |-> alloc_avail[g]);
    a_release : assert property (@(posedge clk) disable iff (!rst_n)
      rel_valid[g] |-> taken_q[rel_preg[g]]);
  end

endmodule
