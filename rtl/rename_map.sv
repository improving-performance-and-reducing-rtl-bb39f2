// rename_map: register renaming onto the rename register file.
//
// For each architectural register the map holds whether its newest value is
// still in flight in a rename register and, if so, which one. For each rename
// register a ready bit says whether its result has been written. A dispatch
// group of W instructions is renamed in one cycle: a source names the rename
// register of its newest producer (a producer earlier in the same group
// included) or, when no producer is in flight, the architectural register
// file. A destination gets the rename register handed out by the free list.
// When an instruction retires, its value moves to the architectural register
// file and the map entry is cleared, unless a younger instruction has already
// renamed the same register.
//
// Result and retirement broadcasts of the current cycle are not folded in
// here; the issue queue applies them to the entry it writes.
// The document names the rename stage but not its organisation; this
// rename-buffer organisation (values move to an architectural file at
// retirement, which frees the rename register) follows its statement that
// registers are released as their instructions commit.
//
// Each renamed source also carries its architectural register number
// unchanged (`areg`), so that the issue queue can switch it to the
// architectural file later; those output bits are plain copies of the input.
//
// Timing: `ren_src` is combinational; map and ready bits update at the edge.
module rename_map
  import rr_pkg::*;
#(
  parameter int unsigned W = WIDTH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  inst_t [W-1:0]   ren_inst,
  input  logic  [W-1:0]   ren_fire,     // instruction i is dispatched this cycle
  input  preg_t [W-1:0]   ren_dst,      // rename register for instruction i
  output src_t  [W-1:0]   ren_s1,
  output src_t  [W-1:0]   ren_s2,
  input  logic  [W-1:0]   wb_valid,
  input  preg_t [W-1:0]   wb_preg,
  input  logic  [W-1:0]   cm_valid,
  input  rob_entry_t [W-1:0] cm_entry
);

  logic  [NUM_AREG-1:0] inflight_q;
  preg_t                map_q [NUM_AREG];
  logic  [RF_SIZE-1:0]  ready_q;

  function automatic src_t lookup(input areg_t a, input int i, input inst_t [W-1:0] inst,
                                  input preg_t [W-1:0] dst);
    src_t r;
    r.areg   = a;
    r.preg   = map_q[a];
    r.in_arf = !inflight_q[a];
    r.rdy    = !inflight_q[a] || ready_q[map_q[a]];
    for (int j = 0; j < W; j++) begin
      if (j < i && inst[j].has_dst && inst[j].dst == a) begin
        r.preg   = dst[j];
        r.in_arf = 1'b0;
        r.rdy    = 1'b0;
      end
    end
    return r;
  endfunction

  always_comb begin
    for (int i = 0; i < W; i++) begin
      ren_s1[i] = lookup(ren_inst[i].src1, i, ren_inst, ren_dst);
      ren_s2[i] = lookup(ren_inst[i].src2, i, ren_inst, ren_dst);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight_q <= '0;
      ready_q    <= '0;
    end else begin
      for (int k = 0; k < W; k++)
        if (cm_valid[k] && cm_entry[k].has_dst && inflight_q[cm_entry[k].areg]
            && map_q[cm_entry[k].areg] == cm_entry[k].preg)
          inflight_q[cm_entry[k].areg] <= 1'b0;
      for (int k = 0; k < W; k++)
        if (wb_valid[k]) ready_q[wb_preg[k]] <= 1'b1;
      for (int i = 0; i < W; i++)
        if (ren_fire[i] && ren_inst[i].has_dst) begin
          inflight_q[ren_inst[i].dst] <= 1'b1;
          ready_q[ren_dst[i]]         <= 1'b0;
        end
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++)
      if (ren_fire[i] && ren_inst[i].has_dst) map_q[ren_inst[i].dst] <= ren_dst[i];
  end

endmodule
