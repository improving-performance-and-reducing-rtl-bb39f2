// rob: reorder buffer with a base partition and a power-gated extension.
//
// The buffer has SIZE entries: entries 0..BASE-1 form the base partition and
// BASE..SIZE-1 the extension (48 = 32 + 16 in the main configuration). It is a
// circular buffer whose wrap point moves: after entry BASE-1 the tail goes on
// to entry BASE when the extension may be filled (`grow`), otherwise back to
// entry 0. The choice made when the tail leaves entry BASE-1 is kept in one
// flag, and the head follows the same path when it gets there, so program
// order is kept across size changes. After entry SIZE-1 both pointers wrap to
// 0. (The moving wrap point is this design's way of letting the size change
// while the buffer holds data.)
//
// Up to WIDTH instructions are allocated per cycle at `alloc_idx[0..]` (the
// caller checks `alloc_free` and asserts `alloc_n`), up to WIDTH completions
// mark entries done, and up to WIDTH done entries at the head retire per cycle
// in program order. `upper_empty` is the OR-reduced occupancy of the
// extension, also requiring that neither pointer sits in it, which is when
// the extension may be switched off.
//
// Timing: allocation, completion and retirement take effect at the clock
// edge; commit outputs are combinational from the registered state.
module rob
  import rr_pkg::*;
#(
  parameter int unsigned SIZE = ROB_SIZE,
  parameter int unsigned BASE = ROB_BASE,
  parameter int unsigned W    = WIDTH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      grow,           // extension may receive new entries
  // dispatch
  output logic [W-1:0][ROB_W-1:0]   alloc_idx,
  output logic [W-1:0]              alloc_free,     // slot alloc_idx[i] is free
  input  logic [$clog2(W+1)-1:0]    alloc_n,
  input  rob_entry_t [W-1:0]        alloc_entry,
  // completion
  input  logic [W-1:0]              cmpl_valid,
  input  logic [W-1:0][ROB_W-1:0]   cmpl_idx,
  // retirement
  output logic [W-1:0]              cm_valid,
  output rob_entry_t [W-1:0]        cm_entry,
  output logic                      upper_empty,
  output logic [ROB_W:0]            count
);

  logic [SIZE-1:0]  valid_q, done_q;
  rob_entry_t       ent_q [SIZE];
  logic [ROB_W-1:0] head_q, tail_q;
  logic             after_base_q;   // path taken after entry BASE-1 on this lap

  function automatic logic [ROB_W-1:0] step(input logic [ROB_W-1:0] i, input logic ext);
    if (i == ROB_W'(BASE - 1))      step = ext ? ROB_W'(BASE) : '0;
    else if (i == ROB_W'(SIZE - 1)) step = '0;
    else                            step = i + 1'b1;
  endfunction

  // allocation slots
  always_comb begin
    logic [ROB_W-1:0] p;
    p = tail_q;
    for (int i = 0; i < W; i++) begin
      alloc_idx[i]  = p;
      alloc_free[i] = !valid_q[p];
      p = step(p, grow);
    end
  end

  // retirement
  logic [W-1:0][ROB_W-1:0] cm_idx;
  always_comb begin
    logic [ROB_W-1:0] p;
    logic             run;
    p   = head_q;
    run = 1'b1;
    for (int i = 0; i < W; i++) begin
      cm_idx[i]   = p;
      run         = run && valid_q[p] && done_q[p];
      cm_valid[i] = run;
      cm_entry[i] = ent_q[p];
      p = step(p, after_base_q);
    end
  end

  logic [$clog2(W+1)-1:0] cm_n;
  always_comb begin
    cm_n = '0;
    for (int i = 0; i < W; i++) if (cm_valid[i]) cm_n = cm_n + 1'b1;
  end

  always_comb begin
    upper_empty = (valid_q[SIZE-1:BASE] == '0)
               && (tail_q < ROB_W'(BASE)) && (head_q < ROB_W'(BASE));
    count = '0;
    for (int i = 0; i < SIZE; i++) count = count + (ROB_W+1)'(valid_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q      <= '0;
      done_q       <= '0;
      head_q       <= '0;
      tail_q       <= '0;
      after_base_q <= 1'b0;
    end else begin
      for (int i = 0; i < W; i++)
        if (cm_valid[i]) valid_q[cm_idx[i]] <= 1'b0;
      for (int i = 0; i < W; i++)
        if (cmpl_valid[i]) done_q[cmpl_idx[i]] <= 1'b1;
      for (int i = 0; i < W; i++) begin
        if (i < int'(alloc_n)) begin
          valid_q[alloc_idx[i]] <= 1'b1;
          done_q[alloc_idx[i]]  <= 1'b0;
          if (alloc_idx[i] == ROB_W'(BASE - 1)) after_base_q <= grow;
        end
      end
      if (alloc_n != '0) tail_q <= step(alloc_idx[alloc_n - 1'b1], grow);
      if (cm_n != '0)    head_q <= step(cm_idx[cm_n - 1'b1], after_base_q);
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++)
      if (i < int'(alloc_n)) ent_q[alloc_idx[i]] <= alloc_entry[i];
  end

  // Allocation only into free slots; completion only of allocated entries.
  for (genvar g = 0; g < W; g++) begin : g_chk
    a_alloc_free : assert property (@(posedge clk) disable iff (!rst_n)
      (g < int'(alloc_n)) |-> alloc_free[g]);
    a_cmpl_valid : assert property (@(posedge clk) disable iff (!rst_n)
      cmpl_valid[g] |-> valid_q[cmpl_idx[g]]);
  end

endmodule
