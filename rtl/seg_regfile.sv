// seg_regfile: segmented rename register file with a variable access time.
//
// SIZE registers of XLEN bits in two segments: registers 0..BASE-1 (lower
// segment, next to the sense amplifiers) and BASE..SIZE-1 (upper segment).
// In the circuit the two bitline segments are joined by segment-select pass
// gates; with the gates off the upper segment is floating and power gated and
// the lower segment alone sets the bitline load, so an access fits in one
// clock cycle. With the gates on (`upper_en`) the full bitline is slower and
// every access takes two cycles.
//
// This model keeps that behaviour at the register-transfer level:
//  * `upper_en` = 0: a read presented in cycle t returns its data at the edge
//    ending cycle t (valid in t+1); a write presented in cycle t is in the
//    array at the edge ending t. The upper segment is cut off: its registers
//    read as 0 and writes to it are lost.
//  * `upper_en` = 1: reads and writes are pipelined over two cycles. A read in
//    cycle t samples the array in t+1 and returns data valid in t+2; a write
//    in cycle t lands in the array at the edge ending t+1.
// The issue read ports return the array contents only; results written too
//  recently to be in the array are supplied by the bypass network that sits
// after this block. When the access time drops from two cycles to one, a read
// still in its first stage would collide with a new one-cycle read, so
// `rd_ready` is low for that one cycle and the issue stage holds.
//
// The retirement read ports (`cr_*`) are combinational and see a write that
// is still in the write pipeline, so a result can retire in the cycle after
// it was written. Each issue lane reads two registers and carries a payload
// of type TAG_T alongside. The pipelining of writes and the cycle-exact
// port behaviour are this design's choices; the two-cycle access of the
// enlarged register file follows the document.
module seg_regfile
  import rr_pkg::*;
#(
  parameter int unsigned SIZE  = RF_SIZE,
  parameter int unsigned BASE  = RF_BASE,
  parameter int unsigned LANES = WIDTH,
  parameter type         TAG_T = logic
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  upper_en,      // segment-select pass gates on
  // issue read lanes
  output logic                  rd_ready,
  input  logic  [LANES-1:0]     rd_valid,
  input  preg_t [LANES-1:0][1:0] rd_addr,
  input  TAG_T  [LANES-1:0]     rd_tag,
  output logic  [LANES-1:0]     out_valid,
  output preg_t [LANES-1:0][1:0] out_addr,
  output data_t [LANES-1:0][1:0] out_data,
  output TAG_T  [LANES-1:0]     out_tag,
  output logic  [LANES-1:0]     out_slow,      // read took two cycles
  // write ports
  input  logic  [LANES-1:0]     wr_valid,
  input  preg_t [LANES-1:0]     wr_addr,
  input  data_t [LANES-1:0]     wr_data,
  // retirement read ports
  input  preg_t [LANES-1:0]     cr_addr,
  output data_t [LANES-1:0]     cr_data
);

  data_t mem [SIZE];

  // read pipeline stage 1 (two-cycle mode only)
  logic  [LANES-1:0]      s1_valid;
  preg_t [LANES-1:0][1:0] s1_addr;
  TAG_T  [LANES-1:0]      s1_tag;
  // write pipeline stage (two-cycle mode only)
  logic  [LANES-1:0]      w1_valid;
  preg_t [LANES-1:0]      w1_addr;
  data_t [LANES-1:0]      w1_data;

  assign rd_ready = upper_en || (s1_valid == '0);

  function automatic data_t rd_array(input preg_t a, input logic up);
    if (!up && a >= preg_t'(BASE)) return '0;   // isolated segment
    return mem[a];
  endfunction

  // the read that reaches the array this cycle
  logic                   acc_slow;
  logic  [LANES-1:0]      acc_valid;
  preg_t [LANES-1:0][1:0] acc_addr;
  TAG_T  [LANES-1:0]      acc_tag;
  always_comb begin
    acc_slow  = (s1_valid != '0);
    acc_valid = acc_slow ? s1_valid : (upper_en ? '0 : rd_valid);
    acc_addr  = acc_slow ? s1_addr  : rd_addr;
    acc_tag   = acc_slow ? s1_tag   : rd_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= '0;
      w1_valid  <= '0;
      out_valid <= '0;
    end else begin
      s1_valid  <= upper_en ? rd_valid : '0;
      w1_valid  <= upper_en ? wr_valid : '0;
      out_valid <= acc_valid;
    end
  end

  always_ff @(posedge clk) begin
    s1_addr <= rd_addr;
    s1_tag  <= rd_tag;
    w1_addr <= wr_addr;
    w1_data <= wr_data;
    for (int l = 0; l < LANES; l++) begin
      out_addr[l] <= acc_addr[l];
      out_tag[l]  <= acc_tag[l];
      out_slow[l] <= acc_slow;
      for (int s = 0; s < 2; s++) out_data[l][s] <= rd_array(acc_addr[l][s], upper_en);
    end
    // array writes: the write stage first, then direct one-cycle writes
    for (int l = 0; l < LANES; l++)
      if (w1_valid[l]) mem[w1_addr[l]] <= w1_data[l];
    for (int l = 0; l < LANES; l++)
      if (!upper_en && wr_valid[l] && wr_addr[l] < preg_t'(BASE)) mem[wr_addr[l]] <= wr_data[l];
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      cr_data[l] = rd_array(cr_addr[l], upper_en);
      for (int k = 0; k < LANES; k++)
        if (w1_valid[k] && w1_addr[k] == cr_addr[l]) cr_data[l] = w1_data[k];
    end
  end

  // With the upper segment cut off, nothing may address it.
  for (genvar g = 0; g < LANES; g++) begin : g_chk
    a_rd_lower : assert property (@(posedge clk) disable iff (!rst_n)
      (rd_valid[g] && !upper_en) |-> (rd_addr[g][0] < preg_t'(BASE) && rd_addr[g][1] < preg_t'(BASE)));
    a_wr_lower : assert property (@(posedge clk) disable iff (!rst_n)
      (wr_valid[g] && !upper_en) |-> (wr_addr[g] < preg_t'(BASE)));
  end

endmodule
