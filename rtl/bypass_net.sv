// bypass_net: two-level result bypass in front of the execution units.
//
// An operand read from the rename register file can miss a result that was
// broadcast too recently to be in the array. With the one-cycle register file
// the missing result is the one broadcast one cycle before the operand leaves
// the read stage; with the two-cycle (enlarged) register file it is the one
// broadcast two cycles before. Keeping only one level would leave a "hole" in
// which a value is neither on the bypass nor in the array, so this block keeps
// both levels at all times: the results of the last cycle (level 1) and of
// the cycle before (level 2). Each operand that names a rename register is
// compared with all of them; a match replaces the array value, level 1 taking
// precedence. Operands that come from the architectural register file
// (`src_use` = 0) pass through unchanged.
//
// Timing: the two history levels are registered copies of the result bus;
// the operand selection is combinational. `hit_l1` / `hit_l2` report, per
// operand, which level supplied it.
module bypass_net
  import rr_pkg::*;
#(
  parameter int unsigned LANES = WIDTH,   // operand lanes (2 sources each)
  parameter int unsigned WB    = WIDTH    // result buses
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic  [WB-1:0]          wb_valid,
  input  preg_t [WB-1:0]          wb_preg,
  input  data_t [WB-1:0]          wb_data,
  input  logic  [LANES-1:0][1:0]  src_use,
  input  preg_t [LANES-1:0][1:0]  src_preg,
  input  data_t [LANES-1:0][1:0]  src_rf,
  output data_t [LANES-1:0][1:0]  src_out,
  output logic  [LANES-1:0][1:0]  hit_l1,
  output logic  [LANES-1:0][1:0]  hit_l2
);

  logic  [WB-1:0] l1_valid, l2_valid;
  preg_t [WB-1:0] l1_preg, l2_preg;
  data_t [WB-1:0] l1_data, l2_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_valid <= '0;
      l2_valid <= '0;
    end else begin
      l1_valid <= wb_valid;
      l2_valid <= l1_valid;
    end
  end

  always_ff @(posedge clk) begin
    l1_preg <= wb_preg;
    l1_data <= wb_data;
    l2_preg <= l1_preg;
    l2_data <= l1_data;
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      for (int s = 0; s < 2; s++) begin
        src_out[l][s] = src_rf[l][s];
        hit_l1[l][s]  = 1'b0;
        hit_l2[l][s]  = 1'b0;
        if (src_use[l][s]) begin
          for (int k = 0; k < WB; k++) begin
            if (l2_valid[k] && l2_preg[k] == src_preg[l][s]) begin
              src_out[l][s] = l2_data[k];
              hit_l2[l][s]  = 1'b1;
            end
          end
          for (int k = 0; k < WB; k++) begin
            if (l1_valid[k] && l1_preg[k] == src_preg[l][s]) begin
              src_out[l][s] = l1_data[k];
              hit_l1[l][s]  = 1'b1;
              hit_l2[l][s]  = 1'b0;
            end
          end
        end
      end
    end
  end

endmodule
