// arch_regfile: committed (architectural) register state.
//
// NUM_AREG registers of XLEN bits, cleared to zero at reset. Retiring
// instructions write their results here (up to W per cycle; a later port wins
// when two retire to the same register in one cycle, which is program order).
// Reads are combinational; NRD read ports serve the operands that no longer
// live in a rename register. The document treats the architectural state as
// part of the base core; this file is the simplest form of it.
module arch_regfile
  import rr_pkg::*;
#(
  parameter int unsigned W   = WIDTH,
  parameter int unsigned NRD = 2 * WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic  [W-1:0]    wr_valid,
  input  areg_t [W-1:0]    wr_addr,
  input  data_t [W-1:0]    wr_data,
  input  areg_t [NRD-1:0]  rd_addr,
  output data_t [NRD-1:0]  rd_data
);

  data_t regs_q [NUM_AREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_AREG; r++) regs_q[r] <= '0;
    end else begin
      for (int k = 0; k < W; k++) if (wr_valid[k]) regs_q[wr_addr[k]] <= wr_data[k];
    end
  end

  always_comb
    for (int p = 0; p < NRD; p++) rd_data[p] = regs_q[rd_addr[p]];

endmodule
