// rf_bitline_column: behavioural model (not synthesizable logic) of one bit
// column of the segmented register file.
//
// The column is a differential bitline pair running past ROWS storage cells.
// It is cut into two segments of SEG_ROWS rows: the lower segment sits next
// to the shared sense amplifier / pre-charge circuit, the upper segment is
// joined to it through a segment-select pass gate on each bitline. The
// bitline delay grows with the diffusion capacitance hung on it, i.e. with the
// number of rows connected, so:
//  * segment select off: only the lower segment loads the bitline and a read
//    completes after T_ISO (1.79 ns, against 1.76 ns for a plain 32-row file);
//    the upper segment floats and is power gated, so its cells lose their
//    contents and its rows cannot be read or written;
//  * segment select on: the whole bitline is loaded and a read completes after
//    T_FULL (1.93 ns), which the pipeline covers with two clock cycles.
// The three delays are the document's figures; the port list, the loss of
// the upper contents at power-down and the "no valid read" response for an
// isolated row are this model's choices.
//
// Interface: `precharge` high pre-charges the bitlines (no read in progress).
// With `precharge` low, one active `wordline` starts an access: a read when
// `wr_en` is low, a write of `wr_bit` when it is high. `sense_valid` rises and
// `sense_out` shows the stored bit when the read delay has elapsed; any change
// of the inputs restarts the access.
module rf_bitline_column #(
  parameter int unsigned ROWS     = 64,
  parameter int unsigned SEG_ROWS = 32,
  parameter realtime     T_ISO    = 1.79ns,
  parameter realtime     T_FULL   = 1.93ns
) (
  input  logic [ROWS-1:0] wordline,
  input  logic            seg_sel,
  input  logic            precharge,
  input  logic            wr_en,
  input  logic            wr_bit,
  output logic            sense_out,
  output logic            sense_valid
);
  timeunit 1ns;
  timeprecision 1ps;

  logic        bits [ROWS];
  int unsigned token;

  initial begin
    for (int r = 0; r < ROWS; r++) bits[r] = 1'b0;
    sense_out   = 1'b0;
    sense_valid = 1'b0;
    token       = 0;
  end

  function automatic int active_row(input logic [ROWS-1:0] wl);
    int row = -1;
    for (int r = 0; r < ROWS; r++)
      if (wl[r]) row = (row < 0) ? r : -2;   // -2: more than one row
    return row;
  endfunction

  always @(wordline or seg_sel or precharge or wr_en or wr_bit) begin
    int          row;
    int unsigned my;
    token       = token + 1;
    my          = token;
    sense_valid = 1'b0;
    row         = active_row(wordline);
    // power gating of the upper segment while it is cut off
    if (!seg_sel)
      for (int r = SEG_ROWS; r < ROWS; r++) bits[r] = 1'b0;
    if (!precharge && row >= 0 && (row < int'(SEG_ROWS) || seg_sel)) begin
      if (wr_en) begin
        bits[row] = wr_bit;
      end else begin
        fork
          begin
            #(seg_sel ? T_FULL : T_ISO);
            if (token == my) begin
              sense_out   = bits[row];
              sense_valid = 1'b1;
            end
          end
        join_none
      end
    end
  end

endmodule
