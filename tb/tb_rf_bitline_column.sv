// tb_rf_bitline_column: timing test of the bit-column behavioural model.
//
// Writes a pattern into all 64 rows with the segments joined, then reads rows
// back and checks the data and the read delay: with the upper segment cut
// off a lower row must be valid after 1.79 ns and not at 1.78 ns; with it
// joined any row must be valid after 1.93 ns and not at 1.92 ns. An upper row
// addressed while the segment is cut off must never give a valid read, and
// switching the segment off must lose the upper contents (power gating).
module tb_rf_bitline_column;
  timeunit 1ns;
  timeprecision 1ps;

  logic [63:0] wordline;
  logic seg_sel, precharge, wr_en, wr_bit;
  logic sense_out, sense_valid;
  logic [63:0] pattern;
  int checks = 0, failures = 0;

  rf_bitline_column dut (.*);

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  task automatic access_done();
    wordline = '0; precharge = 1; wr_en = 0;
    #1;
  endtask

  task automatic read_row(input int r, input realtime t, input logic exp);
    precharge = 0; wr_en = 0; wordline = '0; wordline[r] = 1;
    #(t - 0.01ns);
    check("not valid before the read delay", !sense_valid);
    #0.02ns;
    check("valid after the read delay", sense_valid);
    check("read data", sense_out == exp);
    access_done();
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pattern = {$urandom(), $urandom()};
    wordline = '0; seg_sel = 1; precharge = 1; wr_en = 0; wr_bit = 0;
    #1;
    for (int r = 0; r < 64; r++) begin
      precharge = 0; wr_en = 1; wr_bit = pattern[r]; wordline = '0; wordline[r] = 1;
      #1;
      access_done();
    end
    // joined segments: 1.93 ns for every row
    for (int r = 0; r < 64; r += 5) read_row(r, 1.93ns, pattern[r]);
    // cut off: lower rows in 1.79 ns, upper rows never
    seg_sel = 0; #1;
    for (int r = 0; r < 32; r += 3) read_row(r, 1.79ns, pattern[r]);
    precharge = 0; wordline = '0; wordline[40] = 1;
    #5;
    check("isolated upper row gives no read", !sense_valid);
    access_done();
    // joined again: the upper segment was powered down and lost its data
    seg_sel = 1; #1;
    read_row(40, 1.93ns, 1'b0);
    read_row(63, 1.93ns, 1'b0);
    read_row(7, 1.93ns, pattern[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
