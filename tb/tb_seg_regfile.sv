// tb_seg_regfile: self-checking test of the segmented rename register file.
//
// The testbench keeps its own image of the array and of the two-cycle
// pipeline stages and applies the documented timing: with the upper segment
// cut off a read returns the array contents one cycle later and a write lands
// at the end of its cycle; with it connected a read samples the array one
// cycle later and returns after two cycles, and a write lands one cycle later.
// Random reads, writes and retirement reads run in phases of both modes; the
// upper segment is addressed only while connected. Every cycle the read
// results (data, address, tag, latency flag), `rd_ready` and the retirement
// read data are compared. The test also measures the read latency directly
// and checks that the one-cycle hold appears when the access time drops.
module tb_seg_regfile;
  import rr_pkg::*;
  localparam int SZ = 64, BS = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic upper_en;
  logic rd_ready;
  logic [1:0] rd_valid;
  preg_t [1:0][1:0] rd_addr;
  logic [1:0] rd_tag;
  logic [1:0] out_valid;
  preg_t [1:0][1:0] out_addr;
  data_t [1:0][1:0] out_data;
  logic [1:0] out_tag;
  logic [1:0] out_slow;
  logic [1:0] wr_valid;
  preg_t [1:0] wr_addr;
  data_t [1:0] wr_data;
  preg_t [1:0] cr_addr;
  data_t [1:0] cr_data;
  int checks = 0, failures = 0;

  seg_regfile dut (.*);
  always #5 clk = ~clk;

  data_t m_mem[SZ];
  // model pipeline
  bit [1:0] m_s1v; preg_t [1:0][1:0] m_s1a; logic [1:0] m_s1t;
  bit [1:0] m_w1v; preg_t [1:0] m_w1a; data_t [1:0] m_w1d;
  bit [1:0] e_v; preg_t [1:0][1:0] e_a; data_t [1:0][1:0] e_d; logic [1:0] e_t; bit e_slow;
  int n_fast = 0, n_slow = 0, n_hold = 0, cyc = 0;
  int t_issue = -1, lat_fast = -1, lat_slow = -1;
  bit probe_slow;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic preg_t rnd_addr(bit up);
    return preg_t'(up ? $urandom_range(0, SZ - 1) : $urandom_range(0, BS - 1));
  endfunction

  initial begin
    upper_en = 0; rd_valid = 0; rd_addr = '0; rd_tag = 0; wr_valid = 0; wr_addr = '0; wr_data = '0; cr_addr = '0;
    e_v = 0; m_s1v = 0; m_w1v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // initialise every register through the two-cycle write path
    upper_en = 1;
    for (int i = 0; i < SZ; i += 2) begin
      wr_valid = 2'b11; wr_addr[0] = preg_t'(i); wr_addr[1] = preg_t'(i + 1);
      wr_data[0] = $urandom(); wr_data[1] = $urandom();
      m_mem[i] = wr_data[0]; m_mem[i+1] = wr_data[1];
      @(posedge clk); #1;
    end
    wr_valid = 0;
    repeat (2) @(posedge clk);
    upper_en = 0;
    #1;
    for (int c = 0; c < 20000; c++) begin
      bit up, acc_slow;
      bit [1:0] acc_v; preg_t [1:0][1:0] acc_a; logic [1:0] acc_t;
      bit m_ready;
      up = ((c / 500) % 2) == 1;
      upper_en = up;
      m_ready = up || (m_s1v == 0);
      if (!m_ready) n_hold++;
      // stimulus
      rd_valid = '0;
      for (int l = 0; l < 2; l++) begin
        rd_valid[l] = m_ready && ($urandom_range(0, 99) < 60);
        // the upper segment is empty when it is switched off, so nothing
        // reads it in the last connected cycle
        rd_addr[l][0] = rnd_addr(up && (c % 500) != 499);
        rd_addr[l][1] = rnd_addr(up && (c % 500) != 499);
        rd_tag[l] = 1'($urandom());
        wr_valid[l] = ($urandom_range(0, 99) < 50);
        wr_addr[l] = rnd_addr(up);
        wr_data[l] = $urandom();
        cr_addr[l] = rnd_addr(up);
      end
      if (wr_valid == 2'b11 && wr_addr[0] == wr_addr[1]) wr_valid[1] = 0;
      #1;
      // checks of this cycle
      check("rd_ready", rd_ready == m_ready);
      for (int l = 0; l < 2; l++) begin
        data_t exp_cr;
        check("out_valid", out_valid[l] == e_v[l]);
        if (e_v[l]) begin
          check("out_tag", out_tag[l] == e_t[l]);
          check("out_slow", out_slow[l] == e_slow);
          for (int s = 0; s < 2; s++) begin
            check("out_addr", out_addr[l][s] == e_a[l][s]);
            check("out_data", out_data[l][s] == e_d[l][s]);
          end
        end
        exp_cr = m_mem[cr_addr[l]];
        for (int k = 0; k < 2; k++) if (m_w1v[k] && m_w1a[k] == cr_addr[l]) exp_cr = m_w1d[k];
        check("cr_data", cr_data[l] == exp_cr);
      end
      // latency probe on lane 0
      if (e_v[0] && t_issue >= 0) begin
        if (probe_slow) lat_slow = cyc - t_issue; else lat_fast = cyc - t_issue;
        t_issue = -1;
      end
      if (rd_valid[0] && t_issue < 0 && e_v == 0 && m_s1v == 0) begin
        t_issue = cyc;
        probe_slow = up;
      end
      // model: the access that reaches the array this cycle
      acc_slow = (m_s1v != 0);
      acc_v = acc_slow ? m_s1v : (up ? 2'b00 : rd_valid);
      acc_a = acc_slow ? m_s1a : rd_addr;
      acc_t = acc_slow ? m_s1t : rd_tag;
      for (int l = 0; l < 2; l++) if (acc_v[l]) begin
        if (acc_slow) n_slow++; else n_fast++;
      end
      @(posedge clk);
      cyc++;
      e_v = acc_v; e_a = acc_a; e_t = acc_t; e_slow = acc_slow;
      for (int l = 0; l < 2; l++) for (int s = 0; s < 2; s++) e_d[l][s] = m_mem[acc_a[l][s]];
      for (int k = 0; k < 2; k++) if (m_w1v[k]) m_mem[m_w1a[k]] = m_w1d[k];
      for (int k = 0; k < 2; k++) if (!up && wr_valid[k]) m_mem[wr_addr[k]] = wr_data[k];
      m_w1v = up ? wr_valid : 2'b00; m_w1a = wr_addr; m_w1d = wr_data;
      m_s1v = up ? rd_valid : 2'b00; m_s1a = rd_addr; m_s1t = rd_tag;
      #1;
    end
    check("one-cycle reads seen", n_fast > 0);
    check("two-cycle reads seen", n_slow > 0);
    check("issue hold on access-time drop seen", n_hold > 0);
    check("one-cycle read latency", lat_fast == 1);
    check("two-cycle read latency", lat_slow == 2);
    $display("fast=%0d slow=%0d holds=%0d latency fast=%0d slow=%0d", n_fast, n_slow, n_hold, lat_fast, lat_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
