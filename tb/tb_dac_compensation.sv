// Testbench for dac_compensation, with a 3 s step timer.  A reference model
// here tracks, per channel, seconds since the last count, the compensation
// setting and the error counter.  Each "second" some channels receive a count
// (on one voter or the other) and others do not.  Checked every second: the
// settings, the error flags (6 steps without a count), dac_155 and dac_over;
// freezing while block is high; clearing by dac_reset; and that the DAC bus
// writes all eight channels, each with setting + 100 (saturated) when
// add_offset is high, followed by one LDAC pulse.
module tb_dac_compensation;
  import blm_pkg::*;
  localparam int TS = 3, EL = 6, OFS = 100;
  logic clk = 0, rst = 1, en_1s = 0, count_strobe = 0, block = 0, add_offset = 0;
  logic dac_reset = 0, dac_update = 0;
  count_t q1 [NCH], q2 [NCH];
  dac_t dac_set [NCH];
  logic [NCH-1:0] cfc_err;
  logic dac_155, dac_over;
  dac_t dac_data;
  logic [2:0] dac_addr;
  logic dac_cs_n, dac_wr_n, dac_ldac_n;
  int checks = 0, failures = 0;

  dac_compensation #(.TIMER_S(TS), .ERR_LIMIT(EL), .TEST_OFFSET(OFS)) dut (
    .clk, .rst, .en_1s, .count_strobe, .count_q1(q1), .count_q2(q2), .block, .add_offset,
    .dac_reset, .dac_update, .dac_set, .cfc_err, .dac_155, .dac_over,
    .dac_data, .dac_addr, .dac_cs_n, .dac_wr_n, .dac_ldac_n);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // reference model
  int m_sec [NCH], m_set [NCH], m_err [NCH];

  // DAC bus monitor
  int wr_seen [NCH];
  int wr_val [NCH];
  int n_ldac = 0, n_writes = 0;
  always @(posedge clk) begin
    if (!dac_wr_n && !dac_cs_n) begin
      wr_seen[dac_addr] = 1; wr_val[dac_addr] = int'(dac_data); n_writes++;
    end
    if (!dac_ldac_n) n_ldac++;
  end

  task automatic do_second(input bit [NCH-1:0] counts, input bit use_q2);
    // count strobe with counts on the chosen voter output
    @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      q1[c] = (counts[c] && !use_q2) ? count_t'($urandom_range(1, 255)) : '0;
      q2[c] = (counts[c] &&  use_q2) ? count_t'($urandom_range(1, 255)) : '0;
    end
    count_strobe = 1;
    @(negedge clk) count_strobe = 0;
    for (int c = 0; c < NCH; c++) q1[c] = '0;
    for (int c = 0; c < NCH; c++) q2[c] = '0;
    if (!block)
      for (int c = 0; c < NCH; c++) if (counts[c]) begin m_sec[c] = 0; m_err[c] = 0; end
    repeat (3) @(negedge clk);
    en_1s = 1;
    @(negedge clk) en_1s = 0;
    if (!block)
      for (int c = 0; c < NCH; c++) begin
        if (m_sec[c] == TS - 1) begin
          m_sec[c] = 0;
          if (m_set[c] < 255) m_set[c]++;
          if (m_err[c] < EL) m_err[c]++;
        end else m_sec[c]++;
      end
  endtask

  task automatic compare(input string what);
    bit e155, eover;
    e155 = 0; eover = 0;
    for (int c = 0; c < NCH; c++) begin
      chk(dac_set[c] == dac_t'(m_set[c]), $sformatf("%s: setting ch%0d %0d exp %0d", what, c, dac_set[c], m_set[c]));
      chk(cfc_err[c] == (m_err[c] == EL), $sformatf("%s: error flag ch%0d", what, c));
      if (m_set[c] > 155) e155 = 1;
      if (m_set[c] == 255) eover = 1;
    end
    chk(dac_155 == e155 && dac_over == eover, {what, ": 155/over flags"});
  endtask

  task automatic check_bus(input bit ofs);
    foreach (wr_seen[c]) wr_seen[c] = 0;
    n_ldac = 0;
    @(negedge clk) add_offset = ofs; dac_update = 1;
    @(negedge clk) dac_update = 0;
    repeat (50) @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      int e;
      e = m_set[c] + (ofs ? OFS : 0);
      if (e > 255) e = 255;
      chk(wr_seen[c] == 1 && wr_val[c] == e, $sformatf("DAC write ch%0d %0d exp %0d", c, wr_val[c], e));
    end
    chk(n_ldac == 1, "one LDAC pulse");
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) begin m_sec[c] = 0; m_set[c] = 0; m_err[c] = 0; q1[c] = '0; q2[c] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // phase 1: channels 0-3 never count, 4-7 count at random
    for (int s = 0; s < 30; s++) begin
      do_second({4'($urandom), 4'b0000} | ((s % 4 == 0) ? 8'b0000_0010 : 8'b0), s[0]);
      compare("phase 1");
    end
    check_bus(0);
    check_bus(1);
    // blocked: nothing moves
    block = 1;
    for (int s = 0; s < 10; s++) do_second(8'hF0, 0);
    compare("blocked");
    block = 0;
    // long run towards saturation on channel 0
    for (int s = 0; s < 800; s++) begin
      do_second(8'b1111_1110, 0);
      if (s % 50 == 0) compare("long run");
    end
    compare("saturated");
    check_bus(1);
    // DAC reset
    @(negedge clk) dac_reset = 1;
    @(negedge clk) dac_reset = 0;
    for (int c = 0; c < NCH; c++) begin m_sec[c] = 0; m_set[c] = 0; m_err[c] = 0; end
    compare("after reset");
    chk(n_writes > 0, "bus used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
