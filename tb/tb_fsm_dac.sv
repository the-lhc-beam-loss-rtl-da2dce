// Testbench for fsm_dac with a 5 s hold and a 10-cycle "second".  Sequences
// checked: a test request shorter than the hold is ignored; a held request
// enters the test state after HOLD_S seconds and leaves it only when the pin
// is low and all LEVEL inputs are 1; a DAC-reset request passes through
// received, wait_for_level_2 and a one-cycle DAC reset; a GOH-reset request
// likewise ends in a one-cycle GOH reset; dropping a higher pin while it is
// being timed returns to the default state.  Outputs (offset, block, status
// flags) are checked in every state reached.
module tb_fsm_dac;
  import blm_pkg::*;
  localparam int HS = 5, SEC = 10;
  logic clk = 0, rst = 1, en_1s = 0, cfc_test = 0, rst_dac = 0, rst_goh = 0;
  logic [NCH-1:0] level = '1;
  cmd_state_e state;
  logic test_on, dac_rst_r, goh_rst_r, add_offset, block, dac_reset, goh_reset;
  int checks = 0, failures = 0;
  int cyc = 0, secs = 0;

  fsm_dac #(.HOLD_S(HS)) dut (.clk, .rst, .en_1s, .cfc_test, .rst_dac, .rst_goh, .level,
    .state, .test_on, .dac_rst_r, .goh_rst_r, .add_offset, .block, .dac_reset, .goh_reset);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    en_1s <= (cyc % SEC == SEC - 1);
    if (en_1s) secs <= secs + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t (state %s)", msg, $time, state.name()); end
  endtask

  // outputs as the description defines them, checked against the state
  always @(negedge clk) if (!rst) begin
    checks++;
    if (block != (state != ST_WAIT_FOR_CFC_TEST)) begin failures++; $display("block wrong"); end
  end

  int n_dac_reset = 0, n_goh_reset = 0;
  always @(posedge clk) begin
    if (!rst && dac_reset) n_dac_reset++;
    if (!rst && goh_reset) n_goh_reset++;
  end

  task automatic wait_s(input int n);
    repeat (n * SEC) @(negedge clk);
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(state == ST_WAIT_FOR_CFC_TEST && !add_offset, "default state");
    // short request
    cfc_test = 1; wait_s(HS - 2);
    chk(!test_on && !add_offset && block, "timing short request");
    cfc_test = 0; @(negedge clk); @(negedge clk);
    chk(state == ST_WAIT_FOR_CFC_TEST && !block, "short request ignored");
    // held test request
    @(negedge clk) cfc_test = 1; t0 = secs;
    while (!test_on && secs - t0 < HS + 3) @(negedge clk);
    chk(test_on && add_offset && block && !dac_rst_r, "test state entered");
    chk(secs - t0 >= HS - 1 && secs - t0 <= HS + 1, "hold time");
    wait_s(3);
    chk(test_on, "test state held");
    level[3] = 0; cfc_test = 0; wait_s(2);
    chk(test_on, "test state kept while a level is high");
    level[3] = 1; @(negedge clk); @(negedge clk);
    chk(state == ST_WAIT_FOR_CFC_TEST && !add_offset, "test state left");
    // DAC reset
    cfc_test = 1; wait_s(1); rst_dac = 1; wait_s(HS + 2);
    chk(dac_rst_r && add_offset && !test_on, "DAC reset received");
    level[0] = 0; cfc_test = 0; rst_dac = 0; @(negedge clk); @(negedge clk);
    chk(state == ST_WAIT_FOR_LEVEL_2 && dac_rst_r && add_offset, "wait for level 2");
    wait_s(1);
    chk(n_dac_reset == 0, "no DAC reset before levels are fine");
    level[0] = 1; @(negedge clk); @(negedge clk); @(negedge clk);
    chk(n_dac_reset == 1 && state == ST_WAIT_FOR_CFC_TEST, "one DAC reset pulse");
    // rst_dac dropped while being timed
    cfc_test = 1; wait_s(1); rst_dac = 1; wait_s(2); rst_dac = 0; cfc_test = 0;
    @(negedge clk); @(negedge clk);
    chk(state == ST_WAIT_FOR_CFC_TEST && !dac_rst_r, "interrupted DAC request");
    // GOH reset
    cfc_test = 1; wait_s(1); rst_dac = 1; wait_s(1); rst_goh = 1; wait_s(HS + 2);
    chk(goh_rst_r && add_offset && !dac_rst_r, "GOH reset received");
    cfc_test = 0; rst_dac = 0; rst_goh = 0; level[7] = 0; @(negedge clk); @(negedge clk);
    chk(state == ST_WAIT_FOR_LEVEL_3 && goh_rst_r, "wait for level 3");
    level[7] = 1; @(negedge clk); @(negedge clk); @(negedge clk);
    chk(n_goh_reset == 1 && n_dac_reset == 1 && state == ST_WAIT_FOR_CFC_TEST, $sformatf("one GOH reset pulse (%0d GOH, %0d DAC)", n_goh_reset, n_dac_reset));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
