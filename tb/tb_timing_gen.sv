// Testbench for timing_gen.  A small instance (5 ticks per window, 3 windows
// per second) checks the spacing of every enable, the ADC clock duty cycle,
// the sampling strobes, the readout window, the frame delay and the FID.  A
// second instance at the default parameters checks the card's periods:
// 200 ns = 8 cycles and 40 us = 1600 cycles.
module tb_timing_gen;
  import blm_pkg::*;
  localparam int CYC = 8, TK = 5, W1S = 3, FD = 6, PW = 4;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  logic e200, e40, e1s, nr, fs, aclk, sr, sf;
  logic [FID_W-1:0] fid;
  logic d200, d40, d1s, dnr, dfs, daclk, dsr, dsf;
  logic [FID_W-1:0] dfid;

  timing_gen #(.CYC_200NS(CYC), .TICKS_40US(TK), .WIN_1S(W1S), .PULSE_WIN(PW), .FRAME_DELAY(FD)) dut (
    .clk, .rst, .en_200ns(e200), .en_40us(e40), .en_1s(e1s), .near_readout(nr),
    .frame_start(fs), .adc_clk(aclk), .smp_rise(sr), .smp_fall(sf), .fid);
  timing_gen dut_def (
    .clk, .rst, .en_200ns(d200), .en_40us(d40), .en_1s(d1s), .near_readout(dnr),
    .frame_start(dfs), .adc_clk(daclk), .smp_rise(dsr), .smp_fall(dsf), .fid(dfid));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last200 = -1, last40 = -1, last1s = -1, lastd40 = -1, lastd200 = -1;
  int n40 = 0, nfs = 0, nr_run = 0;
  logic [FID_W-1:0] fid_exp = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    forever begin
      @(posedge clk); #1;
      cyc++;
      // phase within the 200 ns period, counted from reset release
      chk(aclk == ((cyc % CYC) < CYC / 2), "adc_clk duty");
      chk(sr == ((cyc % CYC) == CYC / 2 - 1), "smp_rise position");
      chk(sf == ((cyc % CYC) == CYC - 1), "smp_fall position");
      if (e200) begin
        if (last200 >= 0) chk(cyc - last200 == CYC, "200ns period");
        last200 = cyc;
      end
      if (nr) nr_run++;
      if (e40) begin
        chk(nr, "near_readout covers en_40us");
        chk(nr_run == PW, "near_readout length");
        if (last40 >= 0) chk(cyc - last40 == CYC * TK, "40us period");
        last40 = cyc; n40++;
      end
      if (!nr) nr_run = 0;
      if (e1s) begin
        chk(e40, "en_1s on a window boundary");
        if (last1s >= 0) chk(cyc - last1s == CYC * TK * W1S, "1s period");
        last1s = cyc;
      end
      if (fs) begin
        chk(cyc - last40 == FD + 1, "frame delay");
        chk(fid == fid_exp, "fid value");
        fid_exp++; nfs++;
      end
      if (d200) begin
        if (lastd200 >= 0) chk(cyc - lastd200 == 8, "default 200ns = 8 cycles");
        lastd200 = cyc;
      end
      if (d40) begin
        if (lastd40 >= 0) chk(cyc - lastd40 == 1600, "default 40us = 1600 cycles");
        lastd40 = cyc;
      end
      if (cyc == 6000) break;
    end
    chk(n40 > 100, "windows seen");
    chk(nfs > 100, "frames seen");
    chk(lastd40 > 0, "default window seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
