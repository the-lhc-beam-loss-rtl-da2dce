// Testbench for adc_readout_pair.  An ADC model drives a random even-channel
// word during the high half of each 5 MHz period and a random odd-channel word
// during the low half.  Around each 40 us boundary (here every 6 ADC periods)
// CFC pulses are placed inside or outside the 100 ns readout window, and the
// sample after the boundary is sometimes made small, so all three readouts are
// selected.  Expected values follow from the sampling rule: even channel t, t1,
// t2 = samples of periods n, n+1, n+2; odd channel n-1, n, n+1, where n is the
// period that ends at the boundary.
module tb_adc_readout_pair;
  import blm_pkg::*;
  localparam int CYC = 8, TK = 6, NP = 400;
  localparam adc_t THR = 12'd64;
  logic clk = 0, rst = 1;
  adc_t adc_bus;
  logic smp_rise, smp_fall, en_40us, near_readout;
  logic [1:0] cfc_pulse;
  adc_t adc [2];
  logic [1:0] late;
  logic valid;
  int checks = 0, failures = 0;
  int n_t = 0, n_t1 = 0, n_t2 = 0;

  adc_readout_pair #(.ADC_THRESHOLD(THR)) dut (.clk, .rst, .adc_bus, .smp_rise, .smp_fall,
    .en_40us, .near_readout, .cfc_pulse, .adc, .late, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (CYC * NP + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  adc_t ev [NP], od [NP];
  int cyc = 0;
  int per, ph;
  assign per = cyc / CYC;
  assign ph  = cyc % CYC;
  assign adc_bus   = (per < NP) ? ((ph < CYC / 2) ? ev[per] : od[per]) : '0;
  assign smp_rise  = (ph == CYC / 2 - 1);
  assign smp_fall  = (ph == CYC - 1);
  assign en_40us   = (ph == CYC - 1) && (per % TK == TK - 1);
  assign near_readout = (ph >= CYC - 4) && (per % TK == TK - 1);

  // pulse plan per window: 0 none, 1 inside the readout window, 2 outside it
  int plan [2][NP];
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      unique case (plan[c][per])
        1: cfc_pulse[c] = (per % TK == TK - 1) && (ph == CYC - 2 - c);
        2: cfc_pulse[c] = (per % TK == TK - 3) && (ph == 2);
        default: cfc_pulse[c] = 1'b0;
      endcase
    end
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      ev[p] = adc_t'($urandom_range(0, 4095));
      od[p] = adc_t'($urandom_range(0, 4095));
      if ($urandom_range(0, 2) == 0) ev[p] = adc_t'($urandom_range(0, 63));
      if ($urandom_range(0, 2) == 0) od[p] = adc_t'($urandom_range(0, 63));
      plan[0][p] = $urandom_range(0, 2);
      plan[1][p] = $urandom_range(0, 2);
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
  end

  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  // checker: just before each boundary, the value of the previous window
  initial begin
    int n;
    @(negedge rst);
    forever begin
      @(negedge clk);
      if (en_40us && per >= 2 * TK && per + 2 < NP) begin
        checks++;
        if (!valid) begin failures++; $display("valid low before boundary"); end
        n = per - TK;                       // boundary period of the window just read
        for (int c = 0; c < 2; c++) begin
          adc_t t, t1, t2, exp;
          bit lt;
          t  = (c != 0) ? od[n - 1] : ev[n];
          t1 = (c != 0) ? od[n]     : ev[n + 1];
          t2 = (c != 0) ? od[n + 1] : ev[n + 2];
          lt = (plan[c][n] == 1);
          if (!lt)            begin exp = t;  n_t++;  end
          else if (t1 >= THR) begin exp = t1; n_t1++; end
          else                begin exp = t2; n_t2++; end
          checks += 2;
          if (adc[c] !== exp) begin
            failures++;
            $display("period %0d ch%0d: adc %0d expected %0d (late %0b)", n, c, adc[c], exp, lt);
          end
          if (late[c] !== lt) begin failures++; $display("late flag ch%0d", c); end
        end
      end
      if (per + 2 >= NP) begin
        checks += 3;
        if (n_t == 0 || n_t1 == 0 || n_t2 == 0) begin
          failures++;
          $display("selection path not exercised: t %0d t1 %0d t2 %0d", n_t, n_t1, n_t2);
        end
        // rate: one value per window, ready within 1 us of the boundary
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // latency: value updated within 3 ADC periods of the boundary
  int since = -1;
  always @(posedge clk) begin
    if (en_40us) since <= 0;
    else if (since >= 0) since <= since + 1;
    if (since >= 0 && valid && $past(!valid)) begin
      checks++;
      if (since > 3 * CYC) begin failures++; $display("readout latency %0d cycles", since); end
    end
  end
endmodule
