// Testbench for cfc_counter_channel.  The same random pulse train is driven on
// the three pins of the channel, except that in some windows one pin (a
// different one each time) is corrupted: held low, or given extra pulses.  Both
// voted outputs must still equal the true count of the window, and the voted
// pulse must follow the good pins.
module tb_cfc_counter_channel;
  import blm_pkg::*;
  localparam int WIN = 400;
  logic clk = 0, rst = 1, en_40us = 0, pulse;
  logic [2:0] cfc_in;
  count_t q1, q2;
  int checks = 0, failures = 0;
  int cyc = 0;

  cfc_counter_channel dut (.clk, .rst, .cfc_in, .en_40us, .pulse, .count_q1(q1), .count_q2(q2));

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    en_40us <= ((cyc % WIN) == WIN - 2);
  end

  // true signal, and per window which lane is faulty (3 = none) and how
  logic good = 0, good_q = 0;
  int   bad_lane = 3, bad_kind = 0;
  int   wcount = 0, last_count = -1;
  int   npulse_ok = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (good && !good_q) wcount++;
      if (en_40us) begin last_count = wcount; wcount = 0; end
    end
    good_q <= good;
  end

  always_comb begin
    for (int l = 0; l < 3; l++) begin
      if (l == bad_lane) cfc_in[l] = (bad_kind == 0) ? 1'b0 : ~good;
      else               cfc_in[l] = good;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    forever begin
      @(negedge clk);
      good = ($urandom_range(0, 3) == 0) ? ~good : good;
    end
  end

  // fault selection changes right after each boundary
  int nw = 0;
  initial begin
    @(negedge rst);
    forever begin
      @(posedge clk iff en_40us);
      #1;
      nw++;
      // alternate clean windows and windows with one faulty lane, so that
      // no two lanes are ever wrong at the same time
      bad_lane = (nw % 2 == 0) ? 3 : $urandom_range(0, 2);
      bad_kind = $urandom_range(0, 1);
      repeat (2) @(posedge clk);
      #1;
      if (nw > 1) begin
        checks += 2;
        if (q1 !== count_t'(last_count)) begin failures++; $display("q1 %0d exp %0d", q1, last_count); end
        if (q2 !== count_t'(last_count)) begin failures++; $display("q2 %0d exp %0d", q2, last_count); end
      end
      if (nw == 40) begin
        checks++;
        if (npulse_ok < 100) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // sampled just before the clock edge, against the testbench's own edge detector
  always @(posedge clk) if (!rst) begin
    if (pulse) npulse_ok++;
    checks++;
    if (pulse !== (good & ~good_q)) begin failures++; $display("pulse mismatch at %0t", $time); end
  end
endmodule
