// Testbench for cfc_lane.  Pulse trains of known lengths are placed in 40 us
// windows (600 cycles here); the count read out during the following window
// must equal the number of rising edges, and a window with more than 255 edges
// must read 255 (overflow FSM) rather than the wrapped value.  Edges on the
// window boundary cycle belong to the ending window.
module tb_cfc_lane;
  import blm_pkg::*;
  localparam int WIN = 600;
  logic clk = 0, rst = 1, cfc_in = 0, en_40us = 0, pulse;
  count_t count;
  int checks = 0, failures = 0;
  int cyc = 0;

  cfc_lane dut (.clk, .rst, .cfc_in, .en_40us, .pulse, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // window boundary generator
  always @(posedge clk) begin
    cyc <= cyc + 1;
    en_40us <= ((cyc % WIN) == WIN - 2);
  end

  int edges_in_win [$];
  int wedges = 0;
  int npulse = 0;
  always @(posedge clk) if (!rst && pulse) npulse++;

  // count the edges this testbench drives, per window
  logic prev_in = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (cfc_in && !prev_in) wedges++;
      if (en_40us) begin
        edges_in_win.push_back(wedges);
        wedges = 0;
      end
    end
    prev_in <= cfc_in;
  end

  // stimulus: per window a number of edges, some at the very end of the window
  int plan [8] = '{0, 1, 17, 255, 256, 299, 100, 3};
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(posedge en_40us);
    for (int w = 0; w < 8; w++) begin
      @(negedge clk);
      // wait so the pulses end just at the boundary in some windows
      if (plan[w] < 200) repeat (WIN - 2 * plan[w] - 4) @(negedge clk);
      for (int e = 0; e < plan[w]; e++) begin
        cfc_in = 1; @(negedge clk); cfc_in = 0; @(negedge clk);
      end
      while (!en_40us) @(negedge clk);
    end
  end

  // checker: two cycles after each boundary compare with the previous window
  int widx = 0;
  initial begin
    @(negedge rst);
    @(posedge en_40us);      // first boundary: nothing counted yet
    forever begin
      @(posedge clk iff en_40us);
      repeat (2) @(posedge clk);
      #1;
      if (edges_in_win.size() > 1) begin
        int exp;
        exp = edges_in_win[edges_in_win.size() - 1];
        if (exp > 255) exp = 255;
        checks++;
        if (count !== count_t'(exp)) begin
          failures++;
          $display("window %0d: count %0d expected %0d", widx, count, exp);
        end
        // the value must hold through the whole next window
        repeat (WIN - 10) @(posedge clk);
        checks++;
        if (count !== count_t'(exp)) begin failures++; $display("count not held"); end
      end
      widx++;
      if (widx == 10) begin
        checks++;
        if (npulse == 0) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
