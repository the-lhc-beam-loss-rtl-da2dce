// Testbench for reset_tmr: every combination of the three reset pins must give
// the two-out-of-three majority on rst two clock edges later.
module tb_reset_tmr;
  logic clk = 0, rst;
  logic [2:0] rst_pin;
  int checks = 0, failures = 0;

  reset_tmr dut (.clk, .rst_pin, .rst);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_pin = '0;
    repeat (3) @(posedge clk);
    for (int r = 0; r < 3; r++) begin
      for (int v = 0; v < 8; v++) begin
        logic exp;
        exp = ($countones(3'(v)) >= 2);
        @(negedge clk) rst_pin = 3'(v);
        @(posedge clk); @(posedge clk);
        #1;
        checks++;
        if (rst !== exp) begin
          failures++;
          $display("pins=%b rst=%b expected %b", 3'(v), rst, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
