// Testbench for goh_control.  An I2C slave model decodes START, STOP and the
// bytes on the bus and acknowledges every byte (or none, for the NACK test).
// Checked: after reset both GOHs get the nominal laser code; raising either
// temperature flag writes the raised code to both; a flag change that does
// not change the wanted current writes nothing; a GOH reset request holds both
// reset outputs low for RST_TICKS ticks and is followed by a rewrite; a missing
// ACK sets nack.
module tb_goh_control;
  import blm_pkg::*;
  localparam int QT = 1, RT = 4;
  localparam logic [6:0] A1 = 7'h20, A2 = 7'h21;
  localparam logic [7:0] RG = 8'h02, NOM = 8'd57, HI = 8'd81;
  logic clk = 0, rst = 1, en_200ns = 0, temp1 = 0, temp2 = 0, goh_rst_req = 0;
  logic [1:0] goh_rst_n;
  logic scl, sda_low, sda_in, i2c_busy, nack, cur_high;
  int checks = 0, failures = 0;
  int cyc = 0;

  goh_control #(.QTR_TICKS(QT), .RST_TICKS(RT)) dut (.clk, .rst, .en_200ns, .temp1, .temp2,
    .goh_rst_req, .goh_rst_n, .scl, .sda_low, .sda_in, .i2c_busy, .nack, .cur_high);

  always #5 clk = ~clk;
  always @(posedge clk) begin cyc <= cyc + 1; en_200ns <= (cyc % 2 == 0); end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // ------------------------------------------------------------ slave model
  bit   ack_en = 1;
  logic slave_pull = 0;
  logic sda;
  assign sda    = ~(sda_low | slave_pull);
  assign sda_in = sda;
  logic scl_q = 1, sda_q = 1;
  int   nbit = 0;
  logic [7:0] sh;
  logic [7:0] bytes [$];
  logic [7:0] xfers [$][$];
  int   nstarts = 0;

  always @(posedge clk) begin
    scl_q <= scl; sda_q <= sda;
    if (scl && scl_q && sda_q && !sda) begin nbit <= 0; bytes.delete(); nstarts++; end     // START
    else if (scl && scl_q && !sda_q && sda) xfers.push_back(bytes);                         // STOP
    else if (scl && !scl_q) begin                                                            // SCL rise
      if (nbit < 8) sh <= {sh[6:0], sda};
      if (nbit == 7) bytes.push_back({sh[6:0], sda});
      nbit <= (nbit == 8) ? 0 : nbit + 1;
    end
    if (!scl && scl_q) slave_pull <= (nbit == 8) && ack_en;                                  // SCL fall
  end

  task automatic expect_pair(input logic [7:0] code, input string what);
    int t = 0;
    while (xfers.size() < 2 && t < 5000) begin @(posedge clk); t++; end
    chk(xfers.size() == 2, {what, ": two transfers"});
    if (xfers.size() == 2) begin
      chk(xfers[0].size() == 3 && xfers[0][0] == {A1, 1'b0} && xfers[0][1] == RG && xfers[0][2] == code,
          {what, ": GOH 1 write"});
      chk(xfers[1].size() == 3 && xfers[1][0] == {A2, 1'b0} && xfers[1][1] == RG && xfers[1][2] == code,
          {what, ": GOH 2 write"});
    end
    @(posedge clk);
    chk(!i2c_busy, {what, ": idle after"});
    xfers.delete();
  endtask

  initial begin
    int low;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    expect_pair(NOM, "after reset");
    chk(!cur_high && !nack, "nominal, acked");
    @(negedge clk) temp1 = 1;
    expect_pair(HI, "temp1 high");
    chk(cur_high, "cur_high set");
    @(negedge clk) temp2 = 1;
    @(negedge clk) temp1 = 0;
    repeat (1000) @(posedge clk);
    chk(xfers.size() == 0 && nstarts == 4, "no write when setting unchanged");
    @(negedge clk) temp2 = 0;
    expect_pair(NOM, "temps low");
    // GOH reset
    @(negedge clk) goh_rst_req = 1;
    @(negedge clk) goh_rst_req = 0;
    low = 0;
    while (goh_rst_n == 2'b00) begin @(negedge clk); low++; end
    chk(low >= 2 * RT - 2 && low <= 2 * RT + 2, "GOH reset length");
    expect_pair(NOM, "after GOH reset");
    // missing acknowledge
    ack_en = 0;
    @(negedge clk) temp1 = 1;
    expect_pair(HI, "no ack");
    chk(nack, "nack flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
