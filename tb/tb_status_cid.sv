// Testbench for status_cid.  Random status inputs change every cycle; the
// outputs must equal the inputs of the last en_40us cycle and hold between
// boundaries.  A model of the signature source loads a random 16-bit CID on
// cid_load and presents its bits MSB first, moving to the next bit after each
// falling edge of cid_sclk; the block must end with that CID and cid_valid.
module tb_status_cid;
  import blm_pkg::*;
  logic clk = 0, rst = 1, en_200ns = 0, en_40us = 0;
  word_t s1_in, s2_in, s1, s2;
  logic cid_load, cid_sclk, cid_sdi, cid_valid;
  logic [CID_W-1:0] cid;
  int checks = 0, failures = 0;
  int cyc = 0;

  status_cid dut (.clk, .rst, .en_200ns, .en_40us, .status1_in(s1_in), .status2_in(s2_in),
    .status1(s1), .status2(s2), .cid_load, .cid_sclk, .cid_sdi, .cid, .cid_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    en_200ns <= (cyc % 8 == 6);
    en_40us  <= (cyc % 160 == 158);
  end
  always @(negedge clk) begin
    s1_in = word_t'($urandom);
    s2_in = word_t'($urandom);
  end

  // signature source
  logic [CID_W-1:0] sig, sreg;
  logic sclk_q = 0;
  assign cid_sdi = sreg[CID_W-1];
  always @(posedge clk) begin
    if (cid_load) sreg <= sig;
    else if (sclk_q && !cid_sclk) sreg <= {sreg[CID_W-2:0], 1'b0};
    sclk_q <= cid_sclk;
  end

  word_t exp1, exp2;
  int nsnap = 0;
  always @(posedge clk) if (rst) nsnap <= 0; else begin
    if (en_40us) begin exp1 <= s1_in; exp2 <= s2_in; nsnap <= nsnap + 1; end
    if (nsnap > 0) begin
      checks += 2;
      if (s1 !== exp1) begin failures++; $display("status1 %h exp %h", s1, exp1); end
      if (s2 !== exp2) begin failures++; $display("status2 %h exp %h", s2, exp2); end
    end
  end

  initial begin
    for (int run = 0; run < 3; run++) begin
      int t0;
      sig = CID_W'($urandom);
      rst = 1;
      repeat (3) @(posedge clk);
      @(negedge clk) rst = 0;
      t0 = cyc;
      checks++;
      if (cid_valid) begin failures++; $display("cid_valid before readout"); end
      wait (cid_valid);
      @(negedge clk);
      checks += 2;
      if (cid !== sig) begin failures++; $display("cid %h expected %h", cid, sig); end
      // 1 load tick + 2 ticks per bit + final low tick, 8 cycles per tick
      if (cyc - t0 > 8 * (2 * CID_W + 3)) begin failures++; $display("cid read too slow"); end
      repeat (500) @(posedge clk);
      checks++;
      if (cid !== sig || !cid_valid) begin failures++; $display("cid not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
