// Testbench for crc32_16.  Known answer: the bytes "12345678" taken as four
// 16-bit words give 0x49E3C2FB for the CRC-32/MPEG-2 definition (polynomial
// 0x04C11DB7, initial value all ones, no reflection, no final XOR).  Random
// frames are checked against a byte-at-a-time table-free reference.
module tb_crc32_16;
  import blm_pkg::*;
  logic clk = 0, init = 0, en = 0;
  word_t d = '0;
  logic [31:0] crc;
  int checks = 0, failures = 0;

  crc32_16 dut (.clk, .init, .en, .d, .crc);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_byte(input logic [31:0] c, input logic [7:0] b);
    c = c ^ {b, 24'h0};
    for (int i = 0; i < 8; i++) c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
    return c;
  endfunction

  task automatic run(input word_t w [$], input logic [31:0] exp);
    @(negedge clk) init = 1; en = 0;
    foreach (w[i]) begin
      @(negedge clk) init = 0; en = 1; d = w[i];
      // hold en low now and then: the CRC must not move
      if (i % 3 == 2) begin @(negedge clk) en = 0; d = ~w[i]; end
    end
    @(negedge clk) en = 0;
    checks++;
    if (crc !== exp) begin failures++; $display("crc %h expected %h", crc, exp); end
  endtask

  initial begin
    word_t w [$];
    logic [31:0] r;
    w = '{16'h3132, 16'h3334, 16'h3536, 16'h3738};
    run(w, 32'h49E3C2FB);
    for (int f = 0; f < 50; f++) begin
      w.delete();
      r = 32'hFFFFFFFF;
      for (int i = 0; i < 18; i++) begin
        w.push_back(word_t'($urandom));
        r = ref_byte(r, w[i][15:8]);
        r = ref_byte(r, w[i][7:0]);
      end
      run(w, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
