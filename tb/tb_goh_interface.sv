// Testbench for goh_interface.  Random frame contents are applied, frame_start
// is pulsed and the inputs are scrambled right after it (the block must send
// its snapshot).  The 20 words seen while tx_en is high are compared with a
// frame built here bit by bit from the frame table, with a byte-wise CRC-32
// over the first 18 words.  The first word must appear two cycles after
// frame_start and the 20 words must be consecutive.
module tb_goh_interface;
  import blm_pkg::*;
  logic clk = 0, rst = 1, frame_start = 0;
  logic [CID_W-1:0] cid;
  word_t status1, status2;
  chan_data_t chan [NCH];
  logic [FID_W-1:0] fid;
  dac_t dac [NCH];
  word_t tx_data;
  logic tx_en, tx_er, busy;
  int checks = 0, failures = 0;

  goh_interface dut (.clk, .rst, .frame_start, .cid, .status1, .status2, .chan, .fid, .dac,
    .tx_data, .tx_en, .tx_er, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_byte(input logic [31:0] c, input logic [7:0] b);
    c = c ^ {b, 24'h0};
    for (int i = 0; i < 8; i++) c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
    return c;
  endfunction

  task automatic scramble();
    cid = CID_W'($urandom); status1 = word_t'($urandom); status2 = word_t'($urandom);
    fid = FID_W'($urandom);
    for (int c = 0; c < NCH; c++) begin
      chan[c].count = count_t'($urandom); chan[c].adc = adc_t'($urandom);
      dac[c] = dac_t'($urandom);
    end
  endtask

  initial begin
    word_t exp [FRAME_WORDS];
    word_t got [$];
    bit    bits [$];
    logic [31:0] r;
    int    start_lat;
    scramble();
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 60; f++) begin
      repeat ($urandom_range(3, 30)) @(negedge clk);
      scramble();
      // expected frame
      exp[0] = cid; exp[1] = status1; exp[2] = status2;
      for (int g = 0; g < 2; g++) begin
        bits.delete();
        for (int c = 4 * g; c < 4 * g + 4; c++) begin
          for (int b = CNT_W - 1; b >= 0; b--) bits.push_back(chan[c].count[b]);
          for (int b = ADC_W - 1; b >= 0; b--) bits.push_back(chan[c].adc[b]);
        end
        for (int w = 0; w < 5; w++)
          for (int b = 0; b < 16; b++) exp[3 + 5 * g + w][15 - b] = bits[16 * w + b];
      end
      exp[13] = fid;
      for (int p = 0; p < 4; p++) exp[14 + p] = {dac[2 * p], dac[2 * p + 1]};
      r = 32'hFFFFFFFF;
      for (int i = 0; i < 18; i++) begin r = ref_byte(r, exp[i][15:8]); r = ref_byte(r, exp[i][7:0]); end
      exp[18] = r[31:16]; exp[19] = r[15:0];
      frame_start = 1;
      @(negedge clk) frame_start = 0;
      scramble();
      got.delete();
      start_lat = 1;
      while (!tx_en) begin @(negedge clk); start_lat++; if (start_lat > 10) break; end
      checks++;
      if (start_lat != 2) begin failures++; $display("start latency %0d", start_lat); end
      while (tx_en) begin
        got.push_back(tx_data);
        checks++;
        if (tx_er) begin failures++; $display("tx_er during frame"); end
        @(negedge clk);
      end
      checks++;
      if (got.size() != FRAME_WORDS) begin failures++; $display("frame length %0d", got.size()); end
      for (int i = 0; i < FRAME_WORDS && i < got.size(); i++) begin
        checks++;
        if (got[i] !== exp[i]) begin failures++; $display("frame %0d word %0d: %h expected %h", f, i, got[i], exp[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
