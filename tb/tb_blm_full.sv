// Full-size run of the card FPGA with every parameter at its default (40 us
// window of 1600 cycles at 40 MHz).  After reset it lets the card read its CID
// and send five frames on both links while the CFC pins receive pulse trains
// (channel 1 at the 20 MHz limit of the registered input, so its count
// saturates at 255; channel 2 at 5 MHz, the converter's rate at 1 mA, which
// must give 200 counts per window; channel 5 with one pin held low).  Checked
// per frame: 20 words, CRC, identical links, FID sequence, CID, counts against
// the edges of the window just ended, ADC channel tags, and a frame period of
// exactly 1600 cycles.
module tb_blm_full;
  import blm_pkg::*;
  localparam logic [CID_W-1:0] SIG = 16'h5A3C;

  logic clk = 0;
  logic [2:0] rst_pin = '1;
  logic [NCH-1:0][2:0] cfc_pin;
  adc_t adc_bus [NCH/2];
  logic adc_clk, cid_load, cid_sclk, cid_sdi;
  word_t goh1_data, goh2_data;
  logic goh1_tx_en, goh1_tx_er, goh2_tx_en, goh2_tx_er;
  logic [1:0] goh_rst_n;
  logic i2c_scl, i2c_sda_low;
  dac_t dac_data;
  logic [2:0] dac_addr;
  logic dac_cs_n, dac_wr_n, dac_ldac_n;
  int checks = 0, failures = 0;

  blm_cfc_fpga dut (
    .clk, .rst_pin, .cfc_pin, .adc_bus, .adc_clk,
    .st_p5v(1'b1), .st_m5v(1'b1), .st_p2v(1'b1), .st_hv(1'b1),
    .hv_cfc_test(1'b0), .hv_rst_dac(1'b0), .hv_rst_goh(1'b0), .temp1(1'b0), .temp2(1'b0),
    .goh_ready(2'b11), .level('1),
    .cid_load, .cid_sclk, .cid_sdi,
    .goh1_data, .goh1_tx_en, .goh1_tx_er, .goh2_data, .goh2_tx_en, .goh2_tx_er, .goh_rst_n,
    .i2c_scl, .i2c_sda_low, .i2c_sda_in(~i2c_sda_low),
    .dac_data, .dac_addr, .dac_cs_n, .dac_wr_n, .dac_ldac_n);

  always #5 clk = ~clk;

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  int cyc = 0;

  // CFC one-shots
  logic [NCH-1:0] cfc_true = '0;
  always @(negedge clk) begin
    cfc_true[0] <= ~cfc_true[0];
    cfc_true[1] <= (cyc % 8) < 2;                 // 5 MHz: the rate at 1 mA
    for (int c = 2; c < NCH; c++)
      if ($urandom_range(0, 10 * c) == 0) cfc_true[c] <= ~cfc_true[c];
  end
  always_comb begin
    for (int c = 0; c < NCH; c++) cfc_pin[c] = {3{cfc_true[c]}};
    cfc_pin[4][1] = 1'b0;
  end

  // ADC: each word carries its channel number in the top three bits
  int adc_per = 0;
  always @(posedge adc_clk) adc_per <= adc_per + 1;
  always_comb
    for (int k = 0; k < NCH / 2; k++)
      adc_bus[k] = adc_clk ? {3'(2 * k), 9'(adc_per)} : {3'(2 * k + 1), 9'(adc_per)};

  // CID source
  logic [CID_W-1:0] sreg;
  logic sclk_q = 0;
  assign cid_sdi = sreg[CID_W-1];
  always @(posedge clk) begin
    if (cid_load) sreg <= SIG;
    else if (sclk_q && !cid_sclk) sreg <= {sreg[CID_W-2:0], 1'b0};
    sclk_q <= cid_sclk;
  end

  // edges per window, from the registered pins and the window boundary
  int win_edges [NCH], last_win [NCH], exp_cnt [NCH];
  logic [NCH-1:0] maj, maj_q = '0;
  always_comb
    for (int c = 0; c < NCH; c++)
      maj[c] = (dut.cfc_q[c][0] & dut.cfc_q[c][1]) | (dut.cfc_q[c][0] & dut.cfc_q[c][2]) |
               (dut.cfc_q[c][1] & dut.cfc_q[c][2]);
  always @(posedge clk) begin
    maj_q <= maj;
    if (dut.rst) for (int c = 0; c < NCH; c++) win_edges[c] = 0;
    else for (int c = 0; c < NCH; c++) begin
      if (maj[c] && !maj_q[c]) win_edges[c]++;
      if (dut.en_40us) begin last_win[c] = win_edges[c]; win_edges[c] = 0; end
    end
    if (dut.frame_start) for (int c = 0; c < NCH; c++) exp_cnt[c] = (last_win[c] > 255) ? 255 : last_win[c];
  end

  word_t f1 [FRAME_WORDS], f2 [FRAME_WORDS];
  int nw1, nw2;
  logic ok1, ok2, d1, d2;
  frame_rx rx1 (.clk, .data(goh1_data), .tx_en(goh1_tx_en), .frame(f1), .nwords(nw1), .crc_ok(ok1), .done(d1));
  frame_rx rx2 (.clk, .data(goh2_data), .tx_en(goh2_tx_en), .frame(f2), .nwords(nw2), .crc_ok(ok2), .done(d2));

  bit armed = 0;
  always @(posedge clk) if (!dut.rst && $past(dut.rst)) armed <= 1;
  int n_frames = 0, prev_fid = -1, last_frame_cyc = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (d1 && armed) begin
      logic [79:0] g;
      int cnt, adc;
      n_frames++;
      chk(d2 && nw1 == FRAME_WORDS && nw2 == FRAME_WORDS, "both links sent 20 words");
      chk(ok1 && ok2, "CRC");
      chk(f1 == f2, "links identical");
      if (prev_fid >= 0) chk(f1[13] == word_t'(prev_fid + 1), "FID increments");
      prev_fid = int'(f1[13]);
      if (last_frame_cyc >= 0) chk(cyc - last_frame_cyc == 1600, "frame every 40 us");
      last_frame_cyc = cyc;
      chk(f1[0] == SIG, "CID");
      if (n_frames > 1)
        for (int c = 0; c < NCH; c++) begin
          g = (c < 4) ? {f1[3], f1[4], f1[5], f1[6], f1[7]} : {f1[8], f1[9], f1[10], f1[11], f1[12]};
          cnt = int'(g[79 - 20 * (c % 4) -: 8]);
          adc = int'(g[71 - 20 * (c % 4) -: 12]);
          chk(cnt == exp_cnt[c], $sformatf("count ch%0d %0d exp %0d", c, cnt, exp_cnt[c]));
          chk((adc >> 9) == c, "ADC channel tag");
          if (c == 0) chk(cnt == 255, "saturated channel");
          if (c == 1) chk(cnt == 200, "5 MHz gives 200 counts per 40 us");
        end
      if (n_frames == 5) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) rst_pin = '0;
  end
endmodule
