// End-to-end testbench of the card FPGA at reduced time constants: a 16 us
// counting window (80 ticks of 200 ns, long enough for 255 counts), a "second"
// of 5 windows, a 3 s HV hold and a 2 s compensation step.  Models here: CFC
// one-shots (channel 1 at maximum rate, channels 2-7 random, channel 8 silent,
// one pin of channel 4 stuck low), an ADC whose words carry their channel
// number and sample index, the CID signature source and an acknowledging I2C
// slave.  Both links are received and every frame is checked: length, CRC,
// consecutive FID, CID, supply status bits, link 1 = link 2, counts equal to
// the edges of the window just ended (from the registered pins, saturated at
// 255) and the ADC channel tags.  The HV pins are then used to run the CFC
// test, a DAC reset and a GOH reset, and a temperature flag is raised.  Each
// mechanism is counted and must occur at least once: counter overflow, a
// voter masking a bad lane, a late ADC readout, the ADC threshold retry, a
// compensation step, a no-count error, the test offset on the DAC bus, the
// DAC reset, the GOH reset and both laser current writes.
module tb_blm_cfc_fpga;
  import blm_pkg::*;
  localparam int TK = 80, W1S = 5, HS = 3, TS = 2;
  localparam int WIN = 8 * TK, SEC = WIN * W1S;
  localparam logic [CID_W-1:0] SIG = 16'hB1C5;

  logic clk = 0;
  logic [2:0] rst_pin = '1;
  logic [NCH-1:0][2:0] cfc_pin;
  adc_t adc_bus [NCH/2];
  logic adc_clk;
  logic hv_cfc_test = 0, hv_rst_dac = 0, hv_rst_goh = 0, temp1 = 0, temp2 = 0;
  logic [NCH-1:0] level = '1;
  logic cid_load, cid_sclk, cid_sdi;
  word_t goh1_data, goh2_data;
  logic goh1_tx_en, goh1_tx_er, goh2_tx_en, goh2_tx_er;
  logic [1:0] goh_rst_n;
  logic i2c_scl, i2c_sda_low, i2c_sda_in;
  dac_t dac_data;
  logic [2:0] dac_addr;
  logic dac_cs_n, dac_wr_n, dac_ldac_n;
  int checks = 0, failures = 0;

  blm_cfc_fpga #(.TICKS_40US(TK), .WIN_1S(W1S), .HOLD_S(HS), .TIMER_S(TS), .QTR_TICKS(1),
                 .RST_TICKS(4)) dut (
    .clk, .rst_pin, .cfc_pin, .adc_bus, .adc_clk,
    .st_p5v(1'b1), .st_m5v(1'b1), .st_p2v(1'b1), .st_hv(1'b1),
    .hv_cfc_test, .hv_rst_dac, .hv_rst_goh, .temp1, .temp2, .goh_ready(2'b11), .level,
    .cid_load, .cid_sclk, .cid_sdi,
    .goh1_data, .goh1_tx_en, .goh1_tx_er, .goh2_data, .goh2_tx_en, .goh2_tx_er, .goh_rst_n,
    .i2c_scl, .i2c_sda_low, .i2c_sda_in,
    .dac_data, .dac_addr, .dac_cs_n, .dac_wr_n, .dac_ldac_n);

  always #5 clk = ~clk;

  initial begin
    repeat (45 * SEC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // ------------------------------------------------------------ CFC model
  logic [NCH-1:0] cfc_true = '0;
  always @(negedge clk) begin
    cfc_true[0] <= ~cfc_true[0];                                   // maximum rate
    for (int c = 1; c < NCH - 1; c++)
      if ($urandom_range(0, 40) == 0) cfc_true[c] <= ~cfc_true[c];
    cfc_true[NCH-1] <= 1'b0;                                      // silent channel
  end
  always_comb begin
    for (int c = 0; c < NCH; c++) cfc_pin[c] = {3{cfc_true[c]}};
    cfc_pin[3][2] = 1'b0;                                          // stuck pin
  end

  // ------------------------------------------------------------ ADC model
  int adc_per = 0;
  always @(posedge adc_clk) adc_per <= adc_per + 1;
  always_comb
    for (int k = 0; k < NCH / 2; k++)
      adc_bus[k] = adc_clk ? {3'(2 * k), 9'(adc_per)} : {3'(2 * k + 1), 9'(adc_per)};

  // ------------------------------------------------------------ CID source
  logic [CID_W-1:0] sreg;
  logic sclk_q = 0;
  assign cid_sdi = sreg[CID_W-1];
  always @(posedge clk) begin
    if (cid_load) sreg <= SIG;
    else if (sclk_q && !cid_sclk) sreg <= {sreg[CID_W-2:0], 1'b0};
    sclk_q <= cid_sclk;
  end

  // ------------------------------------------------------------ I2C slave
  logic slave_pull = 0, scl_q = 1, sda_q = 1, sda;
  int nbit = 0;
  logic [7:0] sh, i2c_bytes [$];
  int n_wr_nom = 0, n_wr_high = 0;
  assign sda = ~(i2c_sda_low | slave_pull);
  assign i2c_sda_in = sda;
  always @(posedge clk) begin
    scl_q <= i2c_scl; sda_q <= sda;
    if (i2c_scl && scl_q && sda_q && !sda) begin nbit <= 0; i2c_bytes.delete(); end
    else if (i2c_scl && scl_q && !sda_q && sda) begin
      if (i2c_bytes.size() == 3 && i2c_bytes[2] == 8'd57) n_wr_nom++;
      if (i2c_bytes.size() == 3 && i2c_bytes[2] == 8'd81) n_wr_high++;
    end else if (i2c_scl && !scl_q) begin
      if (nbit < 8) sh <= {sh[6:0], sda};
      if (nbit == 7) i2c_bytes.push_back({sh[6:0], sda});
      nbit <= (nbit == 8) ? 0 : nbit + 1;
    end
    if (!i2c_scl && scl_q) slave_pull <= (nbit == 8);
  end

  // ------------------------------------------------------------ DAC bus monitor
  int dac_bus [NCH];
  always @(posedge clk) if (!dac_wr_n && !dac_cs_n) dac_bus[dac_addr] = int'(dac_data);

  // ------------------------------------------------------------ reference counts
  int win_edges [NCH], last_win [NCH];
  logic [NCH-1:0] maj_q = '0;
  logic [NCH-1:0] maj;
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
  end

  // ------------------------------------------------------------ mechanism counters
  int n_ovf = 0, n_vote_mask = 0, n_late = 0, n_retry = 0, n_step = 0, n_err = 0;
  int n_test_ofs = 0, n_dac_rst = 0, n_goh_rst = 0, n_frames = 0;
  always @(posedge clk) begin
    if (dut.g_cfc[3].u_cnt.lane_cnt[2] != dut.g_cfc[3].u_cnt.lane_cnt[0] &&
        dut.g_cfc[3].u_cnt.count_q1 == dut.g_cfc[3].u_cnt.lane_cnt[0] && dut.en_40us) n_vote_mask++;
    if (dut.en_40us && dut.g_adc[0].u_adc.seen[0]) n_late++;
    if (dut.g_adc[0].u_adc.st[0] == 3'd3 && dut.g_adc[0].u_adc.late[0] &&
        dut.g_adc[0].u_adc.r_t1[0] < 12'd64) n_retry++;
    if (!dut.rst && goh_rst_n == 2'b00 && $past(goh_rst_n) == 2'b11) n_goh_rst++;
  end

  // ------------------------------------------------------------ frame checks
  word_t f1 [FRAME_WORDS], f2 [FRAME_WORDS];
  int nw1, nw2;
  logic ok1, ok2, d1, d2;
  frame_rx rx1 (.clk, .data(goh1_data), .tx_en(goh1_tx_en), .frame(f1), .nwords(nw1), .crc_ok(ok1), .done(d1));
  frame_rx rx2 (.clk, .data(goh2_data), .tx_en(goh2_tx_en), .frame(f2), .nwords(nw2), .crc_ok(ok2), .done(d2));

  bit armed = 0;                          // set when the voted reset is released
  always @(posedge clk) if (!dut.rst && $past(dut.rst)) armed <= 1;
  int exp_cnt [NCH];
  int prev_fid = -1, prev_dac7 = 0;
  bit test_seen = 0;
  always @(posedge clk) begin
    if (dut.frame_start) for (int c = 0; c < NCH; c++) exp_cnt[c] = (last_win[c] > 255) ? 255 : last_win[c];
    if (d1 && armed) begin
      logic [79:0] g;
      int cnt, adc, dac7;
      n_frames++;
      chk(d2 && nw1 == FRAME_WORDS && nw2 == FRAME_WORDS, "both links sent 20 words");
      chk(ok1 && ok2, "CRC of both links");
      chk(f1 == f2, "links carry the same frame");
      chk(f1[13] == word_t'(prev_fid + 1) || prev_fid < 0, "FID increments");
      prev_fid = int'(f1[13]);
      if (n_frames > 2) chk(f1[0] == SIG, "CID");
      if (n_frames > 2) chk(f1[1][15:12] == 4'hF && f1[1][3:2] == 2'b11, "supply and GOH ready bits");
      for (int c = 0; c < NCH; c++) begin
        g = (c < 4) ? {f1[3], f1[4], f1[5], f1[6], f1[7]} : {f1[8], f1[9], f1[10], f1[11], f1[12]};
        cnt = int'(g[79 - 20 * (c % 4) -: 8]);
        adc = int'(g[71 - 20 * (c % 4) -: 12]);
        if (n_frames > 2) begin
          chk(cnt == exp_cnt[c], $sformatf("count ch%0d %0d exp %0d", c, cnt, exp_cnt[c]));
          chk((adc >> 9) == c, $sformatf("ADC channel tag ch%0d got %0d", c, adc >> 9));
        end
        if (c == 0 && cnt == 255) n_ovf++;
      end
      dac7 = int'(f1[17][7:0]);
      if (dac7 > prev_dac7) n_step++;
      if (dac7 == 0 && prev_dac7 > 0) n_dac_rst++;
      prev_dac7 = dac7;
      if (f1[2][8]) n_err++;
      if (f1[1][10]) begin
        test_seen = 1;
        if (dac_bus[7] == dac7 + 100) n_test_ofs++;
      end
    end
  end

  task automatic wait_s(input real s);
    repeat (int'(s * SEC)) @(negedge clk);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) rst_pin = 3'b010;       // one reset pin stays high: voted away
    wait_s(15);                            // compensation steps and no-count error on ch8
    chk(n_err > 0, "no-count error reported");
    // CFC test mode
    hv_cfc_test = 1; wait_s(HS + 2);
    hv_cfc_test = 0; wait_s(1);
    // laser current raised
    temp1 = 1; wait_s(1);
    // DAC reset
    hv_cfc_test = 1; wait_s(0.5); hv_rst_dac = 1; wait_s(HS + 1);
    hv_rst_dac = 0; hv_cfc_test = 0; wait_s(2);
    // GOH reset
    hv_cfc_test = 1; wait_s(0.3); hv_rst_dac = 1; wait_s(0.3); hv_rst_goh = 1; wait_s(HS + 1);
    hv_rst_goh = 0; hv_rst_dac = 0; hv_cfc_test = 0; wait_s(2);

    $display("frames %0d overflow %0d vote-masked %0d late %0d retry %0d step %0d err %0d",
             n_frames, n_ovf, n_vote_mask, n_late, n_retry, n_step, n_err);
    $display("test-offset %0d dac-reset %0d goh-reset %0d i2c nominal %0d raised %0d",
             n_test_ofs, n_dac_rst, n_goh_rst, n_wr_nom, n_wr_high);
    chk(n_frames > 100, "frames received");
    chk(n_ovf > 0, "counter overflow happened");
    chk(n_vote_mask > 0, "voter masked the stuck pin");
    chk(n_late > 0, "late ADC readout happened");
    chk(n_retry > 0, "ADC threshold retry happened");
    chk(n_step > 0, "compensation step happened");
    chk(test_seen && n_test_ofs > 0, "test offset on the DAC bus");
    chk(n_dac_rst > 0, "DAC reset happened");
    chk(n_goh_rst > 0, "GOH reset happened");
    chk(n_wr_nom >= 2, "nominal laser current written after reset");
    chk(n_wr_high >= 4, "raised laser current written, and again after the GOH restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
