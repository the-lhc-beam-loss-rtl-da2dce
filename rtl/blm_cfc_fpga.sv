// FPGA of the beam loss monitor tunnel acquisition card.
//
// The card measures eight detector currents over a very wide range with
// current-to-frequency converters (CFC): each converter emits one pulse per
// fixed charge, and the FPGA counts the pulses in 40 us windows.  To resolve
// fractions of a pulse at low currents, the integrator voltage of each
// converter is also read by a 12-bit ADC.  Every 40 us the FPGA sends a frame
// with the eight counts and ADC values, status bits, the card and frame
// identity numbers, the compensation DAC settings and a CRC over two redundant
// optical links (GOH).  The counters are triplicated against single-event
// upsets and voted separately for each link; the rest is single.
//
// Blocks: reset_tmr (voted reset), timing_gen (enables, ADC clock, frame start,
// FID), eight cfc_counter_channel, four adc_readout_pair, status_cid (status
// snapshot, CID reader), two goh_interface with crc32_16, goh_control (laser
// current over I2C, GOH reset), fsm_dac (commands given through the detector
// high voltage) and dac_compensation (offset-current DAC).  Every input pin is
// registered once at 40 MHz before use, as on the card.
//
// Status word 1, bit 15 down to 0: +5V ok, -5V ok, +2.5V ok, HV present, HV test
// pin, TEST_ON, HV DAC-reset pin, DAC_RST_R, HV GOH-reset pin, GOH_RST_R,
// temperature 1, temperature 2, GOH 1 ready, GOH 2 ready, DAC > 155, DAC = 255.
// Status word 2: no-count errors of channels 1-8 (bits 15..8), LEVEL inputs of
// channels 1-8 (bits 7..0).  The bit list follows the card's status table; the
// bit positions are this design's choice.  Pin values are sent as read.
//
// ADC buses: bus k carries channel 2k after the rising and channel 2k+1 after
// the falling edge of adc_clk.
//
// Timing at the defaults: one frame of 20 words per 40 us on each link,
// starting FRAME_DELAY+1 cycles after the window boundary.
module blm_cfc_fpga
  import blm_pkg::*;
#(
  parameter int unsigned CYC_200NS     = 8,
  parameter int unsigned TICKS_40US    = 200,
  parameter int unsigned WIN_1S        = 25000,
  parameter int unsigned FRAME_DELAY   = 32,
  parameter int unsigned HOLD_S        = 120,
  parameter int unsigned TIMER_S       = 20,
  parameter int unsigned ERR_LIMIT     = 6,
  parameter int unsigned TEST_OFFSET   = 100,
  parameter adc_t        ADC_THRESHOLD = 12'd64,
  parameter int unsigned QTR_TICKS     = 13,
  parameter int unsigned RST_TICKS     = 50
) (
  input  logic                 clk,
  input  logic [2:0]           rst_pin,
  // CFC one-shot outputs, three pins per channel
  input  logic [NCH-1:0][2:0]  cfc_pin,
  // ADC
  input  adc_t                 adc_bus [NCH/2],
  output logic                 adc_clk,
  // comparator and monitor pins
  input  logic                 st_p5v,
  input  logic                 st_m5v,
  input  logic                 st_p2v,
  input  logic                 st_hv,
  input  logic                 hv_cfc_test,
  input  logic                 hv_rst_dac,
  input  logic                 hv_rst_goh,
  input  logic                 temp1,
  input  logic                 temp2,
  input  logic [1:0]           goh_ready,
  input  logic [NCH-1:0]       level,
  // card identity
  output logic                 cid_load,
  output logic                 cid_sclk,
  input  logic                 cid_sdi,
  // optical links
  output word_t                goh1_data,
  output logic                 goh1_tx_en,
  output logic                 goh1_tx_er,
  output word_t                goh2_data,
  output logic                 goh2_tx_en,
  output logic                 goh2_tx_er,
  output logic [1:0]           goh_rst_n,
  output logic                 i2c_scl,
  output logic                 i2c_sda_low,
  input  logic                 i2c_sda_in,
  // compensation DAC
  output dac_t                 dac_data,
  output logic [2:0]           dac_addr,
  output logic                 dac_cs_n,
  output logic                 dac_wr_n,
  output logic                 dac_ldac_n
);
  logic rst;

  // ---------------------------------------------------------------- inputs
  logic [NCH-1:0][2:0] cfc_q;
  adc_t                adc_q [NCH/2];
  logic [6:0]          hv_sup_q;
  logic [1:0]          temp_q, ready_q;
  logic [NCH-1:0]      level_q;
  logic                cid_sdi_q, sda_q;

  always_ff @(posedge clk) begin
    cfc_q     <= cfc_pin;
    adc_q     <= adc_bus;
    hv_sup_q  <= {st_p5v, st_m5v, st_p2v, st_hv, hv_cfc_test, hv_rst_dac, hv_rst_goh};
    temp_q    <= {temp1, temp2};
    ready_q   <= goh_ready;
    level_q   <= level;
    cid_sdi_q <= cid_sdi;
    sda_q     <= i2c_sda_in;
  end

  reset_tmr u_rst (.clk, .rst_pin, .rst);

  // ---------------------------------------------------------------- timing
  logic             en_200ns, en_40us, en_1s, near_readout, frame_start;
  logic             smp_rise, smp_fall;
  logic [FID_W-1:0] fid;

  timing_gen #(
    .CYC_200NS (CYC_200NS), .TICKS_40US (TICKS_40US), .WIN_1S (WIN_1S),
    .FRAME_DELAY (FRAME_DELAY)
  ) u_timing (
    .clk, .rst, .en_200ns, .en_40us, .en_1s, .near_readout, .frame_start,
    .adc_clk, .smp_rise, .smp_fall, .fid
  );

  // ---------------------------------------------------------------- counters
  count_t         cnt_q1 [NCH];
  count_t         cnt_q2 [NCH];
  logic [NCH-1:0] cfc_pulse;

  for (genvar c = 0; c < NCH; c++) begin : g_cfc
    cfc_counter_channel u_cnt (
      .clk, .rst,
      .cfc_in   (cfc_q[c]),
      .en_40us,
      .pulse    (cfc_pulse[c]),
      .count_q1 (cnt_q1[c]),
      .count_q2 (cnt_q2[c])
    );
  end

  // ---------------------------------------------------------------- ADC
  adc_t adc_val [NCH];

  for (genvar k = 0; k < NCH / 2; k++) begin : g_adc
    adc_t       pair [2];
    logic [1:0] late_unused;
    logic       valid_unused;
    adc_readout_pair #(.ADC_THRESHOLD (ADC_THRESHOLD)) u_adc (
      .clk, .rst,
      .adc_bus      (adc_q[k]),
      .smp_rise, .smp_fall, .en_40us, .near_readout,
      .cfc_pulse    (cfc_pulse[2*k+1 -: 2]),
      .adc          (pair),
      .late         (late_unused),
      .valid        (valid_unused)
    );
    assign adc_val[2*k]   = pair[0];
    assign adc_val[2*k+1] = pair[1];
  end

  // ---------------------------------------------------------------- HV FSM
  cmd_state_e state;
  logic       test_on, dac_rst_r, goh_rst_r, add_offset, block, dac_reset, goh_reset;

  fsm_dac #(.HOLD_S (HOLD_S)) u_fsm (
    .clk, .rst, .en_1s,
    .cfc_test (hv_sup_q[2]), .rst_dac (hv_sup_q[1]), .rst_goh (hv_sup_q[0]),
    .level    (level_q),
    .state, .test_on, .dac_rst_r, .goh_rst_r, .add_offset, .block, .dac_reset, .goh_reset
  );

  // ---------------------------------------------------------------- DAC
  dac_t           dac_set [NCH];
  logic [NCH-1:0] cfc_err;
  logic           dac_155, dac_over;

  dac_compensation #(
    .TIMER_S (TIMER_S), .ERR_LIMIT (ERR_LIMIT), .TEST_OFFSET (TEST_OFFSET)
  ) u_dac (
    .clk, .rst, .en_1s,
    .count_strobe (frame_start),
    .count_q1     (cnt_q1),
    .count_q2     (cnt_q2),
    .block, .add_offset, .dac_reset,
    .dac_update   (en_40us),
    .dac_set, .cfc_err, .dac_155, .dac_over,
    .dac_data, .dac_addr, .dac_cs_n, .dac_wr_n, .dac_ldac_n
  );

  // ---------------------------------------------------------------- status / CID
  word_t            status1_in, status2_in, status1, status2;
  logic [CID_W-1:0] cid;
  logic             cid_valid;

  assign status1_in = {hv_sup_q[6:3], hv_sup_q[2], test_on, hv_sup_q[1], dac_rst_r,
                       hv_sup_q[0], goh_rst_r, temp_q, ready_q, dac_155, dac_over};
  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      status2_in[15 - c] = cfc_err[c];
      status2_in[7 - c]  = level_q[c];
    end
  end

  status_cid u_status (
    .clk, .rst, .en_200ns, .en_40us,
    .status1_in, .status2_in, .status1, .status2,
    .cid_load, .cid_sclk, .cid_sdi (cid_sdi_q), .cid, .cid_valid
  );

  // ---------------------------------------------------------------- links
  chan_data_t chan1 [NCH];
  chan_data_t chan2 [NCH];
  logic       busy1, busy2;

  for (genvar c = 0; c < NCH; c++) begin : g_pack
    assign chan1[c] = '{count: cnt_q1[c], adc: adc_val[c]};
    assign chan2[c] = '{count: cnt_q2[c], adc: adc_val[c]};
  end

  goh_interface u_goh1 (
    .clk, .rst, .frame_start, .cid, .status1, .status2, .chan (chan1), .fid,
    .dac (dac_set), .tx_data (goh1_data), .tx_en (goh1_tx_en), .tx_er (goh1_tx_er),
    .busy (busy1)
  );
  goh_interface u_goh2 (
    .clk, .rst, .frame_start, .cid, .status1, .status2, .chan (chan2), .fid,
    .dac (dac_set), .tx_data (goh2_data), .tx_en (goh2_tx_en), .tx_er (goh2_tx_er),
    .busy (busy2)
  );

  logic i2c_busy, nack, cur_high;
  goh_control #(.QTR_TICKS (QTR_TICKS), .RST_TICKS (RST_TICKS)) u_gohctl (
    .clk, .rst, .en_200ns,
    .temp1 (temp_q[1]), .temp2 (temp_q[0]),
    .goh_rst_req (goh_reset),
    .goh_rst_n,
    .scl (i2c_scl), .sda_low (i2c_sda_low), .sda_in (sda_q),
    .i2c_busy, .nack, .cur_high
  );
endmodule
