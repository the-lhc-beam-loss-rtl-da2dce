// Shared constants, types and helpers of the beam loss monitor tunnel-card FPGA.
//
// The card digitises eight current inputs: each has a current-to-frequency
// converter (CFC) whose pulses are counted in 40 us windows, plus a 12-bit ADC
// reading of the integrator voltage.  Every 40 us one frame of twenty 16-bit
// words (table of the frame layout below) is sent over two redundant optical
// links.  The widths, channel count and frame length follow the published
// description of the card; the ordering of bits inside the packed words and the
// CRC polynomial are this design's own choices and are documented where used.
package blm_pkg;

  localparam int unsigned NCH         = 8;   // current inputs / CFC channels
  localparam int unsigned CNT_W       = 8;   // CFC counter width
  localparam int unsigned ADC_W       = 12;  // ADC resolution
  localparam int unsigned DAC_W       = 8;   // compensation DAC resolution
  localparam int unsigned WORD_W      = 16;  // link word width
  localparam int unsigned FRAME_WORDS = 20;  // words per frame, CRC included
  localparam int unsigned DATA_WORDS  = 18;  // words covered by the CRC
  localparam int unsigned FID_W       = 16;  // frame identity number width
  localparam int unsigned CID_W       = 16;  // card identity number width

  typedef logic [CNT_W-1:0]  count_t;
  typedef logic [ADC_W-1:0]  adc_t;
  typedef logic [DAC_W-1:0]  dac_t;
  typedef logic [WORD_W-1:0] word_t;

  // States of the high-voltage command FSM (test mode, DAC reset, GOH reset).
  typedef enum logic [3:0] {
    ST_WAIT_FOR_CFC_TEST    = 4'd0,
    ST_CFC_TEST_COUNT       = 4'd1,
    ST_CFC_TEST             = 4'd2,
    ST_DAC_RST_COUNT        = 4'd3,
    ST_DAC_RST_RECEIVED     = 4'd4,
    ST_WAIT_FOR_LEVEL_2     = 4'd5,
    ST_DAC_RESET            = 4'd6,
    ST_GOH_RST_COUNT        = 4'd7,
    ST_GOH_RST_RECEIVED     = 4'd8,
    ST_WAIT_FOR_LEVEL_3     = 4'd9,
    ST_GOH_RESET            = 4'd10
  } cmd_state_e;

  // One channel's payload in the frame: 8-bit count then 12-bit ADC value.
  typedef struct packed {
    count_t count;
    adc_t   adc;
  } chan_data_t;

  // Bitwise two-out-of-three majority.
  function automatic logic [WORD_W-1:0] maj3(input logic [WORD_W-1:0] a,
                                             input logic [WORD_W-1:0] b,
                                             input logic [WORD_W-1:0] c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  // One step of a 32-bit CRC (polynomial 0x04C11DB7, MSB first) over a
  // 16-bit word, most significant data bit first.
  function automatic logic [31:0] crc32_word(input logic [31:0] crc,
                                             input logic [WORD_W-1:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = WORD_W - 1; i >= 0; i--) begin
      if (c[31] ^ d[i]) c = {c[30:0], 1'b0} ^ 32'h04C1_1DB7;
      else              c = {c[30:0], 1'b0};
    end
    return c;
  endfunction

endpackage
