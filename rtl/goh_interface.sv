// Frame builder and transmitter for one gigabit optical hybrid (GOH) link.
//
// Every 40 us the card sends one frame of twenty 16-bit words over each of two
// redundant optical links; this block drives one link.  On frame_start it
// takes a snapshot of the frame contents, packed into 18 words:
//   word 0      CID (card identity number)
//   word 1, 2   status 1, status 2
//   word 3..7   channels 1-4, 4 x (8-bit count, 12-bit ADC) = 80 bits
//   word 8..12  channels 5-8, same packing
//   word 13     FID (frame identity number)
//   word 14..17 DAC settings, two 8-bit values per word (odd channel high)
//   word 18, 19 CRC, upper half first
// The channel fields are concatenated in channel order, count before ADC,
// most significant bit first, and the 80 bits are cut into five words, first
// word most significant.  A word counter drives a 20-input multiplexer; its
// output goes both to the CRC calculator (words 0..17) and to the 40 MHz output
// register that drives the GOH data pins.  The last two multiplexer inputs are
// the CRC.  TX_EN is high for the 20 words of the frame.
//
// The word list, the 20 x 16 multiplexer fed back by the CRC and the 40 MHz
// output register follow the card description.  The bit packing order is this
// design's reading of the frame table.  The description does not say when
// the data-error output is asserted; this design keeps it low (no error is
// ever signalled to the serializer), so it is a constant output.
//
// Timing: the first word appears on tx_data two cycles after frame_start and
// the frame lasts FRAME_WORDS consecutive cycles; busy covers the frame.
module goh_interface
  import blm_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             frame_start,
  input  logic [CID_W-1:0] cid,
  input  word_t            status1,
  input  word_t            status2,
  input  chan_data_t       chan [NCH],
  input  logic [FID_W-1:0] fid,
  input  dac_t             dac [NCH],
  output word_t            tx_data,
  output logic             tx_en,
  output logic             tx_er,
  output logic             busy
);
  localparam int unsigned GRP_BITS = (NCH / 2) * (CNT_W + ADC_W);  // 80
  localparam int unsigned GRP_WORDS = GRP_BITS / WORD_W;            // 5

  word_t                           words [DATA_WORDS];
  logic [4:0]                      widx;
  logic                            run;
  word_t                           mux;
  logic [31:0]                     crc;
  logic [GRP_BITS-1:0]             grp [2];

  // Pack channels 1-4 and 5-8 into two 80-bit groups.
  always_comb begin
    for (int g = 0; g < 2; g++) begin
      for (int c = 0; c < NCH / 2; c++)
        grp[g][GRP_BITS-1 - c*(CNT_W+ADC_W) -: (CNT_W+ADC_W)] = chan[g*(NCH/2) + c];
    end
  end

  // Snapshot of the frame data.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DATA_WORDS; i++) words[i] <= '0;
    end else if (frame_start) begin
      words[0] <= word_t'(cid);
      words[1] <= status1;
      words[2] <= status2;
      for (int g = 0; g < 2; g++)
        for (int w = 0; w < GRP_WORDS; w++)
          words[3 + g*GRP_WORDS + w] <= grp[g][GRP_BITS-1 - w*WORD_W -: WORD_W];
      words[13] <= word_t'(fid);
      for (int p = 0; p < NCH / 2; p++)
        words[14 + p] <= {dac[2*p], dac[2*p+1]};
    end
  end

  // Word counter.
  always_ff @(posedge clk) begin
    if (rst) begin
      run  <= 1'b0;
      widx <= '0;
    end else if (frame_start) begin
      run  <= 1'b1;
      widx <= '0;
    end else if (run) begin
      if (widx == 5'(FRAME_WORDS - 1)) run <= 1'b0;
      widx <= widx + 1'b1;
    end
  end

  // 20 x 16 multiplexer: 18 data words, then the two CRC halves.
  always_comb begin
    if (widx < 5'(DATA_WORDS))          mux = words[widx];
    else if (widx == 5'(DATA_WORDS))    mux = crc[31:16];
    else                                mux = crc[15:0];
  end

  crc32_16 u_crc (
    .clk,
    .init (frame_start),
    .en   (run && (widx < 5'(DATA_WORDS))),
    .d    (mux),
    .crc
  );

  // 40 MHz output register towards the GOH.
  always_ff @(posedge clk) begin
    if (rst) begin
      tx_data <= '0;
      tx_en   <= 1'b0;
    end else begin
      tx_data <= run ? mux : '0;
      tx_en   <= run;
    end
  end
  assign tx_er = 1'b0;
  assign busy  = run | tx_en;
endmodule
