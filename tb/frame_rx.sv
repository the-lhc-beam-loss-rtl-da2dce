// Receiver model of one optical link, for testbenches.  Collects the words
// sent while tx_en is high; when tx_en falls it presents the frame for one
// cycle (done), together with the result of recomputing the CRC-32 over the
// first 18 words (polynomial 0x04C11DB7, initial value all ones, MSB first,
// bytes in word order) and the word count.
module frame_rx
  import blm_pkg::*;
(
  input  logic  clk,
  input  word_t data,
  input  logic  tx_en,
  output word_t frame [FRAME_WORDS],
  output int    nwords,
  output logic  crc_ok,
  output logic  done
);
  word_t buf_w [$];
  logic  en_q = 0;

  function automatic logic [31:0] ref_byte(input logic [31:0] c, input logic [7:0] b);
    c = c ^ {b, 24'h0};
    for (int i = 0; i < 8; i++) c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
    return c;
  endfunction

  always @(posedge clk) begin
    done <= 1'b0;
    en_q <= tx_en;
    if (tx_en) buf_w.push_back(data);
    if (!tx_en && en_q) begin
      logic [31:0] r;
      r = 32'hFFFFFFFF;
      nwords <= buf_w.size();
      for (int i = 0; i < FRAME_WORDS; i++) frame[i] <= (i < buf_w.size()) ? buf_w[i] : '0;
      if (buf_w.size() == FRAME_WORDS) begin
        for (int i = 0; i < DATA_WORDS; i++) begin
          r = ref_byte(r, buf_w[i][15:8]);
          r = ref_byte(r, buf_w[i][7:0]);
        end
        crc_ok <= (r == {buf_w[18], buf_w[19]});
      end else begin
        crc_ok <= 1'b0;
      end
      done <= 1'b1;
      buf_w.delete();
    end
  end
endmodule
