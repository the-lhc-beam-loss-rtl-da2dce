// Automatic leakage compensation through the 8-channel offset DAC.
//
// Each CFC input receives a small constant offset current from an 8-bit DAC so
// that an idle channel still produces one count about every 20 s; as the
// amplifier's leakage grows with radiation dose, the DAC setting has to rise.
// Per channel this block has:
//   * a count detector: a non-zero count from either voter in a window
//     (sampled on count_strobe) is a "count arrived" event;
//   * a 20 s timer, cleared by every count event and advanced by en_1s;
//   * an 8-bit compensation counter, incremented (saturating at 255) each
//     time the timer runs out, i.e. after 20 s without a count;
//   * a 3-bit no-count counter, incremented on the same enable and cleared by
//     a count; when it reaches ERR_LIMIT (6, i.e. 120 s without a count) the
//     channel's error flag is set.
// The eight settings are multiplexed onto the parallel DAC bus through an
// adder that adds TEST_OFFSET (100, about 100 pA) while the HV command FSM
// asks for it (add_offset), saturating at 255.  While block is high (the FSM
// is in a test or reset state) timers and counters are frozen; dac_reset
// clears the compensation and error counters.  dac_155 and dac_over report
// that some channel's setting exceeds 155 or has reached 255.
//
// DAC bus: after each dac_update the eight channels are written in turn,
// 4 cycles each (address/data and CS low, WR low, WR high, CS high), then
// LDAC is pulsed low for one cycle to update all outputs together.
//
// The detector/timer/counter chain, the 20 s period, the 3-bit counter with
// limit 6, the multiplexer and the +100 adder follow the card description.
// The write sequence, the saturating adder and the freezing of the error
// counter while blocked are this design's choices.
module dac_compensation
  import blm_pkg::*;
#(
  parameter int unsigned TIMER_S     = 20,   // seconds without count before a step
  parameter int unsigned ERR_LIMIT   = 6,    // steps without count before error
  parameter int unsigned TEST_OFFSET = 100   // DAC codes added in test/reset states
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           en_1s,
  input  logic           count_strobe,   // counts of the last window are valid
  input  count_t         count_q1 [NCH],
  input  count_t         count_q2 [NCH],
  input  logic           block,          // freeze compensation
  input  logic           add_offset,     // add TEST_OFFSET on the DAC bus
  input  logic           dac_reset,      // clear the compensation counters
  input  logic           dac_update,     // start writing all eight channels
  output dac_t           dac_set [NCH],  // compensation settings (no offset)
  output logic [NCH-1:0] cfc_err,        // 120 s without a count
  output logic           dac_155,
  output logic           dac_over,
  output dac_t           dac_data,
  output logic [2:0]     dac_addr,
  output logic           dac_cs_n,
  output logic           dac_wr_n,
  output logic           dac_ldac_n
);
  logic [$clog2(TIMER_S+1)-1:0] timer [NCH];
  logic [2:0]                   nocnt [NCH];
  logic [NCH-1:0]               got;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    assign got[c] = count_strobe && ((count_q1[c] != '0) || (count_q2[c] != '0));

    always_ff @(posedge clk) begin
      if (rst || dac_reset) begin
        timer[c]   <= '0;
        nocnt[c]   <= '0;
        dac_set[c] <= '0;
      end else if (!block) begin
        if (got[c]) begin
          timer[c] <= '0;
          nocnt[c] <= '0;
        end else if (en_1s) begin
          if (timer[c] == $bits(timer[c])'(TIMER_S - 1)) begin
            timer[c] <= '0;
            if (dac_set[c] != '1)                 dac_set[c] <= dac_set[c] + 1'b1;
            if (nocnt[c] != 3'(ERR_LIMIT))        nocnt[c]   <= nocnt[c] + 1'b1;
          end else begin
            timer[c] <= timer[c] + 1'b1;
          end
        end
      end
    end
    assign cfc_err[c] = (nocnt[c] == 3'(ERR_LIMIT));
  end

  always_comb begin
    dac_155  = 1'b0;
    dac_over = 1'b0;
    for (int c = 0; c < NCH; c++) begin
      if (dac_set[c] > 8'd155) dac_155  = 1'b1;
      if (dac_set[c] == '1)    dac_over = 1'b1;
    end
  end

  // Write sequencer: channel index, step within the channel write.
  logic       wr_run;
  logic [2:0] wch;
  logic [1:0] wstep;
  logic       ldac_due;
  logic [8:0] sum;

  assign sum = {1'b0, dac_set[wch]} + (add_offset ? 9'(TEST_OFFSET) : 9'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_run     <= 1'b0;
      wch        <= '0;
      wstep      <= '0;
      ldac_due   <= 1'b0;
      dac_data   <= '0;
      dac_addr   <= '0;
      dac_cs_n   <= 1'b1;
      dac_wr_n   <= 1'b1;
      dac_ldac_n <= 1'b1;
    end else begin
      dac_ldac_n <= 1'b1;
      if (ldac_due) begin
        dac_ldac_n <= 1'b0;
        ldac_due   <= 1'b0;
      end
      if (!wr_run) begin
        if (dac_update) begin
          wr_run <= 1'b1;
          wch    <= '0;
          wstep  <= '0;
        end
      end else begin
        unique case (wstep)
          2'd0: begin
            dac_addr <= wch;
            dac_data <= sum[8] ? 8'hFF : sum[7:0];
            dac_cs_n <= 1'b0;
          end
          2'd1: dac_wr_n <= 1'b0;
          2'd2: dac_wr_n <= 1'b1;
          2'd3: begin
            dac_cs_n <= 1'b1;
            wch      <= wch + 1'b1;
            if (wch == 3'(NCH - 1)) begin
              wr_run   <= 1'b0;
              ldac_due <= 1'b1;
            end
          end
        endcase
        wstep <= wstep + 1'b1;
      end
    end
  end
endmodule
