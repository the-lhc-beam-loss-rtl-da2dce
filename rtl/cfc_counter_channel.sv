// Triple-redundant counter of one CFC channel.
//
// The one-shot output of a channel reaches the FPGA on three pins.  Each pin
// feeds its own cfc_lane (two chopper counters, overflow FSM, multiplexer), so
// the whole counting path exists three times.  Two independent two-out-of-three
// voters combine the three lane results; voter 1 feeds GOH link 1 and voter 2
// feeds GOH link 2, so that an upset in one lane, or in one voter, corrupts
// neither link.  The count pulse used by the ADC readout logic is voted the
// same way.  All of this follows the card description.
//
// Timing: as cfc_lane; the voters are combinational, so count_q1/count_q2
// change two cycles after en_40us.
module cfc_counter_channel
  import blm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] cfc_in,     // three registered copies of the one-shot pin
  input  logic       en_40us,
  output logic       pulse,      // voted count pulse
  output count_t     count_q1,   // voted count for GOH link 1
  output count_t     count_q2    // voted count for GOH link 2
);
  count_t     lane_cnt [3];
  logic [2:0] lane_pulse;
  word_t      v1, v2;

  for (genvar l = 0; l < 3; l++) begin : g_lane
    cfc_lane u_lane (
      .clk, .rst,
      .cfc_in (cfc_in[l]),
      .en_40us,
      .pulse  (lane_pulse[l]),
      .count  (lane_cnt[l])
    );
  end

  // Two separate voters, one per link.
  assign v1 = maj3(word_t'(lane_cnt[0]), word_t'(lane_cnt[1]), word_t'(lane_cnt[2]));
  assign v2 = maj3(word_t'(lane_cnt[0]), word_t'(lane_cnt[1]), word_t'(lane_cnt[2]));
  assign count_q1 = v1[CNT_W-1:0];
  assign count_q2 = v2[CNT_W-1:0];

  assign pulse = (lane_pulse[0] & lane_pulse[1]) | (lane_pulse[0] & lane_pulse[2]) |
                 (lane_pulse[1] & lane_pulse[2]);
endmodule
