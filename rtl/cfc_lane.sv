// One lane of a CFC channel counter: two chopper-mode 8-bit counters.
//
// The pulses of the current-to-frequency converter (already registered at
// 40 MHz) are edge-detected and counted.  Two counters take turns: while one
// counts during a 40 us window, the other holds the previous window's total
// and is read out, so the read path has a full 40 us instead of one clock
// cycle.  At each window boundary (en_40us) the roles swap and the counter
// that becomes active restarts from zero.  The counters themselves wrap at
// 256, like a plain generated counter; a small overflow FSM per counter records
// a wrap, and the output multiplexer then selects its third input, the
// constant 255, so an overflowed window always reads 255.
//
// The pair of alternating counters, the overflow FSM and the three-input
// multiplexer follow the card description.  The registered output and the
// restart-from-zero of the counter that becomes active are this design's
// choices.
//
// Timing: a rising edge of cfc_in is counted in the window in which it is
// registered (an edge in the en_40us cycle belongs to the ending window).
// count changes two cycles after en_40us and then holds for the whole next
// window.  pulse is high for one cycle per rising edge of cfc_in.
module cfc_lane
  import blm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   cfc_in,    // registered one-shot output
  input  logic   en_40us,   // last cycle of each counting window
  output logic   pulse,     // one-cycle pulse per counted edge
  output count_t count      // total of the previous window, 255 on overflow
);
  logic       cfc_q;
  logic       sel;          // index of the counter that is counting now
  count_t     cnt [2];
  logic [1:0] ovf;          // overflow FSM state per counter: 1 = overflowed
  logic       idle;

  always_ff @(posedge clk) begin
    if (rst) cfc_q <= 1'b0;
    else     cfc_q <= cfc_in;
  end
  assign pulse = cfc_in & ~cfc_q;
  assign idle  = ~sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      sel    <= 1'b0;
      cnt[0] <= '0;
      cnt[1] <= '0;
      ovf    <= '0;
    end else begin
      for (int k = 0; k < 2; k++) begin
        if (sel == k[0]) begin
          // counting counter: enable = pulse gated by its half of the chopper
          if (pulse) begin
            cnt[k] <= cnt[k] + 1'b1;
            if (cnt[k] == '1) ovf[k] <= 1'b1;
          end
        end else if (en_40us) begin
          // held counter becomes the counting one: restart
          cnt[k] <= '0;
          ovf[k] <= 1'b0;
        end
      end
      if (en_40us) sel <= ~sel;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)           count <= '0;
    else if (ovf[idle]) count <= '1;
    else               count <= cnt[idle];
  end
endmodule
