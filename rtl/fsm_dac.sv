// High-voltage command FSM: CFC test mode, DAC reset and GOH reset.
//
// The optical link only runs from the tunnel to the surface, so commands reach
// the card through the level of the detector high voltage.  Three comparators
// with rising thresholds give the pins cfc_test, rst_dac and rst_goh (in that
// order, so a higher command also raises the lower pins).  A command is taken
// only after its pin has been high without interruption for HOLD_S seconds
// (120 s); dropping the pin before then returns the FSM to the default state.
// A higher pin rising while a lower command is being timed moves the FSM on
// to timing the higher command.
//
//   wait_for_cfc_test --cfc_test--> cfc_test_count_to_120s --120 s--> cfc_test
//   cfc_test_count_to_120s --rst_dac--> dac_rst_count_to_120s --120 s-->
//       dac_rst_received --pins low--> wait_for_level_2 --levels ok-->
//       st_dac_reset --> wait_for_cfc_test
//   dac_rst_count_to_120s --rst_goh--> goh_rst_count_to_120s --120 s-->
//       goh_rst_received --pins low--> wait_for_level_3 --levels ok-->
//       st_goh_reset --> wait_for_cfc_test
//   cfc_test --cfc_test low and levels ok--> wait_for_cfc_test
//
// "levels ok" means all eight LEVEL inputs are 1, i.e. every integrator is
// below its Schmitt-trigger level, so the CFCs work normally.  In cfc_test and
// in the received / wait_for_level states the DAC adder adds 100 codes
// (add_offset, about 100 pA on every input).  In every state other than the
// default one the automatic compensation is frozen (block).  st_dac_reset and
// st_goh_reset last one cycle and request the DAC counter clear or the GOH
// restart.
//
// The state names, the 120 s hold, the 100 pA offset, the level condition and
// the extra state before returning to the default follow the card
// description and its state diagram.  Which pin ends the received states (all
// pins low), and the absence of any way back from wait_for_level_N to the
// received state, are this design's choices.
//
// Timing: seconds are counted on en_1s, so the hold lasts between HOLD_S-1 and
// HOLD_S seconds; outputs are decoded from the state register.
module fsm_dac
  import blm_pkg::*;
#(
  parameter int unsigned HOLD_S = 120
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           en_1s,
  input  logic           cfc_test,     // HV >= test threshold
  input  logic           rst_dac,      // HV >= DAC-reset threshold
  input  logic           rst_goh,      // HV >= GOH-reset threshold
  input  logic [NCH-1:0] level,        // 1 = integrator below its level
  output cmd_state_e     state,
  output logic           test_on,      // status TEST_ON
  output logic           dac_rst_r,    // status DAC_RST_R
  output logic           goh_rst_r,    // status GOH_RST_R
  output logic           add_offset,
  output logic           block,
  output logic           dac_reset,
  output logic           goh_reset
);
  logic [$clog2(HOLD_S+1)-1:0] secs;
  logic                        held, lv_ok;

  assign held  = (secs == $bits(secs)'(HOLD_S));
  assign lv_ok = &level;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_WAIT_FOR_CFC_TEST;
      secs  <= '0;
    end else begin
      if (en_1s && !held) secs <= secs + 1'b1;
      unique case (state)
        ST_WAIT_FOR_CFC_TEST: begin
          secs <= '0;
          if (cfc_test) state <= ST_CFC_TEST_COUNT;
        end
        ST_CFC_TEST_COUNT: begin
          if (!cfc_test)    state <= ST_WAIT_FOR_CFC_TEST;
          else if (rst_dac) begin state <= ST_DAC_RST_COUNT; secs <= '0; end
          else if (held)    state <= ST_CFC_TEST;
        end
        ST_CFC_TEST:
          if (!cfc_test && lv_ok) state <= ST_WAIT_FOR_CFC_TEST;
        ST_DAC_RST_COUNT: begin
          if (!rst_dac)     state <= ST_WAIT_FOR_CFC_TEST;
          else if (rst_goh) begin state <= ST_GOH_RST_COUNT; secs <= '0; end
          else if (held)    state <= ST_DAC_RST_RECEIVED;
        end
        ST_DAC_RST_RECEIVED:
          if (!cfc_test && !rst_dac && !rst_goh) state <= ST_WAIT_FOR_LEVEL_2;
        ST_WAIT_FOR_LEVEL_2:
          if (lv_ok) state <= ST_DAC_RESET;
        ST_DAC_RESET:
          state <= ST_WAIT_FOR_CFC_TEST;
        ST_GOH_RST_COUNT: begin
          if (!rst_goh)     state <= ST_WAIT_FOR_CFC_TEST;
          else if (held)    state <= ST_GOH_RST_RECEIVED;
        end
        ST_GOH_RST_RECEIVED:
          if (!cfc_test && !rst_dac && !rst_goh) state <= ST_WAIT_FOR_LEVEL_3;
        ST_WAIT_FOR_LEVEL_3:
          if (lv_ok) state <= ST_GOH_RESET;
        ST_GOH_RESET:
          state <= ST_WAIT_FOR_CFC_TEST;
        default:
          state <= ST_WAIT_FOR_CFC_TEST;
      endcase
    end
  end

  assign test_on    = (state == ST_CFC_TEST);
  assign dac_rst_r  = (state == ST_DAC_RST_RECEIVED) | (state == ST_WAIT_FOR_LEVEL_2);
  assign goh_rst_r  = (state == ST_GOH_RST_RECEIVED) | (state == ST_WAIT_FOR_LEVEL_3);
  assign add_offset = test_on | dac_rst_r | goh_rst_r;
  assign block      = (state != ST_WAIT_FOR_CFC_TEST);
  assign dac_reset  = (state == ST_DAC_RESET);
  assign goh_reset  = (state == ST_GOH_RESET);
endmodule
