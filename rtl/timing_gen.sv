// Clock divider and frame timing.
//
// Derives every enable used on the card from the 40 MHz clock: a 200 ns
// enable (one 5 MHz ADC period), the 40 us counting-window enable, a 1 s
// enable, the 5 MHz ADC clock and its two sampling strobes, a strobe that
// marks the last PULSE_WIN cycles of each window (the "100 ns" window in which a
// CFC pulse makes the ADC readout suspect) and the frame start, FRAME_DELAY+1
// cycles after the window boundary.  A 16-bit frame identity number (FID)
// increments after every frame start.  The 200 ns, 40 us and 1 s periods, the
// 5 MHz ADC rate, the 100 ns window and the 16-bit FID follow the card
// description; the placement of strobes inside the 200 ns period and the frame
// delay are this design's choices.
//
// Timing, at the defaults: en_40us is high one cycle every 1600 cycles, on the
// last cycle of a window; frame_start follows it by FRAME_DELAY+1 cycles; fid
// holds the number of the frame being started and changes on the cycle after
// frame_start.  adc_clk is high in cycles 0..3 of each 8-cycle period;
// smp_rise (cycle 3) and smp_fall (cycle 7) sample the data that the ADC drives
// after its rising and falling clock edges.
module timing_gen
  import blm_pkg::*;
#(
  parameter int unsigned CYC_200NS   = 8,      // 40 MHz cycles per 200 ns
  parameter int unsigned TICKS_40US  = 200,    // 200 ns ticks per 40 us window
  parameter int unsigned WIN_1S      = 25000,  // 40 us windows per second
  parameter int unsigned PULSE_WIN   = 4,      // cycles in the 100 ns window
  parameter int unsigned FRAME_DELAY = 32      // cycles from window end to frame
) (
  input  logic             clk,
  input  logic             rst,
  output logic             en_200ns,
  output logic             en_40us,
  output logic             en_1s,
  output logic             near_readout,
  output logic             frame_start,
  output logic             adc_clk,
  output logic             smp_rise,
  output logic             smp_fall,
  output logic [FID_W-1:0] fid
);
  logic [$clog2(CYC_200NS)-1:0]  phase;
  logic [$clog2(TICKS_40US)-1:0] tick;
  logic [$clog2(WIN_1S+1)-1:0]   win;
  logic [$clog2(FRAME_DELAY+1)-1:0] fdly;
  logic                          fdly_run;
  logic                          last_phase, last_tick;

  assign last_phase = (phase == CYC_200NS[$bits(phase)-1:0] - 1'b1);
  assign last_tick  = (tick == TICKS_40US[$bits(tick)-1:0] - 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      tick  <= '0;
      win   <= '0;
    end else begin
      phase <= last_phase ? '0 : phase + 1'b1;
      if (last_phase) begin
        tick <= last_tick ? '0 : tick + 1'b1;
        if (last_tick)
          win <= (win == WIN_1S[$bits(win)-1:0] - 1'b1) ? '0 : win + 1'b1;
      end
    end
  end

  assign en_200ns     = last_phase;
  assign en_40us      = last_phase & last_tick;
  assign en_1s        = en_40us & (win == WIN_1S[$bits(win)-1:0] - 1'b1);
  assign near_readout = last_tick & (phase >= $bits(phase)'(CYC_200NS - PULSE_WIN));
  assign adc_clk      = (phase < $bits(phase)'(CYC_200NS / 2));
  assign smp_rise     = (phase == $bits(phase)'(CYC_200NS / 2 - 1));
  assign smp_fall     = last_phase;

  // Frame start FRAME_DELAY cycles after the window boundary.
  always_ff @(posedge clk) begin
    if (rst) begin
      fdly_run    <= 1'b0;
      fdly        <= '0;
      frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (en_40us) begin
        fdly_run <= 1'b1;
        fdly     <= '0;
      end else if (fdly_run) begin
        if (fdly == $bits(fdly)'(FRAME_DELAY - 1)) begin
          fdly_run    <= 1'b0;
          frame_start <= 1'b1;
        end else begin
          fdly <= fdly + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)              fid <= '0;
    else if (frame_start) fid <= fid + 1'b1;
  end
endmodule
