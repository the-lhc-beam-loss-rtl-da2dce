// Readout of two ADC channels that share one 12-bit data bus.
//
// The ADC runs at 5 MHz and multiplexes two channels on each bus: the word
// that follows its rising clock edge belongs to the even channel, the word
// that follows the falling edge to the odd one.  Two "5 MHz" registers
// separate them, sampling half a clock period apart (smp_rise, smp_fall).
//
// The card sends one ADC value per channel every 40 us.  For each channel
// three readouts are registered: the sample current at the window boundary
// (t), the next one (t+t1, 200 ns later) and the one after (t+t2, 400 ns
// later).  Two small FSMs pick which one is used.  The integrator output lags
// the CFC pulse, so a pulse shortly before the readout leaves the ADC value
// inconsistent with the count.  The pulse FSM watches a 100 ns window
// (near_readout) and, if the channel's CFC pulse fell in it, selects t+t1.
// The threshold FSM then checks that readout; if it is still below
// ADC_THRESHOLD (the integrator has not settled yet) it selects t+t2.
//
// The bus multiplexing, the three readouts, the two FSMs and the 100 ns
// window follow the card description.  The threshold value and the direction
// of the comparison (below threshold = not yet valid) are this design's
// choices, the latter taken from the observed symptom of an ADC value near
// zero where the maximum was expected.
//
// The readout at t is the 5 MHz register as it stands at the window boundary;
// t+t1 and t+t2 are the next two samples taken into it.  For the odd channel,
// whose sampling strobe coincides with the boundary, t is therefore the sample
// taken half an ADC period before the even channel's.
//
// Timing: adc holds the selected value of the window that ended at the last
// en_40us; it is updated three cycles after the t+t2 sample is taken, i.e. about 400 ns
// after en_40us, and valid is high from then until the next en_40us.
module adc_readout_pair
  import blm_pkg::*;
#(
  parameter adc_t ADC_THRESHOLD = 12'd64   // below this a late readout is retried
) (
  input  logic       clk,
  input  logic       rst,
  input  adc_t       adc_bus,       // registered ADC data bus
  input  logic       smp_rise,      // sample even channel
  input  logic       smp_fall,      // sample odd channel
  input  logic       en_40us,       // readout instant
  input  logic       near_readout,  // last 100 ns before the readout
  input  logic [1:0] cfc_pulse,     // CFC count pulses of the two channels
  output adc_t       adc [2],       // selected value per channel
  output logic [1:0] late,          // pulse FSM chose a later readout
  output logic       valid
);
  typedef enum logic [2:0] {R_IDLE, R_WAIT_T1, R_WAIT_T2, R_SEL, R_DONE} rd_state_e;

  adc_t       reg5m [2];
  adc_t       r_t [2], r_t1 [2], r_t2 [2];
  logic [1:0] seen;               // pulse FSM: pulse observed in the window
  logic [1:0] smp, smp_d;          // smp_d: reg5m was just updated
  rd_state_e  st [2];

  assign smp = {smp_fall, smp_rise};

  always_ff @(posedge clk) begin
    if (rst) smp_d <= '0;
    else     smp_d <= smp;
  end

  for (genvar c = 0; c < 2; c++) begin : g_ch
    // 5 MHz register
    always_ff @(posedge clk) begin
      if (rst)         reg5m[c] <= '0;
      else if (smp[c]) reg5m[c] <= adc_bus;
    end

    // Pulse FSM: remember a pulse in the 100 ns window before the readout.
    always_ff @(posedge clk) begin
      if (rst) begin
        seen[c] <= 1'b0;
        late[c] <= 1'b0;
      end else if (en_40us) begin
        late[c] <= seen[c] | (near_readout & cfc_pulse[c]);
        seen[c] <= 1'b0;
      end else if (near_readout & cfc_pulse[c]) begin
        seen[c] <= 1'b1;
      end
    end

    // Readout registers and threshold FSM.
    always_ff @(posedge clk) begin
      if (rst) begin
        st[c]   <= R_IDLE;
        r_t[c]  <= '0;
        r_t1[c] <= '0;
        r_t2[c] <= '0;
        adc[c]  <= '0;
      end else begin
        unique case (st[c])
          R_IDLE, R_DONE: if (en_40us) begin
            r_t[c] <= reg5m[c];
            st[c]  <= R_WAIT_T1;
          end
          R_WAIT_T1: if (smp_d[c]) begin
            r_t1[c] <= reg5m[c];
            st[c]   <= R_WAIT_T2;
          end
          R_WAIT_T2: if (smp_d[c]) begin
            r_t2[c] <= reg5m[c];
            st[c]   <= R_SEL;
          end
          R_SEL: begin
            // multiplexer steered by the pulse FSM and the threshold FSM
            if (!late[c])                      adc[c] <= r_t[c];
            else if (r_t1[c] >= ADC_THRESHOLD) adc[c] <= r_t1[c];
            else                               adc[c] <= r_t2[c];
            st[c] <= R_DONE;
          end
          default: st[c] <= R_IDLE;
        endcase
      end
    end
  end

  assign valid = (st[0] == R_DONE) & (st[1] == R_DONE);
endmodule
