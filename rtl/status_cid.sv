// Status register and card identity (CID) reader.
//
// Status: the 32 status bits (supply, HV, temperature and GOH-ready
// comparators from pins, plus flags made inside the FPGA) are registered
// together once every 40 us, so that every frame carries one consistent
// snapshot.  Their meaning and order are listed in the top-level module.
//
// CID: each FPGA carries a 16-bit silicon signature that identifies the card.
// After reset this block reads it serially: it raises cid_load for one 200 ns
// tick so the signature source loads it, then produces CID_W pulses on
// cid_sclk (high for one tick, low for one tick) and shifts cid_sdi into a
// shift register, most significant bit first, on each rising edge of
// cid_sclk.  After the last bit cid_valid rises and the CID is held.
//
// Registering the status bits every 40 us and a shift register for the CID
// follow the card description; the serial protocol (load pulse, tick-rate
// clock, MSB first) is this design's choice, as the signature's access port
// is not specified.
//
// Timing: status1/status2 change on the cycle after en_40us.  The CID is
// valid 2*CID_W+2 ticks of 200 ns after reset.
module status_cid
  import blm_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             en_200ns,
  input  logic             en_40us,
  input  word_t            status1_in,
  input  word_t            status2_in,
  output word_t            status1,
  output word_t            status2,
  output logic             cid_load,
  output logic             cid_sclk,
  input  logic             cid_sdi,
  output logic [CID_W-1:0] cid,
  output logic             cid_valid
);
  typedef enum logic [1:0] {C_LOAD, C_LOW, C_HIGH, C_DONE} cid_state_e;

  cid_state_e                 cst;
  logic [$clog2(CID_W+1)-1:0] nbits;

  always_ff @(posedge clk) begin
    if (rst) begin
      status1 <= '0;
      status2 <= '0;
    end else if (en_40us) begin
      status1 <= status1_in;
      status2 <= status2_in;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cst   <= C_LOAD;
      nbits <= '0;
      cid   <= '0;
    end else if (en_200ns) begin
      unique case (cst)
        C_LOAD: cst <= C_LOW;
        C_LOW:  cst <= (nbits == $bits(nbits)'(CID_W)) ? C_DONE : C_HIGH;
        C_HIGH: begin
          cid   <= {cid[CID_W-2:0], cid_sdi};
          nbits <= nbits + 1'b1;
          cst   <= C_LOW;
        end
        C_DONE: ;
      endcase
    end
  end

  assign cid_load  = (cst == C_LOAD);
  assign cid_sclk  = (cst == C_HIGH);
  assign cid_valid = (cst == C_DONE);
endmodule
