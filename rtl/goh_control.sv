// I2C and power control of the two GOH optical transmitters.
//
// The laser of each GOH is set over I2C.  Two PCB temperature flags select its
// bias current: nominal (11.4 mA) while both are low, raised (16.2 mA) when
// either is high, which removed CRC errors seen at high temperature.  This
// block writes the current setting to both GOHs after reset, after every GOH
// reset and whenever the wanted setting changes.  A GOH reset request (from
// the HV command FSM) holds both GOH reset outputs low for RST_TICKS ticks of
// 200 ns, after which the setting is written again.
//
// I2C: write-only master.  One transfer is START, address byte (7-bit address,
// write), register byte, data byte, STOP; the ACK bit of every byte is sampled
// and a missing ACK sets nack until the next transfer.  Each I2C bit lasts four
// phases of QTR_TICKS x 200 ns (about 96 kHz at the defaults).  SCL is driven
// push-pull, SDA only pulled low (sda_low) and read back on sda_in.
//
// The two currents and their switching by the temperature flags over I2C, and
// the GOH reset, follow the card description.  The I2C addresses, the register
// number, the code values (current / 0.2 mA) and the reset length are this
// design's assumptions.
//
// Timing: i2c_busy is high from the start request until the STOP of the second
// GOH's transfer; cur_high shows the setting last written.
module goh_control
  import blm_pkg::*;
#(
  parameter int unsigned QTR_TICKS = 13,       // 200 ns ticks per I2C quarter bit
  parameter int unsigned RST_TICKS = 50,       // GOH reset length in 200 ns ticks
  parameter logic [6:0]  ADDR1     = 7'h20,    // I2C address, GOH 1
  parameter logic [6:0]  ADDR2     = 7'h21,    // I2C address, GOH 2
  parameter logic [7:0]  REG_BIAS  = 8'h02,    // laser bias register
  parameter logic [7:0]  CODE_NOM  = 8'd57,    // 11.4 mA
  parameter logic [7:0]  CODE_HIGH = 8'd81     // 16.2 mA
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en_200ns,
  input  logic       temp1,        // temperature flag 1 (>35 C)
  input  logic       temp2,        // temperature flag 2 (>60 C)
  input  logic       goh_rst_req,  // one-cycle request to restart the GOHs
  output logic [1:0] goh_rst_n,    // GOH reset outputs, active low
  output logic       scl,
  output logic       sda_low,      // 1 pulls SDA low
  input  logic       sda_in,
  output logic       i2c_busy,
  output logic       nack,
  output logic       cur_high      // 1 = raised current written
);
  typedef enum logic [2:0] {G_RESET, G_IDLE, G_START, G_BITS, G_STOP} i2c_state_e;

  i2c_state_e                      st;
  logic [$clog2(QTR_TICKS+1)-1:0]  qcnt;
  logic [1:0]                      qph;       // quarter of the current bit
  logic [1:0]                      bytei;     // byte of the transfer
  logic [3:0]                      biti;      // bit of the byte, 8 = ACK
  logic                            dev;       // 0 = GOH 1, 1 = GOH 2
  logic                            want;      // wanted setting
  logic                            pending;   // a write is due
  logic [$clog2(RST_TICKS+1)-1:0]  rcnt;
  logic [7:0]                      cur_byte;
  logic                            qtick;     // end of a quarter bit

  assign want  = temp1 | temp2;
  assign qtick = en_200ns && (qcnt == $bits(qcnt)'(QTR_TICKS - 1));

  always_comb begin
    unique case (bytei)
      2'd0:    cur_byte = {dev ? ADDR2 : ADDR1, 1'b0};
      2'd1:    cur_byte = REG_BIAS;
      default: cur_byte = cur_high ? CODE_HIGH : CODE_NOM;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= G_IDLE;
      qcnt      <= '0;
      qph       <= '0;
      bytei     <= '0;
      biti      <= '0;
      dev       <= 1'b0;
      pending   <= 1'b1;
      rcnt      <= '0;
      goh_rst_n <= 2'b11;
      scl       <= 1'b1;
      sda_low   <= 1'b0;
      nack      <= 1'b0;
      cur_high  <= 1'b0;
    end else begin
      if (en_200ns) qcnt <= (qcnt == $bits(qcnt)'(QTR_TICKS - 1)) ? '0 : qcnt + 1'b1;
      if (want != cur_high) pending <= 1'b1;

      if (goh_rst_req) begin
        // restart both GOHs; any transfer in progress is abandoned
        st        <= G_RESET;
        rcnt      <= '0;
        goh_rst_n <= 2'b00;
        scl       <= 1'b1;
        sda_low   <= 1'b0;
        pending   <= 1'b1;
      end else begin
        unique case (st)
          G_RESET: if (en_200ns) begin
            if (rcnt == $bits(rcnt)'(RST_TICKS - 1)) begin
              goh_rst_n <= 2'b11;
              st        <= G_IDLE;
            end else begin
              rcnt <= rcnt + 1'b1;
            end
          end
          G_IDLE: if (qtick && pending) begin
            pending  <= 1'b0;
            cur_high <= want;
            dev      <= 1'b0;
            nack     <= 1'b0;
            qph      <= '0;
            st       <= G_START;
          end
          G_START: if (qtick) begin
            // quarters: SDA falls while SCL high, then SCL falls
            unique case (qph)
              2'd0: begin scl <= 1'b1; sda_low <= 1'b0; end
              2'd1: sda_low <= 1'b1;
              2'd2: scl <= 1'b0;
              2'd3: begin bytei <= '0; biti <= '0; st <= G_BITS; end
            endcase
            qph <= qph + 1'b1;
          end
          G_BITS: if (qtick) begin
            unique case (qph)
              2'd0: begin
                scl     <= 1'b0;
                sda_low <= (biti == 4'd8) ? 1'b0 : ~cur_byte[3'd7 - biti[2:0]];
              end
              2'd1: scl <= 1'b1;
              2'd2: if (biti == 4'd8 && sda_in) nack <= 1'b1;
              2'd3: begin
                scl <= 1'b0;
                if (biti == 4'd8) begin
                  biti <= '0;
                  if (bytei == 2'd2) st <= G_STOP;
                  else               bytei <= bytei + 1'b1;
                end else begin
                  biti <= biti + 1'b1;
                end
              end
            endcase
            qph <= qph + 1'b1;
          end
          G_STOP: if (qtick) begin
            // quarters: SDA low, SCL rises, SDA rises, bus free
            unique case (qph)
              2'd0: sda_low <= 1'b1;
              2'd1: scl <= 1'b1;
              2'd2: sda_low <= 1'b0;
              2'd3: begin
                if (!dev) begin
                  dev <= 1'b1;
                  st  <= G_START;
                end else begin
                  st  <= G_IDLE;
                end
              end
            endcase
            qph <= qph + 1'b1;
          end
          default: st <= G_IDLE;
        endcase
      end
    end
  end

  assign i2c_busy = (st == G_START) | (st == G_BITS) | (st == G_STOP);
endmodule
