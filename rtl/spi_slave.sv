// spi_slave: slave end of the custom SPI link between the master and one MPC
// slave.
//
// The link carries words of variable length with no address phase: both ends
// know from the protocol's fixed order which word comes next. A transfer
// ("session") is requested by the slave logic with `req`, the word to send in
// `tx` and its length in beats (`nbeats`, BUS_W bits per beat). The slave then
// raises IRQ; the master answers by pulling nSS low and toggling SCK. On every
// SCK rising edge seen while nSS is low the slave samples MOSI into
// rx[beat*BUS_W +: BUS_W] and moves MISO on to the next beat of `tx`
// (least significant beat first). After the last beat IRQ drops and `done`
// pulses for one cycle; `rx` then holds the received word until the next
// session. A new session starts only once nSS is back high, so the master
// always sees IRQ low between two sessions.
//
// Timing: SCK, nSS and MOSI are driven from the master's registers in the
// same clock domain; a rising edge is detected as sck & !sck_q. MISO changes
// in the cycle after a rising edge, so one beat per SCK period.
//
// The signal set (SCK, nSS, MOSI, MISO, IRQ), the variable word length and
// the IRQ/nSS synchronisation follow the document; the exact handshake order
// and the beat ordering are this design's choices.
module spi_slave #(
  parameter int unsigned BUS_W   = 8,
  parameter int unsigned MAXBITS = 384,
  localparam int unsigned BEATW  = $clog2(MAXBITS / BUS_W + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // bus side
  input  logic               sck,
  input  logic               nss,
  input  logic [BUS_W-1:0]   mosi,
  output logic [BUS_W-1:0]   miso,
  output logic               irq,
  // slave-logic side
  input  logic               req,
  input  logic [BEATW-1:0]   nbeats,
  input  logic [MAXBITS-1:0] tx,
  output logic               done,
  output logic [MAXBITS-1:0] rx
);

  logic               sck_q, rise, active;
  logic [BEATW-1:0]   beat, last;
  logic [MAXBITS-1:0] txreg;

  assign rise = sck && !sck_q;
  assign irq  = active;
  assign miso = txreg[beat*BUS_W +: BUS_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_q  <= 1'b0;
      active <= 1'b0;
      beat   <= '0;
      last   <= '0;
      txreg  <= '0;
      rx     <= '0;
      done   <= 1'b0;
    end else begin
      sck_q <= sck;
      done  <= 1'b0;
      if (!active) begin
        beat <= '0;
        if (req && nss) begin
          active <= 1'b1;
          txreg  <= tx;
          last   <= nbeats - 1'b1;
        end
      end else if (rise && !nss) begin
        rx[beat*BUS_W +: BUS_W] <= mosi;
        if (beat == last) begin
          active <= 1'b0;
          done   <= 1'b1;
        end else begin
          beat <= beat + 1'b1;
        end
      end
    end
  end

  initial assert (MAXBITS % BUS_W == 0) else $error("MAXBITS must be a multiple of BUS_W");

endmodule
