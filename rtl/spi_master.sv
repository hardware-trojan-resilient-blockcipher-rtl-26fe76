// spi_master: the master's SPI module, shared by the three links.
//
// It only generates control: when the master logic is ready for a session
// (`go`) and all three slaves have raised IRQ, it pulls nSS low and toggles
// SCK with a half period of SCK_HALF clock cycles. It keeps toggling until all
// three IRQ lines are low again, then raises nSS and pulses `sess_done`. A
// slave that lowers IRQ early is simply waited for, so the three slaves stay
// synchronised through the master.
//
// Outputs for the rest of the master: `rise` is high in the cycle in which an
// SCK rising edge is visible on the wires (the slaves sample MOSI in that same
// cycle) and `beat` counts the rising edges already seen in the current transfer, so
// the data of beat b must be on MOSI while beat == b.
//
// With SCK_HALF = 1 the bus runs at half the internal clock: one beat per two
// cycles, beta = 0.5 bit per cycle and wire, the operating point of the
// document's cycle counts. The nSS/SCK/IRQ roles follow the document; the
// exact start and stop rule is this design's choice.
//
// The reset also disables the assertions below; verilator therefore lists
// rst_n as used both asynchronously and synchronously, which concerns only
// that simulation check.
module spi_master #(
  parameter int unsigned SCK_HALF = 1,
  parameter int unsigned BEATW    = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  logic [2:0]       irq,
  output logic             nss,
  output logic             sck,
  output logic             rise,
  output logic [BEATW-1:0] beat,
  output logic             sess_start,
  output logic             sess_done
);

  localparam int unsigned DIVW = $clog2(SCK_HALF + 1);

  logic            active, sck_q;
  logic [DIVW-1:0] div;

  assign nss        = !active;
  assign rise       = sck && !sck_q;
  assign sess_start = !active && go && (&irq);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      sck       <= 1'b0;
      sck_q     <= 1'b0;
      div       <= '0;
      beat      <= '0;
      sess_done <= 1'b0;
    end else begin
      sck_q     <= sck;
      sess_done <= 1'b0;
      if (rise) beat <= beat + 1'b1;
      if (!active) begin
        sck <= 1'b0;
        div <= '0;
        if (sess_start) begin
          active <= 1'b1;
          beat   <= '0;
        end
      end else if (irq == 3'b000) begin
        active    <= 1'b0;
        sck       <= 1'b0;
        sess_done <= 1'b1;
      end else if (div == DIVW'(SCK_HALF - 1)) begin
        div <= '0;
        sck <= !sck;
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  // SCK only moves while nSS is low
  assert property (@(posedge clk) disable iff (!rst_n) nss |-> !sck);

endmodule
