// master_recon: serial reconstruction of a shared value in the master.
//
// During the output session slave i sends its share as alternating beats:
// a chunk of x_i, then the same chunk of a_i. One register per slave holds
// the x beat; when the a beats arrive, three XORs form the three possible
// reconstructions v = x_i ^ a_{i+1} (x_1^a_2, x_2^a_3, x_3^a_1) and a
// comparator checks that they agree. The first reconstruction is the output
// chunk; any disagreement sets `mismatch` until the next `clear`.
//
// Interface: `clear` at the start of a session; `rise` and `odd` (beat number
// is odd, i.e. an a beat) come from the SPI module; `v_valid` is high in the
// cycle an a beat is sampled, with the chunk on `v`. Cost: 3*BUS_W registers,
// 3*BUS_W XORs and one comparator, as in the document's serial scheme (for
// BUS_W = 1 exactly three registers).
//
// The delay-register structure follows the document; pairing x_i with the
// neighbour's a_{i+1} follows its reconstruction equation v = x_i ^ a_{i+1}.
module master_recon #(
  parameter int unsigned BUS_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             rise,
  input  logic             odd,
  input  logic [BUS_W-1:0] miso [3],
  output logic [BUS_W-1:0] v,
  output logic             v_valid,
  output logic             mismatch
);

  logic [BUS_W-1:0] xr [3];
  logic [BUS_W-1:0] r1, r2, r3;

  assign r1      = xr[0] ^ miso[1];
  assign r2      = xr[1] ^ miso[2];
  assign r3      = xr[2] ^ miso[0];
  assign v       = r1;
  assign v_valid = rise && odd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr       <= '{default: '0};
      mismatch <= 1'b0;
    end else begin
      if (clear) mismatch <= 1'b0;
      if (rise && !odd) xr <= miso;
      if (v_valid && !(r1 == r2 && r2 == r3)) mismatch <= 1'b1;
    end
  end

endmodule
