// crc_hash: single-cycle CRC of a data word.
//
// The packet forwarding cache picks its set from a CRC of the lookup key, and
// the link-aggregation (LAG) selector picks a member link from a CRC of the
// destination address. The thesis only says a CRC is used and that it fits in
// one clock cycle; the polynomial and the seed are this design's choice:
// CRC-16/CCITT (x^16 + x^12 + x^5 + 1, POLY = 16'h1021), seed 16'hFFFF, no
// final XOR, data fed most significant bit first.
//
// Interface: purely combinational, data_i -> crc_o. The caller registers the
// result, so the hash costs one pipeline stage.
module crc_hash #(
  parameter int          IN_W  = 64,
  parameter int          CRC_W = 16,
  parameter logic [15:0] POLY  = 16'h1021,
  parameter logic [15:0] SEED  = 16'hFFFF
) (
  input  logic [IN_W-1:0]  data_i,
  output logic [CRC_W-1:0] crc_o
);

  always_comb begin
    logic [CRC_W-1:0] c;
    logic             fb;
    c = SEED[CRC_W-1:0];
    for (int i = IN_W - 1; i >= 0; i--) begin
      fb = c[CRC_W-1] ^ data_i[i];
      c  = {c[CRC_W-2:0], 1'b0};
      if (fb) c = c ^ POLY[CRC_W-1:0];
    end
    crc_o = c;
  end

endmodule
