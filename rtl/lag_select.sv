// lag_select: picks the member link of a link-aggregation (LAG) group.
//
// A logical output port may be a bundle of up to 16 physical links. The
// member is chosen from the packet's 24-bit destination address, either as a
// CRC of the address modulo the bundle size (the evaluated configuration) or
// as the address itself modulo the bundle size. It runs in parallel with the
// node reduction function, and its result becomes part of the cache key, so
// every member link has its own cache entry. The CRC is crc_hash's
// CRC-16/CCITT; using its whole 16-bit value for the modulo is this design's
// choice.
//
// Interface: combinational, dst_i + lag_num_i (1..16, 0 treated as 1) -> lag_o.
module lag_select
  import rc_pkg::*;
(
  input  logic [ADDR_W-1:0] dst_i,
  input  logic [4:0]        lag_num_i,
  input  lag_sel_e          lag_sel_i,
  output logic [3:0]        lag_o
);

  logic [15:0] crc;
  logic [ADDR_W-1:0] src;
  logic [ADDR_W-1:0] rem;

  crc_hash #(.IN_W(ADDR_W), .CRC_W(16)) u_crc (.data_i(dst_i), .crc_o(crc));

  always_comb begin
    src = (lag_sel_i == LAG_CRC) ? ADDR_W'(crc) : dst_i;
    if (lag_num_i <= 5'd1) rem = '0;
    else                   rem = src % ADDR_W'(lag_num_i);
    lag_o = rem[3:0];
  end

endmodule
