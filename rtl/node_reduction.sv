// node_reduction: the switchable node reduction function.
//
// Turns a packet's destination address into the key under which the packet
// forwarding cache (and the CAM) holds its route. Three datapaths work in
// parallel and the configured mode selects one:
//   NRF_ARBITRARY : the key is the full destination address; the cache then
//                   behaves as an ordinary CRC-indexed cache;
//   NRF_CUBE      : nrf_cube reduces the address to one of 2n+1 link tags;
//   NRF_FATTREE   : nrf_fattree reduces it to an up or down link tag.
// For the two reduced modes the LAG member chosen by lag_select is appended,
// so each physical link of a bundle has its own entry. The mode is fixed per
// job; the caches are flushed when it changes.
//
// Interface: combinational, cfg_i + dst_i -> key_o (64 bits, layout in rc_pkg).
module node_reduction
  import rc_pkg::*;
(
  input  rc_cfg_t           cfg_i,
  input  logic [ADDR_W-1:0] dst_i,
  output logic [KEY_W-1:0]  key_o
);

  rtag_t      tag_cube, tag_ft;
  logic [3:0] lag;

  nrf_cube u_cube (
    .dst_i(dst_i), .cur_i(cfg_i.cur_addr), .chunk_w_i(cfg_i.chunk_w),
    .n_dims_i(cfg_i.n_dims), .radix_i(cfg_i.radix), .torus_i(cfg_i.torus),
    .tag_o(tag_cube)
  );

  nrf_fattree u_ft (
    .dst_i(dst_i), .cur_i(cfg_i.cur_addr), .chunk_w_i(cfg_i.chunk_w),
    .n_dims_i(cfg_i.n_dims), .dim_i(cfg_i.ft_dim), .tag_o(tag_ft)
  );

  lag_select u_lag (
    .dst_i(dst_i), .lag_num_i(cfg_i.lag_num), .lag_sel_i(cfg_i.lag_sel), .lag_o(lag)
  );

  always_comb begin
    unique case (cfg_i.mode)
      NRF_CUBE:    key_o = reduced_key(NRF_CUBE, tag_cube, lag);
      NRF_FATTREE: key_o = reduced_key(NRF_FATTREE, tag_ft, lag);
      default:     key_o = full_key(NRF_ARBITRARY, dst_i);
    endcase
  end

endmodule
