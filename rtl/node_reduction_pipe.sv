// node_reduction_pipe: two-cycle (pipelined) version of the switchable node
// reduction function.
//
// Same function as node_reduction, for clock rates at which the comparators,
// the priority selection and the final key multiplexer do not fit in one
// cycle. Cycle 0 runs the three datapaths (nrf_cube, nrf_fattree, lag_select)
// and registers their tags, the LAG member, the destination and the mode.
// Cycle 1 picks the key of the registered mode from those registers. The
// thesis evaluates such a two-cycle circuit next to the single-cycle one; the
// split point is this design's choice.
//
// Interface: en_i samples cfg_i and dst_i at the clock edge ending cycle 0;
// key_o is then valid during the following cycle and holds until the next
// en_i. The mode and switch coordinates are those present at sampling, so a
// configuration change never mixes with a key in flight. Reset clears the
// registers (key_o then shows an arbitrary-mode key of address 0).
module node_reduction_pipe
  import rc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_i,
  input  rc_cfg_t           cfg_i,
  input  logic [ADDR_W-1:0] dst_i,
  output logic [KEY_W-1:0]  key_o
);

  rtag_t      tag_cube, tag_ft, tag_cube_q, tag_ft_q;
  logic [3:0] lag, lag_q;
  nrf_mode_e  mode_q;
  logic [ADDR_W-1:0] dst_q;

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

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_cube_q <= '0;
      tag_ft_q   <= '0;
      lag_q      <= '0;
      mode_q     <= NRF_ARBITRARY;
      dst_q      <= '0;
    end else if (en_i) begin
      tag_cube_q <= tag_cube;
      tag_ft_q   <= tag_ft;
      lag_q      <= lag;
      mode_q     <= cfg_i.mode;
      dst_q      <= dst_i;
    end
  end

  always_comb begin
    unique case (mode_q)
      NRF_CUBE:    key_o = reduced_key(NRF_CUBE, tag_cube_q, lag_q);
      NRF_FATTREE: key_o = reduced_key(NRF_FATTREE, tag_ft_q, lag_q);
      default:     key_o = full_key(NRF_ARBITRARY, dst_q);
    endcase
  end

endmodule
