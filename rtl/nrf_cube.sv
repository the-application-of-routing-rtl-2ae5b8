// nrf_cube: node reduction function for k-ary n-meshes and k-ary n-tori.
//
// With dimension-order routing every destination reached through the same
// output link can share one cache entry, so a switch needs only 2n+1 entries
// (n dimensions x {+,-} plus the local endpoint) whatever the network size.
// The destination and the current switch address are both split into n
// chunks of chunk_w bits, chunk 0 in the least significant bits holding the
// coordinate of dimension 0. NUM_CMP comparators (12 by default, enough for
// 24-bit addresses made of 2-bit chunks) compare all dimensions in parallel;
// the lowest dimension whose coordinates differ decides the link, as in
// dimension-order routing. With no difference the tag is the local endpoint.
//
// Mesh: offset = d_i - c_i > 0 gives X(i,+), < 0 gives X(i,-).
// Torus: the wraparound link is taken when it is shorter. The boundary is
// floor(k/2): offset > floor(k/2) gives X(i,-), 0 < offset <= floor(k/2)
// gives X(i,+), and symmetrically for negative offsets. (This follows the
// "c_be = (c + floor(k/2)) mod k" boundary of the thesis; its torus algorithm
// writes ceil(k/2), which for odd k would route one hop further than needed.)
//
// Chunk widths 2..8 bits are accepted at run time, so the evaluated shapes
// 256-ary 3-cube, 64-ary 4-cube, 16-ary 6-cube, 8-ary 8-cube and 4-ary
// 12-cube all fit. NUM_CMP = 6 gives the reduced 6-comparator variant.
//
// Interface: combinational, cfg + dst_i -> tag_o.
module nrf_cube
  import rc_pkg::*;
#(
  parameter int NUM_CMP_P = NUM_CMP
) (
  input  logic [ADDR_W-1:0] dst_i,
  input  logic [ADDR_W-1:0] cur_i,
  input  logic [3:0]        chunk_w_i,
  input  logic [4:0]        n_dims_i,
  input  logic [8:0]        radix_i,
  input  logic              torus_i,
  output rtag_t             tag_o
);

  logic [NUM_CMP_P-1:0] differ;   // comparator i: coordinates differ
  logic [NUM_CMP_P-1:0] plus;     // comparator i: go in + direction

  always_comb begin
    logic signed [9:0] off;
    logic signed [9:0] half;
    half = signed'({2'b00, radix_i[8:1]});
    for (int i = 0; i < NUM_CMP_P; i++) begin
      off = signed'({2'b00, chunk_of(dst_i, i, chunk_w_i)}) -
            signed'({2'b00, chunk_of(cur_i, i, chunk_w_i)});
      differ[i] = (i < int'(n_dims_i)) && (off != 0);
      if (!torus_i)        plus[i] = (off > 0);
      else if (off > half) plus[i] = 1'b0;
      else if (off > 0)    plus[i] = 1'b1;
      else if (off < -half) plus[i] = 1'b1;
      else                 plus[i] = 1'b0;
    end
  end

  // Priority multiplexer: lowest differing dimension first.
  always_comb begin
    tag_o = '{local_ep: 1'b1, dir: 1'b0, idx: 8'd0};
    for (int i = NUM_CMP_P - 1; i >= 0; i--) begin
      if (differ[i]) tag_o = '{local_ep: 1'b0, dir: plus[i], idx: 8'(i)};
    end
  end

endmodule
