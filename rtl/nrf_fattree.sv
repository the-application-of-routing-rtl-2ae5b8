// nrf_fattree: node reduction function for fat trees (and Dragonflies laid
// out as fat trees) with up*/down* routing.
//
// A switch at layer "dim" has coordinates (dim, c_{n-1}..c_0); a compute node
// has n+1 address chunks (d_n..d_0). All chunks are chunk_w bits wide, chunk 0
// in the least significant bits. For each i from dim to n-1 a comparator
// checks d_{i+1} against c_i. If any differs, the destination is outside this
// switch's subtree and the packet goes up; the up link is up_{d_i} taken at
// the highest differing i. If all agree, the packet goes down link
// down_{d_dim}. So the cache needs at most one entry per link, however many
// nodes the tree has. Scanning from i = n-1 downward and stopping at the first
// mismatch is this design's reading of the loop in the thesis.
//
// Interface: combinational, cfg + dst_i -> tag_o (dir = 1 means up).
module nrf_fattree
  import rc_pkg::*;
#(
  parameter int NUM_CMP_P = NUM_CMP
) (
  input  logic [ADDR_W-1:0] dst_i,
  input  logic [ADDR_W-1:0] cur_i,
  input  logic [3:0]        chunk_w_i,
  input  logic [4:0]        n_dims_i,
  input  logic [4:0]        dim_i,
  output rtag_t             tag_o
);

  logic [NUM_CMP_P-1:0] mismatch;

  always_comb begin
    for (int i = 0; i < NUM_CMP_P; i++) begin
      mismatch[i] = (i >= int'(dim_i)) && (i < int'(n_dims_i)) &&
                    (chunk_of(dst_i, i + 1, chunk_w_i) != chunk_of(cur_i, i, chunk_w_i));
    end
  end

  always_comb begin
    tag_o = '{local_ep: 1'b0, dir: 1'b0, idx: chunk_of(dst_i, int'(dim_i), chunk_w_i)};
    for (int i = 0; i < NUM_CMP_P; i++) begin
      if (mismatch[i]) tag_o = '{local_ep: 1'b0, dir: 1'b1, idx: chunk_of(dst_i, i, chunk_w_i)};
    end
  end

endmodule
