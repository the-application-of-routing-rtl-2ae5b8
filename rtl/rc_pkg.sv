// Shared types and constants of the routing-computation (RC) stage of a
// switch with a packet forwarding cache.
//
// A packet carries a 24-bit destination address. The RC stage turns it into a
// 64-bit cache key (the "target node address descriptor" that is stored as
// the cache tag), hashes the key with a CRC to pick a cache set, and looks the
// key up in a 4-way set-associative cache of 2048 lines. A line holds the
// 8-byte tag, a 2-byte output port descriptor and 2 reserved bytes (for QoS).
// On a miss the same key is looked up in the off-chip CAM.
//
// The key has one of two shapes, chosen by the node-reduction mode:
//   arbitrary topology : {mode, 38'b0, destination address[23:0]}
//   k-ary n-cube/fat tree (reduced): {mode, 48'b0, local, dir, idx[7:0], lag[3:0]}
// where idx is the dimension (cube) or the address digit of the link (fat
// tree), dir is + / up when 1, local marks the local endpoint, and lag is the
// member link of a link-aggregation group. The key layout is a choice of this
// design; the sizes (24-bit addresses, 8/2/2-byte line) follow the thesis.
package rc_pkg;

  localparam int ADDR_W  = 24;             // packet destination address
  localparam int KEY_W   = 64;             // cache tag: 8-byte node descriptor
  localparam int PORT_W  = 16;             // output port descriptor: 2 bytes
  localparam int RSV_W   = 16;             // reserved (QoS) field: 2 bytes
  localparam int DATA_W  = PORT_W + RSV_W; // data part of a cache line
  localparam int ID_W    = 8;              // request tag returned with a result
  localparam int CHUNK_MAXW = 8;           // widest address chunk (256-ary)
  localparam int NUM_CMP = 12;             // chunk comparators (24 bit / 2 bit)

  // Node-reduction datapath selected for the running job.
  typedef enum logic [1:0] {
    NRF_ARBITRARY = 2'd0,  // CRC only, key is the full destination address
    NRF_CUBE      = 2'd1,  // k-ary n-mesh / n-torus, dimension-order routing
    NRF_FATTREE   = 2'd2   // fat tree and Dragonfly, up*/down* routing
  } nrf_mode_e;

  // How a member link of a LAG group is chosen.
  typedef enum logic {
    LAG_CRC     = 1'b0,    // CRC of the destination address mod lag_num
    LAG_RESIDUE = 1'b1     // destination address mod lag_num
  } lag_sel_e;

  // Run-time configuration of the node reduction functions. Changing it
  // requires a cache flush (see cache_ctrl).
  typedef struct packed {
    nrf_mode_e          mode;
    logic [ADDR_W-1:0]  cur_addr;  // this switch's coordinates, chunk format
    logic [3:0]         chunk_w;   // chunk width in bits (1..8)
    logic [4:0]         n_dims;    // cube: n; fat tree: n (levels above leaves)
    logic [8:0]         radix;     // cube: k, used for torus wraparound
    logic               torus;     // cube: 1 = torus, 0 = mesh
    logic [4:0]         ft_dim;    // fat tree: layer ("dim") of this switch
    logic [4:0]         lag_num;   // links per LAG group, 1..16 (1 = no LAG)
    lag_sel_e           lag_sel;
  } rc_cfg_t;

  // Reduced routing tag produced by the cube and fat-tree datapaths.
  typedef struct packed {
    logic       local_ep;          // destination is this switch's endpoint
    logic       dir;               // cube: 1 = +, 0 = -;  fat tree: 1 = up, 0 = down
    logic [7:0] idx;               // cube: dimension; fat tree: link digit
  } rtag_t;

  // One cache line's payload.
  typedef struct packed {
    logic [RSV_W-1:0]  rsv;
    logic [PORT_W-1:0] port;
  } line_data_t;

  function automatic logic [KEY_W-1:0] full_key(nrf_mode_e m, logic [ADDR_W-1:0] dst);
    return {m, {(KEY_W-2-ADDR_W){1'b0}}, dst};
  endfunction

  function automatic logic [KEY_W-1:0] reduced_key(nrf_mode_e m, rtag_t t, logic [3:0] lag);
    return {m, {(KEY_W-2-14){1'b0}}, t, lag};
  endfunction

  // Chunk i of width w of an address (zero beyond the address).
  function automatic logic [CHUNK_MAXW-1:0] chunk_of(logic [ADDR_W-1:0] a, int unsigned i,
                                                     logic [3:0] w);
    logic [ADDR_W+CHUNK_MAXW-1:0] wide;
    logic [CHUNK_MAXW-1:0] mask;
    wide = {{CHUNK_MAXW{1'b0}}, a} >> (i * w);
    mask = CHUNK_MAXW'((9'd1 << w) - 9'd1);
    return wide[CHUNK_MAXW-1:0] & mask;
  endfunction

endpackage
