// cache_switch_rc: routing-computation stage of a switch with packet
// forwarding caches (top level).
//
// A conventional switch routes each packet by a lookup in an off-chip CAM,
// which costs about 25 ns per packet and caps the packet rate of a port. Here
// every input port has its own on-chip packet forwarding cache in front of
// its CAM (rc_port): a hit returns the output port in 3 cycles at one packet
// per cycle, only misses pay the CAM latency. A switchable node reduction
// function maps destinations to a few cache keys on k-ary n-cubes, fat trees
// and Dragonflies, so that a handful of entries cover any number of nodes;
// for arbitrary topologies the full address is the key. One cache_ctrl
// shared by all ports holds that configuration and flushes / re-enables the
// caches around topology changes.
//
// The rest of the switch (input buffers, VC and switch allocation, crossbar)
// and the CAM itself are outside this block: packet headers arrive on req_*,
// routes leave on rsp_*, and each port's CAM lookups use its cam_* signals.
// Management updates of a cache line (upd_*) are broadcast to all ports and
// accepted when every port can take them.
//
// Defaults follow the thesis' main configuration: 64 ports, 2048 entries,
// 4 ways per port, single-cycle node reduction (NRF_PIPE = 1 selects the
// two-cycle one). All per-port signals are arrays indexed by input port.
module cache_switch_rc
  import rc_pkg::*;
#(
  parameter int NUM_PORTS = 64,
  parameter int ENTRIES   = 2048,
  parameter int WAYS      = 4,
  parameter int MQ_DEPTH  = 8,
  parameter bit NRF_PIPE  = 1'b0   // 1: two-cycle node reduction in every port
) (
  input  logic              clk,
  input  logic              rst_n,
  // control / configuration
  input  logic              topo_change_i,
  input  logic              cfg_load_i,
  input  rc_cfg_t           cfg_i,
  input  logic              reprog_done_i,
  output logic              cache_en_o,
  // management update (broadcast)
  input  logic              upd_valid_i,
  output logic              upd_ready_o,
  input  logic [KEY_W-1:0]  upd_key_i,
  input  line_data_t        upd_data_i,
  // per input port: packet headers
  input  logic              req_valid_i [NUM_PORTS],
  output logic              req_ready_o [NUM_PORTS],
  input  logic [ADDR_W-1:0] req_dst_i   [NUM_PORTS],
  input  logic [ID_W-1:0]   req_id_i    [NUM_PORTS],
  // per input port: routes
  output logic              rsp_valid_o [NUM_PORTS],
  output logic [ID_W-1:0]   rsp_id_o    [NUM_PORTS],
  output line_data_t        rsp_data_o  [NUM_PORTS],
  output logic              rsp_hit_o   [NUM_PORTS],
  // per input port: CAM
  output logic              cam_req_valid_o [NUM_PORTS],
  input  logic              cam_req_ready_i [NUM_PORTS],
  output logic [KEY_W-1:0]  cam_req_key_o   [NUM_PORTS],
  input  logic              cam_rsp_valid_i [NUM_PORTS],
  input  line_data_t        cam_rsp_data_i  [NUM_PORTS]
);

  logic    flush;
  rc_cfg_t cfg;

  cache_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .topo_change_i(topo_change_i), .cfg_load_i(cfg_load_i),
    .cfg_new_i(cfg_i), .reprog_done_i(reprog_done_i), .flush_o(flush),
    .cache_en_o(cache_en_o), .cfg_o(cfg)
  );

  logic [NUM_PORTS-1:0] upd_rdy;
  assign upd_ready_o = &upd_rdy;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    rc_port #(.ENTRIES(ENTRIES), .WAYS(WAYS), .MQ_DEPTH(MQ_DEPTH), .NRF_PIPE(NRF_PIPE)) u_rc (
      .clk(clk), .rst_n(rst_n), .cfg_i(cfg), .cache_en_i(cache_en_o), .flush_i(flush),
      .req_valid_i(req_valid_i[p]), .req_ready_o(req_ready_o[p]),
      .req_dst_i(req_dst_i[p]), .req_id_i(req_id_i[p]),
      .rsp_valid_o(rsp_valid_o[p]), .rsp_id_o(rsp_id_o[p]),
      .rsp_data_o(rsp_data_o[p]), .rsp_hit_o(rsp_hit_o[p]),
      .upd_valid_i(upd_valid_i && upd_ready_o), .upd_ready_o(upd_rdy[p]),
      .upd_key_i(upd_key_i), .upd_data_i(upd_data_i),
      .cam_req_valid_o(cam_req_valid_o[p]), .cam_req_ready_i(cam_req_ready_i[p]),
      .cam_req_key_o(cam_req_key_o[p]), .cam_rsp_valid_i(cam_rsp_valid_i[p]),
      .cam_rsp_data_i(cam_rsp_data_i[p])
    );
  end

endmodule
