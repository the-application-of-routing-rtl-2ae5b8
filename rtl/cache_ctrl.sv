// cache_ctrl: keeps the packet forwarding caches consistent with the CAM.
//
// The caches are never updated line by line when routes change. Instead, on a
// topology change, or when software loads a new node-reduction configuration
// before a job, the controller:
//   1. pulses flush_o for one cycle and drops cache_en_o (caches disabled),
//   2. latches the new configuration (cfg_load_i only),
//   3. waits until software reports that the CAM has been reprogrammed
//      (reprog_done_i),
//   4. raises cache_en_o again.
// While disabled, every packet is routed by the CAM and nothing is cached.
// After reset the controller is in the waiting state with the caches off, as
// the CAM has to be filled when the machine is deployed. The sequence is the
// thesis'; the signal-level handshake and the reset state are this design's.
//
// Interface: topo_change_i and cfg_load_i are single-cycle requests and may
// arrive in any state (a new request restarts the sequence). cfg_o is the
// configuration used by all node reduction functions of the switch.
module cache_ctrl
  import rc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    topo_change_i,
  input  logic    cfg_load_i,
  input  rc_cfg_t cfg_new_i,
  input  logic    reprog_done_i,
  output logic    flush_o,
  output logic    cache_en_o,
  output rc_cfg_t cfg_o
);

  typedef enum logic {C_WAIT, C_RUN} cstate_e;
  cstate_e st;

  localparam rc_cfg_t CFG_RESET = '{
    mode: NRF_ARBITRARY, cur_addr: '0, chunk_w: 4'd4, n_dims: 5'd1, radix: 9'd16,
    torus: 1'b0, ft_dim: 5'd0, lag_num: 5'd1, lag_sel: LAG_CRC
  };

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= C_WAIT;
      flush_o <= 1'b0;
      cfg_o   <= CFG_RESET;
    end else begin
      flush_o <= topo_change_i || cfg_load_i;
      if (cfg_load_i) cfg_o <= cfg_new_i;
      if (topo_change_i || cfg_load_i) st <= C_WAIT;
      else if (st == C_WAIT && reprog_done_i) st <= C_RUN;
    end
  end

  assign cache_en_o = (st == C_RUN) && !flush_o;

endmodule
