// rc_port: routing computation of one input port of the cache switch.
//
// Replaces the CAM-only routing computation of a conventional switch. Each
// packet header (destination address + request id) goes through a pipeline:
//
//   cycle 0  node reduction: destination -> 64-bit key (node_reduction)
//   cycle 1  CRC hash of the key -> set index; cache read issued
//   cycle 2  tag compare; on a hit the output port is registered
//   cycle 3  rsp_valid_o with the output port (hit latency 3 cycles)
//
// With NRF_PIPE = 1 the node reduction takes two cycles (node_reduction_pipe,
// for higher clock rates) and every latency grows by one cycle: a hit answers
// in cycle 4. The thesis evaluates both circuits; the default is the
// single-cycle one.
//
// One request is accepted per clock, so with all hits the port routes one
// packet per cycle. A lookup that misses (or any lookup while the cache is
// disabled) is queued in a miss queue and served by a miss handler while
// later hits keep flowing ("hit under miss"); results may therefore return
// out of order and carry the request id. The miss handler takes one queued
// miss at a time: it re-reads the set through the cache's maintenance port
// (an earlier refill may have brought the key in meanwhile; then no CAM access
// is needed), otherwise it sends the key to the off-chip CAM, waits for the
// answer, refills the victim way and returns the result. Only one CAM lookup
// is outstanding, so all-miss traffic is limited to one packet per CAM
// latency, as for a conventional switch.
//
// The same handler also serves management updates of a cache line (upd_*),
// used to reroute around a failed link without a flush. Updates take priority
// over queued misses.
//
// flush_i clears the cache; a refill in flight when a flush happens is
// dropped so no stale route survives. While cache_en_i is low every lookup
// misses, goes to the CAM and does not refill.
//
// Flow control: req_ready_o is low when the miss queue could not absorb every
// lookup already in the pipeline (a stall). The result port has no back
// pressure. When a hit and a handler result are ready together the hit goes
// first and the handler waits a cycle.
//
// From the thesis: per-port exclusive cache, hash / cache / CAM stages, CAM
// only on a miss, flush and disable. This design's choices: the miss queue
// depth, hit under miss, the recheck before the CAM access, the update port.
module rc_port
  import rc_pkg::*;
#(
  parameter int ENTRIES  = 2048,
  parameter int WAYS     = 4,
  parameter int MQ_DEPTH = 8,
  parameter bit NRF_PIPE = 1'b0,   // 1: two-cycle node reduction (hit latency 4)
  localparam int SETS    = ENTRIES / WAYS,
  localparam int SET_W   = $clog2(SETS),
  localparam int WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  rc_cfg_t           cfg_i,
  input  logic              cache_en_i,
  input  logic              flush_i,
  // packet headers from the input buffer
  input  logic              req_valid_i,
  output logic              req_ready_o,
  input  logic [ADDR_W-1:0] req_dst_i,
  input  logic [ID_W-1:0]   req_id_i,
  // routing result towards VC / switch allocation
  output logic              rsp_valid_o,
  output logic [ID_W-1:0]   rsp_id_o,
  output line_data_t        rsp_data_o,
  output logic              rsp_hit_o,      // 1: route came from the cache
  // management update of one cache line
  input  logic              upd_valid_i,
  output logic              upd_ready_o,
  input  logic [KEY_W-1:0]  upd_key_i,
  input  line_data_t        upd_data_i,
  // off-chip CAM
  output logic              cam_req_valid_o,
  input  logic              cam_req_ready_i,
  output logic [KEY_W-1:0]  cam_req_key_o,
  input  logic              cam_rsp_valid_i,
  input  line_data_t        cam_rsp_data_i
);

  typedef struct packed {
    logic [KEY_W-1:0] key;
    logic [ID_W-1:0]  id;
    logic [SET_W-1:0] set;
  } miss_t;

  typedef enum logic [2:0] {H_IDLE, H_CHECK, H_CAMREQ, H_CAMWAIT, H_RESP} hstate_e;

  localparam int CNT_W = $clog2(MQ_DEPTH + 1);

  logic req_fire;

  // ---------------- stage 0: node reduction ----------------
  // nr_valid / nr_id / key0 describe the request whose key is ready this cycle.
  logic [KEY_W-1:0] key0;
  logic             nr_valid;
  logic [ID_W-1:0]  nr_id;
  logic             s0_valid;     // request inside the two-cycle node reduction

  if (NRF_PIPE) begin : g_nrf_pipe
    logic [ID_W-1:0] s0_id;
    node_reduction_pipe u_nrf (
      .clk(clk), .rst_n(rst_n), .en_i(req_fire), .cfg_i(cfg_i), .dst_i(req_dst_i), .key_o(key0)
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s0_valid <= 1'b0;
        s0_id    <= '0;
      end else begin
        s0_valid <= req_fire;
        if (req_fire) s0_id <= req_id_i;
      end
    end
    assign nr_valid = s0_valid;
    assign nr_id    = s0_id;
  end else begin : g_nrf_comb
    node_reduction u_nrf (.cfg_i(cfg_i), .dst_i(req_dst_i), .key_o(key0));
    assign s0_valid = 1'b0;
    assign nr_valid = req_fire;
    assign nr_id    = req_id_i;
  end

  // ---------------- stage 1: hash ----------------
  logic             s1_valid, s2_valid;
  logic [KEY_W-1:0] s1_key, s2_key;
  logic [ID_W-1:0]  s1_id, s2_id;
  logic [SET_W-1:0] s2_set;
  logic [15:0]      s1_crc;
  logic [SET_W-1:0] s1_set;

  crc_hash #(.IN_W(KEY_W), .CRC_W(16)) u_hash (.data_i(s1_key), .crc_o(s1_crc));
  assign s1_set = s1_crc[SET_W-1:0];

  // miss queue
  logic             mq_push, mq_pop, mq_empty, mq_full;
  miss_t            mq_din, mq_dout;
  logic [CNT_W-1:0] mq_count;

  assign req_ready_o = (int'(mq_count) + int'(s0_valid) + int'(s1_valid) + int'(s2_valid)) < MQ_DEPTH;
  assign req_fire    = req_valid_i && req_ready_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
      s1_key   <= '0;
      s1_id    <= '0;
      s2_key   <= '0;
      s2_id    <= '0;
      s2_set   <= '0;
    end else begin
      s1_valid <= nr_valid;
      if (nr_valid) begin
        s1_key <= key0;
        s1_id  <= nr_id;
      end
      s2_valid <= s1_valid;
      if (s1_valid) begin
        s2_key <= s1_key;
        s2_id  <= s1_id;
        s2_set <= s1_set;
      end
    end
  end

  // ---------------- cache ----------------
  logic             lk_hit, mt_hit;
  line_data_t       lk_data, mt_data;
  logic [WAY_W-1:0] mt_way, mt_victim;
  logic             mt_en;
  logic [SET_W-1:0] mt_set;
  logic [KEY_W-1:0] mt_key;
  logic             wr_en, wr_alloc;
  logic [SET_W-1:0] wr_set;
  logic [WAY_W-1:0] wr_way;
  logic [KEY_W-1:0] wr_key;
  line_data_t       wr_data;

  fwd_cache #(.ENTRIES(ENTRIES), .WAYS(WAYS)) u_cache (
    .clk(clk), .rst_n(rst_n), .flush_i(flush_i),
    .lk_en_i(s1_valid), .lk_set_i(s1_set), .lk_key_i(s1_key),
    .lk_hit_o(lk_hit), .lk_data_o(lk_data),
    .mt_en_i(mt_en), .mt_set_i(mt_set), .mt_key_i(mt_key),
    .mt_hit_o(mt_hit), .mt_way_o(mt_way), .mt_victim_o(mt_victim), .mt_data_o(mt_data),
    .wr_en_i(wr_en), .wr_alloc_i(wr_alloc), .wr_set_i(wr_set), .wr_way_i(wr_way),
    .wr_key_i(wr_key), .wr_data_i(wr_data)
  );

  // ---------------- stage 2: compare ----------------
  logic s2_hit;
  assign s2_hit  = s2_valid && lk_hit && cache_en_i;
  assign mq_push = s2_valid && !s2_hit;
  assign mq_din  = '{key: s2_key, id: s2_id, set: s2_set};

  sync_fifo #(.WIDTH($bits(miss_t)), .DEPTH(MQ_DEPTH)) u_mq (
    .clk(clk), .rst_n(rst_n), .push_i(mq_push), .din_i(mq_din), .pop_i(mq_pop),
    .dout_o(mq_dout), .empty_o(mq_empty), .full_o(mq_full), .count_o(mq_count)
  );

  // ---------------- miss handler ----------------
  hstate_e          hs;
  miss_t            cur;
  logic             cur_upd;      // current job is a management update
  line_data_t       cur_data;     // update data, then the result
  logic             cur_hit;      // result found by the recheck
  logic             cur_flushed;  // a flush happened since the job started
  logic [WAY_W-1:0] cur_way;
  logic             cur_alloc;

  logic [15:0]      upd_crc;
  crc_hash #(.IN_W(KEY_W), .CRC_W(16)) u_upd_hash (.data_i(upd_key_i), .crc_o(upd_crc));

  logic take_upd, take_miss, h_resp_fire;
  assign upd_ready_o = (hs == H_IDLE);
  assign take_upd    = (hs == H_IDLE) && upd_valid_i;
  assign take_miss   = (hs == H_IDLE) && !upd_valid_i && !mq_empty;
  assign mq_pop      = take_miss;
  assign h_resp_fire = (hs == H_RESP) && !s2_hit;

  always_comb begin
    mt_en  = take_upd || take_miss;
    mt_set = take_upd ? upd_crc[SET_W-1:0] : mq_dout.set;
    mt_key = take_upd ? upd_key_i : mq_dout.key;
  end

  // refill / update write
  always_comb begin
    wr_en    = 1'b0;
    wr_alloc = 1'b0;
    wr_set   = cur.set;
    wr_way   = mt_victim;
    wr_key   = cur.key;
    wr_data  = cur_data;
    if (hs == H_CHECK && cur_upd && cache_en_i && !cur_flushed && !flush_i) begin
      wr_en    = 1'b1;
      wr_way   = mt_hit ? mt_way : mt_victim;
      wr_alloc = !mt_hit;
    end else if (hs == H_CAMWAIT && cam_rsp_valid_i && cache_en_i && !cur_flushed && !flush_i) begin
      wr_en    = 1'b1;
      wr_way   = cur_way;
      wr_alloc = cur_alloc;
      wr_data  = cam_rsp_data_i;
    end
  end

  assign cam_req_valid_o = (hs == H_CAMREQ);
  assign cam_req_key_o   = cur.key;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs          <= H_IDLE;
      cur         <= '0;
      cur_upd     <= 1'b0;
      cur_data    <= '0;
      cur_hit     <= 1'b0;
      cur_flushed <= 1'b0;
      cur_way     <= '0;
      cur_alloc   <= 1'b0;
    end else begin
      if (flush_i) cur_flushed <= 1'b1;
      unique case (hs)
        H_IDLE: begin
          if (take_upd) begin
            cur         <= '{key: upd_key_i, id: '0, set: upd_crc[SET_W-1:0]};
            cur_upd     <= 1'b1;
            cur_data    <= upd_data_i;
            cur_flushed <= flush_i;
            hs          <= H_CHECK;
          end else if (take_miss) begin
            cur         <= mq_dout;
            cur_upd     <= 1'b0;
            cur_flushed <= flush_i;
            hs          <= H_CHECK;
          end
        end
        H_CHECK: begin
          cur_way   <= mt_victim;
          cur_alloc <= 1'b1;
          if (cur_upd) begin
            hs <= H_IDLE;
          end else if (mt_hit && cache_en_i && !cur_flushed && !flush_i) begin
            cur_data <= mt_data;
            cur_hit  <= 1'b1;
            hs       <= H_RESP;
          end else begin
            cur_hit <= 1'b0;
            hs      <= H_CAMREQ;
          end
        end
        H_CAMREQ: if (cam_req_ready_i) hs <= H_CAMWAIT;
        H_CAMWAIT: begin
          if (cam_rsp_valid_i) begin
            cur_data <= cam_rsp_data_i;
            hs       <= H_RESP;
          end
        end
        H_RESP: if (h_resp_fire) hs <= H_IDLE;
        default: hs <= H_IDLE;
      endcase
    end
  end

  // ---------------- result register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid_o <= 1'b0;
      rsp_id_o    <= '0;
      rsp_data_o  <= '0;
      rsp_hit_o   <= 1'b0;
    end else begin
      rsp_valid_o <= s2_hit || h_resp_fire;
      if (s2_hit) begin
        rsp_id_o   <= s2_id;
        rsp_data_o <= lk_data;
        rsp_hit_o  <= 1'b1;
      end else if (h_resp_fire) begin
        rsp_id_o   <= cur.id;
        rsp_data_o <= cur_data;
        rsp_hit_o  <= cur_hit;
      end
    end
  end

  a_mq_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) mq_push |-> !mq_full);
  a_cam_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                       cam_rsp_valid_i |-> hs == H_CAMWAIT);

endmodule
