// tb_cache_switch_rc: end-to-end test of the routing-computation stage at its
// default size (64 input ports, 2048-entry 4-way cache per port), each port
// connected to its own behavioural CAM (25-cycle search).
//
// The run goes through the life of a machine:
//   1. deployment: caches off until the CAMs are programmed; packets are
//      routed by the CAM meanwhile;
//   2. a job on an arbitrary topology: full-address keys, cold misses, hits,
//      stalls on miss bursts, hits overtaking misses, rechecks;
//   3. a broadcast update of one cache line (fault rerouting);
//   4. a switch to the k-ary n-torus node reduction with 2-link LAG;
//   5. a switch to the fat-tree node reduction;
//   6. a topology change (flush, reprogram, re-enable).
// Every route is checked against a route computed here from the expected key,
// hit latency (3 cycles) and cold miss latency (33 cycles) are checked, and
// each mechanism above is counted: one that never happened is a failure.
module tb_cache_switch_rc;
  import rc_pkg::*;

  localparam int P        = 64;
  localparam int CAM_LAT  = 25;
  localparam int HIT_LAT  = 3;
  localparam int MISS_LAT = HIT_LAT + 5 + CAM_LAT;
  localparam int NARB     = 200;   // destinations used in the arbitrary-topology job

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // ---------------- DUT ----------------
  logic topo, load, done, cache_en;
  rc_cfg_t cfg_new;
  logic upd_valid, upd_ready;
  logic [KEY_W-1:0] upd_key;
  line_data_t upd_data;
  logic              req_valid [P], req_ready [P];
  logic [ADDR_W-1:0] req_dst   [P];
  logic [ID_W-1:0]   req_id    [P];
  logic              rsp_valid [P], rsp_hit [P];
  logic [ID_W-1:0]   rsp_id    [P];
  line_data_t        rsp_data  [P];
  logic              cam_req_valid [P], cam_req_ready [P], cam_rsp_valid [P];
  logic [KEY_W-1:0]  cam_req_key [P];
  line_data_t        cam_rsp_data [P];
  int                searches [P];

  cache_switch_rc dut (
    .clk, .rst_n, .topo_change_i(topo), .cfg_load_i(load), .cfg_i(cfg_new),
    .reprog_done_i(done), .cache_en_o(cache_en),
    .upd_valid_i(upd_valid), .upd_ready_o(upd_ready), .upd_key_i(upd_key), .upd_data_i(upd_data),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_dst_i(req_dst), .req_id_i(req_id),
    .rsp_valid_o(rsp_valid), .rsp_id_o(rsp_id), .rsp_data_o(rsp_data), .rsp_hit_o(rsp_hit),
    .cam_req_valid_o(cam_req_valid), .cam_req_ready_i(cam_req_ready), .cam_req_key_o(cam_req_key),
    .cam_rsp_valid_i(cam_rsp_valid), .cam_rsp_data_i(cam_rsp_data)
  );

  logic prog_en;
  logic [15:0] prog_idx;
  logic prog_vld;
  logic [KEY_W-1:0] prog_value;
  line_data_t prog_data;

  for (genvar p = 0; p < P; p++) begin : g_cam
    tcam_model #(.SIZE(256), .LATENCY(CAM_LAT)) u_cam (
      .clk, .rst_n, .prog_en_i(prog_en), .prog_idx_i(prog_idx), .prog_valid_i(prog_vld),
      .prog_value_i(prog_value), .prog_care_i('1), .prog_data_i(prog_data),
      .req_valid_i(cam_req_valid[p]), .req_ready_o(cam_req_ready[p]), .req_key_i(cam_req_key[p]),
      .rsp_valid_o(cam_rsp_valid[p]), .rsp_data_o(cam_rsp_data[p]), .searches_o(searches[p])
    );
  end

  // ---------------- reference ----------------
  rc_cfg_t cfg_ref;   // configuration the DUT is expected to use

  // route held by the CAM (and so by the caches) for a key
  function automatic line_data_t route_of(logic [KEY_W-1:0] k);
    return '{rsv: k[31:16] ^ k[63:48], port: k[15:0] ^ 16'h5A5A};
  endfunction

  function automatic logic [15:0] crc24(input logic [23:0] d);
    logic [15:0] c = 16'hFFFF;
    for (int b = 2; b >= 0; b--) begin
      c ^= {d[b*8 +: 8], 8'h00};
      repeat (8) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  function automatic int chunk(logic [ADDR_W-1:0] a, int i, int cw);
    return (i * cw >= ADDR_W) ? 0 : int'((a >> (i * cw)) & ((1 << cw) - 1));
  endfunction

  function automatic logic [KEY_W-1:0] ref_key(rc_cfg_t c, logic [ADDR_W-1:0] d);
    int cw, lag;
    cw  = int'(c.chunk_w);
    lag = (c.lag_num <= 1) ? 0 : int'(crc24(d)) % int'(c.lag_num);
    if (c.mode == NRF_CUBE) begin
      for (int i = 0; i < int'(c.n_dims); i++) begin
        int off;
        off = chunk(d, i, cw) - chunk(c.cur_addr, i, cw);
        if (off != 0) begin
          bit plus;
          if (!c.torus) plus = off > 0;
          else if (off > 0) plus = off <= int'(c.radix) / 2;
          else plus = -off > int'(c.radix) / 2;
          return {2'd1, 48'd0, 1'b0, plus, 8'(i), 4'(lag)};
        end
      end
      return {2'd1, 48'd0, 1'b1, 1'b0, 8'd0, 4'(lag)};
    end else if (c.mode == NRF_FATTREE) begin
      for (int i = int'(c.n_dims) - 1; i >= int'(c.ft_dim); i--)
        if (chunk(d, i + 1, cw) != chunk(c.cur_addr, i, cw))
          return {2'd2, 48'd0, 1'b0, 1'b1, 8'(chunk(d, i, cw)), 4'(lag)};
      return {2'd2, 48'd0, 1'b0, 1'b0, 8'(chunk(d, int'(c.ft_dim), cw)), 4'(lag)};
    end
    return {2'd0, 38'd0, d};
  endfunction

  // ---------------- traffic engine ----------------
  line_data_t exp_data [P][256];
  bit         pending  [P][256];
  int         acc_cyc  [P][256];
  int         last_id  [P];
  int         next_id  [P];
  int         todo     [P];
  bit         accepted [P];
  logic [ADDR_W-1:0] pool[$];   // destinations to draw from
  line_data_t override_key_data;
  logic [KEY_W-1:0] override_key;
  bit         override_on = 0;

  // mechanism counters
  int n_rsp = 0, n_hit = 0, n_miss_cam = 0, n_recheck = 0, n_stall = 0, n_overtake = 0;
  int n_disabled = 0, n_flush = 0, n_mode = 0, n_update = 0, n_lag_members = 0;
  int n_cold_ok = 0, n_hit_lat_ok = 0;
  bit lag_seen [16];

  always @(posedge clk) if (rst_n && dut.flush) n_flush++;

  always @(negedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < P; p++) begin
        // responses
        if (rsp_valid[p]) begin
          int id, lat;
          id = int'(rsp_id[p]);
          chk(pending[p][id], $sformatf("port %0d: unexpected id %0d", p, id));
          chk(rsp_data[p] == exp_data[p][id],
              $sformatf("port %0d id %0d: route %h expected %h", p, id, rsp_data[p], exp_data[p][id]));
          pending[p][id] = 0;
          lat = cyc - (acc_cyc[p][id] - 1);
          n_rsp++;
          if (!cache_en) n_disabled++;
          if (rsp_hit[p] && lat == HIT_LAT) begin n_hit++; n_hit_lat_ok++; end
          else if (rsp_hit[p]) n_recheck++;
          else begin
            n_miss_cam++;
            if (lat == MISS_LAT) n_cold_ok++;
          end
          chk(lat >= HIT_LAT, "latency below the pipeline depth");
          if (rsp_hit[p]) chk(lat == HIT_LAT || lat > MISS_LAT - CAM_LAT - 1, "hit latency");
          if (id < last_id[p] && last_id[p] - id < 128) n_overtake++;
          last_id[p] = id;
        end
        // CAM requests: LAG members seen
        if (cam_req_valid[p] && cam_req_ready[p] && cam_req_key[p][63:62] != 2'd0) begin
          if (!lag_seen[cam_req_key[p][3:0]]) n_lag_members++;
          lag_seen[cam_req_key[p][3:0]] = 1;
        end
        // requests
        if (accepted[p] || !req_valid[p]) begin
          if (todo[p] > 0 && !pending[p][next_id[p]] && $urandom_range(3) != 0) begin
            req_valid[p] = 1;
            req_dst[p]   = pool[$urandom_range(pool.size() - 1)];
            req_id[p]    = 8'(next_id[p]);
          end else req_valid[p] = 0;
        end
        accepted[p] = 0;
        if (req_valid[p] && !req_ready[p]) n_stall++;
        if (req_valid[p] && req_ready[p]) begin
          int id;
          logic [KEY_W-1:0] k;
          id = int'(req_id[p]);
          k = ref_key(cfg_ref, req_dst[p]);
          exp_data[p][id] = (override_on && k == override_key) ? override_key_data : route_of(k);
          pending[p][id]  = 1;
          acc_cyc[p][id]  = cyc + 1;
          accepted[p]     = 1;
          next_id[p]      = (next_id[p] + 1) % 256;
          todo[p]--;
        end
      end
    end
  end

  task automatic run_traffic(input int per_port, input int max_cycles);
    int n;
    bit busy;
    for (int p = 0; p < P; p++) todo[p] = per_port;
    n = 0;
    do begin
      @(negedge clk);
      busy = 0;
      for (int p = 0; p < P; p++) begin
        busy |= (todo[p] > 0) || req_valid[p];
        foreach (pending[p][i]) busy |= pending[p][i];
      end
      n++;
    end while (busy && n < max_cycles);
    chk(!busy, "traffic did not drain");
  endtask

  // program every CAM with the routes of a list of keys
  task automatic program_cams(input logic [KEY_W-1:0] keys[$]);
    for (int i = 0; i < 256; i++) begin
      prog_en = 1; prog_idx = 16'(i); prog_vld = (i < keys.size());
      prog_value = (i < keys.size()) ? keys[i] : '0;
      prog_data = (i < keys.size()) ? route_of(keys[i]) : '0;
      @(negedge clk);
    end
    prog_en = 0;
  endtask

  task automatic keys_for_pool(output logic [KEY_W-1:0] keys[$]);
    keys.delete();
    foreach (pool[i]) begin
      logic [KEY_W-1:0] k;
      k = ref_key(cfg_ref, pool[i]);
      if (!(k inside {keys})) keys.push_back(k);
    end
  endtask

  task automatic reprogrammed();
    done = 1; @(negedge clk); done = 0;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KEY_W-1:0] keys[$];
    int h0, c0, s0;
    topo = 0; load = 0; done = 0; upd_valid = 0; upd_key = '0; upd_data = '0;
    prog_en = 0; prog_idx = '0; prog_vld = 0; prog_value = '0; prog_data = '0;
    cfg_new = '0;
    for (int p = 0; p < P; p++) begin
      req_valid[p] = 0; req_dst[p] = '0; req_id[p] = '0; last_id[p] = 0; next_id[p] = 0;
      todo[p] = 0; accepted[p] = 0;
      for (int i = 0; i < 256; i++) pending[p][i] = 0;
    end
    foreach (lag_seen[i]) lag_seen[i] = 0;
    cfg_ref = '{mode: NRF_ARBITRARY, cur_addr: '0, chunk_w: 4'd4, n_dims: 5'd1, radix: 9'd16,
                torus: 1'b0, ft_dim: 5'd0, lag_num: 5'd1, lag_sel: LAG_CRC};
    for (int i = 0; i < NARB; i++) pool.push_back(ADDR_W'(i * 9973 + 5));
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. deployment: CAM-only routing while the CAMs are filled
    keys_for_pool(keys);
    program_cams(keys);
    chk(!cache_en, "caches must be off before the CAMs are programmed");
    run_traffic(3, 2000);
    chk(n_disabled > 0, "no packet routed with the caches off");
    chk(n_hit == 0, "hit while caches are off");
    reprogrammed();
    chk(cache_en, "caches on after programming");

    // 2. arbitrary-topology job
    run_traffic(120, 60000);
    chk(n_hit > 0 && n_miss_cam > 0, "arbitrary job: hits and misses expected");

    // 3. broadcast update of one line (rerouting around a failed link)
    override_key = ref_key(cfg_ref, pool[0]);
    override_key_data = '{rsv: 16'h0, port: 16'hFA11};
    upd_valid = 1; upd_key = override_key; upd_data = override_key_data;
    @(negedge clk);
    while (!upd_ready) @(negedge clk);
    upd_valid = 0;
    override_on = 1;
    n_update++;
    repeat (4) @(negedge clk);
    pool.push_front(pool[0]);
    h0 = n_hit;
    for (int r = 0; r < 4; r++) begin
      for (int p = 0; p < P; p++) todo[p] = 1;
      // only the updated destination
      begin
        logic [ADDR_W-1:0] sv[$];
        sv = pool; pool.delete(); pool.push_back(sv[0]);
        run_traffic(1, 500);
        pool = sv;
      end
    end
    chk(n_hit - h0 >= P * 3, "updated line must be served from the caches");
    // make the CAMs agree and start clean
    override_on = 0;
    topo = 1; @(negedge clk); topo = 0;
    program_cams(keys);
    reprogrammed();

    // 4. switch to the torus node reduction: 8-ary 8-torus with 3-bit chunks, LAG of 2
    cfg_ref = '{mode: NRF_CUBE, cur_addr: 24'o12345670, chunk_w: 4'd3, n_dims: 5'd8,
                radix: 9'd8, torus: 1'b1, ft_dim: 5'd0, lag_num: 5'd2, lag_sel: LAG_CRC};
    cfg_new = cfg_ref;
    load = 1; @(negedge clk); load = 0;
    n_mode++;
    chk(!cache_en, "caches must be off during the switch");
    pool.delete();
    for (int i = 0; i < 2000; i++) pool.push_back(ADDR_W'($urandom));
    keys_for_pool(keys);
    chk(keys.size() <= 2 * (2 * 8 + 1), $sformatf("torus: %0d keys for 2000 destinations", keys.size()));
    program_cams(keys);
    reprogrammed();
    c0 = n_miss_cam; h0 = n_hit; s0 = n_recheck;
    run_traffic(150, 60000);
    chk(n_miss_cam - c0 <= P * keys.size(), "torus: at most one CAM search per key per port");
    chk((n_hit - h0 + n_recheck - s0) * 100 >= (P * 150) * 80,
        $sformatf("torus: cache hit rate %0d of %0d", n_hit - h0 + n_recheck - s0, P * 150));
    chk(n_lag_members == 2, $sformatf("LAG members used: %0d", n_lag_members));

    // 5. switch to the fat-tree node reduction: 4-ary tree, 2-bit chunks, n = 6, switch at layer 2
    cfg_ref = '{mode: NRF_FATTREE, cur_addr: 24'b00_00_11_01_10_00, chunk_w: 4'd2, n_dims: 5'd6,
                radix: 9'd4, torus: 1'b0, ft_dim: 5'd2, lag_num: 5'd1, lag_sel: LAG_CRC};
    cfg_new = cfg_ref;
    load = 1; @(negedge clk); load = 0;
    n_mode++;
    pool.delete();
    for (int i = 0; i < 1000; i++) begin
      logic [ADDR_W-1:0] d;
      d = ADDR_W'($urandom) & 24'h3FFF;
      // half of them inside this switch's subtree so both up and down routes occur
      if (i % 2 == 0) d = (d & 24'h7F) | ((24'(cfg_ref.cur_addr) >> 2 << 2 << 1) & 24'h3F80);
      pool.push_back(d);
    end
    keys_for_pool(keys);
    program_cams(keys);
    reprogrammed();
    h0 = n_hit;
    run_traffic(100, 60000);
    chk(n_hit > h0, "fat tree: no hits");
    chk(keys.size() <= 8, $sformatf("fat tree: %0d keys for 1000 destinations", keys.size()));

    // 6. topology change
    topo = 1; @(negedge clk); topo = 0;
    program_cams(keys);
    reprogrammed();
    c0 = n_miss_cam;
    run_traffic(1, 500);
    chk(n_miss_cam > c0, "after a topology change the caches must start empty");

    // every mechanism must have happened
    chk(n_hit > 0, "no cache hit");
    chk(n_miss_cam > 0, "no CAM lookup");
    chk(n_hit_lat_ok > 0, "no hit with the 3-cycle latency");
    chk(n_cold_ok > 0, "no miss with the 33-cycle latency");
    chk(n_recheck > 0, "no miss served by the recheck");
    chk(n_stall > 0, "no stall");
    chk(n_overtake > 0, "no hit overtook a miss");
    chk(n_disabled > 0, "no routing with caches disabled");
    chk(n_flush >= 4, $sformatf("flushes: %0d", n_flush));
    chk(n_mode == 2, "mode switches");
    chk(n_update == 1, "update");
    $display("hits=%0d cam_lookups=%0d rechecks=%0d stalls=%0d overtakes=%0d disabled=%0d flushes=%0d mode_switches=%0d updates=%0d lag_members=%0d responses=%0d cycles=%0d",
             n_hit, n_miss_cam, n_recheck, n_stall, n_overtake, n_disabled, n_flush, n_mode,
             n_update, n_lag_members, n_rsp, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
