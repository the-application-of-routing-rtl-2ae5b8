// tb_rc_port: self-checking test of one input port's routing computation.
//
// An rc_port with its default 2048-entry 4-way cache is connected to a
// behavioural CAM (25-cycle search, one search at a time). The CAM is filled
// with a route for every destination used; the expected route of every
// response is recomputed here from the destination, so a wrong port, a lost
// or duplicated response and a wrong latency are all caught. Covered:
// routing with the cache disabled, a cold miss (3 + 5 + 25 = 33 cycles), a
// hit (3 cycles), one hit per cycle back to back, hits passing an
// outstanding miss, the recheck that serves a second miss to the same key
// without a CAM search, stalls when the miss queue fills, flush, a line
// update, random traffic over more destinations than the cache holds, and a
// k-ary n-cube configuration where 7 keys cover all 64 destinations.
module tb_rc_port;
  import rc_pkg::*;

  localparam int CAM_LAT  = 25;
  localparam int HIT_LAT  = 3;
  localparam int MISS_LAT = HIT_LAT + 5 + CAM_LAT;
  localparam int NDST     = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  rc_cfg_t    cfg;
  logic       cache_en, flush;
  logic       req_valid, req_ready;
  logic [ADDR_W-1:0] req_dst;
  logic [ID_W-1:0]   req_id;
  logic       rsp_valid, rsp_hit;
  logic [ID_W-1:0] rsp_id;
  line_data_t rsp_data;
  logic       upd_valid, upd_ready;
  logic [KEY_W-1:0] upd_key;
  line_data_t upd_data;
  logic       cam_req_valid, cam_req_ready, cam_rsp_valid;
  logic [KEY_W-1:0] cam_req_key;
  line_data_t cam_rsp_data;
  logic       prog_en;
  logic [15:0] prog_idx;
  logic [KEY_W-1:0] prog_value, prog_care;
  line_data_t prog_data;
  int         searches;

  rc_port dut (
    .clk, .rst_n, .cfg_i(cfg), .cache_en_i(cache_en), .flush_i(flush),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_dst_i(req_dst), .req_id_i(req_id),
    .rsp_valid_o(rsp_valid), .rsp_id_o(rsp_id), .rsp_data_o(rsp_data), .rsp_hit_o(rsp_hit),
    .upd_valid_i(upd_valid), .upd_ready_o(upd_ready), .upd_key_i(upd_key), .upd_data_i(upd_data),
    .cam_req_valid_o(cam_req_valid), .cam_req_ready_i(cam_req_ready), .cam_req_key_o(cam_req_key),
    .cam_rsp_valid_i(cam_rsp_valid), .cam_rsp_data_i(cam_rsp_data)
  );

  tcam_model #(.SIZE(4096), .LATENCY(CAM_LAT)) cam (
    .clk, .rst_n, .prog_en_i(prog_en), .prog_idx_i(prog_idx), .prog_valid_i(1'b1),
    .prog_value_i(prog_value), .prog_care_i(prog_care), .prog_data_i(prog_data),
    .req_valid_i(cam_req_valid), .req_ready_o(cam_req_ready), .req_key_i(cam_req_key),
    .rsp_valid_o(cam_rsp_valid), .rsp_data_o(cam_rsp_data), .searches_o(searches)
  );

  // route stored in the CAM for a destination (arbitrary mode)
  function automatic line_data_t route_of(logic [ADDR_W-1:0] d);
    return '{rsv: d[23:8], port: 16'(d * 7 + 3)};
  endfunction
  function automatic logic [ADDR_W-1:0] dst_of(int i);
    return ADDR_W'(i * 40503 + 17);
  endfunction

  // scoreboard
  line_data_t exp_data [256];
  bit         pending  [256];
  int         acc_cyc  [256];
  int         last_lat [256];
  bit         last_hit [256];
  int         n_rsp = 0, n_hit = 0, n_stall = 0, n_ooo = 0;
  int         last_rsp_id = -1;

  always @(negedge clk) begin
    if (rst_n && rsp_valid) begin
      chk(pending[rsp_id], $sformatf("response for id %0d not pending", rsp_id));
      chk(rsp_data == exp_data[rsp_id],
          $sformatf("id %0d data %h expected %h", rsp_id, rsp_data, exp_data[rsp_id]));
      pending[rsp_id]  = 0;
      last_lat[rsp_id] = cyc - (acc_cyc[rsp_id] - 1);
      last_hit[rsp_id] = rsp_hit;
      if (int'(rsp_id) < last_rsp_id) n_ooo++;
      last_rsp_id = rsp_id;
      n_rsp++;
      if (rsp_hit) n_hit++;
    end
  end

  // present a header at a negedge; returns at the next negedge after acceptance
  task automatic send(input logic [ADDR_W-1:0] dst, input logic [ID_W-1:0] id,
                      input line_data_t exp);
    req_valid = 1;
    req_dst   = dst;
    req_id    = id;
    while (!req_ready) begin
      n_stall++;
      @(negedge clk);
    end
    exp_data[id] = exp;
    pending[id]  = 1;
    acc_cyc[id]  = cyc + 1;
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic drain(input int max_cycles);
    int n = 0;
    bit any;
    do begin
      @(negedge clk);
      any = 0;
      foreach (pending[i]) any |= pending[i];
      n++;
    end while (any && n < max_cycles);
    chk(!any, "responses outstanding after drain");
  endtask

  task automatic prog(input int idx, input logic [KEY_W-1:0] v, input logic [KEY_W-1:0] care,
                      input line_data_t d);
    prog_en = 1; prog_idx = 16'(idx); prog_value = v; prog_care = care; prog_data = d;
    @(negedge clk);
    prog_en = 0;
  endtask

  function automatic rc_cfg_t arb_cfg();
    return '{mode: NRF_ARBITRARY, cur_addr: '0, chunk_w: 4'd2, n_dims: 5'd1, radix: 9'd4,
             torus: 1'b0, ft_dim: 5'd0, lag_num: 5'd1, lag_sel: LAG_CRC};
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0, id, k, ooo0;
    cfg = arb_cfg();
    cache_en = 0; flush = 0; req_valid = 0; req_dst = '0; req_id = '0;
    upd_valid = 0; upd_key = '0; upd_data = '0; prog_en = 0; prog_idx = '0;
    prog_value = '0; prog_care = '0; prog_data = '0;
    foreach (pending[i]) pending[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NDST; i++) prog(i, full_key(NRF_ARBITRARY, dst_of(i)), '1, route_of(dst_of(i)));

    // 1. cache disabled: CAM routes, nothing is cached
    s0 = searches;
    send(dst_of(0), 0, route_of(dst_of(0))); drain(100);
    send(dst_of(0), 1, route_of(dst_of(0))); drain(100);
    chk(searches - s0 == 2, "disabled cache must send both lookups to the CAM");
    chk(!last_hit[1], "disabled cache reported a hit");

    // 2. enable: cold miss then hit, with their latencies
    cache_en = 1;
    send(dst_of(1), 2, route_of(dst_of(1))); drain(100);
    chk(!last_hit[2] && last_lat[2] == MISS_LAT,
        $sformatf("cold miss latency %0d expected %0d", last_lat[2], MISS_LAT));
    send(dst_of(1), 3, route_of(dst_of(1))); drain(100);
    chk(last_hit[3] && last_lat[3] == HIT_LAT,
        $sformatf("hit latency %0d expected %0d", last_lat[3], HIT_LAT));

    // 3. 32 hits back to back: one result per cycle
    for (int i = 10; i < 42; i++) begin
      send(dst_of(i), 8'(i), route_of(dst_of(i)));
    end
    drain(400);
    s0 = cyc;
    for (int i = 10; i < 42; i++) send(dst_of(i), 8'(i), route_of(dst_of(i)));
    drain(50);
    for (int i = 10; i < 42; i++) chk(last_hit[i] && last_lat[i] == HIT_LAT, "back-to-back hit");
    chk(cyc - s0 <= 32 + HIT_LAT + 1, $sformatf("32 hits took %0d cycles", cyc - s0));

    // 4. hits pass an outstanding miss
    ooo0 = n_ooo;
    send(dst_of(100), 100, route_of(dst_of(100)));
    for (int i = 10; i < 20; i++) send(dst_of(i), 8'(i), route_of(dst_of(i)));
    drain(100);
    chk(!last_hit[100] && last_lat[100] == MISS_LAT, "miss under hits latency");
    chk(n_ooo > ooo0, "hits did not overtake the miss");

    // 5. two misses to one key: second is served by the recheck, one CAM search
    s0 = searches;
    send(dst_of(200), 50, route_of(dst_of(200)));
    send(dst_of(200), 51, route_of(dst_of(200)));
    drain(200);
    chk(searches - s0 == 1, $sformatf("recheck: %0d CAM searches", searches - s0));
    chk(!last_hit[50] && last_hit[51], "recheck should serve the second lookup from the cache");

    // 6. a burst of misses fills the miss queue and stalls the input
    k = n_stall;
    for (int i = 0; i < 20; i++) send(dst_of(300 + i), 8'(60 + i), route_of(dst_of(300 + i)));
    drain(2000);
    chk(n_stall > k, "miss burst did not stall the input");

    // 7. flush empties the cache
    flush = 1; @(negedge clk); flush = 0;
    send(dst_of(1), 4, route_of(dst_of(1))); drain(100);
    chk(!last_hit[4], "hit after flush");

    // 8. update a line: new route without a flush
    upd_valid = 1; upd_key = full_key(NRF_ARBITRARY, dst_of(1));
    upd_data = '{rsv: 16'h0, port: 16'hBEEF};
    while (!upd_ready) @(negedge clk);
    @(negedge clk); upd_valid = 0;
    repeat (3) @(negedge clk);
    send(dst_of(1), 5, '{rsv: 16'h0, port: 16'hBEEF}); drain(100);
    chk(last_hit[5], "updated line should hit");
    flush = 1; @(negedge clk); flush = 0;   // back to the CAM's routes

    // 9. random traffic over 3000 destinations (more than 2048 entries)
    id = 0;
    for (int n = 0; n < 4000; n++) begin
      int d;
      d = $urandom_range(NDST - 1);
      while (pending[id]) @(negedge clk);
      send(dst_of(d), 8'(id), route_of(dst_of(d)));
      id = (id + 1) % 256;
    end
    drain(5000);

    // 10. 4-ary 3-cube, switch at (1,2,3): 7 keys for all 64 destinations
    flush = 1;
    cfg = '{mode: NRF_CUBE, cur_addr: 24'b01_10_11, chunk_w: 4'd2, n_dims: 5'd3, radix: 9'd4,
            torus: 1'b0, ft_dim: 5'd0, lag_num: 5'd1, lag_sel: LAG_CRC};
    @(negedge clk); flush = 0;
    for (int d = 0; d < 3; d++) begin
      prog(3000 + 2 * d, reduced_key(NRF_CUBE, '{local_ep: 0, dir: 1, idx: 8'(d)}, 0), '1,
           '{rsv: 0, port: 16'(10 * d + 1)});
      prog(3001 + 2 * d, reduced_key(NRF_CUBE, '{local_ep: 0, dir: 0, idx: 8'(d)}, 0), '1,
           '{rsv: 0, port: 16'(10 * d + 2)});
    end
    prog(3010, reduced_key(NRF_CUBE, '{local_ep: 1, dir: 0, idx: 0}, 0), '1, '{rsv: 0, port: 16'd99});
    s0 = searches;
    k = n_hit;
    for (int r = 0; r < 2; r++) begin
      for (int dst = 0; dst < 64; dst++) begin
        logic [5:0] a;
        line_data_t e;
        a = 6'(dst);
        // expected link by dimension order, computed independently
        if (a[1:0] != 2'd3)      e = '{rsv: 0, port: (a[1:0] > 2'd3) ? 16'd1 : 16'd2};
        else if (a[3:2] != 2'd2) e = '{rsv: 0, port: (a[3:2] > 2'd2) ? 16'd11 : 16'd12};
        else if (a[5:4] != 2'd1) e = '{rsv: 0, port: (a[5:4] > 2'd1) ? 16'd21 : 16'd22};
        else                     e = '{rsv: 0, port: 16'd99};
        send(24'(a), 8'(dst), e);
      end
      drain(2000);
    end
    chk(searches - s0 <= 7, $sformatf("cube mode used %0d CAM searches for 7 keys", searches - s0));
    chk(n_hit - k >= 128 - 7 - 6, "cube mode hit rate too low");

    $display("rc_port: responses=%0d hits=%0d stalls=%0d overtakes=%0d cam_searches=%0d",
             n_rsp, n_hit, n_stall, n_ooo, searches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
