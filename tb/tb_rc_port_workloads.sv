// tb_rc_port_workloads: hit rates of one input port on the traffic sizes the
// design is meant for.
//
// An rc_port at its defaults (2048 lines, 4 ways) is connected to the
// behavioural CAM (25-cycle search) and fed uniform random destinations, one
// header per cycle when it is ready. Every route is checked against a
// reference computed here. Four phases:
//   1. arbitrary topology, 512 destinations (a job below 2K nodes): after one
//      pass over all destinations (compulsory misses) a second random pass
//      must hit 100%, and the CAM must have been searched at most once per
//      destination;
//   2. arbitrary topology, 9261 destinations (a 21x21x21 torus): the cache
//      cannot hold them, so the warm hit rate must stay near 2048/9261;
//   3. the same 21x21x21 torus with the cube node reduction (5-bit chunks):
//      after the flush, 7 keys cover every destination, so at most 7 CAM
//      searches happen and the warm hit rate is 100% again;
//   4. a Dragonfly of 16 groups x 16 nodes seen from one group switch with
//      the fat-tree reduction: at most 32 keys (16 up, 16 down links) and a
//      100% warm hit rate.
// Counts and hit rates are printed; the watchdog ends the run if it hangs.
module tb_rc_port_workloads;
  import rc_pkg::*;

  localparam int CAM_LAT = 25;
  localparam int N_TOR   = 21 * 21 * 21;

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
  logic       upd_ready;
  logic       cam_req_valid, cam_req_ready, cam_rsp_valid;
  logic [KEY_W-1:0] cam_req_key;
  line_data_t cam_rsp_data;
  logic       prog_en;
  logic [15:0] prog_idx;
  logic [KEY_W-1:0] prog_value;
  line_data_t prog_data;
  int         searches;

  rc_port dut (
    .clk, .rst_n, .cfg_i(cfg), .cache_en_i(cache_en), .flush_i(flush),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_dst_i(req_dst), .req_id_i(req_id),
    .rsp_valid_o(rsp_valid), .rsp_id_o(rsp_id), .rsp_data_o(rsp_data), .rsp_hit_o(rsp_hit),
    .upd_valid_i(1'b0), .upd_ready_o(upd_ready), .upd_key_i('0), .upd_data_i('0),
    .cam_req_valid_o(cam_req_valid), .cam_req_ready_i(cam_req_ready), .cam_req_key_o(cam_req_key),
    .cam_rsp_valid_i(cam_rsp_valid), .cam_rsp_data_i(cam_rsp_data)
  );

  tcam_model #(.SIZE(16384), .LATENCY(CAM_LAT)) cam (
    .clk, .rst_n, .prog_en_i(prog_en), .prog_idx_i(prog_idx), .prog_valid_i(1'b1),
    .prog_value_i(prog_value), .prog_care_i('1), .prog_data_i(prog_data),
    .req_valid_i(cam_req_valid), .req_ready_o(cam_req_ready), .req_key_i(cam_req_key),
    .rsp_valid_o(cam_rsp_valid), .rsp_data_o(cam_rsp_data), .searches_o(searches)
  );

  // torus address of node i: three 5-bit chunks (x, y, z)
  function automatic logic [ADDR_W-1:0] tor_addr(int i);
    return ADDR_W'({5'(i / 441), 5'((i / 21) % 21), 5'(i % 21)});
  endfunction
  localparam logic [ADDR_W-1:0] CUR = ADDR_W'({5'd10, 5'd3, 5'd17});  // this switch

  function automatic line_data_t arb_route(logic [ADDR_W-1:0] d);
    return '{rsv: 16'(d >> 8), port: 16'(d * 5 + 1)};
  endfunction
  function automatic line_data_t link_route(bit loc, bit plus, int dim);
    return '{rsv: 16'hC0BE, port: loc ? 16'hFFFF : 16'(dim * 2 + int'(plus))};
  endfunction
  // dimension-order routing on the 21-ary 3-torus, wraparound when shorter
  function automatic line_data_t cube_route(logic [ADDR_W-1:0] d);
    for (int i = 0; i < 3; i++) begin
      int off;
      off = int'(d[5*i +: 5]) - int'(CUR[5*i +: 5]);
      if (off != 0) return link_route(0, (off > 0 && off <= 10) || off < -10, i);
    end
    return link_route(1, 0, 0);
  endfunction

  line_data_t exp_data [256];
  bit         pending  [256];
  int         n_rsp = 0, n_hit = 0;

  always @(negedge clk) begin
    if (rst_n && rsp_valid) begin
      chk(pending[rsp_id], $sformatf("response for id %0d not pending", rsp_id));
      chk(rsp_data == exp_data[rsp_id],
          $sformatf("id %0d data %h expected %h", rsp_id, rsp_data, exp_data[rsp_id]));
      pending[rsp_id] = 0;
      n_rsp++;
      if (rsp_hit) n_hit++;
    end
  end

  int next_id = 0;
  task automatic send(input logic [ADDR_W-1:0] dst, input line_data_t exp);
    while (pending[next_id]) @(negedge clk);
    req_valid = 1;
    req_dst   = dst;
    req_id    = ID_W'(next_id);
    while (!req_ready) @(negedge clk);
    exp_data[next_id] = exp;
    pending[next_id]  = 1;
    @(negedge clk);
    req_valid = 0;
    next_id = (next_id + 1) % 256;
  endtask

  task automatic drain();
    bit any;
    do begin
      @(negedge clk);
      any = 0;
      foreach (pending[i]) any |= pending[i];
    end while (any);
  endtask

  task automatic prog(input int idx, input logic [KEY_W-1:0] v, input line_data_t d);
    prog_en = 1; prog_idx = 16'(idx); prog_value = v; prog_data = d;
    @(negedge clk);
    prog_en = 0;
  endtask

  task automatic restart(input rc_cfg_t c);
    cfg = c;
    flush = 1;
    @(negedge clk);
    flush = 0;
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0, h0, r0, pct;
    cfg = '{mode: NRF_ARBITRARY, cur_addr: CUR, chunk_w: 4'd5, n_dims: 5'd3, radix: 9'd21,
            torus: 1'b1, ft_dim: 5'd0, lag_num: 5'd1, lag_sel: LAG_CRC};
    cache_en = 0; flush = 0; req_valid = 0; req_dst = '0; req_id = '0;
    prog_en = 0; prog_idx = '0; prog_value = '0; prog_data = '0;
    foreach (pending[i]) pending[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // CAM: every torus node in arbitrary mode, then the 7 reduced keys
    for (int i = 0; i < N_TOR; i++)
      prog(i, full_key(NRF_ARBITRARY, tor_addr(i)), arb_route(tor_addr(i)));
    prog(N_TOR, reduced_key(NRF_CUBE, '{local_ep: 1'b1, dir: 1'b0, idx: 8'd0}, 4'd0), link_route(1, 0, 0));
    for (int i = 0; i < 3; i++)
      for (int p = 0; p < 2; p++)
        prog(N_TOR + 1 + 2 * i + p, reduced_key(NRF_CUBE, '{local_ep: 1'b0, dir: 1'(p), idx: 8'(i)}, 4'd0),
             link_route(0, 1'(p), i));
    cache_en = 1;

    // 1. 512 destinations, arbitrary mode
    s0 = searches;
    for (int i = 0; i < 512; i++) send(tor_addr(i), arb_route(tor_addr(i)));
    drain();
    h0 = n_hit; r0 = n_rsp;
    for (int k = 0; k < 4000; k++) begin
      int i;
      i = $urandom_range(0, 511);
      send(tor_addr(i), arb_route(tor_addr(i)));
    end
    drain();
    chk(searches - s0 <= 512, $sformatf("512 destinations: %0d CAM searches", searches - s0));
    chk(n_hit - h0 == n_rsp - r0, $sformatf("512 destinations: warm hits %0d of %0d", n_hit - h0, n_rsp - r0));
    $display("workload 512 destinations, arbitrary: CAM searches %0d, warm hit rate %0d%%",
             searches - s0, (n_hit - h0) * 100 / (n_rsp - r0));

    // 2. 9261 destinations, arbitrary mode: capacity misses
    restart(cfg);
    for (int k = 0; k < 3000; k++) begin
      int i;
      i = $urandom_range(0, N_TOR - 1);
      send(tor_addr(i), arb_route(tor_addr(i)));
    end
    drain();
    h0 = n_hit; r0 = n_rsp;
    for (int k = 0; k < 3000; k++) begin
      int i;
      i = $urandom_range(0, N_TOR - 1);
      send(tor_addr(i), arb_route(tor_addr(i)));
    end
    drain();
    pct = (n_hit - h0) * 100 / (n_rsp - r0);
    chk(pct >= 8 && pct <= 30, $sformatf("9261 destinations: warm hit rate %0d%%", pct));
    $display("workload 21x21x21 torus, arbitrary: warm hit rate %0d%% (2048/9261 = 22%%)", pct);

    // 3. same torus, cube node reduction
    begin
      rc_cfg_t c;
      c = cfg;
      c.mode = NRF_CUBE;
      restart(c);
    end
    s0 = searches;
    // one neighbour in each direction of each dimension, and the switch itself
    for (int i = 0; i < 3; i++)
      for (int p = 0; p < 2; p++) begin
        logic [ADDR_W-1:0] d;
        d = CUR;
        d[5*i +: 5] = 5'((int'(CUR[5*i +: 5]) + (p != 0 ? 1 : 20)) % 21);
        send(d, cube_route(d));
      end
    send(CUR, cube_route(CUR));
    drain();
    chk(searches - s0 <= 7, $sformatf("cube reduction: %0d CAM searches", searches - s0));
    h0 = n_hit; r0 = n_rsp;
    for (int k = 0; k < 4000; k++) begin
      int i;
      i = $urandom_range(0, N_TOR - 1);
      send(tor_addr(i), cube_route(tor_addr(i)));
    end
    drain();
    chk(n_hit - h0 == n_rsp - r0, $sformatf("cube reduction: warm hits %0d of %0d", n_hit - h0, n_rsp - r0));
    $display("workload 21x21x21 torus, cube reduction: CAM searches %0d, warm hit rate %0d%%",
             searches - s0, (n_hit - h0) * 100 / (n_rsp - r0));

    // 4. Dragonfly of 16 groups x 16 nodes, fat-tree reduction at a group
    //    switch (layer 0, group 5): node address (group d_1, node d_0),
    //    4-bit chunks; other groups go up link d_0, own group down link d_0
    begin
      rc_cfg_t c;
      c = '{mode: NRF_FATTREE, cur_addr: 24'd5, chunk_w: 4'd4, n_dims: 5'd1, radix: 9'd16,
            torus: 1'b0, ft_dim: 5'd0, lag_num: 5'd1, lag_sel: LAG_CRC};
      for (int up = 0; up < 2; up++)
        for (int x = 0; x < 16; x++)
          prog(N_TOR + 8 + 16 * up + x,
               reduced_key(NRF_FATTREE, '{local_ep: 1'b0, dir: 1'(up), idx: 8'(x)}, 4'd0),
               '{rsv: 16'hF7, port: 16'(16 * up + x)});
      restart(c);
    end
    s0 = searches;
    for (int i = 0; i < 256; i++) send(ADDR_W'(i), '{rsv: 16'hF7, port: 16'(16 * int'(i / 16 != 5) + i % 16)});
    drain();
    chk(searches - s0 <= 32, $sformatf("dragonfly: %0d CAM searches", searches - s0));
    h0 = n_hit; r0 = n_rsp;
    for (int k = 0; k < 4000; k++) begin
      int i;
      i = $urandom_range(0, 255);
      send(ADDR_W'(i), '{rsv: 16'hF7, port: 16'(16 * int'(i / 16 != 5) + i % 16)});
    end
    drain();
    chk(n_hit - h0 == n_rsp - r0, $sformatf("dragonfly: warm hits %0d of %0d", n_hit - h0, n_rsp - r0));
    $display("workload dragonfly 16x16, fat-tree reduction: CAM searches %0d, warm hit rate %0d%%",
             searches - s0, (n_hit - h0) * 100 / (n_rsp - r0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
