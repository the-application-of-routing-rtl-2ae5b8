// tb_fwd_cache: checks the 2048-entry 4-way forwarding cache: cold misses,
// one-cycle read latency, fill of invalid ways first, round-robin victims
// once a set is full, update of a matching way, flush, and random fills
// against a reference model kept here (per set: 4 lines and a pointer).
module tb_fwd_cache;
  import rc_pkg::*;
  localparam int ENTRIES = 2048, WAYS = 4, SETS = ENTRIES / WAYS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flush, lk_en, mt_en, wr_en, wr_alloc;
  logic [8:0] lk_set, mt_set, wr_set;
  logic [KEY_W-1:0] lk_key, mt_key, wr_key;
  logic lk_hit, mt_hit;
  line_data_t lk_data, mt_data, wr_data;
  logic [1:0] mt_way, mt_victim, wr_way;

  fwd_cache dut (.clk, .rst_n, .flush_i(flush),
    .lk_en_i(lk_en), .lk_set_i(lk_set), .lk_key_i(lk_key), .lk_hit_o(lk_hit), .lk_data_o(lk_data),
    .mt_en_i(mt_en), .mt_set_i(mt_set), .mt_key_i(mt_key), .mt_hit_o(mt_hit), .mt_way_o(mt_way),
    .mt_victim_o(mt_victim), .mt_data_o(mt_data),
    .wr_en_i(wr_en), .wr_alloc_i(wr_alloc), .wr_set_i(wr_set), .wr_way_i(wr_way),
    .wr_key_i(wr_key), .wr_data_i(wr_data));

  // reference model
  logic [KEY_W-1:0] m_tag [SETS][WAYS];
  line_data_t       m_dat [SETS][WAYS];
  bit               m_vld [SETS][WAYS];
  int               m_rr  [SETS];

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic lookup(input int s, input logic [KEY_W-1:0] k, output bit hit, output line_data_t d);
    lk_en = 1; lk_set = 9'(s); lk_key = k;
    @(negedge clk);
    lk_en = 0;
    hit = lk_hit; d = lk_data;
  endtask

  // install a key the way the miss handler does: maintenance read, then write
  task automatic install(input int s, input logic [KEY_W-1:0] k, input line_data_t d,
                         output int way);
    mt_en = 1; mt_set = 9'(s); mt_key = k;
    @(negedge clk);
    mt_en = 0;
    way = mt_hit ? int'(mt_way) : int'(mt_victim);
    wr_en = 1; wr_set = 9'(s); wr_way = 2'(way); wr_key = k; wr_data = d; wr_alloc = !mt_hit;
    @(negedge clk);
    wr_en = 0;
  endtask

  function automatic int m_find(int s, logic [KEY_W-1:0] k);
    for (int w = 0; w < WAYS; w++) if (m_vld[s][w] && m_tag[s][w] == k) return w;
    return -1;
  endfunction

  function automatic int m_victim(int s);
    for (int w = 0; w < WAYS; w++) if (!m_vld[s][w]) return w;
    return m_rr[s];
  endfunction

  task automatic m_install(int s, logic [KEY_W-1:0] k, line_data_t d, output int way);
    int f;
    f = m_find(s, k);
    if (f >= 0) way = f;
    else begin
      way = m_victim(s);
      if (way == m_rr[s]) m_rr[s] = (m_rr[s] + 1) % WAYS;
    end
    m_tag[s][way] = k; m_dat[s][way] = d; m_vld[s][way] = 1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hit;
    line_data_t d;
    int way, mway;
    flush = 0; lk_en = 0; mt_en = 0; wr_en = 0; wr_alloc = 0;
    lk_set = 0; mt_set = 0; wr_set = 0; lk_key = 0; mt_key = 0; wr_key = 0; wr_data = 0; wr_way = 0;
    foreach (m_vld[s, w]) m_vld[s][w] = 0;
    foreach (m_rr[s]) m_rr[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    lookup(5, 64'h1234, hit, d);
    chk(!hit, "cold cache hit");

    // fill set 5: invalid ways first
    for (int i = 0; i < 4; i++) begin
      install(5, 64'(100 + i), '{rsv: 16'(i), port: 16'(200 + i)}, way);
      m_install(5, 64'(100 + i), '{rsv: 16'(i), port: 16'(200 + i)}, mway);
      chk(way == i, $sformatf("fill %0d went to way %0d", i, way));
    end
    for (int i = 0; i < 4; i++) begin
      lookup(5, 64'(100 + i), hit, d);
      chk(hit && d.port == 16'(200 + i), $sformatf("lookup key %0d", 100 + i));
    end
    // set full: round robin victims 0, 1
    install(5, 64'd104, '{rsv: 0, port: 16'd204}, way);
    m_install(5, 64'd104, '{rsv: 0, port: 16'd204}, mway);
    chk(way == 0, "first victim should be way 0");
    install(5, 64'd105, '{rsv: 0, port: 16'd205}, way);
    m_install(5, 64'd105, '{rsv: 0, port: 16'd205}, mway);
    chk(way == 1, "second victim should be way 1");
    lookup(5, 64'd100, hit, d); chk(!hit, "evicted key 100 still hits");
    lookup(5, 64'd101, hit, d); chk(!hit, "evicted key 101 still hits");
    lookup(5, 64'd104, hit, d); chk(hit && d.port == 16'd204, "key 104");
    // update of a present key rewrites its own way
    install(5, 64'd103, '{rsv: 0, port: 16'hBEEF}, way);
    m_install(5, 64'd103, '{rsv: 0, port: 16'hBEEF}, mway);
    chk(way == 3, "update should hit way 3");
    lookup(5, 64'd103, hit, d); chk(hit && d.port == 16'hBEEF, "updated data");
    // a different set is independent
    lookup(6, 64'd104, hit, d); chk(!hit, "key hit in wrong set");

    // flush, including a lookup issued in the flush cycle
    flush = 1; lk_en = 1; lk_set = 5; lk_key = 64'd104;
    @(negedge clk);
    flush = 0; lk_en = 0;
    chk(!lk_hit, "lookup in flush cycle hit");
    lookup(5, 64'd104, hit, d); chk(!hit, "hit after flush");
    foreach (m_vld[s, w]) m_vld[s][w] = 0;
    foreach (m_rr[s]) m_rr[s] = 0;
    // random fills and lookups against the model, on 16 sets
    for (int r = 0; r < 3000; r++) begin
      int s;
      logic [KEY_W-1:0] k;
      int f;
      s = $urandom_range(15);
      k = 64'($urandom_range(40));
      f = m_find(s, k);
      lookup(s, k, hit, d);
      chk(hit == (f >= 0), $sformatf("random lookup set %0d key %0d hit %0d model %0d", s, k, hit, f));
      if (f >= 0) chk(d == m_dat[s][f], "random lookup data");
      if (f < 0) begin
        line_data_t nd;
        nd = '{rsv: 16'($urandom), port: 16'($urandom)};
        install(s, k, nd, way);
        m_install(s, k, nd, mway);
        chk(way == mway, $sformatf("victim set %0d way %0d model %0d", s, way, mway));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
