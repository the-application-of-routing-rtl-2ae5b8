// tb_nrf_fattree: checks the fat-tree node reduction against a reference
// loop (i from n-1 down to dim, first mismatch of d_{i+1} and c_i routes up
// through up_{d_i}, else down through down_{d_dim}), on a 2-ary 4-level tree
// exhaustively and on random larger trees, and that a switch needs no more
// tags than it has links.
module tb_nrf_fattree;
  import rc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ADDR_W-1:0] dst, cur;
  logic [3:0] w;
  logic [4:0] n, dim;
  rtag_t tag;

  nrf_fattree dut (.dst_i(dst), .cur_i(cur), .chunk_w_i(w), .n_dims_i(n), .dim_i(dim), .tag_o(tag));

  function automatic int chunk(logic [ADDR_W-1:0] a, int i, int cw);
    return (i * cw >= ADDR_W) ? 0 : int'((a >> (i * cw)) & ((1 << cw) - 1));
  endfunction

  function automatic rtag_t ref_tag(logic [ADDR_W-1:0] d, logic [ADDR_W-1:0] c,
                                    int cw, int nn, int dm);
    for (int i = nn - 1; i >= dm; i--)
      if (chunk(d, i + 1, cw) != chunk(c, i, cw))
        return '{local_ep: 0, dir: 1, idx: 8'(chunk(d, i, cw))};
    return '{local_ep: 0, dir: 0, idx: 8'(chunk(d, dm, cw))};
  endfunction

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 2-ary, n = 4: node addresses have 5 one-bit chunks; all switches, all nodes
    for (int dm = 0; dm < 4; dm++) begin
      for (int c = 0; c < 16; c++) begin
        bit used[64];
        int distinct;
        distinct = 0;
        foreach (used[i]) used[i] = 0;
        for (int d = 0; d < 32; d++) begin
          rtag_t e;
          dst = 24'(d); cur = 24'(c); w = 1; n = 4; dim = 5'(dm);
          @(negedge clk);
          e = ref_tag(24'(d), 24'(c), 1, 4, dm);
          chk(tag == e, $sformatf("dim=%0d c=%0d d=%0d got %p exp %p", dm, c, d, tag, e));
          if (!used[{tag.dir, tag.idx[4:0]}]) distinct++;
          used[{tag.dir, tag.idx[4:0]}] = 1;
        end
        chk(distinct <= 4, $sformatf("switch (%0d,%0d) used %0d tags for 2 up + 2 down links",
                                     dm, c, distinct));
      end
    end
    // random larger trees
    for (int r = 0; r < 2000; r++) begin
      int cw, nn, dm;
      rtag_t e;
      logic [ADDR_W-1:0] d, c;
      cw = $urandom_range(1, 4);
      nn = $urandom_range(1, ADDR_W / cw - 1);
      if (nn > 11) nn = 11;
      dm = $urandom_range(0, nn - 1);
      d = ADDR_W'($urandom); c = ADDR_W'($urandom);
      if (r % 3 == 0) for (int i = dm; i < nn; i++)   // same subtree: force a down route
        d = (d & ~(ADDR_W'((1 << cw) - 1) << ((i + 1) * cw))) |
            (ADDR_W'(chunk(c, i, cw)) << ((i + 1) * cw));
      dst = d; cur = c; w = 4'(cw); n = 5'(nn); dim = 5'(dm);
      @(negedge clk);
      e = ref_tag(d, c, cw, nn, dm);
      chk(tag == e, $sformatf("w=%0d n=%0d dim=%0d d=%h c=%h got %p exp %p", cw, nn, dm, d, c, tag, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
