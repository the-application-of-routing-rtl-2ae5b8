// tb_nrf_cube: checks the k-ary n-cube node reduction against a reference
// written here as a sequential loop over dimensions. Covers the 3-ary 2-mesh
// example (destinations (0,2),(1,2),(2,2) share link X0+ at switch (1,1)),
// the 5-ary torus boundary c_be = (c + floor(k/2)) mod k, that a mesh needs
// at most 2n+1 distinct tags, and random cases for every evaluated shape
// (256-ary 3-cube .. 4-ary 12-cube), meshes and tori.
module tb_nrf_cube;
  import rc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ADDR_W-1:0] dst, cur;
  logic [3:0] w;
  logic [4:0] n;
  logic [8:0] k;
  logic torus;
  rtag_t tag;

  nrf_cube dut (.dst_i(dst), .cur_i(cur), .chunk_w_i(w), .n_dims_i(n), .radix_i(k),
                .torus_i(torus), .tag_o(tag));

  function automatic rtag_t ref_tag(logic [ADDR_W-1:0] d, logic [ADDR_W-1:0] c,
                                    int cw, int nd, int kk, bit tor);
    for (int i = 0; i < nd; i++) begin
      int di, ci, off;
      di = int'((d >> (i * cw)) & ((1 << cw) - 1));
      ci = int'((c >> (i * cw)) & ((1 << cw) - 1));
      off = di - ci;
      if (off != 0) begin
        bit p;
        if (!tor) p = off > 0;
        else if (off > 0) p = (off <= kk / 2);
        else p = (-off > kk / 2);
        return '{local_ep: 0, dir: p, idx: 8'(i)};
      end
    end
    return '{local_ep: 1, dir: 0, idx: 0};
  endfunction

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic apply(input logic [ADDR_W-1:0] d, input logic [ADDR_W-1:0] c,
                       input int cw, input int nd, input int kk, input bit tor);
    rtag_t e;
    dst = d; cur = c; w = 4'(cw); n = 5'(nd); k = 9'(kk); torus = tor;
    @(negedge clk);
    e = ref_tag(d, c, cw, nd, kk, tor);
    chk(tag == e, $sformatf("d=%h c=%h w=%0d n=%0d k=%0d torus=%0d: got %p exp %p",
                            d, c, cw, nd, kk, tor, tag, e));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int shapes_w[5] = '{8, 6, 4, 3, 2};
    int shapes_n[5] = '{3, 4, 6, 8, 12};
    bit seen[32];
    int distinct;
    // 3-ary 2-mesh, switch (1,1): (x,2) -> X0+
    for (int x = 0; x < 3; x++) begin
      dst = 24'({2'(x), 2'd2}); cur = 24'b01_01; w = 2; n = 2; k = 3; torus = 0;
      @(negedge clk);
      chk(tag == '{local_ep: 0, dir: 1, idx: 0}, $sformatf("mesh example (%0d,2)", x));
    end
    // 5-ary 1-torus from node 1: 2,3 go +, 4,0 go -
    foreach (seen[i]) seen[i] = 0;
    for (int x = 0; x < 5; x++) begin
      dst = 24'(x); cur = 24'd1; w = 3; n = 1; k = 5; torus = 1;
      @(negedge clk);
      if (x == 1) chk(tag.local_ep, "torus self");
      else chk(!tag.local_ep && tag.dir == (x == 2 || x == 3), $sformatf("torus dest %0d", x));
    end
    // a 4-ary 3-mesh needs 2n+1 = 7 tags
    distinct = 0;
    for (int d = 0; d < 64; d++) begin
      dst = 24'(d); cur = 24'b01_10_01; w = 2; n = 3; k = 4; torus = 0;
      @(negedge clk);
      if (!seen[{tag.local_ep, tag.dir, tag.idx[2:0]}]) distinct++;
      seen[{tag.local_ep, tag.dir, tag.idx[2:0]}] = 1;
    end
    chk(distinct == 7, $sformatf("4-ary 3-mesh used %0d tags", distinct));
    // random, all evaluated shapes, mesh and torus
    for (int s = 0; s < 5; s++) begin
      for (int r = 0; r < 300; r++) begin
        int kk;
        logic [ADDR_W-1:0] d, c;
        kk = $urandom_range(2, 1 << shapes_w[s]);
        d = '0; c = '0;
        for (int i = 0; i < shapes_n[s]; i++) begin
          d |= ADDR_W'($urandom_range(kk - 1)) << (i * shapes_w[s]);
          c |= ADDR_W'($urandom_range(kk - 1)) << (i * shapes_w[s]);
        end
        if (r % 7 == 0) d = c;
        apply(d, c, shapes_w[s], shapes_n[s], kk, r[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
