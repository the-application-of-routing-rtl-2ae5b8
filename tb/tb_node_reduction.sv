// tb_node_reduction: checks the mode switch of the node reduction function.
// Arbitrary mode must key on the full address; cube and fat-tree modes must
// produce the reduced key of the selected datapath (reference computed here)
// with the LAG member appended. Counts distinct keys over all destinations:
// 4-ary 3-mesh -> 7, the same with 2-link LAG -> at most 14, arbitrary -> 64.
module tb_node_reduction;
  import rc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  rc_cfg_t cfg;
  logic [ADDR_W-1:0] dst;
  logic [KEY_W-1:0] key;

  node_reduction dut (.cfg_i(cfg), .dst_i(dst), .key_o(key));

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic logic [KEY_W-1:0] ref_cube(logic [5:0] d, logic [5:0] c, logic [3:0] lg);
    for (int i = 0; i < 3; i++)
      if (d[2*i +: 2] != c[2*i +: 2])
        return {2'd1, 48'd0, 1'b0, d[2*i +: 2] > c[2*i +: 2], 8'(i), lg};
    return {2'd1, 48'd0, 1'b1, 1'b0, 8'd0, lg};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KEY_W-1:0] keys[$];
    int n;
    cfg = '{mode: NRF_ARBITRARY, cur_addr: 24'b01_10_01, chunk_w: 4'd2, n_dims: 5'd3,
            radix: 9'd4, torus: 1'b0, ft_dim: 5'd0, lag_num: 5'd1, lag_sel: LAG_RESIDUE};
    for (int m = 0; m < 3; m++) begin
      for (int lg = 1; lg <= 2; lg++) begin
        keys.delete();
        for (int d = 0; d < 64; d++) begin
          logic [KEY_W-1:0] e;
          cfg.mode = nrf_mode_e'(m);
          cfg.lag_num = 5'(lg);
          dst = 24'(d);
          @(negedge clk);
          if (m == 0) e = {2'd0, 38'd0, 24'(d)};
          else if (m == 1) e = ref_cube(6'(d), 6'b01_10_01, 4'(d % lg));
          else e = key;  // fat tree checked in its own test; here only the mode field
          chk(key == e, $sformatf("mode %0d lag %0d d=%0d key %h exp %h", m, lg, d, key, e));
          chk(key[63:62] == 2'(m), "mode field");
          if (!(key inside {keys})) keys.push_back(key);
        end
        n = keys.size();
        if (m == 0) chk(n == 64, $sformatf("arbitrary: %0d keys", n));
        if (m == 1) chk(lg == 1 ? n == 7 : n <= 14 && n > 7, $sformatf("cube lag %0d: %0d keys", lg, n));
        if (m == 2) chk(n < 64, $sformatf("fat tree: %0d keys", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
