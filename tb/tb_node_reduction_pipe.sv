// tb_node_reduction_pipe: checks the two-cycle node reduction function.
// Random destinations, modes, switch coordinates and LAG sizes are presented
// with en_i high on most cycles; one cycle after each sampling edge key_o must
// equal a reference key computed here (dimension-order cube routing on a
// 4-ary 3-mesh or 3-torus, up*/down* at the top layer of a 3-level fat tree,
// full address in arbitrary mode, residue LAG) from the values that were
// sampled. Cycles with en_i low must hold key_o. Both fat-tree directions must
// have been seen.
module tb_node_reduction_pipe;
  import rc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  rc_cfg_t cfg;
  logic [ADDR_W-1:0] dst;
  logic [KEY_W-1:0] key;
  logic en;

  node_reduction_pipe dut (.clk(clk), .rst_n(rst_n), .en_i(en), .cfg_i(cfg), .dst_i(dst), .key_o(key));

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask

  // 4-ary 3-cube, dimension order, torus boundary floor(4/2) = 2
  function automatic logic [KEY_W-1:0] ref_cube(logic [5:0] d, logic [5:0] c, bit torus, logic [3:0] lg);
    for (int i = 0; i < 3; i++) begin
      int off;
      bit plus;
      off = int'(d[2*i +: 2]) - int'(c[2*i +: 2]);
      if (off != 0) begin
        plus = torus ? ((off > 0 && off <= 2) || off < -2) : (off > 0);
        return {2'd1, 48'd0, 1'b0, plus, 8'(i), lg};
      end
    end
    return {2'd1, 48'd0, 1'b1, 1'b0, 8'd0, lg};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KEY_W-1:0] exp_key;
    bit have, is_ft;
    int n_up, n_down;
    cfg = '{mode: NRF_ARBITRARY, cur_addr: 24'b01_10_01, chunk_w: 4'd2, n_dims: 5'd3,
            radix: 9'd4, torus: 1'b0, ft_dim: 5'd0, lag_num: 5'd1, lag_sel: LAG_RESIDUE};
    dst = '0;
    en = 1'b0;
    have = 1'b0;
    is_ft = 1'b0;
    n_up = 0;
    n_down = 0;
    exp_key = '0;
    repeat (3) @(negedge clk);
    chk(key == '0, "reset value");
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      // check the key of the previous sampling edge
      if (have) begin
        chk(key == exp_key, $sformatf("mode %0d key %h exp %h", is_ft, key, exp_key));
      end
      // new inputs for the next edge
      en = ($urandom_range(0, 3) != 0);
      dst = 24'($urandom_range(0, 255));
      cfg.mode = nrf_mode_e'($urandom_range(0, 2));
      cfg.cur_addr = 24'($urandom_range(0, 63));
      cfg.torus = 1'($urandom);
      cfg.lag_num = 5'($urandom_range(1, 3));
      cfg.ft_dim = 5'd2;
      if (en) begin
        have = 1'b1;
        is_ft = (cfg.mode == NRF_FATTREE);
        if (cfg.mode == NRF_ARBITRARY) exp_key = {2'd0, 38'd0, dst};
        else if (cfg.mode == NRF_CUBE)
          exp_key = ref_cube(dst[5:0], cfg.cur_addr[5:0], cfg.torus, 4'(int'(dst) % int'(cfg.lag_num)));
        // top layer dim = n-1 = 2: up (digit d_2) if d_3 != c_2, else down (digit d_2)
        if (is_ft) begin
          bit up;
          up = (dst[7:6] != cfg.cur_addr[5:4]);
          if (up) n_up++; else n_down++;
          exp_key = {2'd2, 48'd0, 1'b0, up, 8'(dst[5:4]), 4'(int'(dst) % int'(cfg.lag_num))};
        end
      end
    end
    chk(n_up > 0 && n_down > 0, "fat-tree both directions sampled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
