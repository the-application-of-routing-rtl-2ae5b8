// tb_cache_ctrl: checks the flush / disable / reprogram / enable sequence:
// caches off after reset until the CAM is reported programmed; a topology
// change or configuration load gives exactly one flush pulse, turns the
// caches off at once, and they stay off until reprog_done; a configuration
// is applied only when loaded.
module tb_cache_ctrl;
  import rc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic topo, load, done, flush, en;
  rc_cfg_t cfg_new, cfg;
  int n_flush = 0;

  cache_ctrl dut (.clk, .rst_n, .topo_change_i(topo), .cfg_load_i(load), .cfg_new_i(cfg_new),
                  .reprog_done_i(done), .flush_o(flush), .cache_en_o(en), .cfg_o(cfg));

  always @(posedge clk) if (rst_n && flush) n_flush++;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rc_cfg_t c1;
    topo = 0; load = 0; done = 0;
    cfg_new = '{mode: NRF_CUBE, cur_addr: 24'h123, chunk_w: 4'd3, n_dims: 5'd8, radix: 9'd8,
                torus: 1'b1, ft_dim: 5'd0, lag_num: 5'd4, lag_sel: LAG_CRC};
    c1 = cfg_new;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    chk(!en, "enabled before the CAM was programmed");
    chk(cfg.mode == NRF_ARBITRARY && cfg.lag_num == 5'd1, "reset configuration");
    done = 1; @(negedge clk); done = 0;
    chk(en, "not enabled after reprog_done");
    repeat (3) @(negedge clk);
    chk(en && n_flush == 0, "spurious flush");
    // topology change
    topo = 1; @(negedge clk); topo = 0;
    chk(flush && !en, "topology change: flush and disable");
    @(negedge clk);
    chk(!flush && !en, "flush must be one cycle, cache stays off");
    repeat (10) @(negedge clk);
    chk(!en && n_flush == 1, "cache re-enabled before reprogramming");
    chk(cfg.mode == NRF_ARBITRARY, "topology change must not load a configuration");
    done = 1; @(negedge clk); done = 0;
    chk(en, "enabled after reprogramming");
    // configuration load (switch of node reduction function)
    load = 1; @(negedge clk); load = 0;
    chk(flush && !en && cfg == c1, "config load: flush, disable, new configuration");
    @(negedge clk);
    done = 1; @(negedge clk); done = 0;
    chk(en && n_flush == 2, "enabled after load");
    // a request while waiting restarts the wait
    topo = 1; @(negedge clk); topo = 0;
    load = 1; cfg_new.mode = NRF_FATTREE; @(negedge clk); load = 0;
    chk(!en && flush && cfg.mode == NRF_FATTREE && n_flush == 3, "back-to-back requests");
    done = 1; @(negedge clk); done = 0;
    chk(en, "final enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
