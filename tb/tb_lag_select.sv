// tb_lag_select: checks LAG member selection against a byte-wise software
// CRC-16/CCITT modulo the bundle size, and against the plain address residue,
// for bundle sizes 1..16; also that random destinations use every member.
module tb_lag_select;
  import rc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ADDR_W-1:0] dst;
  logic [4:0] num;
  lag_sel_e sel;
  logic [3:0] lag;

  lag_select dut (.dst_i(dst), .lag_num_i(num), .lag_sel_i(sel), .lag_o(lag));

  function automatic logic [15:0] crc24(input logic [23:0] d);
    logic [15:0] c = 16'hFFFF;
    for (int b = 2; b >= 0; b--) begin
      c ^= {d[b*8 +: 8], 8'h00};
      repeat (8) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
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
    for (int nn = 1; nn <= 16; nn++) begin
      bit used[16];
      int nused;
      nused = 0;
      foreach (used[i]) used[i] = 0;
      for (int r = 0; r < 200; r++) begin
        dst = ADDR_W'($urandom); num = 5'(nn); sel = LAG_CRC;
        @(negedge clk);
        chk(int'(lag) == int'(crc24(dst)) % nn, $sformatf("crc n=%0d d=%h lag=%0d", nn, dst, lag));
        if (!used[lag]) nused++;
        used[lag] = 1;
        sel = LAG_RESIDUE;
        @(negedge clk);
        chk(int'(lag) == int'(dst) % nn, $sformatf("residue n=%0d d=%h lag=%0d", nn, dst, lag));
      end
      chk(nused == nn, $sformatf("n=%0d: only %0d members used", nn, nused));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
