// tb_crc_hash: checks the single-cycle CRC against the published CRC-16/CCITT
// check value (0x29B1 for the ASCII string "123456789") and against a
// byte-at-a-time software CRC for random 64-bit keys and 24-bit addresses.
module tb_crc_hash;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [71:0] d72;  logic [15:0] c72;
  logic [63:0] d64;  logic [15:0] c64;
  logic [23:0] d24;  logic [15:0] c24;

  crc_hash #(.IN_W(72)) u72 (.data_i(d72), .crc_o(c72));
  crc_hash #(.IN_W(64)) u64 (.data_i(d64), .crc_o(c64));
  crc_hash #(.IN_W(24)) u24 (.data_i(d24), .crc_o(c24));

  function automatic logic [15:0] crc_bytes(input logic [71:0] d, input int nbytes);
    logic [15:0] c = 16'hFFFF;
    for (int b = nbytes - 1; b >= 0; b--) begin
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
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d72 = "123456789"; d64 = '0; d24 = '0;
    @(negedge clk);
    chk(c72 == 16'h29B1, $sformatf("check value %h", c72));
    for (int i = 0; i < 500; i++) begin
      d64 = {$urandom, $urandom};
      d24 = 24'($urandom);
      @(negedge clk);
      chk(c64 == crc_bytes({8'h0, d64}, 8), $sformatf("crc64 of %h = %h", d64, c64));
      chk(c24 == crc_bytes({48'h0, d24}, 3), $sformatf("crc24 of %h = %h", d24, c24));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
