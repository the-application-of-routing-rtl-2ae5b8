// sync_fifo: small first-word-fall-through FIFO (helper).
//
// Holds the lookups that missed in the packet forwarding cache until the miss
// handler can send them to the CAM. dout_o shows the oldest entry whenever
// empty_o is low; pop_i removes it. Pushing when full or popping when empty
// is a protocol error and is caught by assertions.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 8,
  localparam int PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_i,
  input  logic [WIDTH-1:0] din_i,
  input  logic             pop_i,
  output logic [WIDTH-1:0] dout_o,
  output logic             empty_o,
  output logic             full_o,
  output logic [CNT_W-1:0] count_o
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [CNT_W-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push_i) wr_ptr <= (int'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (pop_i)  rd_ptr <= (int'(rd_ptr) == DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + CNT_W'(push_i) - CNT_W'(pop_i);
    end
  end

  always_ff @(posedge clk) begin
    if (push_i) mem[wr_ptr] <= din_i;
  end

  assign dout_o  = mem[rd_ptr];
  assign empty_o = (count == '0);
  assign full_o  = (int'(count) == DEPTH);
  assign count_o = count;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push_i |-> (!full_o || pop_i));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop_i |-> !empty_o);

endmodule
