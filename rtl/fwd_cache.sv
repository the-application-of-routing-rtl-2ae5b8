// fwd_cache: set-associative packet forwarding cache of one input port.
//
// ENTRIES lines (2048) in WAYS ways (4), so 512 sets. A line is 12 bytes: the
// 8-byte key as tag, a 2-byte output port descriptor and 2 reserved bytes
// (QoS). Each input port owns one cache exclusively; there is no shared
// second level. Those numbers are the thesis'. The rest is this design's:
//
//  * Two read ports, both synchronous (address in cycle t, result in t+1):
//    the lookup port used by every packet, and a maintenance port used by
//    the miss handler before it refills or updates a line, so refills never
//    stall lookups. One write port.
//  * A hit needs a valid way whose tag equals the key; the compare is done on
//    the registered read data in cycle t+1.
//  * Replacement fills an invalid way first, otherwise a per-set round-robin
//    pointer chooses the victim (the thesis does not name a policy).
//  * flush_i clears all valid bits and victim pointers in one cycle; a read issued in that same
//    cycle already sees the cache empty. A write in the flush cycle is
//    dropped.
//  * A lookup in the same cycle as a write to its set sees the old contents.
module fwd_cache
  import rc_pkg::*;
#(
  parameter int ENTRIES = 2048,
  parameter int WAYS    = 4,
  localparam int SETS   = ENTRIES / WAYS,
  localparam int SET_W  = $clog2(SETS),
  localparam int WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush_i,
  // lookup port
  input  logic              lk_en_i,
  input  logic [SET_W-1:0]  lk_set_i,
  input  logic [KEY_W-1:0]  lk_key_i,
  output logic              lk_hit_o,
  output line_data_t        lk_data_o,
  // maintenance port
  input  logic              mt_en_i,
  input  logic [SET_W-1:0]  mt_set_i,
  input  logic [KEY_W-1:0]  mt_key_i,
  output logic              mt_hit_o,
  output logic [WAY_W-1:0]  mt_way_o,     // matching way on a hit
  output logic [WAY_W-1:0]  mt_victim_o,  // way to fill on a miss
  output line_data_t        mt_data_o,
  // write port
  input  logic              wr_en_i,
  input  logic              wr_alloc_i,   // write fills the victim: advance round robin
  input  logic [SET_W-1:0]  wr_set_i,
  input  logic [WAY_W-1:0]  wr_way_i,
  input  logic [KEY_W-1:0]  wr_key_i,
  input  line_data_t        wr_data_i
);

  logic [WAYS-1:0]  valid_q [SETS];
  logic [WAY_W-1:0] rr_q    [SETS];

  // registered read results
  logic [KEY_W-1:0] lk_tag [WAYS];
  line_data_t       lk_dat [WAYS];
  logic [WAYS-1:0]  lk_vld;
  logic [KEY_W-1:0] lk_key_q;
  logic [KEY_W-1:0] mt_tag [WAYS];
  line_data_t       mt_dat [WAYS];
  logic [WAYS-1:0]  mt_vld;
  logic [WAY_W-1:0] mt_rr;
  logic [KEY_W-1:0] mt_key_q;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [KEY_W-1:0] tag_mem  [SETS];
    line_data_t       data_mem [SETS];

    always_ff @(posedge clk) begin
      if (wr_en_i && !flush_i && wr_way_i == WAY_W'(w)) begin
        tag_mem[wr_set_i]  <= wr_key_i;
        data_mem[wr_set_i] <= wr_data_i;
      end
      if (lk_en_i) begin
        lk_tag[w] <= tag_mem[lk_set_i];
        lk_dat[w] <= data_mem[lk_set_i];
      end
      if (mt_en_i) begin
        mt_tag[w] <= tag_mem[mt_set_i];
        mt_dat[w] <= data_mem[mt_set_i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        rr_q[s]    <= '0;
      end
      lk_vld   <= '0;
      mt_vld   <= '0;
      mt_rr    <= '0;
      lk_key_q <= '0;
      mt_key_q <= '0;
    end else begin
      if (flush_i) begin
        for (int s = 0; s < SETS; s++) begin
          valid_q[s] <= '0;
          rr_q[s]    <= '0;
        end
      end else if (wr_en_i) begin
        valid_q[wr_set_i][wr_way_i] <= 1'b1;
        if (wr_alloc_i && wr_way_i == rr_q[wr_set_i])
          rr_q[wr_set_i] <= WAY_W'((int'(rr_q[wr_set_i]) + 1) % WAYS);
      end
      if (lk_en_i) begin
        lk_vld   <= flush_i ? '0 : valid_q[lk_set_i];
        lk_key_q <= lk_key_i;
      end
      if (mt_en_i) begin
        mt_vld   <= flush_i ? '0 : valid_q[mt_set_i];
        mt_rr    <= rr_q[mt_set_i];
        mt_key_q <= mt_key_i;
      end
    end
  end

  // tag compare
  always_comb begin
    lk_hit_o  = 1'b0;
    lk_data_o = '0;
    mt_hit_o  = 1'b0;
    mt_way_o  = '0;
    mt_data_o = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (lk_vld[w] && lk_tag[w] == lk_key_q) begin
        lk_hit_o  = 1'b1;
        lk_data_o = lk_dat[w];
      end
      if (mt_vld[w] && mt_tag[w] == mt_key_q) begin
        mt_hit_o  = 1'b1;
        mt_way_o  = WAY_W'(w);
        mt_data_o = mt_dat[w];
      end
    end
  end

  // victim: first invalid way, else round robin
  always_comb begin
    mt_victim_o = mt_rr;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!mt_vld[w]) mt_victim_o = WAY_W'(w);
    end
  end

endmodule
