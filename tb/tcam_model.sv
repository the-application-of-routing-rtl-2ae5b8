// tcam_model: behavioural model of the off-chip ternary CAM that holds the
// complete forwarding table of an input port (testbench only).
//
// Entries hold (value, care mask, data). A search returns the data of the
// lowest-numbered valid entry whose cared-for bits equal the key, LATENCY
// clock cycles after the request was accepted; a key that matches nothing
// returns data 0 (the real table is assumed to cover every destination).
// Only one search is in flight at a time (req_ready_o is low meanwhile), which
// models a single-ported CAM whose access time bounds the packet rate.
// Entries are written through the prog_* port, one per cycle.
module tcam_model
  import rc_pkg::*;
#(
  parameter int SIZE    = 1024,
  parameter int LATENCY = 25
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               prog_en_i,
  input  logic [15:0]        prog_idx_i,
  input  logic               prog_valid_i,
  input  logic [KEY_W-1:0]   prog_value_i,
  input  logic [KEY_W-1:0]   prog_care_i,
  input  line_data_t         prog_data_i,
  input  logic               req_valid_i,
  output logic               req_ready_o,
  input  logic [KEY_W-1:0]   req_key_i,
  output logic               rsp_valid_o,
  output line_data_t         rsp_data_o,
  output int                 searches_o
);

  logic             vld   [SIZE];
  logic [KEY_W-1:0] value [SIZE];
  logic [KEY_W-1:0] care  [SIZE];
  line_data_t       data  [SIZE];
  int               busy_cnt;
  line_data_t       result;

  assign req_ready_o = (busy_cnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SIZE; i++) vld[i] <= 1'b0;
      busy_cnt    <= 0;
      rsp_valid_o <= 1'b0;
      rsp_data_o  <= '0;
      result      <= '0;
      searches_o  <= 0;
    end else begin
      if (prog_en_i) begin
        vld[prog_idx_i]   <= prog_valid_i;
        value[prog_idx_i] <= prog_value_i;
        care[prog_idx_i]  <= prog_care_i;
        data[prog_idx_i]  <= prog_data_i;
      end
      rsp_valid_o <= 1'b0;
      if (req_valid_i && req_ready_o) begin
        line_data_t r;
        r = '0;
        for (int i = SIZE - 1; i >= 0; i--)
          if (vld[i] && ((value[i] ^ req_key_i) & care[i]) == '0) r = data[i];
        result     <= r;
        busy_cnt   <= LATENCY;
        searches_o <= searches_o + 1;
      end else if (busy_cnt > 0) begin
        busy_cnt <= busy_cnt - 1;
        if (busy_cnt == 1) begin
          rsp_valid_o <= 1'b1;
          rsp_data_o  <= result;
        end
      end
    end
  end

endmodule
