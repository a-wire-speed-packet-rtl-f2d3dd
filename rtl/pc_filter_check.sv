// pc_filter_check: decides, per packet, whether the packet matches the filter.
//
// It watches the words entering the capture FIFO.  A two-state machine
// separates module-header words (non-zero control before the data) from
// packet data, and `in_word_num` counts the data words 0..7 of the 64-byte
// filter window.  For each data word it looks up the filter word
// `in_word_num` (data, mask and valid flag, read combinationally from the
// filter table) and forms, in the same cycle,
//   hit  : valid, mask non-zero and (word & mask) == data
//   miss : valid, mask non-zero and (word & mask) != data
// A word whose mask is zero or whose valid flag is clear gives neither.
// Hits and misses are accumulated over the window.  When the eighth data
// word arrives, `dec_valid` pulses for one cycle with `dec_match` = (at least
// one hit) and (no miss); this is the packet's exception_pkt flag.  A packet
// that ends before its eighth data word never reaches the decision point: it
// gets a decision on its last word, always "no match".  Each packet gives
// exactly one decision.
//
// Timing: combinational from the input word to `dec_valid`/`dec_match`; the
// accumulators and the word counter are registered.  The hit/miss
// definitions, the word counter and the decision rule follow the design
// description; the header/data state machine and the "no match" decision
// for packets shorter than eight words are this design's own reading (a
// frame of the 60-byte Ethernet minimum already fills eight words).
module pc_filter_check
  import pc_pkg::*;
#(
  parameter int unsigned WINDOW_WORDS = FILTER_WORDS
) (
  input  logic                  clk,
  input  logic                  reset,
  // Word entering the FIFO
  input  logic                  in_wr,
  input  logic [CTRL_W-1:0]     in_ctrl,
  input  logic [DATA_W-1:0]     in_data,
  // Filter table lookup at in_word_num
  output logic [WORD_IDX_W-1:0] in_word_num,
  input  logic [DATA_W-1:0]     filter_data,
  input  logic [DATA_W-1:0]     filter_mask,
  input  logic                  filter_valid,
  // Per-packet decision
  output logic                  dec_valid,
  output logic                  dec_match,
  // Per-word results, for observation
  output logic                  filter_hit,
  output logic                  filter_miss
);

  typedef enum logic {S_HEADER, S_DATA} in_state_e;

  in_state_e in_state;
  logic      hit_seen, miss_seen, decided;

  logic is_data, is_last, active;
  logic masked_eq;

  assign is_data = in_wr && ((in_state == S_DATA) || (in_ctrl == '0));
  assign is_last = in_wr && (in_state == S_DATA) && (in_ctrl != '0);
  assign active  = is_data && !decided && filter_valid && (|filter_mask);

  assign masked_eq   = ((in_data & filter_mask) == filter_data);
  assign filter_hit  = active &&  masked_eq;
  assign filter_miss = active && !masked_eq;

  assign dec_valid = is_data && !decided &&
                     ((in_word_num == WORD_IDX_W'(WINDOW_WORDS-1)) || is_last);
  assign dec_match = (in_word_num == WORD_IDX_W'(WINDOW_WORDS-1)) &&
                     (hit_seen || filter_hit) && !(miss_seen || filter_miss);

  always_ff @(posedge clk) begin
    if (reset) begin
      in_state    <= S_HEADER;
      in_word_num <= '0;
      hit_seen    <= 1'b0;
      miss_seen   <= 1'b0;
      decided     <= 1'b0;
    end else if (is_data) begin
      if (is_last) begin
        in_state    <= S_HEADER;
        in_word_num <= '0;
        hit_seen    <= 1'b0;
        miss_seen   <= 1'b0;
        decided     <= 1'b0;
      end else begin
        in_state  <= S_DATA;
        hit_seen  <= hit_seen  || filter_hit;
        miss_seen <= miss_seen || filter_miss;
        if (dec_valid) decided <= 1'b1;
        if (in_word_num != WORD_IDX_W'(WINDOW_WORDS-1))
          in_word_num <= in_word_num + WORD_IDX_W'(1);
      end
    end
  end

endmodule
