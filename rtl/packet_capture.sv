// packet_capture: wire-speed packet classification and capture, one filter.
//
// Placed in series in the packet path (words of 64 data + 8 control bits
// with in_wr/in_rdy and out_wr/out_rdy flow control), it passes every packet
// on, and redirects to a host DMA port those packets whose first 64 bytes
// match a filter.  The filter is eight 64-bit data/mask word pairs: word i of
// the packet, ANDed with mask i, must equal data i wherever the mask and the
// entry's valid flag are set; all such words must match (AND only).
//
// Structure:
//   pc_small_fifo (72 x 10)  buffers the words, so that up to 64 bytes can be
//                            inspected before the packet's first word leaves;
//   pc_filter_check          matches each word as it is written into the
//                            FIFO and gives one capture decision per packet;
//   pc_small_fifo (1 x 10)   queues those decisions, one per packet, so that
//                            the tail of one packet and the head of the next
//                            can both be in flight;
//   pc_header_rewrite        drains the FIFO and, for a captured packet,
//                            replaces the destination port in the module
//                            header and the destination MAC with the tag;
//   pc_regs                  register-bus access to the filter table and the
//                            PORT_NUM_HITS counter.
//
// Flow control: in_rdy is "FIFO not full, or a word leaves in this cycle",
// so the FIFO accepts a word even when full if one is read at the same time.
// The module never stalls the packet path by itself, it only passes on
// out_rdy (in_rdy depends combinationally on out_rdy when the FIFO is full).  Latency: a packet's
// first word, written at clock t, leaves at clock t+9 when the eighth data
// word was written at t+8 and out_rdy is high (decision registered in the
// decision queue at the end of t+8).  Packets shorter than eight data words
// are decided, as not captured, on their last word.
//
// What follows the design description: the FIFO size, the filter table, the
// hit/miss rule, the tag MAC address parameter, the exception_port input with
// a per-instance default, and the register set.  This design's own choices:
// the decision queue, the fall-through FIFO, the register bus timing.
module packet_capture
  import pc_pkg::*;
#(
  parameter logic [MAC_W-1:0]     TAG_MAC                = 48'hFFFF_FFFF_FFFE,
  parameter logic [PORT_W-1:0]    DEFAULT_EXCEPTION_PORT = 16'h0002,
  parameter logic [REG_TAG_W-1:0] BLOCK_TAG              = 17'h00010,
  parameter int unsigned          FIFO_DEPTH             = 10
) (
  input  logic              clk,
  input  logic              reset,
  // From the previous module (e.g. a MAC receive queue)
  input  logic [DATA_W-1:0] in_data,
  input  logic [CTRL_W-1:0] in_ctrl,
  input  logic              in_wr,
  output logic              in_rdy,
  // To the next module (e.g. the input arbiter)
  output logic [DATA_W-1:0] out_data,
  output logic [CTRL_W-1:0] out_ctrl,
  output logic              out_wr,
  input  logic              out_rdy,
  // Capture destination (one-hot, 0 = use DEFAULT_EXCEPTION_PORT)
  input  logic [PORT_W-1:0] exception_port,
  // Register bus
  input  reg_bus_t          reg_in,
  output reg_bus_t          reg_out
);

  localparam int unsigned CNT_W = $clog2(FIFO_DEPTH+1);

  pkt_word_t             fifo_din, fifo_dout;
  logic                  fifo_empty, fifo_full, fifo_rd;
  logic [CNT_W-1:0]      fifo_count;

  logic [WORD_IDX_W-1:0] in_word_num;
  logic [DATA_W-1:0]     filter_data, filter_mask;
  logic                  filter_valid;
  logic                  dec_valid, dec_match, filter_hit, filter_miss;

  logic                  dq_match, dq_empty, dq_full, dq_rd;
  logic [CNT_W-1:0]      dq_count;
  logic                  rewriting;
  logic [REG_DATA_W-1:0] num_hits;

  assign in_rdy   = !fifo_full || fifo_rd;
  assign fifo_din = '{ctrl: in_ctrl, data: in_data};

  pc_small_fifo #(.WIDTH($bits(pkt_word_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk   (clk),
    .reset (reset),
    .wr_en (in_wr),
    .din   (fifo_din),
    .rd_en (fifo_rd),
    .dout  (fifo_dout),
    .empty (fifo_empty),
    .full  (fifo_full),
    .count (fifo_count)
  );

  pc_filter_check u_check (
    .clk          (clk),
    .reset        (reset),
    .in_wr        (in_wr && in_rdy),
    .in_ctrl      (in_ctrl),
    .in_data      (in_data),
    .in_word_num  (in_word_num),
    .filter_data  (filter_data),
    .filter_mask  (filter_mask),
    .filter_valid (filter_valid),
    .dec_valid    (dec_valid),
    .dec_match    (dec_match),
    .filter_hit   (filter_hit),
    .filter_miss  (filter_miss)
  );

  // One decision per packet whose first word is still in the FIFO, so a
  // queue as deep as the FIFO cannot overflow.
  pc_small_fifo #(.WIDTH(1), .DEPTH(FIFO_DEPTH)) u_decisions (
    .clk   (clk),
    .reset (reset),
    .wr_en (dec_valid),
    .din   (dec_match),
    .rd_en (dq_rd),
    .dout  (dq_match),
    .empty (dq_empty),
    .full  (dq_full),
    .count (dq_count)
  );

  pc_header_rewrite #(
    .TAG_MAC                (TAG_MAC),
    .DEFAULT_EXCEPTION_PORT (DEFAULT_EXCEPTION_PORT)
  ) u_rewrite (
    .clk            (clk),
    .reset          (reset),
    .fifo_word      (fifo_dout),
    .fifo_empty     (fifo_empty),
    .fifo_rd        (fifo_rd),
    .dec_match      (dq_match),
    .dec_empty      (dq_empty),
    .dec_rd         (dq_rd),
    .exception_port (exception_port),
    .out_wr         (out_wr),
    .out_ctrl       (out_ctrl),
    .out_data       (out_data),
    .out_rdy        (out_rdy),
    .rewriting      (rewriting)
  );

  pc_regs #(.BLOCK_TAG(BLOCK_TAG)) u_regs (
    .clk         (clk),
    .reset       (reset),
    .reg_in      (reg_in),
    .reg_out     (reg_out),
    .match_addr  (in_word_num),
    .match_data  (filter_data),
    .match_mask  (filter_mask),
    .match_valid (filter_valid),
    .hit_inc     (dec_valid && dec_match),
    .num_hits    (num_hits)
  );

  // The previous module writes only when this one is ready.  A word is never
  // both a hit and a miss; every queued decision belongs to a packet whose
  // first word is still in the FIFO; only a word that leaves is rewritten.
  a_hit_xor_miss: assert property (@(posedge clk) disable iff (reset) !(filter_hit && filter_miss))
    else $error("packet_capture: hit and miss on one word");
  a_dq_le_fifo: assert property (@(posedge clk) disable iff (reset) dq_count <= fifo_count)
    else $error("packet_capture: more decisions than packets");
  a_rewrite_out: assert property (@(posedge clk) disable iff (reset) rewriting |-> out_wr)
    else $error("packet_capture: rewrite without output");
  a_in_wr_rdy: assert property (@(posedge clk) disable iff (reset) in_wr |-> in_rdy)
    else $error("packet_capture: in_wr while not ready");
  a_dq_no_overflow: assert property (@(posedge clk) disable iff (reset) dec_valid |-> !dq_full)
    else $error("packet_capture: decision queue overflow");

endmodule
