// pc_header_rewrite: drains the capture FIFO and rewrites captured packets.
//
// The FIFO head (fall-through) and the head of the decision queue are its
// inputs.  A word leaves the FIFO, and appears on out_wr/out_ctrl/out_data in
// the same cycle, when the FIFO is not empty and the next module is ready
// (`out_rdy`); the first word of a packet additionally waits until that
// packet's capture decision (exception_pkt) is in the decision queue, and
// pops it.  If the packet is to be captured, the words are rewritten inline:
//   - in an I/O queue module header (control 0xFF) the one-hot destination
//     port, bits 63:48, becomes `exception_port`, or DEFAULT_EXCEPTION_PORT
//     when `exception_port` is zero;
//   - in the first data word the destination MAC address, bits 63:16,
//     becomes TAG_MAC (FF:FF:FF:FF:FF:FE by default).
// All other words pass unchanged.  The rewrite is combinational, so it adds
// no cycle; the module never holds back a word once its decision is known.
//
// The tag address, the exception_port input with its per-port default and
// the rewrite of the port field and the MAC address follow the design
// description; the three-state word tracker is this design's own.
module pc_header_rewrite
  import pc_pkg::*;
#(
  parameter logic [MAC_W-1:0]  TAG_MAC                = 48'hFFFF_FFFF_FFFE,
  parameter logic [PORT_W-1:0] DEFAULT_EXCEPTION_PORT = 16'h0002
) (
  input  logic              clk,
  input  logic              reset,
  // FIFO head
  input  pkt_word_t         fifo_word,
  input  logic              fifo_empty,
  output logic              fifo_rd,
  // Decision queue head
  input  logic              dec_match,
  input  logic              dec_empty,
  output logic              dec_rd,
  // Run-time capture destination (one-hot), zero selects the default
  input  logic [PORT_W-1:0] exception_port,
  // Output to the next module
  output logic              out_wr,
  output logic [CTRL_W-1:0] out_ctrl,
  output logic [DATA_W-1:0] out_data,
  input  logic              out_rdy,
  // Observation: the current word is being rewritten
  output logic              rewriting
);

  typedef enum logic [1:0] {O_SOP, O_HEADER, O_DATA} out_state_e;

  out_state_e out_state;
  logic       exception_pkt;   // decision of the packet now leaving
  logic       cur_exc;
  logic       is_header, is_word0;
  logic [PORT_W-1:0] exc_port;

  assign fifo_rd = !fifo_empty && out_rdy && ((out_state != O_SOP) || !dec_empty);
  assign dec_rd  = fifo_rd && (out_state == O_SOP);
  assign cur_exc = (out_state == O_SOP) ? dec_match : exception_pkt;

  assign is_header = (out_state != O_DATA) && (fifo_word.ctrl != '0);
  assign is_word0  = (out_state != O_DATA) && (fifo_word.ctrl == '0);
  assign exc_port  = (exception_port != '0) ? exception_port : DEFAULT_EXCEPTION_PORT;

  always_comb begin
    out_wr    = fifo_rd;
    out_ctrl  = fifo_word.ctrl;
    out_data  = fifo_word.data;
    rewriting = 1'b0;
    if (cur_exc) begin
      if (is_header && (fifo_word.ctrl == IO_QUEUE_STAGE_NUM)) begin
        out_data[IOQ_DST_PORT_POS +: PORT_W] = exc_port;
        rewriting = fifo_rd;
      end else if (is_word0) begin
        out_data[DST_MAC_POS +: MAC_W] = TAG_MAC;
        rewriting = fifo_rd;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      out_state     <= O_SOP;
      exception_pkt <= 1'b0;
    end else if (fifo_rd) begin
      if (out_state == O_SOP) exception_pkt <= dec_match;
      if (is_header)                    out_state <= O_HEADER;
      else if (is_word0)                out_state <= O_DATA;
      else if (fifo_word.ctrl != '0)    out_state <= O_SOP;   // last word
    end
  end

endmodule
