// pc_small_fifo: small synchronous FIFO with first-word fall-through.
//
// Holds DEPTH entries of WIDTH bits in a register array with a read and a
// write pointer and an occupancy count.  The oldest entry is always visible
// on `dout` while `empty` is low; asserting `rd_en` removes it at the next
// clock edge.  `wr_en` stores `din` at the clock edge.  A write while `full`
// or a read while `empty` is ignored (and flagged by an assertion).  A read
// and a write in the same cycle are both performed, also when full.
//
// The packet path uses it 72 bits wide and 10 deep, the size given for the
// capture module's buffer; the same module, 1 bit wide, queues the per-packet
// capture decisions.  The fall-through output and the count-based flags are
// this design's choice.
module pc_small_fifo #(
  parameter int unsigned WIDTH = 72,
  parameter int unsigned DEPTH = 10
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic [CNT_W-1:0] cnt;

  logic do_wr, do_rd;
  assign do_rd = rd_en && (cnt != '0);
  assign do_wr = wr_en && ((cnt != CNT_W'(DEPTH)) || do_rd);

  function automatic logic [PTR_W-1:0] ptr_inc(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH-1)) ? '0 : p + PTR_W'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_wr) wr_ptr <= ptr_inc(wr_ptr);
      if (do_rd) rd_ptr <= ptr_inc(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   cnt <= cnt + CNT_W'(1);
        2'b01:   cnt <= cnt - CNT_W'(1);
        default: cnt <= cnt;
      endcase
    end
  end

  assign dout  = mem[rd_ptr];
  assign empty = (cnt == '0);
  assign full  = (cnt == CNT_W'(DEPTH));
  assign count = cnt;

  property p_no_overflow;
    @(posedge clk) disable iff (reset) (wr_en && full) |-> rd_en;
  endproperty
  property p_no_underflow;
    @(posedge clk) disable iff (reset) rd_en |-> !empty;
  endproperty
  a_no_overflow:  assert property (p_no_overflow)  else $error("pc_small_fifo: write while full");
  a_no_underflow: assert property (p_no_underflow) else $error("pc_small_fifo: read while empty");

endmodule
