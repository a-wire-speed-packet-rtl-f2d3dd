// pc_dp_ram: small dual-port RAM, one read/write port and one read port.
//
// Port A writes `a_wdata` at `a_addr` on the clock edge when `a_we` is high
// and always shows the word at `a_addr` on `a_rdata` (asynchronous read).
// Port B only reads: `b_rdata` shows the word at `b_addr` in the same cycle.
// Written as an array without reset, so that synthesis can map it to LUT RAM;
// its contents are undefined until written.  The filter table uses two of
// these, 8 x 64 bits, one for the filter data and one for the filter mask:
// port A serves the register interface (write and read-back), port B the
// filter check.  Asynchronous reads are this design's choice, made so that a
// packet word can be matched in the cycle it arrives.
module pc_dp_ram #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output logic [WIDTH-1:0]         b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
  end

  assign a_rdata = mem[a_addr];
  assign b_rdata = mem[b_addr];

endmodule
