// packet_capture_4port: per-port packet capture for a four-port NetFPGA.
//
// Four packet_capture instances, one in each MAC receive path between the
// MAC receive queue and the input arbiter, so that every physical port has
// its own filter.  Port p's instance captures to the host DMA interface p by
// default (one-hot port bit 2p+1 in the NetFPGA port numbering, where bit 2p
// is MAC p), unless `exception_port[p]` is non-zero.  The four register
// blocks sit one after another on a single register bus ring, at block tags
// BASE_TAG, BASE_TAG+1, BASE_TAG+2 and BASE_TAG+3; a request passes through
// all four and takes four clocks from `reg_in` to `reg_out`.
//
// The per-port placement, the per-port default DMA destination and four
// register blocks follow the design description; the port bit numbering and
// the block tags are this design's choices.  The MAC receive queues, the
// input arbiter and the host's register bus master are outside this module:
// their signals are the ports.
module packet_capture_4port
  import pc_pkg::*;
#(
  parameter int unsigned          NUM_PORTS = 4,
  parameter logic [MAC_W-1:0]     TAG_MAC   = 48'hFFFF_FFFF_FFFE,
  parameter logic [REG_TAG_W-1:0] BASE_TAG  = 17'h00010
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [DATA_W-1:0] in_data        [NUM_PORTS],
  input  logic [CTRL_W-1:0] in_ctrl        [NUM_PORTS],
  input  logic              in_wr          [NUM_PORTS],
  output logic              in_rdy         [NUM_PORTS],
  output logic [DATA_W-1:0] out_data       [NUM_PORTS],
  output logic [CTRL_W-1:0] out_ctrl       [NUM_PORTS],
  output logic              out_wr         [NUM_PORTS],
  input  logic              out_rdy        [NUM_PORTS],
  input  logic [PORT_W-1:0] exception_port [NUM_PORTS],
  input  reg_bus_t          reg_in,
  output reg_bus_t          reg_out
);

  reg_bus_t ring [NUM_PORTS+1];

  assign ring[0] = reg_in;
  assign reg_out = ring[NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    packet_capture #(
      .TAG_MAC                (TAG_MAC),
      .DEFAULT_EXCEPTION_PORT (PORT_W'(1) << (2*p + 1)),
      .BLOCK_TAG              (BASE_TAG + REG_TAG_W'(p))
    ) u_capture (
      .clk            (clk),
      .reset          (reset),
      .in_data        (in_data[p]),
      .in_ctrl        (in_ctrl[p]),
      .in_wr          (in_wr[p]),
      .in_rdy         (in_rdy[p]),
      .out_data       (out_data[p]),
      .out_ctrl       (out_ctrl[p]),
      .out_wr         (out_wr[p]),
      .out_rdy        (out_rdy[p]),
      .exception_port (exception_port[p]),
      .reg_in         (ring[p]),
      .reg_out        (ring[p+1])
    );
  end

endmodule
