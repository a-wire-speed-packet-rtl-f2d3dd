// pc_regs: register interface of one packet capture filter.
//
// Sits on a daisy-chained register bus: every request enters on `reg_in` and
// leaves one clock later on `reg_out`.  A request that is not yet
// acknowledged and whose address tag (bits above the 6-bit offset) equals
// BLOCK_TAG is served here: it leaves with `ack` set and, for a read, with
// the register value in `data`.  Everything else passes through unchanged.
//
// Registers (offset: name):
//   0 FILTER_TABLE_ENTRY_DATA_HI  1 FILTER_TABLE_ENTRY_DATA_LO
//   2 FILTER_TABLE_ENTRY_MASK_HI  3 FILTER_TABLE_ENTRY_MASK_LO
//   4 FILTER_TABLE_WR_ADDR        5 FILTER_TABLE_RD_ADDR
//   6 PORT_NUM_HITS
// The four ENTRY registers are staging registers.  Writing an index to
// WR_ADDR copies the staged data and mask into filter_data[i] and
// filter_mask[i] and sets filter_valid[i].  Writing an index to RD_ADDR loads
// the staging registers from entry i, to be read back.  PORT_NUM_HITS counts
// matched packets (`hit_inc`) and is set to the written value on a write.
// The two filter RAMs (pc_dp_ram, 8 x 64) live here; their second read port
// is brought out for the filter check.  filter_valid is cleared by reset; the
// RAMs are not.
//
// The register names, the five-write upload sequence, the read-back sequence,
// the valid flags and the hit counter follow the design description.  The
// bus timing, the address split, the register offsets and the value 0 read
// from unused offsets are this design's choices, modelled on the NetFPGA
// register ring.
module pc_regs
  import pc_pkg::*;
#(
  parameter logic [REG_TAG_W-1:0] BLOCK_TAG = 17'h00010
) (
  input  logic                  clk,
  input  logic                  reset,
  input  reg_bus_t              reg_in,
  output reg_bus_t              reg_out,
  // Filter lookup for the matcher
  input  logic [WORD_IDX_W-1:0] match_addr,
  output logic [DATA_W-1:0]     match_data,
  output logic [DATA_W-1:0]     match_mask,
  output logic                  match_valid,
  // One matched packet
  input  logic                  hit_inc,
  output logic [REG_DATA_W-1:0] num_hits
);

  logic [DATA_W-1:0]       entry_data, entry_mask;
  logic [WORD_IDX_W-1:0]   wr_addr_q, rd_addr_q;
  logic [FILTER_WORDS-1:0] filter_valid;
  logic [REG_DATA_W-1:0]   hits_q;

  logic                    sel, do_wr, do_rd;
  logic [REG_OFF_W-1:0]    off;
  logic                    table_we;
  logic [WORD_IDX_W-1:0]   table_addr;
  logic [DATA_W-1:0]       table_data_q, table_mask_q;
  logic [REG_DATA_W-1:0]   rd_value;

  assign sel   = reg_in.req && !reg_in.ack &&
                 (reg_in.addr[REG_ADDR_W-1:REG_OFF_W] == BLOCK_TAG);
  assign off   = reg_in.addr[REG_OFF_W-1:0];
  assign do_wr = sel && !reg_in.rd_wr_L;
  assign do_rd = sel &&  reg_in.rd_wr_L;

  assign table_we   = do_wr && (off == REG_WR_ADDR);
  assign table_addr = reg_in.data[WORD_IDX_W-1:0];

  pc_dp_ram #(.WIDTH(DATA_W), .DEPTH(FILTER_WORDS)) u_filter_data (
    .clk     (clk),
    .a_we    (table_we),
    .a_addr  (table_addr),
    .a_wdata (entry_data),
    .a_rdata (table_data_q),
    .b_addr  (match_addr),
    .b_rdata (match_data)
  );

  pc_dp_ram #(.WIDTH(DATA_W), .DEPTH(FILTER_WORDS)) u_filter_mask (
    .clk     (clk),
    .a_we    (table_we),
    .a_addr  (table_addr),
    .a_wdata (entry_mask),
    .a_rdata (table_mask_q),
    .b_addr  (match_addr),
    .b_rdata (match_mask)
  );

  assign match_valid = filter_valid[match_addr];
  assign num_hits    = hits_q;

  always_comb begin
    unique case (off)
      REG_ENTRY_DATA_HI: rd_value = entry_data[63:32];
      REG_ENTRY_DATA_LO: rd_value = entry_data[31:0];
      REG_ENTRY_MASK_HI: rd_value = entry_mask[63:32];
      REG_ENTRY_MASK_LO: rd_value = entry_mask[31:0];
      REG_WR_ADDR:       rd_value = REG_DATA_W'(wr_addr_q);
      REG_RD_ADDR:       rd_value = REG_DATA_W'(rd_addr_q);
      REG_PORT_NUM_HITS: rd_value = hits_q;
      default:           rd_value = '0;
    endcase
  end

  // Staging registers, addresses, valid flags
  always_ff @(posedge clk) begin
    if (reset) begin
      entry_data   <= '0;
      entry_mask   <= '0;
      wr_addr_q    <= '0;
      rd_addr_q    <= '0;
      filter_valid <= '0;
    end else if (do_wr) begin
      case (off)
        REG_ENTRY_DATA_HI: entry_data[63:32] <= reg_in.data;
        REG_ENTRY_DATA_LO: entry_data[31:0]  <= reg_in.data;
        REG_ENTRY_MASK_HI: entry_mask[63:32] <= reg_in.data;
        REG_ENTRY_MASK_LO: entry_mask[31:0]  <= reg_in.data;
        REG_WR_ADDR: begin
          wr_addr_q                <= table_addr;
          filter_valid[table_addr] <= 1'b1;
        end
        REG_RD_ADDR: begin
          rd_addr_q  <= table_addr;
          entry_data <= table_data_q;
          entry_mask <= table_mask_q;
        end
        default: ;
      endcase
    end
  end

  // Hit counter: a register write sets it, otherwise it counts matches.
  always_ff @(posedge clk) begin
    if (reset)                                  hits_q <= '0;
    else if (do_wr && off == REG_PORT_NUM_HITS) hits_q <= reg_in.data;
    else if (hit_inc)                           hits_q <= hits_q + 1'b1;
  end

  // Bus stage
  always_ff @(posedge clk) begin
    if (reset) begin
      reg_out <= '0;
    end else begin
      reg_out     <= reg_in;
      if (sel) begin
        reg_out.ack <= 1'b1;
        if (do_rd) reg_out.data <= rd_value;
      end
    end
  end

endmodule
