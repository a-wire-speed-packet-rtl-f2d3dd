// tb_pc_regs: self-checking test of the filter register interface.
//
// Drives the register bus one request at a time and checks, one clock later,
// the request leaving on reg_out: acknowledged with read data when it is for
// this block, unchanged when it is for another block or already acknowledged.
// Uploads a random filter with the five-write sequence per word (four entry
// writes, then the word index to WR_ADDR), checks the matcher's read port and
// the valid flags against a model, reads every word back with RD_ADDR, and
// checks the PORT_NUM_HITS counter: counting hit pulses, and set by a write.
module tb_pc_regs;
  import pc_pkg::*;

  localparam logic [REG_TAG_W-1:0] TAG = 17'h00123;

  logic clk = 1'b0, reset = 1'b1;
  reg_bus_t reg_in, reg_out;
  logic [WORD_IDX_W-1:0] match_addr;
  logic [DATA_W-1:0] match_data, match_mask;
  logic match_valid, hit_inc;
  logic [REG_DATA_W-1:0] num_hits;

  pc_regs #(.BLOCK_TAG(TAG)) dut (.*);

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] mdata [8], mmask [8];
  bit                mvalid [8];

  always #4 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One bus request; returns what leaves the block one clock later.
  task automatic bus(input logic [REG_TAG_W-1:0] tag, input reg_off_e off,
                     input bit rd, input logic [31:0] wdata, input bit acked,
                     output reg_bus_t resp);
    reg_bus_t req;
    @(negedge clk);
    req = '{req: 1'b1, ack: acked, rd_wr_L: rd, addr: {tag, off}, data: wdata,
            src: 2'($urandom)};
    reg_in = req;
    @(negedge clk);
    resp = reg_out;
    reg_in = '0;
    check(resp.req && resp.rd_wr_L == req.rd_wr_L && resp.addr == req.addr &&
          resp.src == req.src, "request passed on");
    if (tag == TAG && !acked) check(resp.ack, "ack");
    else check(resp.ack == acked && resp.data == req.data, "foreign request unchanged");
  endtask

  task automatic wr(input reg_off_e off, input logic [31:0] v);
    reg_bus_t r;
    bus(TAG, off, 0, v, 0, r);
  endtask

  task automatic rd(input reg_off_e off, output logic [31:0] v);
    reg_bus_t r;
    bus(TAG, off, 1, 32'hA5A5_A5A5, 0, r);
    v = r.data;
  endtask

  initial begin
    logic [31:0] v;
    reg_bus_t r;
    int order [8];
    reg_in = '0; match_addr = 0; hit_inc = 0;
    repeat (3) @(posedge clk);
    reset = 0;
    // after reset no entry is valid
    for (int i = 0; i < 8; i++) begin
      match_addr = 3'(i); #1; check(!match_valid, "invalid after reset");
    end
    // upload five of the eight words, in random order
    foreach (order[i]) order[i] = i;
    order.shuffle();
    for (int j = 0; j < 5; j++) begin
      int i;
      i = order[j];
      mdata[i] = {$urandom, $urandom}; mmask[i] = {$urandom, $urandom}; mvalid[i] = 1;
      wr(REG_ENTRY_DATA_HI, mdata[i][63:32]);
      wr(REG_ENTRY_DATA_LO, mdata[i][31:0]);
      wr(REG_ENTRY_MASK_HI, mmask[i][63:32]);
      wr(REG_ENTRY_MASK_LO, mmask[i][31:0]);
      rd(REG_ENTRY_MASK_HI, v); check(v == mmask[i][63:32], "staging read");
      // a write for another block and an already acknowledged write change nothing
      bus(TAG + 1, REG_WR_ADDR, 0, 32'(order[7]), 0, r);
      bus(TAG, REG_WR_ADDR, 0, 32'(order[7]), 1, r);
      wr(REG_WR_ADDR, 32'(i));
      rd(REG_WR_ADDR, v); check(v == 32'(i), "WR_ADDR read");
    end
    for (int i = 0; i < 8; i++) begin
      match_addr = 3'(i); #1;
      check(match_valid == mvalid[i], "valid flag");
      if (mvalid[i]) check(match_data == mdata[i] && match_mask == mmask[i], "match port");
    end
    // read back in another order
    order.shuffle();
    foreach (order[j]) begin
      int i;
      i = order[j];
      if (!mvalid[i]) continue;
      wr(REG_RD_ADDR, 32'(i));
      rd(REG_RD_ADDR, v);       check(v == 32'(i), "RD_ADDR read");
      rd(REG_ENTRY_DATA_HI, v); check(v == mdata[i][63:32], "readback data hi");
      rd(REG_ENTRY_DATA_LO, v); check(v == mdata[i][31:0],  "readback data lo");
      rd(REG_ENTRY_MASK_HI, v); check(v == mmask[i][63:32], "readback mask hi");
      rd(REG_ENTRY_MASK_LO, v); check(v == mmask[i][31:0],  "readback mask lo");
    end
    // hit counter
    rd(REG_PORT_NUM_HITS, v); check(v == 0, "hits after reset");
    for (int k = 0; k < 13; k++) begin
      @(negedge clk); hit_inc = 1;
      @(negedge clk); hit_inc = 0;
    end
    rd(REG_PORT_NUM_HITS, v); check(v == 13 && num_hits == 13, "hits counted");
    wr(REG_PORT_NUM_HITS, 32'd0);
    rd(REG_PORT_NUM_HITS, v); check(v == 0, "hits cleared by write");
    wr(REG_PORT_NUM_HITS, 32'd100);
    @(negedge clk); hit_inc = 1;
    @(negedge clk); hit_inc = 0;
    rd(REG_PORT_NUM_HITS, v); check(v == 101, "hits count on from written value");
    rd(reg_off_e'(6'd40), v); check(v == 0, "unused offset reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
