// tb_pc_filter_check: self-checking test of the per-packet match decision.
//
// The filter table is modelled by arrays read at the block's in_word_num.
// Random packets (one or two module headers, 2 to 20 data words, a non-zero
// control word on the last one) are sent with random idle cycles.  For each
// packet a new random filter is drawn, built from the packet's own words so
// that matches, mismatches, zero masks and invalid entries all occur.  The
// expected per-word hit/miss, the cycle of the single decision (eighth data
// word, or the last word of a shorter packet, which is never captured) and
// the decision itself are
// computed from the packet and the filter, independently of the block.
module tb_pc_filter_check;
  import pc_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic in_wr;
  logic [CTRL_W-1:0] in_ctrl;
  logic [DATA_W-1:0] in_data;
  logic [WORD_IDX_W-1:0] in_word_num;
  logic [DATA_W-1:0] filter_data, filter_mask;
  logic filter_valid;
  logic dec_valid, dec_match, filter_hit, filter_miss;

  logic [DATA_W-1:0] tdata [8], tmask [8];
  logic              tvalid [8];

  assign filter_data  = tdata[in_word_num];
  assign filter_mask  = tmask[in_word_num];
  assign filter_valid = tvalid[in_word_num];

  int checks = 0, failures = 0;
  int n_match = 0, n_nomatch = 0, n_short = 0, n_hits = 0, n_misses = 0;

  pc_filter_check dut (.*);

  always #4 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_word(input logic [CTRL_W-1:0] c, input logic [DATA_W-1:0] d,
                           input bit exp_dec, input bit exp_match,
                           input bit exp_hit, input bit exp_miss);
    while ($urandom_range(3) == 0) begin
      @(negedge clk);
      in_wr = 0; in_ctrl = $urandom; in_data = {$urandom, $urandom};
      #1;
      check(!dec_valid && !filter_hit && !filter_miss, "idle cycle quiet");
    end
    @(negedge clk);
    in_wr = 1; in_ctrl = c; in_data = d;
    #1;
    check(dec_valid == exp_dec, "decision timing");
    if (exp_dec) check(dec_match == exp_match, "decision value");
    check(filter_hit == exp_hit, "filter_hit");
    check(filter_miss == exp_miss, "filter_miss");
  endtask

  initial begin
    logic [DATA_W-1:0] pkt [];
    int n, nhdr, win;
    bit any_hit, any_miss, match, h, m;
    in_wr = 0; in_ctrl = 0; in_data = 0;
    foreach (tvalid[i]) begin tvalid[i] = 0; tdata[i] = 0; tmask[i] = 0; end
    repeat (3) @(posedge clk);
    reset = 0;
    for (int p = 0; p < 1500; p++) begin
      n = ($urandom_range(4) == 0) ? $urandom_range(7, 2) : $urandom_range(20, 8);
      pkt = new[n];
      foreach (pkt[i]) pkt[i] = {$urandom, $urandom};
      // a filter derived from this packet
      for (int i = 0; i < 8; i++) begin
        int kind;
        kind = $urandom_range(9);
        tvalid[i] = (kind != 0);
        tmask[i]  = (kind >= 1 && kind <= 3) ? 64'h0 : {$urandom, $urandom};
        tdata[i]  = (i < n ? pkt[i] : {$urandom, $urandom}) & tmask[i];
        if (kind == 9) tdata[i][$urandom_range(63)] ^= 1'b1;   // force a mismatch
      end
      // expected decision
      win = (n < 8) ? n : 8;
      any_hit = 0; any_miss = 0;
      for (int i = 0; i < win; i++)
        if (tvalid[i] && tmask[i] != 0) begin
          if ((pkt[i] & tmask[i]) == tdata[i]) any_hit = 1; else any_miss = 1;
        end
      match = any_hit && !any_miss && (n >= 8);
      if (match) n_match++; else n_nomatch++;
      if (n < 8) n_short++;
      // send
      nhdr = $urandom_range(2, 1);
      send_word(IO_QUEUE_STAGE_NUM, {$urandom, $urandom}, 0, 0, 0, 0);
      if (nhdr == 2) send_word(8'h42, {$urandom, $urandom}, 0, 0, 0, 0);
      for (int i = 0; i < n; i++) begin
        h = 0; m = 0;
        if (i < 8 && tvalid[i] && tmask[i] != 0) begin
          h = ((pkt[i] & tmask[i]) == tdata[i]);
          m = !h;
        end
        n_hits += h; n_misses += m;
        send_word((i == n-1) ? 8'(1 << $urandom_range(7)) : 8'h00, pkt[i],
                  (i == win-1), match, h, m);
      end
    end
    @(negedge clk);
    in_wr = 0;
    check(n_match > 100 && n_nomatch > 100, "both outcomes exercised");
    check(n_short > 100, "short packets exercised");
    $display("matched %0d, not matched %0d, short %0d, word hits %0d, word misses %0d",
             n_match, n_nomatch, n_short, n_hits, n_misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
