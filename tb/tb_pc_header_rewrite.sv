// tb_pc_header_rewrite: self-checking test of the output stage.
//
// The FIFO and the decision queue in front of the block are modelled by
// SystemVerilog queues.  Random packets are pushed word by word at random
// times; each packet's capture decision is pushed after a random number of
// its words, so the block must sometimes hold a packet's first word until
// its decision arrives.  The next module's ready signal and the run-time
// exception_port (sometimes zero, selecting the default) change at random.
// Every output word is compared with the expected one: unchanged for a
// packet that is not captured; for a captured one, destination port field
// of the 0xFF header replaced and destination MAC of the first data word
// replaced by the tag address.
module tb_pc_header_rewrite;
  import pc_pkg::*;

  localparam logic [MAC_W-1:0]  TAG  = 48'hFFFF_FFFF_FFFE;
  localparam logic [PORT_W-1:0] DEFP = 16'h0008;

  logic clk = 1'b0, reset = 1'b1;
  pkt_word_t fifo_word;
  logic fifo_empty, fifo_rd, dec_match, dec_empty, dec_rd;
  logic [PORT_W-1:0] exception_port;
  logic out_wr, out_rdy, rewriting;
  logic [CTRL_W-1:0] out_ctrl;
  logic [DATA_W-1:0] out_data;

  pkt_word_t fq [$];
  bit        dq [$];

  assign fifo_empty = (fq.size() == 0);
  assign fifo_word  = (fq.size() != 0) ? fq[0] : '0;
  assign dec_empty  = (dq.size() == 0);
  assign dec_match  = (dq.size() != 0) ? dq[0] : 1'b0;

  pc_header_rewrite #(.TAG_MAC(TAG), .DEFAULT_EXCEPTION_PORT(DEFP)) dut (.*);

  int checks = 0, failures = 0;
  int n_captured = 0, n_passed = 0, n_waits = 0, n_default = 0, n_stalls = 0;

  // expected stream: words, with packet index, word kind
  typedef struct {
    pkt_word_t w;
    bit        exc;
    bit        ioq_hdr;
    bit        word0;
  } exp_t;
  exp_t ex [$];

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

  // producer: packets into the FIFO model, decisions into the queue model
  int pending_dec_after [$];   // words-to-go before each packet's decision
  bit pending_dec_val [$];
  bit producer_done = 0;

  initial begin
    pkt_word_t words [$];
    exp_t e;
    int n, nh, k;
    bit exc;
    repeat (3) @(posedge clk);
    for (int p = 0; p < 600; p++) begin
      words.delete();
      nh  = $urandom_range(2, 1);
      n   = $urandom_range(12, 2);
      exc = $urandom_range(1);
      words.push_back('{ctrl: IO_QUEUE_STAGE_NUM, data: {$urandom, $urandom}});
      if (nh == 2) words.push_back('{ctrl: 8'h42, data: {$urandom, $urandom}});
      for (int i = 0; i < n; i++)
        words.push_back('{ctrl: (i == n-1) ? 8'(1 << $urandom_range(7)) : 8'h00,
                          data: {$urandom, $urandom}});
      foreach (words[i]) begin
        e.w = words[i]; e.exc = exc;
        e.ioq_hdr = (i == 0);
        e.word0   = (i == nh);
        ex.push_back(e);
      end
      k = $urandom_range((words.size() < 9) ? words.size() : 9, 1);   // decision after k words
      if (exc) n_captured++; else n_passed++;
      foreach (words[i]) begin
        while ($urandom_range(3) == 0) @(negedge clk);
        @(negedge clk);
        while (fq.size() >= 10) @(negedge clk);
        fq.push_back(words[i]);
        if (i == k-1) dq.push_back(exc);
      end
    end
    producer_done = 1;
  end

  // environment: ready and exception_port
  always @(negedge clk) begin
    out_rdy <= ($urandom_range(4) != 0);
    if ($urandom_range(40) == 0)
      exception_port <= ($urandom_range(2) == 0) ? 16'h0 : 16'(1 << $urandom_range(15));
  end

  // checker
  initial begin
    logic [DATA_W-1:0] d;
    exp_t e;
    out_rdy = 0; exception_port = 16'h0020;
    @(posedge clk); @(posedge clk);
    reset = 0;
    forever begin
      @(posedge clk);
      check(!out_wr || out_rdy, "out_wr only when out_rdy");
      if (!out_wr && out_rdy && fq.size() != 0) n_waits++;
      if (!out_rdy && fq.size() != 0) n_stalls++;
      if (out_wr) begin
        check(ex.size() != 0, "unexpected word");
        e = ex.pop_front();
        d = e.w.data;
        if (e.exc && e.ioq_hdr) begin
          d[63:48] = (exception_port != 0) ? exception_port : DEFP;
          if (exception_port == 0) n_default++;
        end
        if (e.exc && e.word0) d[63:16] = TAG;
        check(out_ctrl == e.w.ctrl, "out_ctrl");
        check(out_data == d, "out_data");
        check(rewriting == (e.exc && (e.ioq_hdr || e.word0)), "rewriting flag");
        check(fifo_rd && (dec_rd == e.ioq_hdr), "read strobes");
        #1;
        void'(fq.pop_front());
        if (e.ioq_hdr) void'(dq.pop_front());
      end
      if (producer_done && ex.size() == 0) break;
    end
    check(n_waits > 0, "first word waited for its decision");
    check(n_default > 0, "default port used");
    $display("captured %0d passed %0d waits %0d stalls %0d default-port %0d",
             n_captured, n_passed, n_waits, n_stalls, n_default);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
