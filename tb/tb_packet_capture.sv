// tb_packet_capture: end-to-end test of one capture instance.
//
// Uploads filters through the register bus (five writes per word), then
// streams random packets (some with a second, non-I/O-queue module header) through the module with random gaps upstream and a
// randomly stalling next module.  For every packet the expected output is
// worked out from the packet and the filter the test installed: the words
// unchanged, or, for a match, the 0xFF module header's destination port set
// to the capture port and the destination MAC set to FF:FF:FF:FF:FF:FE.
// Several filters are used in turn (one exact field; fields in three words
// copied from a template packet; all words erased).  Also checked: the
// latency (first word out 9 clocks after it came in, when the eighth data
// word follows back to back and the output is free; a packet shorter than
// eight data words is never captured and leaves one clock after its last
// word), that in_rdy never drops for back-to-back packets while the output
// is free (wire speed), that it drops when the FIFO fills behind a stalled
// output, and the PORT_NUM_HITS counter.
module tb_packet_capture;
  import pc_pkg::*;

  localparam logic [REG_TAG_W-1:0] TAG  = 17'h00010;
  localparam logic [PORT_W-1:0]    DEFP = 16'h0002;

  logic clk = 1'b0, reset = 1'b1;
  logic [DATA_W-1:0] in_data, out_data;
  logic [CTRL_W-1:0] in_ctrl, out_ctrl;
  logic in_wr, in_rdy, out_wr, out_rdy;
  logic [PORT_W-1:0] exception_port;
  reg_bus_t reg_in, reg_out;

  packet_capture dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_capt = 0, n_pass = 0, n_full = 0, n_short = 0, n_two_hdr = 0;

  logic [DATA_W-1:0] fdata [8], fmask [8];

  pkt_word_t exp_q [$];
  int        in_time_q [$];    // input cycle of each first word
  bit        stall_en = 1;
  bit        allow_two_hdr = 0;
  int        lat_seen [$];

  always #4 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reg_access(input reg_off_e off, input bit rd, input logic [31:0] wdata,
                            output logic [31:0] rdata);
    @(negedge clk);
    reg_in = '{req: 1'b1, ack: 1'b0, rd_wr_L: rd, addr: {TAG, off}, data: wdata, src: 2'd0};
    @(negedge clk);
    reg_in = '0;
    check(reg_out.ack, "register ack");
    rdata = reg_out.data;
  endtask

  task automatic upload(input logic [DATA_W-1:0] d [8], input logic [DATA_W-1:0] m [8]);
    logic [31:0] v;
    for (int i = 0; i < 8; i++) begin
      reg_access(REG_ENTRY_DATA_HI, 0, d[i][63:32], v);
      reg_access(REG_ENTRY_DATA_LO, 0, d[i][31:0], v);
      reg_access(REG_ENTRY_MASK_HI, 0, m[i][63:32], v);
      reg_access(REG_ENTRY_MASK_LO, 0, m[i][31:0], v);
      reg_access(REG_WR_ADDR, 0, 32'(i), v);
      fdata[i] = d[i]; fmask[i] = m[i];
    end
  endtask

  // Builds a packet, queues the expected output, and sends it.
  task automatic send_packet(input logic [DATA_W-1:0] pkt [], input bit gaps);
    bit hit, miss, match, two_hdr;
    pkt_word_t w, h2;
    int n = pkt.size();
    hit = 0; miss = 0;
    for (int i = 0; i < n && i < 8; i++)
      if (fmask[i] != 0) begin
        if ((pkt[i] & fmask[i]) == fdata[i]) hit = 1; else miss = 1;
      end
    match = hit && !miss && (n >= 8);
    if (match) n_capt++; else n_pass++;
    if (n < 8) n_short++;
    two_hdr = allow_two_hdr && ($urandom_range(2) == 0);
    h2 = '{ctrl: 8'h42, data: {$urandom, $urandom}};
    if (two_hdr) n_two_hdr++;
    w.ctrl = IO_QUEUE_STAGE_NUM;
    w.data = {16'h0001, 16'(n + 1), 16'h0001, 16'(8 * n)};
    exp_q.push_back(match ? '{ctrl: w.ctrl, data: {DEFP, w.data[47:0]}} : w);
    if (two_hdr) exp_q.push_back(h2);
    for (int i = 0; i < n; i++) begin
      pkt_word_t e;
      e.ctrl = (i == n-1) ? 8'h80 : 8'h00;
      e.data = pkt[i];
      if (match && i == 0) e.data[63:16] = 48'hFFFF_FFFF_FFFE;
      exp_q.push_back(e);
    end
    // drive
    for (int i = (two_hdr ? -2 : -1); i < n; i++) begin
      @(negedge clk);
      #1;   // in_rdy follows out_rdy, which changes at the falling edge
      while (!in_rdy || (gaps && $urandom_range(5) == 0)) begin
        in_wr = 0;
        @(negedge clk);
        #1;
      end
      in_wr   = 1;
      if (i == -2 || (i == -1 && !two_hdr)) begin
        in_ctrl = w.ctrl; in_data = w.data;
        in_time_q.push_back(cycle);
      end else if (i == -1) begin
        in_ctrl = h2.ctrl; in_data = h2.data;
      end else begin
        in_ctrl = (i == n-1) ? 8'h80 : 8'h00;
        in_data = pkt[i];
      end
    end
    @(negedge clk);
    in_wr = 0;
  endtask

  // output monitor
  bit expect_sop = 1, seen_data = 0;
  always @(posedge clk) if (!reset) begin
    if (!in_rdy) n_full++;
    if (out_wr) begin
      pkt_word_t e;
      check(out_rdy, "out_wr only when out_rdy");
      check(exp_q.size() != 0, "unexpected output word");
      e = exp_q.pop_front();
      check(out_ctrl == e.ctrl && out_data == e.data, "output word");
      if (expect_sop) begin
        lat_seen.push_back(cycle - in_time_q.pop_front());
        expect_sop = 0;
        seen_data  = 0;
      end else if (out_ctrl == 0) seen_data = 1;
      else if (seen_data) expect_sop = 1;
    end
  end

  always @(negedge clk) out_rdy <= stall_en ? ($urandom_range(3) != 0) : 1'b1;

  task automatic random_pkt(output logic [DATA_W-1:0] pkt [], input int nmin, input int nmax);
    pkt = new[$urandom_range(nmax, nmin)];
    foreach (pkt[i]) pkt[i] = {$urandom, $urandom};
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    logic [DATA_W-1:0] d [8], m [8];
    logic [DATA_W-1:0] pkt [];
    logic [31:0] v;
    int expected_hits;
    in_wr = 0; in_ctrl = 0; in_data = 0; exception_port = 0; reg_in = '0;
    repeat (3) @(posedge clk);
    reset = 0;

    // Filter A: Ethertype 0x0800 in word 1, bits 31:16.
    foreach (d[i]) begin d[i] = 0; m[i] = 0; end
    d[1] = 64'h0000_0000_0800_0000; m[1] = 64'h0000_0000_FFFF_0000;
    upload(d, m);
    // latency: free output, back-to-back words
    stall_en = 0;
    repeat (3) @(negedge clk);
    random_pkt(pkt, 12, 12); pkt[1][31:16] = 16'h0800;
    send_packet(pkt, 0);
    drain();
    check(lat_seen[$] == 9, "latency of a long captured packet");
    random_pkt(pkt, 12, 12); pkt[1][31:16] = 16'h86DD;
    send_packet(pkt, 0);
    drain();
    check(lat_seen[$] == 9, "latency of a long passed packet");
    random_pkt(pkt, 4, 4); pkt[1][31:16] = 16'h0800;
    send_packet(pkt, 0);
    drain();
    check(lat_seen[$] == 5, "latency of a 4-word packet");
    // wire speed: free output, back-to-back packets, in_rdy must stay high
    allow_two_hdr = 1;
    n_full = 0;
    for (int p = 0; p < 40; p++) begin
      random_pkt(pkt, 2, 16);
      if ($urandom_range(1)) pkt[1][31:16] = 16'h0800;
      send_packet(pkt, 0);
    end
    drain();
    check(n_full == 0, "no back-pressure at wire speed with a free output");
    // random traffic, stalls
    stall_en = 1;
    for (int p = 0; p < 200; p++) begin
      random_pkt(pkt, 2, 16);
      if ($urandom_range(1)) pkt[1][31:16] = 16'h0800;
      send_packet(pkt, $urandom_range(1));
    end
    drain();
    expected_hits = n_capt;
    reg_access(REG_PORT_NUM_HITS, 1, 0, v);
    check(v == 32'(expected_hits), "PORT_NUM_HITS");

    // Filter B: random fields in words 0, 3, 7 taken from a template packet.
    random_pkt(pkt, 10, 10);
    foreach (d[i]) begin d[i] = 0; m[i] = 0; end
    m[0] = 64'h0000_FFFF_0000_0000; m[3] = 64'hFF00_0000_0000_00FF; m[7] = 64'h0000_0000_FFFF_FFFF;
    foreach (d[i]) d[i] = pkt[i] & m[i];
    upload(d, m);
    reg_access(REG_PORT_NUM_HITS, 0, 0, v);
    for (int p = 0; p < 200; p++) begin
      logic [DATA_W-1:0] q [];
      random_pkt(q, 2, 16);
      for (int i = 0; i < q.size() && i < 10; i++)
        if ($urandom_range(4) != 0) q[i] = pkt[i];
      send_packet(q, $urandom_range(1));
    end
    drain();
    reg_access(REG_PORT_NUM_HITS, 1, 0, v);
    check(v == 32'(n_capt - expected_hits), "PORT_NUM_HITS after filter B");

    // Filter C: erased (all masks zero) captures nothing.
    foreach (d[i]) begin d[i] = 0; m[i] = 0; end
    upload(d, m);
    for (int p = 0; p < 30; p++) begin
      random_pkt(pkt, 2, 16);
      send_packet(pkt, 1);
    end
    drain();

    check(n_full > 0, "in_rdy dropped (FIFO full)");
    check(n_short > 0, "short packets");
    check(n_two_hdr > 0, "packets with a second module header");
    check(n_capt > 50 && n_pass > 50, "captured and passed packets");
    $display("captured %0d passed %0d short %0d fifo-full cycles %0d",
             n_capt, n_pass, n_short, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
