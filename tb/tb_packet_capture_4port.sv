// tb_packet_capture_4port: end-to-end test of the four-port capture design,
// at its default parameters.
//
// Acts as the host and as the four MAC receive queues and the input arbiter
// around the design.  The host erases the filters of ports 0 and 1 (all masks
// zero) and uploads to ports 2 and 3 the compiled filter for "TCP to
// 131.111.179.82 port 80 whose payload starts with GET" (Ethertype 0x0800,
// IPv4 with a 20-byte header, protocol 6, destination address, destination
// port, payload bytes), all through one register ring.  Each port then
// receives a random mix of Ethernet frames: matching requests, and frames
// that differ in one field (address, port, protocol, Ethertype, IP options,
// payload), plus runts shorter than the 64-byte window.  Whether a frame must
// be captured is decided here from its protocol fields, not from the filter
// words.  Captured frames must leave with destination MAC FF:FF:FF:FF:FF:FE
// and destination port DMA p (one-hot bit 2p+1), or the run-time
// exception_port when it is set; other frames unchanged.  The next modules
// stall at random.  At the end the PORT_NUM_HITS counters are read through
// the ring, a filter word is read back, and a counter is cleared.
// Every mechanism (capture, pass, FIFO-full back-pressure, output stall,
// runt decision, exception_port override, default port, register ring
// pass-through) is counted, and one that never happened is a failure.
module tb_packet_capture_4port;
  import pc_pkg::*;

  localparam int NP = 4;
  localparam logic [REG_TAG_W-1:0] BASE = 17'h00010;

  logic clk = 1'b0, reset = 1'b1;
  logic [DATA_W-1:0] in_data [NP], out_data [NP];
  logic [CTRL_W-1:0] in_ctrl [NP], out_ctrl [NP];
  logic in_wr [NP], in_rdy [NP], out_wr [NP], out_rdy [NP];
  logic [PORT_W-1:0] exception_port [NP];
  reg_bus_t reg_in, reg_out;

  packet_capture_4port dut (.*);

  int checks = 0, failures = 0;
  int n_capt [NP], n_pass [NP], n_full [NP], n_stall [NP];
  int n_runt = 0, n_override = 0, n_default = 0, n_ring = 0;
  pkt_word_t exp_q [NP][$];
  bit        traffic_done [NP];

  // Filter compiled for ip.dest=131.111.179.82 tcp.dport=80 tcp.data=GET
  localparam logic [DATA_W-1:0] FDATA [8] = '{
    64'h0000000000000000, 64'h0000000008004500, 64'h0000000000000006,
    64'h000000000000836F, 64'hB352000000500000, 64'h0000000000000000,
    64'h0000000000004745, 64'h5400000000000000};
  localparam logic [DATA_W-1:0] FMASK [8] = '{
    64'h0000000000000000, 64'h00000000FFFFFF00, 64'h00000000000000FF,
    64'h000000000000FFFF, 64'hFFFF0000FFFF0000, 64'h0000000000000000,
    64'h000000000000FFFF, 64'hFF00000000000000};

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

  // ---------------- register ring master ----------------
  task automatic reg_access(input int port, input reg_off_e off, input bit rd,
                            input logic [31:0] wdata, output logic [31:0] rdata);
    int lat;
    @(negedge clk);
    reg_in = '{req: 1'b1, ack: 1'b0, rd_wr_L: rd,
               addr: {BASE + REG_TAG_W'(port), off}, data: wdata, src: 2'd1};
    @(negedge clk);
    reg_in = '0;
    lat = 1;
    while (!reg_out.req && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    check(lat == NP, "register ring latency");
    check(reg_out.ack, "register ack");
    if (port != 0) n_ring++;
    rdata = reg_out.data;
  endtask

  task automatic upload(input int port, input logic [DATA_W-1:0] d [8],
                        input logic [DATA_W-1:0] m [8]);
    logic [31:0] v;
    for (int i = 0; i < 8; i++) begin
      reg_access(port, REG_ENTRY_DATA_HI, 0, d[i][63:32], v);
      reg_access(port, REG_ENTRY_DATA_LO, 0, d[i][31:0], v);
      reg_access(port, REG_ENTRY_MASK_HI, 0, m[i][63:32], v);
      reg_access(port, REG_ENTRY_MASK_LO, 0, m[i][31:0], v);
      reg_access(port, REG_WR_ADDR, 0, 32'(i), v);
    end
  endtask

  // ---------------- frames ----------------
  // Builds an Ethernet/IPv4/TCP frame; `variant` 0 is a matching request,
  // 1..7 each break one field, 8 is a runt.
  function automatic void make_frame(input int variant, output byte unsigned f [],
                                     output bit should_match);
    int len, ihl, doff, pay;
    byte unsigned dst_ip [4] = '{131, 111, 179, 82};
    ihl  = (variant == 5) ? 6 : 5;           // IP options shift everything
    len  = (variant == 8) ? $urandom_range(48, 16) : $urandom_range(200, 60);
    f = new[len];
    foreach (f[i]) f[i] = 8'($urandom);
    if (len < 60) ;                          // runt: leave it random
    else begin
      f[12] = 8'h08; f[13] = (variant == 4) ? 8'hDD : 8'h00;
      if (variant == 4) f[12] = 8'h86;
      f[14] = 8'(8'h40 | ihl);
      f[23] = (variant == 3) ? 8'd17 : 8'd6;
      for (int i = 0; i < 4; i++) f[30+i] = dst_ip[i];
      if (variant == 1) f[33] = 8'd83;
      doff = 14 + 4*ihl;                     // TCP header
      if (doff + 4 <= len) begin
        f[doff+2] = 8'd0; f[doff+3] = (variant == 2) ? 8'd81 : 8'd80;
      end
      pay = doff + 20;
      if (pay + 3 <= len) begin
        f[pay] = "G"; f[pay+1] = "E"; f[pay+2] = (variant == 6) ? "E" : "T";
      end
      if (variant == 7) f[31] = 8'd112;
    end
    // expected classification from the protocol fields
    should_match = (len >= 60) && f[12] == 8'h08 && f[13] == 8'h00 && f[14] == 8'h45 &&
                   f[23] == 8'd6 && f[30] == 131 && f[31] == 111 && f[32] == 179 &&
                   f[33] == 82 && f[36] == 0 && f[37] == 80 &&
                   f[54] == "G" && f[55] == "E" && f[56] == "T";
  endfunction

  task automatic run_port(input int p, input int nframes, input bit filtered);
    for (int k = 0; k < nframes; k++) begin
      byte unsigned f [];
      bit m, capt;
      int nw, variant;
      pkt_word_t hdr;
      logic [DATA_W-1:0] w [];
      logic [PORT_W-1:0] dstp;
      variant = ($urandom_range(2) == 0) ? 0 : $urandom_range(8);
      make_frame(variant, f, m);
      capt = filtered && m;
      if (variant == 8) n_runt++;
      nw = (f.size() + 7) / 8;
      w = new[nw];
      foreach (w[i]) begin
        w[i] = '0;
        for (int b = 0; b < 8; b++)
          if (8*i + b < f.size()) w[i][63 - 8*b -: 8] = f[8*i + b];
      end
      hdr.ctrl = IO_QUEUE_STAGE_NUM;
      hdr.data = {16'h0000, 16'(nw), 16'(1 << (2*p)), 16'(f.size())};
      // run-time capture destination: sometimes overridden
      @(negedge clk);
      exception_port[p] = ($urandom_range(3) == 0) ? 16'(1 << (2*((p+1) % NP) + 1)) : 16'h0;
      dstp = (exception_port[p] != 0) ? exception_port[p] : 16'(1 << (2*p + 1));
      if (capt) begin
        n_capt[p]++;
        if (exception_port[p] != 0) n_override++; else n_default++;
      end else n_pass[p]++;
      exp_q[p].push_back(capt ? '{ctrl: hdr.ctrl, data: {dstp, hdr.data[47:0]}} : hdr);
      foreach (w[i]) begin
        pkt_word_t e;
        e.ctrl = (i == nw-1) ? 8'(8'h80 >> ((f.size() - 1) % 8)) : 8'h00;
        e.data = w[i];
        if (capt && i == 0) e.data[63:16] = 48'hFFFF_FFFF_FFFE;
        exp_q[p].push_back(e);
      end
      for (int i = -1; i < nw; i++) begin
        #1;   // in_rdy follows out_rdy, which changes at the falling edge
        while (!in_rdy[p] || $urandom_range(9) == 0) begin
          in_wr[p] = 0;
          @(negedge clk);
          #1;
        end
        in_wr[p]   = 1;
        in_ctrl[p] = (i < 0) ? hdr.ctrl : ((i == nw-1) ? 8'(8'h80 >> ((f.size() - 1) % 8)) : 8'h00);
        in_data[p] = (i < 0) ? hdr.data : w[i];
        @(negedge clk);
      end
      in_wr[p] = 0;
      // keep exception_port stable until the frame has left
      while (exp_q[p].size() != 0) @(negedge clk);
    end
    traffic_done[p] = 1;
  endtask

  // ---------------- monitors ----------------
  for (genvar p = 0; p < NP; p++) begin : g_mon
    always @(posedge clk) if (!reset) begin
      if (!in_rdy[p]) n_full[p]++;
      if (!out_rdy[p]) n_stall[p]++;
      if (out_wr[p]) begin
        pkt_word_t e;
        check(out_rdy[p], "out_wr only when out_rdy");
        check(exp_q[p].size() != 0, "unexpected output word");
        e = exp_q[p].pop_front();
        check(out_ctrl[p] == e.ctrl && out_data[p] == e.data, $sformatf("port %0d output word", p));
      end
    end
    always @(negedge clk) out_rdy[p] <= ($urandom_range(2) != 0);
  end

  initial begin
    logic [DATA_W-1:0] zero [8];
    logic [31:0] v;
    foreach (zero[i]) zero[i] = '0;
    for (int p = 0; p < NP; p++) begin
      in_wr[p] = 0; in_ctrl[p] = 0; in_data[p] = 0; exception_port[p] = 0;
      n_capt[p] = 0; n_pass[p] = 0; n_full[p] = 0; n_stall[p] = 0; traffic_done[p] = 0;
    end
    reg_in = '0;
    repeat (3) @(posedge clk);
    reset = 0;
    // erase ports 0 and 1, upload to ports 2 and 3
    upload(0, zero, zero);
    upload(1, zero, zero);
    upload(2, FDATA, FMASK);
    upload(3, FDATA, FMASK);
    // read back word 4 of port 3
    reg_access(3, REG_RD_ADDR, 0, 32'd4, v);
    reg_access(3, REG_ENTRY_DATA_HI, 1, 0, v); check(v == FDATA[4][63:32], "readback data hi");
    reg_access(3, REG_ENTRY_MASK_LO, 1, 0, v); check(v == FMASK[4][31:0],  "readback mask lo");
    fork
      run_port(0, 60, 0);
      run_port(1, 60, 0);
      run_port(2, 120, 1);
      run_port(3, 120, 1);
    join
    repeat (5) @(posedge clk);
    for (int p = 0; p < NP; p++) begin
      reg_access(p, REG_PORT_NUM_HITS, 1, 0, v);
      check(v == 32'(n_capt[p]), $sformatf("PORT_NUM_HITS port %0d", p));
      check(exp_q[p].size() == 0, "all words delivered");
    end
    reg_access(2, REG_PORT_NUM_HITS, 0, 0, v);
    reg_access(2, REG_PORT_NUM_HITS, 1, 0, v); check(v == 0, "PORT_NUM_HITS cleared");
    // mechanisms
    check(n_capt[2] > 0 && n_capt[3] > 0, "captures on filtered ports");
    check(n_capt[0] == 0 && n_capt[1] == 0, "no captures on erased ports");
    check(n_pass[2] > 0, "frames passed on filtered ports");
    check(n_full[2] + n_full[3] > 0, "FIFO-full back-pressure");
    check(n_stall[2] > 0, "output stall");
    check(n_runt > 0, "runt frames");
    check(n_override > 0, "exception_port override");
    check(n_default > 0, "default capture port");
    check(n_ring > 0, "register ring pass-through");
    $display("captured %0d/%0d/%0d/%0d passed %0d/%0d/%0d/%0d runts %0d override %0d default %0d",
             n_capt[0], n_capt[1], n_capt[2], n_capt[3], n_pass[0], n_pass[1], n_pass[2], n_pass[3],
             n_runt, n_override, n_default);
    $display("fifo-full cycles %0d/%0d/%0d/%0d, ring accesses via other blocks %0d",
             n_full[0], n_full[1], n_full[2], n_full[3], n_ring);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
