// tb_pc_dp_ram: self-checking test of the 8 x 64 dual-port filter RAM.
//
// Writes random words through port A and checks, against a model array,
// that port A reads back the written word at its address and that port B
// reads any address independently in the same cycle, including an address
// that port A is writing (old value before the edge, new value after).
module tb_pc_dp_ram;
  localparam int unsigned WIDTH = 64;
  localparam int unsigned DEPTH = 8;

  logic clk = 1'b0;
  logic a_we;
  logic [2:0] a_addr, b_addr;
  logic [WIDTH-1:0] a_wdata, a_rdata, b_rdata;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];
  bit               written [DEPTH];

  pc_dp_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

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

  initial begin
    a_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    // fill every entry
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = 3'(i); a_wdata = {$urandom, $urandom};
      model[i] = a_wdata; written[i] = 1;
    end
    @(negedge clk);
    a_we = 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      a_addr  = 3'($urandom_range(DEPTH-1));
      b_addr  = ($urandom_range(3) == 0) ? a_addr : 3'($urandom_range(DEPTH-1));
      a_we    = $urandom_range(1);
      a_wdata = {$urandom, $urandom};
      #1;
      check(a_rdata == model[a_addr], "port A read");
      check(b_rdata == model[b_addr], "port B read");
      @(posedge clk);
      #1;
      if (a_we) model[a_addr] = a_wdata;
      check(b_rdata == model[b_addr], "port B read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
