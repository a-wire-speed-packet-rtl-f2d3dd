// tb_pc_small_fifo: self-checking test of the 72 x 10 fall-through FIFO.
//
// Random writes and reads (never a write to a full or a read from an empty
// FIFO, except a simultaneous read and write when full) are checked against a
// SystemVerilog queue: the head word, empty, full and the count are compared
// every cycle.  Phases with write-heavy and read-heavy traffic make the FIFO
// fill and drain completely several times.
module tb_pc_small_fifo;
  localparam int unsigned WIDTH = 72;
  localparam int unsigned DEPTH = 10;

  logic clk = 1'b0, reset = 1'b1;
  logic wr_en, rd_en;
  logic [WIDTH-1:0] din, dout;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;

  int checks = 0, failures = 0;
  int fulls = 0, empties = 0;
  logic [WIDTH-1:0] model [$];

  pc_small_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #4 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wr_pct;
    wr_en = 0; rd_en = 0; din = '0;
    repeat (3) @(posedge clk);
    reset = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      wr_pct = ((cyc / 200) % 2 == 0) ? 80 : 25;
      @(negedge clk);
      // compare outputs against the model
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(count == model.size(), "count");
      if (model.size() != 0) check(dout == model[0], "head word");
      if (full) fulls++;
      if (empty) empties++;
      rd_en = (model.size() != 0) && ($urandom_range(99) < 100 - wr_pct);
      wr_en = ($urandom_range(99) < wr_pct) && ((model.size() < DEPTH) || rd_en);
      din   = {$urandom, $urandom, $urandom};
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(din);
    end
    check(fulls > 0, "FIFO became full");
    check(empties > 0, "FIFO became empty");
    $display("FIFO full in %0d cycles, empty in %0d cycles", fulls, empties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
