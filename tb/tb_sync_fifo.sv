// tb_sync_fifo: random traffic against a queue model for the command and
// response FIFO.
//
// A 16-deep FIFO (programmable-full room 4, programmable-empty level 3) gets
// 3000 clocks of random writes and reads, never writing when full nor reading
// when empty. Every clock the bench compares the first-word-fall-through
// output, the fill count, full, empty, prog_full and prog_empty with the
// model; it also checks that the FIFO was seen full and that the synchronous
// reset empties it.
module tb_sync_fifo;
  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0, srst = 0, wr_en = 0, rd_en = 0;
  logic [31:0] wdata = 0, rdata;
  logic full, empty, prog_full, prog_empty;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  int saw_full = 0;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH), .PROG_FULL_ROOM(4), .PROG_EMPTY_LEVEL(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check(int'(count) == q.size(), "count");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      check(prog_full == (DEPTH - q.size() < 4), "prog_full");
      check(prog_empty == (q.size() < 3), "prog_empty");
      if (q.size() > 0) check(rdata == q[0], "first word falls through");
      if (full) saw_full++;
      // bias towards filling in the first half, draining in the second
      wr_en = !full && ($urandom_range(99) < (t < 1500 ? 70 : 30));
      rd_en = !empty && ($urandom_range(99) < (t < 1500 ? 30 : 70));
      wdata = $urandom;
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wdata);
      #1 wr_en = 0; rd_en = 0;
    end
    check(saw_full > 0, "the FIFO filled up at least once");
    // fill a little, then reset
    @(negedge clk); wr_en = 1; wdata = 32'hDEAD_BEEF;
    @(negedge clk); wr_en = 0;
    srst = 1; @(negedge clk); srst = 0;
    check(empty && count == 0, "synchronous reset empties the FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
