// tb_fifo_logic: checks command assembly and packet splitting.
//
// The command FIFO and response FIFO are modelled by queues in the bench.
// Command side: 20 random 36-byte commands are cut into 9 words each and
// offered with random gaps; each assembled command must equal the original,
// in order, and must stay valid until popped (the bench pops after a random
// delay). Packet side: 10 random 64-byte packets are handed over; the words
// written to the response FIFO, under random full back-pressure, must be the
// 16 words of each packet, first word = top bits. Finally a reset in the
// middle of a command must drop the partial words so the next command
// arrives intact.
module tb_fifo_logic;
  import danna_pkg::*;

  logic clk = 0, rst_n = 0, srst = 0;
  logic [31:0] cf_rdata;
  logic cf_empty, cf_rd_en;
  logic rf_wr_en, rf_full = 0;
  logic [31:0] rf_wdata;
  logic cmd_valid, cmd_pop = 0;
  cmd_t cmd;
  logic pkt_valid = 0, pkt_ready;
  pkt_t pkt = '0;
  int checks = 0, failures = 0;

  fifo_logic dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  logic [31:0] cq [$];     // command FIFO model
  logic [31:0] rq [$];     // words written to the response FIFO
  bit          gate = 1;   // random gaps in the command FIFO

  assign cf_empty = (cq.size() == 0) || !gate;
  assign cf_rdata = (cq.size() != 0) ? cq[0] : 32'h0;

  // Bench-side FIFO models: inputs change after the falling edge, the DUT's
  // requests are sampled just before the rising edge and applied after it.
  initial begin
    bit r, w;
    logic [31:0] d;
    forever begin
      @(negedge clk);
      gate    = ($urandom_range(3) != 0);
      rf_full = ($urandom_range(3) == 0);
      #4;
      r = cf_rd_en; w = rf_wr_en; d = rf_wdata;
      @(posedge clk); #1;
      if (r) void'(cq.pop_front());
      if (w) rq.push_back(d);
    end
  end

  function automatic cmd_t rand_cmd();
    cmd_t c;
    for (int i = 0; i < CMD_WORDS; i++) c[i*32 +: 32] = $urandom;
    return c;
  endfunction

  cmd_t sent [20];
  pkt_t pk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- commands --------------------------------------------------------
    for (int k = 0; k < 20; k++) begin
      sent[k] = rand_cmd();
      for (int i = CMD_WORDS - 1; i >= 0; i--) cq.push_back(sent[k][i*32 +: 32]);
    end
    for (int k = 0; k < 20; k++) begin
      int guard = 0;
      while (!cmd_valid && guard < 1000) begin @(negedge clk); guard++; end
      check(cmd_valid, "command assembled");
      repeat ($urandom_range(5)) begin
        @(negedge clk);
        check(cmd_valid, "command stays valid until popped");
      end
      check(cmd == sent[k], $sformatf("command %0d reassembled in order", k));
      cmd_pop = 1; @(negedge clk); cmd_pop = 0;
    end
    // ---- packets ---------------------------------------------------------
    for (int k = 0; k < 10; k++) begin
      for (int i = 0; i < PKT_WORDS; i++) pk[i*32 +: 32] = $urandom;
      while (!pkt_ready) @(negedge clk);
      pkt = pk; pkt_valid = 1; @(negedge clk); pkt_valid = 0;
      while (!pkt_ready) @(negedge clk);
      check(rq.size() == PKT_WORDS, "16 words per packet");
      for (int i = 0; i < PKT_WORDS && rq.size() > 0; i++) begin
        check(rq.pop_front() == pk[(PKT_WORDS-1-i)*32 +: 32], "packet word order");
      end
      rq.delete();
    end
    // ---- reset drops a partial command -----------------------------------
    cq.push_back(32'h1111_1111); cq.push_back(32'h2222_2222);
    repeat (10) @(negedge clk);
    check(cq.size() == 0 && !cmd_valid, "partial command held back");
    srst = 1; @(negedge clk); srst = 0;
    sent[0] = rand_cmd();
    for (int i = CMD_WORDS - 1; i >= 0; i--) cq.push_back(sent[0][i*32 +: 32]);
    repeat (60) @(negedge clk);
    check(cmd_valid && cmd == sent[0], "command after reset is aligned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
