// tb_slave_fifo_fsm: the FX3 slave FIFO state machine against the
// behavioural FX3 model (tb/fx3_model.sv).
//
// The command FIFO and the response FIFO are queues in the bench; the
// response FIFO's programmable-empty flag is "fewer than 16 words". TIMEOUT is
// shortened to 200 clocks.
//
// Checks, in order:
//  1. Host sends 300 random words: they arrive in three DMA buffers
//     (128 on socket 3, 128 on socket 1, 44 on socket 3) and every word lands
//     in the command FIFO in order; the model sees no protocol error.
//  2. Watermark wait: with the command FIFO's programmable-full flag set the
//     FSM parks in WAIT_WM (state 2) and writes nothing; it reads once the
//     flag drops.
//  3. Write path: 32 words in the response FIFO leave as two packets of 16
//     words with PKTEND# on the last word of each; nothing is written while
//     the FX3 reports no buffer ready (flag A low) or while fewer than 16
//     words wait.
//  4. Socket alternation: after a buffer from socket 1 a buffer offered on
//     socket 1 again is not read before TIMEOUT quiet clocks, then it is
//     (return to the neutral choice).
//  5. fifo_rst: after a buffer from socket 3 the FSM expects socket 1, but
//     after fifo_rst a buffer on socket 3 is read at once.
//  6. Read priority: with a read buffer and a full packet waiting at the same
//     time, the read comes first.
module tb_slave_fifo_fsm;
  import danna_pkg::*;

  localparam int TIMEOUT = 200;

  logic clk = 0, rst_n = 0, fifo_rst = 0;
  logic flag_a, flag_b, flag_c, flag_d, flag_e, flag_f;
  logic slcs_n, slrd_n, sloe_n, slwr_n, pktend_n, dq_oe;
  logic [1:0] addr;
  logic [31:0] dq_in, dq_out;
  logic cf_wr_en, cf_prog_full = 0;
  logic [31:0] cf_wdata;
  logic rf_rd_en, rf_empty, rf_prog_empty;
  logic [31:0] rf_rdata;
  logic [3:0] state_o;
  int checks = 0, failures = 0;

  slave_fifo_fsm #(.RD_LAT(2), .TIMEOUT(TIMEOUT)) dut (.*);

  fx3_model #(.BUF_WORDS(128), .RD_LAT(2)) fx (
    .clk, .flag_a, .flag_b, .flag_c, .flag_d, .flag_e, .flag_f,
    .slcs_n, .slrd_n, .sloe_n, .slwr_n, .pktend_n, .addr,
    .dq_to_fpga(dq_in), .dq_from_fpga(dq_out), .dq_oe);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // ---- FIFO models ---------------------------------------------------------
  logic [31:0] cq [$];     // command FIFO contents
  logic [31:0] rq [$];     // response FIFO contents
  int          first_cf_t = -1, first_wr_t = -1;
  assign rf_empty      = (rq.size() == 0);
  assign rf_prog_empty = (rq.size() < PKT_WORDS);
  assign rf_rdata      = (rq.size() > 0) ? rq[0] : 32'h0;

  initial begin
    bit w, r;
    logic [31:0] d;
    forever begin
      @(negedge clk); #4;
      w = cf_wr_en; d = cf_wdata; r = rf_rd_en;
      @(posedge clk); #1;
      if (w) begin
        cq.push_back(d);
        if (first_cf_t < 0) first_cf_t = $time;
      end
      if (r) begin
        void'(rq.pop_front());
        if (first_wr_t < 0) first_wr_t = $time;
      end
    end
  end

  logic [31:0] sent [];
  task automatic send_random(input int n);
    sent = new[n];
    foreach (sent[i]) sent[i] = $urandom;
    fx.host_send(sent);
  endtask

  task automatic wait_clocks(input int n);
    repeat (n) @(negedge clk);
  endtask

  int r3, r1, s_before;
  bit parked, wrote;

  initial begin
    wait_clocks(2);
    rst_n = 1;
    wait_clocks(2);

    // ---- 1. three buffers ------------------------------------------------
    send_random(300);
    wait_clocks(800);
    check(cq.size() == 300, "all 300 words reach the command FIFO");
    for (int i = 0; i < 300 && i < cq.size(); i++)
      if (cq[i] !== sent[i]) begin
        check(0, $sformatf("word %0d in order", i));
        break;
      end
    check(fx.reads_s3 == 172 && fx.reads_s1 == 128, "buffers split 128/128/44 over sockets 3 and 1");
    check(fx.bufs_s3 == 2 && fx.bufs_s1 == 1, "sockets alternate 3, 1, 3");
    check(fx.errors == 0, "no slave FIFO protocol error");
    check(state_o == 4'd0, "back in IDLE");
    cq.delete();

    // ---- 2. watermark wait -------------------------------------------------
    cf_prog_full = 1;
    send_random(20);            // goes to socket 1 (alternation)
    wait_clocks(50);
    check(state_o == 4'd2, "parked in WAIT_WM while the command FIFO lacks room");
    check(cq.size() == 0, "nothing written while parked");
    cf_prog_full = 0;
    wait_clocks(60);
    check(cq.size() == 20 && cq[0] == sent[0] && cq[19] == sent[19], "read resumes when room appears");
    cq.delete();

    // ---- 3. write path -------------------------------------------------------
    fx.p2u_ready = 0;
    for (int i = 0; i < 32; i++) rq.push_back(32'hA000_0000 + i);
    wait_clocks(50);
    check(fx.rx_words.size() == 0 && rq.size() == 32, "no write while flag A is low");
    fx.p2u_ready = 1;
    wait_clocks(100);
    check(fx.rx_pkts == 2, "two packets committed with PKTEND#");
    check(fx.rx_words.size() == 32, "32 words sent");
    for (int i = 0; i < 32 && i < fx.rx_words.size(); i++)
      if (fx.rx_words[i] != 32'hA000_0000 + i) begin
        check(0, $sformatf("response word %0d", i));
        break;
      end
    rq.push_back(32'hBEEF);
    wait_clocks(50);
    check(fx.rx_words.size() == 32 && rq.size() == 1, "no write with less than a packet waiting");
    rq.delete();
    fx.rx_words.delete();

    // ---- 4. alternation and time-out ---------------------------------------
    // Last read was socket 1; offer socket 1 again.
    wait_clocks(TIMEOUT + 20);  // let the choice go neutral first
    send_random(8);             // socket 3 by the model's alternation
    wait_clocks(40);
    check(cq.size() == 8, "buffer on socket 3 read");
    cq.delete();
    fx.next_is_s3 = 1;          // host misbehaves: socket 3 again
    r3 = fx.reads_s3;
    send_random(8);
    wait_clocks(TIMEOUT / 2);
    check(fx.reads_s3 == r3, "socket 3 not read while socket 1 is expected");
    wait_clocks(TIMEOUT + 20);
    check(fx.reads_s3 == r3 + 8 && cq.size() == 8, "socket 3 read after the time-out");
    cq.delete();

    // ---- 5. fifo_rst -----------------------------------------------------------
    wait_clocks(TIMEOUT + 20);
    fx.next_is_s3 = 1;
    send_random(4);             // socket 3 read; socket 1 expected afterwards
    wait_clocks(30);
    fifo_rst = 1; wait_clocks(1); fifo_rst = 0;
    check(state_o == 4'd0, "fifo_rst returns the FSM to IDLE");
    fx.next_is_s3 = 1;
    r3 = fx.reads_s3;
    send_random(4);
    wait_clocks(30);
    check(fx.reads_s3 == r3 + 4, "after fifo_rst any socket is taken");
    cq.delete();

    // ---- 6. read priority ------------------------------------------------------
    first_cf_t = -1; first_wr_t = -1;
    for (int i = 0; i < 16; i++) rq.push_back(i);
    send_random(4);
    wait_clocks(80);
    check(first_cf_t > 0 && first_wr_t > 0 && first_cf_t < first_wr_t, "read served before write");
    check(fx.rx_pkts == 3, "third packet sent afterwards");
    check(fx.errors == 0, "no protocol error at the end");

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
