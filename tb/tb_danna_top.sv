// tb_danna_top: end-to-end test of the whole FPGA design through its FX3
// pins, with a 4 x 5 array.
//
// The host side is the behavioural FX3 model (tb/fx3_model.sv): the bench
// writes 36-byte commands as 32-bit words (byte 0 in bits 31:24 of the first
// word), the model hands them to the FPGA in 512-byte DMA buffers on the two
// read sockets, and collects the 64-byte status packets the FPGA writes back.
// All checks are made on what the host would see: packets, plus the mode,
// time stamp and FSM state pins. Small FIFOs (command 256 words, response
// 32 words) and a socket time-out of 20,000 clocks (longer than any pause inside a run) make the flow-control
// paths reachable in a short run; the clock divider is the default (one
// network cycle = 192 clocks).
//
// Scenario:
//   A  a spike chain along row 0: external input 0 -> neuron (0,0) ->
//      synapse (0,1, distance 2) -> neuron (0,2) -> synapse (0,3) ->
//      neuron (0,4) -> external output 0; a synapse (1,2) watches neuron
//      (0,2) without ever firing itself. Run, Fire, eight no-ops, Halt.
//      Expected: one output packet with time stamp 6 carrying value 7 on
//      output 0, then the EOF packet with time stamp 9.
//   B  Capture and 64 Shifts read rows 0 and 1: fire counts, LTP on both
//      chain synapses (20->21, 15->16) and LTD on the watching one (30->29).
//   C  Step 5: EOF packet with time stamp 14.
//   D  Run with no command behind it: the network stalls (time stamp frozen).
//   E  Reset command: time stamp 0 and the configuration gone.
//   F  A self-firing neuron on external output 2 with the FX3 refusing data:
//      the response FIFO fills, the network stalls; when the FX3 accepts
//      again all packets arrive, two executed cycles apart (refractory
//      period), value 0xFF.
//   G  60 commands at once while halted: the command FIFO fills and the
//      FSM waits in WAIT_WM before reading the next buffer.
//   H  A buffer on the socket just used is only read after the time-out.
//   I  A partial command followed by fifo_rst is dropped; the next command
//      is executed correctly.
// Every mechanism is counted; one that never happened counts a failure.
module tb_danna_top;
  import danna_pkg::*;

  localparam int ROWS = 4, COLS = 5, TIMEOUT = 20_000;

  logic clk = 0, rst_n = 0, fifo_rst = 0;
  logic flag_a, flag_b, flag_c, flag_d, flag_e, flag_f;
  logic slcs_n, slrd_n, sloe_n, slwr_n, pktend_n, dq_oe;
  logic [1:0] fx3_addr;
  logic [31:0] dq_in, dq_out;
  logic gnc_clk, afc_clk, aec_clk, ac_clk;
  logic [1:0] mode;
  logic [63:0] timestamp;
  logic [3:0] fsm_state;
  int checks = 0, failures = 0;

  danna_top #(.ROWS(ROWS), .COLS(COLS), .CMD_DEPTH(256), .RSP_DEPTH(32),
              .TIMEOUT(TIMEOUT)) dut (.*);

  fx3_model #(.BUF_WORDS(128), .RD_LAT(2)) fx (
    .clk, .flag_a, .flag_b, .flag_c, .flag_d, .flag_e, .flag_f,
    .slcs_n, .slrd_n, .sloe_n, .slwr_n, .pktend_n, .addr(fx3_addr),
    .dq_to_fpga(dq_in), .dq_from_fpga(dq_out), .dq_oe);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // ---- mechanism counters ------------------------------------------------
  int mech [string];
  localparam int N_MECH = 22;
  string mech_list [N_MECH] = '{"load", "run", "fire", "ext_output", "chain", "halt", "noop",
                          "capture", "shift", "ltp", "ltd", "step", "stall_empty", "reset",
                          "refractory", "stall_resp", "pktend", "config_id", "watermark_wait",
                          "socket_alternation", "socket_timeout", "fifo_rst"};
  task automatic saw(input string m, input bit cond = 1);
    if (cond) mech[m] = mech.exists(m) ? mech[m] + 1 : 1;
  endtask

  // ---- host side: commands and packets ------------------------------------
  typedef logic [7:0] pkt_b_t [PKT_BYTES];
  logic [31:0] outq [$];
  pkt_b_t      pq [$];

  // One command: bytes b0..b8 (the rest zero), byte 0 in bits 31:24 of the
  // first word.
  task automatic put_cmd(input cmd_t c);
    for (int w = CMD_WORDS - 1; w >= 0; w--) outq.push_back(c[w*32 +: 32]);
  endtask

  task automatic put(input logic [7:0] b0, input logic [7:0] b1 = 0, input logic [7:0] b2 = 0,
                     input logic [7:0] b3 = 0, input logic [7:0] b4 = 0, input logic [7:0] b5 = 0,
                     input logic [7:0] b6 = 0, input logic [7:0] b7 = 0, input logic [7:0] b8 = 0);
    cmd_t c = '0;
    c[CMD_BYTES*8-1 -: 72] = {b0, b1, b2, b3, b4, b5, b6, b7, b8};
    put_cmd(c);
  endtask

  task automatic flush();
    logic [31:0] w [] = new[outq.size()];
    foreach (w[i]) w[i] = outq[i];
    outq.delete();
    fx.host_send(w);
  endtask

  task automatic load(input int r, input int c, input bit syn, input int osel,
                      input int tw, input int dst, input logic [15:0] en, input int refr);
    put(OP_LOAD, 8'(r), 8'(c), 8'(refr), {3'b000, syn, 4'(osel)}, 8'(tw), 8'(dst),
        en[7:0], en[15:8]);
  endtask

  int rx_idx = 0;     // next unread word of the model's receive log
  always @(negedge clk)
    while (fx.rx_words.size() >= rx_idx + PKT_WORDS) begin
      pkt_b_t p;
      for (int w = 0; w < PKT_WORDS; w++) begin
        logic [31:0] x;
        x = fx.rx_words[rx_idx + w];
        {p[4*w], p[4*w+1], p[4*w+2], p[4*w+3]} = x;
      end
      rx_idx += PKT_WORDS;
      if (p[62] == 8'h43 && p[63] == 8'h21) saw("config_id");
      pq.push_back(p);
    end

  function automatic logic [63:0] ts_of(input pkt_b_t p);
    return {p[7], p[6], p[5], p[4], p[3], p[2], p[1], p[0]};
  endfunction

  task automatic wait_gnc(input int n);
    repeat (n) @(posedge gnc_clk);
    @(negedge clk);
  endtask

  task automatic wait_pkts(input int n, input int max_gnc);
    int k = 0;
    while (pq.size() < n && k < max_gnc * 192) begin @(negedge clk); k++; end
  endtask

  // WAIT_WM dwell detector
  int wm_run = 0;
  always @(negedge clk) begin
    if (rst_n && fsm_state == 4'd2) wm_run++;
    else wm_run = 0;
    if (wm_run == 100) saw("watermark_wait");
  end

  pkt_b_t p;
  logic [63:0] ts0;
  logic [31:0] word [ROWS];
  int r_before, n;
  bit ok;

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    wait_gnc(1);
    check(mode == 2'd0 && timestamp == 0 && fsm_state == 4'd0, "reset state: halted, time 0, FSM idle");

    // ---- A: spike chain ----------------------------------------------------
    load(0, 0, 0, 0, 5,  0, 16'h0040, 0);   // neuron, west port (external input 0)
    load(0, 1, 1, 2, 20, 2, 16'h0040, 0);   // synapse, watches east neighbour
    load(0, 2, 0, 0, 10, 0, 16'h0040, 0);
    load(0, 3, 1, 2, 15, 1, 16'h0040, 0);
    load(0, 4, 0, 0, 7,  0, 16'h0040, 0);   // drives external output 0
    load(1, 2, 1, 0, 30, 1, 16'h0000, 0);   // watches (0,2) from below, no input
    put(OP_RUN);
    put(OP_FIRE, 8'd10);                    // charge 10 on input 0, others 0
    repeat (8) put(8'h00);
    put(OP_HALT);
    flush();
    wait_pkts(2, 40);
    check(pq.size() == 2, "chain: output packet and EOF packet");
    if (pq.size() >= 2) begin
      begin p = pq[0]; pq.delete(0); end
      check(ts_of(p) == 64'd6 && p[8] == 8'd7 && p[61] == 8'h00,
            "chain: output 0 fires value 7 at time stamp 6");
      saw("load"); saw("run"); saw("fire"); saw("ext_output"); saw("chain");
      ok = 1;
      for (int i = 9; i < 40; i++) if (p[i] != 0) ok = 0;
      check(ok, "chain: no other output fired");
      begin p = pq[0]; pq.delete(0); end
      check(p[61] == 8'h02 && ts_of(p) == 64'd9, "halt: EOF packet at time stamp 9");
      saw("halt", p[61] == 8'h02);
      saw("noop", ts_of(p) == 64'd9);
    end
    check(mode == 2'd0 && timestamp == 9, "halted at time stamp 9");

    // ---- B: monitor read-out -------------------------------------------------
    put(OP_CAPTURE);
    repeat (64) put(OP_SHIFT);
    flush();
    wait_pkts(64, 80);
    check(pq.size() == 64, "64 shift packets");
    for (int c = 0; c < COLS; c++) word[c] = '0;
    begin
      logic [31:0] row0 [COLS], row1 [COLS];
      for (int k = 0; k < 64 && pq.size() > 0; k++) begin
        begin p = pq[0]; pq.delete(0); end
        if (k == 0) check(p[61] == 8'h01 && ts_of(p) == 64'd9, "shift flag and time stamp");
        for (int c = 0; c < COLS; c++) begin
          if (k < 32) row0[c][31-k] = p[44 + c/8][c%8];
          else        row1[c][63-k] = p[44 + c/8][c%8];
        end
      end
      saw("capture"); saw("shift");
      check(row0[0] == {16'd0, 8'd1, 8'd0}, "(0,0) fired once, charge back at 0");
      check(row0[1] == {16'd21, 8'd1, 8'd0}, "(0,1) fired once, LTP 20 -> 21");
      check(row0[2] == {16'd0, 8'd1, 8'd0}, "(0,2) fired once");
      check(row0[3] == {16'd16, 8'd1, 8'd0}, "(0,3) fired once, LTP 15 -> 16");
      check(row0[4] == {16'd0, 8'd1, 8'd0}, "(0,4) fired once");
      check(row1[2] == {16'd29, 8'd0, 8'd0}, "(1,2) LTD 30 -> 29");
      check(row1[0] == 0 && row1[1] == 0 && row1[3] == 0 && row1[4] == 0, "unprogrammed elements idle");
      saw("ltp", row0[1][31:16] == 16'd21);
      saw("ltd", row1[2][31:16] == 16'd29);
    end

    // ---- C: step ---------------------------------------------------------------
    put(OP_STEP, 8'd5, 8'd0, 8'd0, 8'd0);
    flush();
    wait_pkts(1, 20);
    check(pq.size() == 1, "step: one packet");
    if (pq.size() > 0) begin
      begin p = pq[0]; pq.delete(0); end
      check(p[61] == 8'h02 && ts_of(p) == 64'd14, "step 5: EOF packet at time stamp 14");
      saw("step", ts_of(p) == 64'd14);
    end
    check(mode == 2'd0, "halted after step");

    // ---- D: stall with an empty command FIFO --------------------------------
    put(OP_RUN);
    flush();
    wait_gnc(4);
    ts0 = timestamp;
    wait_gnc(5);
    check(mode == 2'd1 && timestamp == ts0 && ts0 == 14, "running without commands: network stalls");
    saw("stall_empty", mode == 2'd1 && timestamp == ts0);

    // ---- E: reset command --------------------------------------------------------
    put(OP_RESET);
    put(OP_CAPTURE);
    repeat (32) put(OP_SHIFT);
    flush();
    wait_pkts(32, 60);
    check(pq.size() == 32 && timestamp == 0 && mode == 2'd0, "reset: time stamp 0, halted");
    ok = 1;
    while (pq.size() > 0) begin
      begin p = pq[0]; pq.delete(0); end
      if (p[44] != 8'h00 || ts_of(p) != 0) ok = 0;
    end
    check(ok, "reset: configuration and state erased");
    saw("reset", ok && timestamp == 0);

    // ---- F: refractory neuron and response back-pressure ---------------------
    load(2, 4, 0, 0, -1, 0, 16'h0000, 0);   // threshold -1: fires whenever allowed
    put(OP_RUN);
    repeat (20) put(8'h00);
    fx.p2u_ready = 0;
    flush();
    wait_gnc(14);
    ts0 = timestamp;
    wait_gnc(4);
    check(timestamp == ts0 && ts0 < 20 && fx.pending_words() == 0, "FX3 not ready: network stalls with commands waiting");
    saw("stall_resp", timestamp == ts0 && ts0 < 20);
    fx.p2u_ready = 1;
    put(OP_HALT);
    flush();
    wait_gnc(40);
    check(timestamp == 20, "all 20 no-ops executed after the stall");
    n = 0; ok = 1;
    while (pq.size() > 0) begin
      begin p = pq[0]; pq.delete(0); end
      if (p[61] == 8'h02) continue;
      if (ts_of(p) != 64'(1 + 2 * n) || p[10] != 8'hFF) ok = 0;
      n++;
    end
    check(n == 10 && ok, "self-firing neuron: one packet every second cycle with value 0xFF");
    saw("refractory", n == 10 && ok);
    saw("pktend", fx.rx_pkts > 0);

    // ---- G: command FIFO full, watermark wait -------------------------------------
    repeat (60) put(8'h00);
    flush();
    wait_gnc(70);
    check(fx.pending_words() == 0 && fx.errors == 0, "60 queued commands all read");
    check(mech.exists("watermark_wait"), "FSM waited for command FIFO room");
    saw("socket_alternation", fx.bufs_s3 > 1 && fx.bufs_s1 > 1);

    // ---- H: neutral socket choice after the time-out ------------------------------
    put(8'h00);
    flush();
    repeat (40) @(negedge clk);      // read on the expected socket
    fx.next_is_s3 = !fx.next_is_s3;  // offer the socket that was just used
    r_before = fx.reads_s3 + fx.reads_s1;
    put(8'h00);
    flush();
    repeat (TIMEOUT / 2) @(negedge clk);
    check(fx.reads_s3 + fx.reads_s1 == r_before, "same socket twice: not read before the time-out");
    repeat (TIMEOUT + 50) @(negedge clk);
    check(fx.reads_s3 + fx.reads_s1 == r_before + CMD_WORDS, "read after the time-out");
    saw("socket_timeout", fx.reads_s3 + fx.reads_s1 == r_before + CMD_WORDS);

    // ---- I: fifo_rst drops a partial command -------------------------------------
    load(2, 4, 0, 0, 0, 0, 16'h0000, 0);    // silence the self-firing neuron
    flush();
    wait_gnc(3);
    ts0 = timestamp;
    outq.push_back(32'h0200_0000);          // 4 of the 9 words of a halt
    repeat (3) outq.push_back(32'h0);
    flush();
    repeat (100) @(negedge clk);
    fifo_rst = 1; @(negedge clk); fifo_rst = 0;
    put(OP_STEP, 8'd2, 8'd0, 8'd0, 8'd0);
    flush();
    wait_pkts(1, 20);
    check(pq.size() == 1, "after fifo_rst: one packet");
    if (pq.size() > 0) begin
      begin p = pq[0]; pq.delete(0); end
      check(p[61] == 8'h02 && ts_of(p) == ts0 + 2, "after fifo_rst: step 2 executed intact");
      saw("fifo_rst", ts_of(p) == ts0 + 2);
    end
    check(fx.errors == 0, "no slave FIFO protocol error");

    // ---- every mechanism must have happened ----------------------------------------
    foreach (mech_list[i])
      check(mech.exists(mech_list[i]), $sformatf("mechanism %s exercised", mech_list[i]));
    foreach (mech_list[i])
      $display("mechanism %-20s %0d", mech_list[i], mech.exists(mech_list[i]) ? mech[mech_list[i]] : 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    foreach (mech_list[i])
      if (!mech.exists(mech_list[i])) begin
        failures++;
        $display("FAIL: mechanism %s never happened", mech_list[i]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
