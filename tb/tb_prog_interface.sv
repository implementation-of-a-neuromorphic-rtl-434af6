// tb_prog_interface: command decoding, run/halt/step modes and status
// packets of the programming interface.
//
// The bench generates short network cycles (20 clocks, cyc_start on the first
// and gnc_tick on the last), holds commands in a queue (the FIFO logic), and
// records every pulse and packet at falling clock edges. Expected packet
// bytes are built independently from the packet layout: time stamp bytes
// 0..7 little-endian, output weights at 8..39, shift output at 44..59, flags
// at 61, configuration ID at 62..63.
//
// Sequence: load decoding while halted (address and all register fields),
// capture, shift with its packet, run, a fire command (32 charges of 0x7F)
// reaching the array in the same executed cycle, a cycle with no command
// (stall, network does not advance), output fires on outputs 2 and 4
// reported with the time stamp, response back-pressure (stall, then the
// packet), no-ops advancing the network, halt with the EOF packet, step 3
// (three executed cycles without reading commands, then EOF packet with time
// stamp +3), and reset (clear pulse, time stamp back to 0).
module tb_prog_interface;
  import danna_pkg::*;

  logic clk = 0, rst_n = 0, cyc_start = 0, gnc_tick = 0;
  logic cmd_valid, cmd_pop, pkt_valid, pkt_ready = 1;
  cmd_t cmd;
  pkt_t pkt;
  logic adv, clear, load_en, capture, shift;
  logic [15:0] load_addr;
  elem_cfg_t load_cfg;
  logic [N_EXT-1:0] ext_in_fire, ext_out_fire = '0;
  logic [N_EXT-1:0][7:0] ext_in_w, ext_out_w = '0;
  logic [SHIFT_BITS-1:0] col_out = '0;
  logic [1:0] mode_o;
  logic [63:0] timestamp;
  logic stall_empty, stall_resp;
  int checks = 0, failures = 0;

  prog_interface #(.CONFIG_ID(16'h4321)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // ---- command queue and packet log --------------------------------------
  cmd_t cq [$];
  pkt_t pq [$];
  int n_load, n_cap, n_shift, n_clear, n_se, n_sr, n_adv;
  assign cmd_valid = cq.size() > 0;
  assign cmd = (cq.size() > 0) ? cq[0] : '0;

  always @(negedge clk) begin
    if (cmd_pop) void'(cq.pop_front());
    if (pkt_valid && pkt_ready) pq.push_back(pkt);
    if (load_en) n_load++;
    if (capture) n_cap++;
    if (shift) n_shift++;
    if (clear) n_clear++;
    if (stall_empty) n_se++;
    if (stall_resp) n_sr++;
  end

  function automatic cmd_t mk(input logic [7:0] b []);
    cmd_t c = '0;
    foreach (b[i]) c[(CMD_BYTES-1-i)*8 +: 8] = b[i];
    return c;
  endfunction

  function automatic logic [7:0] pbyte(input pkt_t p, input int i);
    return p[(PKT_BYTES-1-i)*8 +: 8];
  endfunction

  // One network cycle; returns whether the network advanced in it.
  task automatic net_cycle(output bit advanced);
    cyc_start = 1; @(negedge clk); cyc_start = 0;
    repeat (5) @(negedge clk);
    advanced = adv;
    repeat (12) @(negedge clk);
    gnc_tick = 1; @(negedge clk); gnc_tick = 0;
  endtask

  bit a;
  pkt_t p;
  logic [63:0] ts0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- load while halted ----------------------------------------------
    // row 3, col 7, refractory 9, synapse watching port 11, weight -3,
    // distance 5, inputs 0x8421
    cq.push_back(mk('{OP_LOAD, 8'd3, 8'd7, 8'd9, 8'h1B, 8'hFD, 8'd5, 8'h21, 8'h84}));
    net_cycle(a);
    check(!a, "halted: load does not advance");
    check(n_load == 1 && load_addr == 16'h0307, "load: address");
    check(load_cfg.is_synapse && load_cfg.out_sel == 4'd11 && load_cfg.thr_weight == 8'hFD &&
          load_cfg.distance == 4'd5 && load_cfg.in_en == 16'h8421 && load_cfg.ltp_refrac == 8'd9,
          "load: register fields");

    // ---- capture and shift ------------------------------------------------
    cq.push_back(mk('{OP_CAPTURE}));
    net_cycle(a);
    check(n_cap == 1, "capture pulse");
    col_out = '0; col_out[0] = 1; col_out[9] = 1; col_out[119] = 1;
    cq.push_back(mk('{OP_SHIFT}));
    net_cycle(a);
    check(n_shift == 1, "shift pulse");
    check(pq.size() == 1, "shift packet sent");
    if (pq.size() > 0) begin
      p = pq.pop_front();
      check(pbyte(p, 44) == 8'h01 && pbyte(p, 45) == 8'h02 && pbyte(p, 58) == 8'h80,
            "shift output bits: column c at byte 44 + c/8, bit c%8");
      check(pbyte(p, 61) == 8'h01, "shift flag");
      check(pbyte(p, 62) == 8'h43 && pbyte(p, 63) == 8'h21, "configuration ID");
    end
    col_out = '0;

    // ---- run and fire -----------------------------------------------------
    cq.push_back(mk('{OP_RUN}));
    net_cycle(a);
    check(mode_o == 2'd1, "run: mode RUNNING");
    begin
      logic [7:0] fb [] = new[33];
      fb[0] = OP_FIRE;
      for (int i = 1; i <= 32; i++) fb[i] = 8'h7F;
      cq.push_back(mk(fb));
    end
    ts0 = timestamp;
    cyc_start = 1; @(negedge clk); cyc_start = 0;
    repeat (3) @(negedge clk);
    check(adv && ext_in_fire == '1 && ext_in_w[0] == 8'h7F && ext_in_w[31] == 8'h7F,
          "fire: all 32 inputs carry 0x7F in the executed cycle");
    repeat (14) @(negedge clk);
    gnc_tick = 1; @(negedge clk); gnc_tick = 0;
    check(timestamp == ts0 + 1, "executed cycle counted");
    // outputs 2 and 4 fired in that cycle
    ext_out_fire = '0; ext_out_fire[2] = 1; ext_out_fire[4] = 1;
    ext_out_w[2] = 8'h81; ext_out_w[4] = 8'h7F; ext_out_w[5] = 8'h55;
    net_cycle(a);     // no command waiting
    check(!a && n_se == 1, "running with an empty FIFO stalls the network");
    check(ext_in_fire == '0, "fire inputs last one executed cycle");
    check(pq.size() == 1, "output fire packet");
    if (pq.size() > 0) begin
      p = pq.pop_front();
      check({pbyte(p,7),pbyte(p,6),pbyte(p,5),pbyte(p,4),pbyte(p,3),pbyte(p,2),pbyte(p,1),pbyte(p,0)} == ts0 + 1,
            "time stamp little-endian");
      check(pbyte(p, 10) == 8'h81 && pbyte(p, 12) == 8'h7F && pbyte(p, 13) == 8'h00 && pbyte(p, 8) == 8'h00,
            "weights of the fired outputs only");
      check(pbyte(p, 61) == 8'h00, "no flags on a fire response");
    end
    ext_out_fire = '0;

    // ---- back-pressure ------------------------------------------------------
    cq.push_back(mk('{8'h00}));
    net_cycle(a);
    check(a, "no-op advances a running network");
    ext_out_fire[0] = 1; ext_out_w[0] = 8'h11;
    pkt_ready = 0;
    cq.push_back(mk('{8'h00}));
    cq.push_back(mk('{8'h00}));
    net_cycle(a);     // packet created, not taken
    ext_out_fire = '0;
    check(a, "cycle with a new packet still executes");
    net_cycle(a);
    check(!a && n_sr == 1, "untaken packet stalls the network");
    check(cq.size() == 1, "no command read while stalled");
    pkt_ready = 1;
    net_cycle(a);
    check(pq.size() == 1, "packet delivered after back-pressure");
    pq.delete();

    // ---- halt -----------------------------------------------------------
    cq.push_back(mk('{OP_HALT}));
    net_cycle(a);
    net_cycle(a);
    check(mode_o == 2'd0 && !a, "halt stops the network");
    check(pq.size() == 1 && pbyte(pq[0], 61) == 8'h02, "halt packet has the EOF flag");
    pq.delete();

    // ---- step 3 -----------------------------------------------------------
    ts0 = timestamp;
    cq.push_back(mk('{OP_STEP, 8'd3, 8'd0, 8'd0, 8'd0}));
    cq.push_back(mk('{8'h00}));
    n_adv = 0;
    for (int i = 0; i < 6; i++) begin
      net_cycle(a);
      if (a) n_adv++;
    end
    check(n_adv == 3, "step 3 executes exactly three cycles");
    check(timestamp == ts0 + 3, "step advances the time stamp by 3");
    check(pq.size() == 1 && pbyte(pq[0], 61) == 8'h02, "step end packet has the EOF flag");
    if (pq.size() > 0)
      check(pbyte(pq[0], 0) == 8'(ts0 + 3), "step end packet time stamp");
    pq.delete();
    check(mode_o == 2'd0, "halted after step");

    // ---- reset -------------------------------------------------------------
    cq.delete();
    cq.push_back(mk('{OP_RESET}));
    net_cycle(a);
    net_cycle(a);
    check(n_clear == 1 && timestamp == 0, "reset clears the array and the time stamp");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
