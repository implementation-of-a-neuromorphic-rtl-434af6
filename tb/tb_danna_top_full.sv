// tb_danna_top_full: the FPGA design at its default size (47 x 47 array,
// 1024-word command FIFO, 512-word response FIFO, default clocking and
// socket time-out), driven through the behavioural FX3 model.
//
// One complete operation, as the host would do it:
//   load neuron (0,0) on its west port (external input 0, threshold 5),
//   load a synapse (0,1) from it (weight 9, distance 1),
//   load neuron (0,2) from the synapse (threshold 4),
//   load a self-firing neuron (threshold -1) at (46,46), the last element,
//   Run, Fire (charge 10 on input 0), four no-ops, Halt,
//   Capture, 33 Shifts.
// Expected packets: output 46 is beyond the 32 external outputs, so no
// output packets; the EOF packet carries time stamp 5; the first shift packet shows
// the top bit of each column's monitor chain, i.e. bit 31 of the top-row
// elements' charge field, which is 0 everywhere, and the configuration ID.
// The first 32 shift packets hold the top row's 32-bit monitor words: (0,0), (0,1)
// and (0,2) fired once each, proving the chain and the capture path across
// the full-width array.
module tb_danna_top_full;
  import danna_pkg::*;

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

  danna_top dut (.*);

  fx3_model fx (
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

  typedef logic [7:0] pkt_b_t [PKT_BYTES];
  logic [31:0] outq [$];
  pkt_b_t      pq [$];

  task automatic put(input logic [7:0] b0, input logic [7:0] b1 = 0, input logic [7:0] b2 = 0,
                     input logic [7:0] b3 = 0, input logic [7:0] b4 = 0, input logic [7:0] b5 = 0,
                     input logic [7:0] b6 = 0, input logic [7:0] b7 = 0, input logic [7:0] b8 = 0);
    cmd_t c = '0;
    c[CMD_BYTES*8-1 -: 72] = {b0, b1, b2, b3, b4, b5, b6, b7, b8};
    for (int w = CMD_WORDS - 1; w >= 0; w--) outq.push_back(c[w*32 +: 32]);
  endtask

  task automatic flush();
    logic [31:0] w [] = new[outq.size()];
    foreach (w[i]) w[i] = outq[i];
    outq.delete();
    fx.host_send(w);
  endtask

  task automatic load(input int r, input int c, input bit syn, input int tw,
                      input int dst, input logic [15:0] en);
    put(OP_LOAD, 8'(r), 8'(c), 8'd0, {3'b000, syn, 4'd0}, 8'(tw), 8'(dst), en[7:0], en[15:8]);
  endtask

  int rx_idx = 0;
  always @(negedge clk)
    while (fx.rx_words.size() >= rx_idx + PKT_WORDS) begin
      pkt_b_t p;
      for (int w = 0; w < PKT_WORDS; w++) begin
        logic [31:0] x;
        x = fx.rx_words[rx_idx + w];
        {p[4*w], p[4*w+1], p[4*w+2], p[4*w+3]} = x;
      end
      rx_idx += PKT_WORDS;
      pq.push_back(p);
    end

  function automatic logic [63:0] ts_of(input pkt_b_t p);
    return {p[7], p[6], p[5], p[4], p[3], p[2], p[1], p[0]};
  endfunction

  task automatic wait_pkts(input int n, input int max_clocks);
    int k = 0;
    while (pq.size() < n && k < max_clocks) begin @(negedge clk); k++; end
  endtask

  pkt_b_t p;
  logic [31:0] top [3];
  bit ok;

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(mode == 2'd0 && timestamp == 0, "after reset: halted at time 0");

    load(0, 0, 0, 5, 0, 16'h0040);
    load(0, 1, 1, 9, 1, 16'h0040);
    load(0, 2, 0, 4, 0, 16'h0040);
    load(46, 46, 0, -1, 0, 16'h0000);
    put(OP_RUN);
    put(OP_FIRE, 8'd10);
    repeat (4) put(8'h00);
    put(OP_HALT);
    put(OP_CAPTURE);
    repeat (33) put(OP_SHIFT);
    flush();
    wait_pkts(34, 60 * 192);
    check(pq.size() == 34, "EOF packet and 33 shift packets");
    if (pq.size() == 34) begin
      p = pq[0]; pq.delete(0);
      check(p[61] == 8'h02 && ts_of(p) == 64'd5, "halt: EOF packet at time stamp 5");
      check(p[62] == 8'h43 && p[63] == 8'h21, "configuration ID 0x4321");
      ok = 1;
      for (int i = 8; i < 40; i++) if (p[i] != 0) ok = 0;
      check(ok, "no external output fired (element 46 is not wired out)");
      for (int k = 0; k < 33; k++) begin
        p = pq[0]; pq.delete(0);
        if (k == 0) check(p[61] == 8'h01 && ts_of(p) == 64'd5, "shift packet flag and time stamp");
        if (k < 32)
          for (int c = 0; c < 3; c++) top[c][31-k] = p[44 + c/8][c%8];
      end
      check(top[0] == {16'd0, 8'd1, 8'd0}, "(0,0) fired once");
      check(top[1] == {16'd9, 8'd1, 8'd0}, "(0,1) passed one spike with weight 9");
      check(top[2] == {16'd0, 8'd1, 8'd0}, "(0,2) fired once");
    end
    check(mode == 2'd0 && timestamp == 5, "halted at time stamp 5");
    check(fx.errors == 0 && fx.pending_words() == 0, "all commands read without protocol error");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
