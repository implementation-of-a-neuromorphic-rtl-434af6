// danna_top: FPGA design of the DANNA development kit.
//
// A host computer sends 36-byte commands over USB to an FX3 USB controller,
// which offers them on its 32-bit, 100 MHz slave FIFO bus. Inside the FPGA:
//
//   FX3 pins <-> slave_fifo_fsm -> command FIFO  -> fifo_logic -> prog_interface -> danna_array
//                               <- response FIFO <-            <-                <-
//
// clock_gen derives the array clocks (GNC, AFC, AEC, AC) as enables of the
// single system clock, prng supplies the global input-port order, and
// prog_interface runs the array one network cycle per command and returns
// 64-byte status packets. Everything runs on `clk`, the 100 MHz bus clock.
//
// `fifo_rst` (a spare FX3 GPIO pin) empties both FIFOs and resets the
// slave-FIFO state machine and the FIFO logic between runs; it leaves the
// array and its configuration alone. `rst_n` resets everything.
//
// Defaults: a 47 x 47 array (the kit's largest array on its Virtex-7 690T),
// configuration ID 0x4321. FIFO depths, the clock divider and the PRNG seed
// are this design's choices.
module danna_top
  import danna_pkg::*;
#(
  parameter int unsigned ROWS       = 47,
  parameter int unsigned COLS       = 47,
  parameter int unsigned CLK_PER_AC = 6,
  parameter int unsigned CMD_DEPTH  = 1024,
  parameter int unsigned RSP_DEPTH  = 512,
  parameter int unsigned BUF_WORDS  = 128,       // one 512-byte DMA buffer
  parameter int unsigned TIMEOUT    = 100_000,
  parameter logic [15:0] CONFIG_ID  = 16'h4321,
  parameter logic [62:0] SEED       = 63'h2B7E_1516_28AE_D2A6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fifo_rst,
  // FX3 slave FIFO interface
  input  logic              flag_a,
  input  logic              flag_b,
  input  logic              flag_c,
  input  logic              flag_d,
  input  logic              flag_e,
  input  logic              flag_f,
  output logic              slcs_n,
  output logic              slrd_n,
  output logic              sloe_n,
  output logic              slwr_n,
  output logic              pktend_n,
  output logic [1:0]        fx3_addr,
  input  logic [BUS_W-1:0]  dq_in,
  output logic [BUS_W-1:0]  dq_out,
  output logic              dq_oe,
  // status
  output logic              gnc_clk,
  output logic              afc_clk,
  output logic              aec_clk,
  output logic              ac_clk,
  output logic [1:0]        mode,
  output logic [63:0]       timestamp,
  output logic [3:0]        fsm_state
);
  // ---- slave FIFO FSM and FIFOs -----------------------------------------
  logic              cf_wr_en, cf_rd_en, cf_empty, cf_full, cf_prog_full, cf_prog_empty;
  logic [BUS_W-1:0]  cf_wdata, cf_rdata;
  logic [$clog2(CMD_DEPTH):0] cf_count;
  logic              rf_wr_en, rf_rd_en, rf_empty, rf_full, rf_prog_full, rf_prog_empty;
  logic [BUS_W-1:0]  rf_wdata, rf_rdata;
  logic [$clog2(RSP_DEPTH):0] rf_count;

  slave_fifo_fsm #(.TIMEOUT(TIMEOUT)) u_fsm (
    .clk, .rst_n, .fifo_rst,
    .flag_a, .flag_b, .flag_c, .flag_d, .flag_e, .flag_f,
    .slcs_n, .slrd_n, .sloe_n, .slwr_n, .pktend_n, .addr(fx3_addr),
    .dq_in, .dq_out, .dq_oe,
    .cf_wr_en, .cf_wdata, .cf_prog_full,
    .rf_rd_en, .rf_rdata, .rf_empty, .rf_prog_empty,
    .state_o(fsm_state)
  );

  sync_fifo #(.WIDTH(BUS_W), .DEPTH(CMD_DEPTH), .PROG_FULL_ROOM(BUF_WORDS),
              .PROG_EMPTY_LEVEL(CMD_WORDS)) u_cmd_fifo (
    .clk, .rst_n, .srst(fifo_rst),
    .wr_en(cf_wr_en), .wdata(cf_wdata), .rd_en(cf_rd_en), .rdata(cf_rdata),
    .full(cf_full), .empty(cf_empty), .prog_full(cf_prog_full),
    .prog_empty(cf_prog_empty), .count(cf_count)
  );

  sync_fifo #(.WIDTH(BUS_W), .DEPTH(RSP_DEPTH), .PROG_FULL_ROOM(PKT_WORDS),
              .PROG_EMPTY_LEVEL(PKT_WORDS)) u_rsp_fifo (
    .clk, .rst_n, .srst(fifo_rst),
    .wr_en(rf_wr_en), .wdata(rf_wdata), .rd_en(rf_rd_en), .rdata(rf_rdata),
    .full(rf_full), .empty(rf_empty), .prog_full(rf_prog_full),
    .prog_empty(rf_prog_empty), .count(rf_count)
  );

  // ---- FIFO logic and programming interface -----------------------------
  logic  cmd_valid, cmd_pop, pkt_valid, pkt_ready;
  cmd_t  cmd;
  pkt_t  pkt;

  fifo_logic u_fifo_logic (
    .clk, .rst_n, .srst(fifo_rst),
    .cf_rdata, .cf_empty, .cf_rd_en,
    .rf_wr_en, .rf_wdata, .rf_full,
    .cmd_valid, .cmd, .cmd_pop,
    .pkt_valid, .pkt, .pkt_ready
  );

  logic       cyc_start, sample_tick, acc_tick, gnc_tick;
  logic [SEL_W-1:0] slot, sel, prng_start;
  logic       adv, clear, load_en, capture, shift;
  logic [15:0] load_addr;
  elem_cfg_t  load_cfg;
  logic [N_EXT-1:0]               ext_in_fire, ext_out_fire;
  logic [N_EXT-1:0][WEIGHT_W-1:0] ext_in_w, ext_out_w;
  logic [SHIFT_BITS-1:0]          col_out;
  logic       stall_empty, stall_resp;

  prog_interface #(.CONFIG_ID(CONFIG_ID)) u_prog (
    .clk, .rst_n, .cyc_start, .gnc_tick,
    .cmd_valid, .cmd, .cmd_pop, .pkt_valid, .pkt, .pkt_ready,
    .adv, .clear, .load_en, .load_addr, .load_cfg, .capture, .shift,
    .ext_in_fire, .ext_in_w, .ext_out_fire, .ext_out_w, .col_out,
    .mode_o(mode), .timestamp, .stall_empty, .stall_resp
  );

  // ---- DANNA array module: clocking, PRNG, elements ---------------------
  clock_gen #(.CLK_PER_AC(CLK_PER_AC)) u_clk (
    .clk, .rst_n, .clear(1'b0),
    .gnc_clk, .afc_clk, .aec_clk, .ac_clk,
    .cyc_start, .sample_tick, .acc_tick, .gnc_tick, .slot
  );

  prng #(.SEED(SEED)) u_prng (
    .clk, .rst_n, .clear, .step(gnc_tick && adv), .slot,
    .start(prng_start), .sel
  );

  danna_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n, .clear, .adv, .sample_tick, .acc_tick, .gnc_tick, .sel,
    .load_en, .load_addr, .load_cfg, .capture, .shift,
    .ext_in_fire, .ext_in_w, .ext_out_fire, .ext_out_w, .col_out
  );

endmodule
