// slave_fifo_fsm: FPGA-side master of the Cypress FX3 synchronous slave FIFO
// (GPIF II) bus, 32 bits wide at 100 MHz.
//
// The FX3 holds two DMA channels. Host-to-FPGA data arrives through two GPIF
// sockets used alternately (socket 3 with flags C/D, socket 1 with flags E/F);
// FPGA-to-host data leaves through socket 0 (flags A/B). For each socket the
// first flag means "a DMA buffer is ready" and the second is the watermark
// ("more data remains" for a read socket, "room remains" for the write
// socket). Control strobes SLCS#, SLRD#, SLOE#, SLWR# and PKTEND# are active
// low; A[1:0] selects the socket.
//
// States (numbered as the state codes 0..8):
//   IDLE, READ_FLAG (a read socket is ready: drive its address),
//   WAIT_WM (wait until the command FIFO has room for a whole DMA buffer;
//   a waiting status packet is sent meanwhile, otherwise a full response
//   path could keep the command FIFO from ever draining),
//   READ (SLOE# and SLRD# low while the watermark flag says data remains),
//   READ_RDOE_DLY and READ_OE_DLY (keep SLOE# low while the last words of
//   the two-clock read latency arrive), WAIT, WRITE_FLAG (socket 0 ready and
//   a whole status packet waits in the response FIFO), WRITE (one packet of
//   PKT_WORDS words with SLWR# low, PKTEND# low with the last word).
// Reading has priority over writing. After a read from one socket the FSM
// expects the other one next, so buffers are never taken out of order; if
// nothing arrives for TIMEOUT clocks it returns to a neutral choice and takes
// whichever read socket becomes ready first.
//
// `fifo_rst` (driven by a spare FX3 GPIO pin) resets the FSM to IDLE and
// neutral. The bidirectional DQ bus is split into dq_in, dq_out and dq_oe for
// the pad. The socket numbers, the state list and the read-before-write
// priority follow the kit; the read latency, watermark semantics, the one
// packet per write burst and TIMEOUT are this design's choices.
module slave_fifo_fsm
  import danna_pkg::*;
#(
  parameter int unsigned RD_LAT  = 2,        // SLRD# to data, in clocks
  parameter int unsigned TIMEOUT = 100_000   // idle clocks before the socket choice resets
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fifo_rst,
  // FX3 slave FIFO pins
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
  output logic [1:0]        addr,
  input  logic [BUS_W-1:0]  dq_in,
  output logic [BUS_W-1:0]  dq_out,
  output logic              dq_oe,
  // command FIFO write side
  output logic              cf_wr_en,
  output logic [BUS_W-1:0]  cf_wdata,
  input  logic              cf_prog_full,
  // response FIFO read side (first-word-fall-through)
  output logic              rf_rd_en,
  input  logic [BUS_W-1:0]  rf_rdata,
  input  logic              rf_empty,
  input  logic              rf_prog_empty,
  // status
  output logic [3:0]        state_o
);
  typedef enum logic [3:0] {
    IDLE          = 4'd0,
    READ_FLAG     = 4'd1,
    WAIT_WM       = 4'd2,
    READ          = 4'd3,
    READ_RDOE_DLY = 4'd4,
    READ_OE_DLY   = 4'd5,
    WAIT          = 4'd6,
    WRITE_FLAG    = 4'd7,
    WRITE         = 4'd8
  } state_e;

  typedef enum logic [1:0] {SK_NEUTRAL, SK_3, SK_1} sock_e;

  localparam logic [1:0] ADDR_S0 = 2'b00;
  localparam logic [1:0] ADDR_S1 = 2'b01;
  localparam logic [1:0] ADDR_S3 = 2'b11;

  state_e      state;
  sock_e       expect_sk;    // read socket expected next
  logic        cur_is_s3;    // socket of the current read
  logic [RD_LAT-1:0] rd_pipe;
  logic [4:0]  wr_cnt;
  logic [$clog2(TIMEOUT+1)-1:0] idle_cnt;

  logic s3_ready, s1_ready, rd_go_s3, rd_go_s1, wr_go, cur_wm;
  always_comb begin
    s3_ready = flag_c && (expect_sk != SK_1);
    s1_ready = flag_e && (expect_sk != SK_3);
    rd_go_s3 = s3_ready;
    rd_go_s1 = s1_ready && !s3_ready;
    wr_go    = flag_a && flag_b && !rf_prog_empty;
    cur_wm   = cur_is_s3 ? flag_d : flag_f;

    slrd_n   = !(state == READ && cur_wm);
    sloe_n   = !(state == READ || state == READ_RDOE_DLY || state == READ_OE_DLY);
    slwr_n   = !(state == WRITE && !rf_empty);
    pktend_n = !(state == WRITE && !rf_empty && wr_cnt == 5'(PKT_WORDS - 1));
    slcs_n   = (state == IDLE) || (state == WAIT);
    dq_oe    = (state == WRITE);
    dq_out   = rf_rdata;
    rf_rd_en = !slwr_n;

    cf_wr_en = rd_pipe[RD_LAT-1];
    cf_wdata = dq_in;
    state_o  = state;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      expect_sk <= SK_NEUTRAL;
      cur_is_s3 <= 1'b1;
      addr      <= ADDR_S0;
      rd_pipe   <= '0;
      wr_cnt    <= '0;
      idle_cnt  <= '0;
    end else if (fifo_rst) begin
      state     <= IDLE;
      expect_sk <= SK_NEUTRAL;
      cur_is_s3 <= 1'b1;
      addr      <= ADDR_S0;
      rd_pipe   <= '0;
      wr_cnt    <= '0;
      idle_cnt  <= '0;
    end else begin
      rd_pipe <= {rd_pipe[RD_LAT-2:0], !slrd_n};

      // Fall back to the neutral socket choice after a long quiet period.
      if (state == IDLE && !rd_go_s3 && !rd_go_s1) begin
        if (idle_cnt == ($clog2(TIMEOUT+1))'(TIMEOUT)) expect_sk <= SK_NEUTRAL;
        else idle_cnt <= idle_cnt + 1'b1;
      end else begin
        idle_cnt <= '0;
      end

      unique case (state)
        IDLE: begin
          if (rd_go_s3 || rd_go_s1) begin
            cur_is_s3 <= rd_go_s3;
            addr      <= rd_go_s3 ? ADDR_S3 : ADDR_S1;
            state     <= READ_FLAG;
          end else if (wr_go) begin
            addr   <= ADDR_S0;
            wr_cnt <= '0;
            state  <= WRITE_FLAG;
          end
        end
        READ_FLAG:     state <= WAIT_WM;
        WAIT_WM: begin
          if (!cf_prog_full) begin
            state <= READ;
          end else if (wr_go) begin
            // The command FIFO only drains if status packets can leave:
            // send one meanwhile, then come back for the same socket.
            addr   <= ADDR_S0;
            wr_cnt <= '0;
            state  <= WRITE_FLAG;
          end
        end
        READ:          if (!cur_wm) state <= READ_RDOE_DLY;
        READ_RDOE_DLY: state <= READ_OE_DLY;
        READ_OE_DLY: begin
          expect_sk <= cur_is_s3 ? SK_1 : SK_3;
          state     <= WAIT;
        end
        WAIT: begin
          if (wr_go) begin
            addr   <= ADDR_S0;
            wr_cnt <= '0;
            state  <= WRITE_FLAG;
          end else begin
            state <= IDLE;
          end
        end
        WRITE_FLAG:    state <= WRITE;
        WRITE: begin
          if (!slwr_n) begin
            if (wr_cnt == 5'(PKT_WORDS - 1)) state <= IDLE;
            wr_cnt <= wr_cnt + 5'd1;
          end
        end
        default:       state <= IDLE;
      endcase
    end
  end

  // The command FIFO must have room for every word that arrives.
  read_needs_room: assert property (@(posedge clk) disable iff (!rst_n || fifo_rst)
                                    state == WAIT_WM && !cf_prog_full |=> state == READ)
    else $error("slave_fifo_fsm: read started without room");

  initial assert (RD_LAT >= 2) else $error("slave_fifo_fsm: RD_LAT must be at least 2");

endmodule
