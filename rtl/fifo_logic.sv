// fifo_logic: the DANNA FIFO logic module, between the two 32-bit FIFOs and
// the programming interface.
//
// Command side: reads nine 32-bit words from the command FIFO and
// concatenates them into one 36-byte command, first word in the top bits (so
// the operation code, the first byte the host sent, ends up in bits
// [287:280]). The finished command is offered with `cmd_valid` and held until
// the programming interface takes it with `cmd_pop`; assembly of the next
// command overlaps with that wait.
//
// Response side: takes one 64-byte status packet when `pkt_valid` and
// `pkt_ready` are both high, then writes it to the response FIFO as sixteen
// words, top bits first, one word per clock while the FIFO is not full.
//
// `srst` (the FIFO reset from the USB controller) drops any partly assembled
// command or partly written packet together with the FIFO contents, so a new
// run starts word-aligned. Handshakes are valid/ready; latencies are this
// design's choice.
module fifo_logic
  import danna_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              srst,
  // command FIFO (first-word-fall-through)
  input  logic [BUS_W-1:0]  cf_rdata,
  input  logic              cf_empty,
  output logic              cf_rd_en,
  // response FIFO
  output logic              rf_wr_en,
  output logic [BUS_W-1:0]  rf_wdata,
  input  logic              rf_full,
  // programming interface
  output logic              cmd_valid,
  output cmd_t              cmd,
  input  logic              cmd_pop,
  input  logic              pkt_valid,
  input  pkt_t              pkt,
  output logic              pkt_ready
);
  // ---- command assembly -------------------------------------------------
  cmd_t                     asm_buf;
  logic [3:0]               asm_cnt;     // words collected into asm_buf

  always_comb cf_rd_en = !cf_empty && (asm_cnt != 4'(CMD_WORDS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_buf   <= '0;
      asm_cnt   <= '0;
      cmd       <= '0;
      cmd_valid <= 1'b0;
    end else if (srst) begin
      asm_cnt   <= '0;
      cmd_valid <= 1'b0;
    end else begin
      if (cmd_pop) cmd_valid <= 1'b0;
      if (cf_rd_en) begin
        asm_buf <= {asm_buf[CMD_BYTES*8-BUS_W-1:0], cf_rdata};
        asm_cnt <= asm_cnt + 4'd1;
      end else if (asm_cnt == 4'(CMD_WORDS) && (!cmd_valid || cmd_pop)) begin
        cmd       <= asm_buf;
        cmd_valid <= 1'b1;
        asm_cnt   <= '0;
      end
    end
  end

  // ---- packet split -----------------------------------------------------
  pkt_t       pkt_buf;
  logic [4:0] pkt_left;                  // words still to write

  always_comb begin
    pkt_ready = (pkt_left == '0);
    rf_wr_en  = (pkt_left != '0) && !rf_full;
    rf_wdata  = pkt_buf[PKT_BYTES*8-1 -: BUS_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_buf  <= '0;
      pkt_left <= '0;
    end else if (srst) begin
      pkt_left <= '0;
    end else if (pkt_valid && pkt_ready) begin
      pkt_buf  <= pkt;
      pkt_left <= 5'(PKT_WORDS);
    end else if (rf_wr_en) begin
      pkt_buf  <= {pkt_buf[PKT_BYTES*8-BUS_W-1:0], BUS_W'(0)};
      pkt_left <= pkt_left - 5'd1;
    end
  end

  pop_only_valid: assert property (@(posedge clk) disable iff (!rst_n) cmd_pop |-> cmd_valid)
    else $error("fifo_logic: command popped while none is valid");

endmodule
