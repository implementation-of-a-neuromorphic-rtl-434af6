// prog_interface: the DANNA programming interface module.
//
// It takes one 36-byte command per network cycle from the FIFO logic, acts on
// the array, and hands 64-byte status packets back. It decides everything at
// `cyc_start`, the first clock of a network cycle; its array controls are
// registered, so they are valid from the second clock on, before the
// elements sample their first input.
//
// Modes:
//   HALTED   the network does not advance; one command is executed per
//            network cycle if one is waiting.
//   RUNNING  each network cycle consumes exactly one command (a no-op, a fire,
//            a load ...) and the network advances one cycle with it. With no
//            command waiting the network stalls for that cycle, which keeps
//            the host's command stream cycle-accurate.
//   STEPPING the network advances the requested number of cycles without
//            reading commands, then halts.
//
// Commands (one-hot operation code in byte 0): Load (program one element),
// Halt, Run, Step N, Fire (32 external input charges, a non-zero byte fires
// that input with that charge), Reset (clear the whole array configuration
// and state, the random generator and the time stamp), Capture (all monitor
// registers load), Shift (all column chains move one bit; the top bits go
// into a packet). Any other code is a no-op.
//
// Status packets are sent when an external output fired in the cycle just
// finished, when a halt command is executed or a step finishes (EOF flag),
// and for every shift command (shift flag); one packet may carry several of
// these. The time stamp is the number of network cycles executed since
// reset. While a packet has not yet been taken by the FIFO logic the
// interface pauses: the network stalls and no command is read.
//
// Byte positions inside the load and step commands, and the pausing rules
// above, are this design's choices; the command set, opcodes and packet
// layout follow the DANNA programming structure.
module prog_interface
  import danna_pkg::*;
#(
  parameter logic [15:0] CONFIG_ID = 16'h4321
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            cyc_start,
  input  logic                            gnc_tick,
  // from / to the FIFO logic
  input  logic                            cmd_valid,
  input  cmd_t                            cmd,
  output logic                            cmd_pop,
  output logic                            pkt_valid,
  output pkt_t                            pkt,
  input  logic                            pkt_ready,
  // to the array
  output logic                            adv,
  output logic                            clear,
  output logic                            load_en,
  output logic [15:0]                     load_addr,
  output elem_cfg_t                       load_cfg,
  output logic                            capture,
  output logic                            shift,
  output logic [N_EXT-1:0]                ext_in_fire,
  output logic [N_EXT-1:0][WEIGHT_W-1:0]  ext_in_w,
  // from the array
  input  logic [N_EXT-1:0]                ext_out_fire,
  input  logic [N_EXT-1:0][WEIGHT_W-1:0]  ext_out_w,
  input  logic [SHIFT_BITS-1:0]           col_out,
  // status
  output logic [1:0]                      mode_o,
  output logic [63:0]                     timestamp,
  output logic                            stall_empty,   // pulse: running, no command
  output logic                            stall_resp     // pulse: packet not yet taken
);
  typedef enum logic [1:0] {HALTED = 2'd0, RUNNING = 2'd1, STEPPING = 2'd2} mode_e;

  mode_e       mode;
  logic [31:0] step_left;
  logic        out_check;      // the last executed cycle may have output fires

  assign mode_o = mode;

  // ---- decode of the waiting command ------------------------------------
  logic [7:0] cb [CMD_BYTES];
  logic [7:0] op;
  always_comb begin
    for (int i = 0; i < int'(CMD_BYTES); i++) cb[i] = cmd_byte(cmd, i);
    op = cb[0];
  end

  // ---- packet assembly --------------------------------------------------
  function automatic pkt_t make_pkt(input logic [63:0] ts,
                                    input logic [N_EXT-1:0] f,
                                    input logic [N_EXT-1:0][WEIGHT_W-1:0] w,
                                    input logic [SHIFT_BITS-1:0] sh,
                                    input logic shf, input logic eof,
                                    input logic [15:0] cid);
    logic [7:0] b [PKT_BYTES];
    pkt_t p;
    for (int i = 0; i < int'(PKT_BYTES); i++) b[i] = 8'h00;
    for (int i = 0; i < 8; i++) b[i] = ts[i*8 +: 8];                 // little-endian
    for (int i = 0; i < int'(N_EXT); i++) b[8+i] = f[i] ? w[i] : 8'h00;
    if (shf)
      for (int i = 0; i < int'(SHIFT_BITS)/8; i++) b[44+i] = sh[i*8 +: 8];
    b[61][FLAG_SHIFT_BIT] = shf;
    b[61][FLAG_EOF_BIT]   = eof;
    b[62] = cid[15:8];
    b[63] = cid[7:0];
    for (int i = 0; i < int'(PKT_BYTES); i++) p[(PKT_BYTES-1-i)*8 +: 8] = b[i];
    return p;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode        <= HALTED;
      step_left   <= '0;
      out_check   <= 1'b0;
      timestamp   <= '0;
      cmd_pop     <= 1'b0;
      pkt_valid   <= 1'b0;
      pkt         <= '0;
      adv         <= 1'b0;
      clear       <= 1'b0;
      load_en     <= 1'b0;
      load_addr   <= '0;
      load_cfg    <= '0;
      capture     <= 1'b0;
      shift       <= 1'b0;
      ext_in_fire <= '0;
      ext_in_w    <= '0;
      stall_empty <= 1'b0;
      stall_resp  <= 1'b0;
    end else begin
      cmd_pop     <= 1'b0;
      clear       <= 1'b0;
      load_en     <= 1'b0;
      capture     <= 1'b0;
      shift       <= 1'b0;
      stall_empty <= 1'b0;
      stall_resp  <= 1'b0;

      if (pkt_valid && pkt_ready) pkt_valid <= 1'b0;

      // End of an executed network cycle.
      if (gnc_tick && adv) begin
        timestamp <= timestamp + 64'd1;
        out_check <= 1'b1;
      end

      if (cyc_start) begin
        if (pkt_valid) begin
          // The previous packet still waits: hold everything for one cycle.
          adv        <= 1'b0;
          stall_resp <= 1'b1;
        end else begin
          logic nadv, eof, shf, fired, do_clear;
          mode_e nmode;
          nadv     = 1'b0;
          eof      = 1'b0;
          shf      = 1'b0;
          do_clear = 1'b0;
          nmode    = mode;
          fired    = out_check && (|ext_out_fire);

          // External inputs last for one executed cycle.
          if (adv) ext_in_fire <= '0;

          if (mode == STEPPING) begin
            if (step_left == '0) begin
              nmode = HALTED;
              eof   = 1'b1;
            end else begin
              nadv = 1'b1;
              step_left <= step_left - 32'd1;
            end
          end else if (cmd_valid) begin
            cmd_pop <= 1'b1;
            nadv = (mode == RUNNING);
            unique case (op)
              OP_LOAD: begin
                load_en   <= 1'b1;
                load_addr <= {cb[1], cb[2]};
                load_cfg  <= '{is_synapse: cb[4][4],
                               out_sel:    cb[4][3:0],
                               thr_weight: cb[5],
                               distance:   cb[6][3:0],
                               in_en:      {cb[8], cb[7]},
                               ltp_refrac: cb[3]};
              end
              OP_HALT: begin
                nmode = HALTED;
                nadv  = 1'b0;
                eof   = 1'b1;
              end
              OP_RUN:  nmode = RUNNING;
              OP_STEP: begin
                nmode = STEPPING;
                nadv  = 1'b0;
                step_left <= {cb[4], cb[3], cb[2], cb[1]};
              end
              OP_FIRE: begin
                for (int i = 0; i < int'(N_EXT); i++) begin
                  ext_in_fire[i] <= cb[1 + i] != 8'h00;
                  ext_in_w[i]    <= cb[1 + i];
                end
              end
              OP_RESET: begin
                do_clear = 1'b1;
                nmode    = HALTED;
                nadv     = 1'b0;
              end
              OP_CAPTURE: capture <= 1'b1;
              OP_SHIFT: begin
                shift <= 1'b1;
                shf   = 1'b1;
              end
              default: ;   // no-op
            endcase
          end else if (mode == RUNNING) begin
            stall_empty <= 1'b1;
          end

          if (fired || eof || shf)
            pkt_valid <= 1'b1;
          pkt <= make_pkt(timestamp, fired ? ext_out_fire : '0, ext_out_w,
                          col_out, shf, eof, CONFIG_ID);

          out_check <= 1'b0;
          adv       <= nadv;
          mode      <= nmode;
          if (do_clear) begin
            clear       <= 1'b1;
            timestamp   <= '0;
            ext_in_fire <= '0;
            step_left   <= '0;
          end
        end
      end
    end
  end

  // A packet stays unchanged until it is taken.
  pkt_stable: assert property (@(posedge clk) disable iff (!rst_n)
                               pkt_valid && !pkt_ready |=> pkt_valid && $stable(pkt))
    else $error("prog_interface: packet changed before it was taken");

endmodule
