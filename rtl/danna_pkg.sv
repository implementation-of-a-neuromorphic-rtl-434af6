// danna_pkg: types and constants shared by the DANNA neuromorphic array and
// its host interface.
//
// Command and packet formats follow the DANNA programming structure: every
// command is 36 bytes long and starts with a one-hot operation code; every
// status packet is 64 bytes long (8-byte little-endian time stamp, 32 external
// output weights, 4 unused bytes, 16 bytes of shift output, 1 unused byte, a
// status-flag byte and a 2-byte configuration ID). Byte 0 of a command or
// packet travels in bits [31:24] of the first 32-bit bus word.
//
// Field widths inside the load and step commands are not fixed by the
// original layout (only their order is); the byte positions below are this
// design's choice.
package danna_pkg;

  // ---- element geometry -------------------------------------------------
  localparam int unsigned NPORTS   = 16;  // connections per element
  localparam int unsigned SEL_W    = 4;   // width of the global input select
  localparam int unsigned WEIGHT_W = 8;   // weights, thresholds, charges
  localparam int unsigned ACC_W    = 16;  // neuron accumulator
  localparam int unsigned MON_W    = 32;  // monitor shift register per element

  // ---- host protocol ----------------------------------------------------
  localparam int unsigned CMD_BYTES  = 36;
  localparam int unsigned PKT_BYTES  = 64;
  localparam int unsigned BUS_W      = 32;
  localparam int unsigned CMD_WORDS  = CMD_BYTES / 4;   // 9
  localparam int unsigned PKT_WORDS  = PKT_BYTES / 4;   // 16
  localparam int unsigned N_EXT      = 32;              // external inputs / outputs
  localparam int unsigned SHIFT_BITS = 128;             // shift output bits per packet

  // One-hot operation codes
  localparam logic [7:0] OP_LOAD    = 8'h01;
  localparam logic [7:0] OP_HALT    = 8'h02;
  localparam logic [7:0] OP_RUN     = 8'h04;
  localparam logic [7:0] OP_STEP    = 8'h08;
  localparam logic [7:0] OP_FIRE    = 8'h10;
  localparam logic [7:0] OP_RESET   = 8'h20;
  localparam logic [7:0] OP_CAPTURE = 8'h40;
  localparam logic [7:0] OP_SHIFT   = 8'h80;

  // Status flag bits (byte 61 of a packet)
  localparam int unsigned FLAG_SHIFT_BIT = 0;  // packet carries shift output
  localparam int unsigned FLAG_EOF_BIT   = 1;  // packet ends a halt or a step

  typedef logic [CMD_BYTES*8-1:0] cmd_t;   // byte 0 in the top 8 bits
  typedef logic [PKT_BYTES*8-1:0] pkt_t;   // byte 0 in the top 8 bits

  // Byte i of a command, counting from the operation code.
  function automatic logic [7:0] cmd_byte(input cmd_t c, input int unsigned i);
    return c[(CMD_BYTES-1-i)*8 +: 8];
  endfunction

  // Element configuration written by a load command.
  typedef struct packed {
    logic                       is_synapse;   // 0: neuron, 1: synapse
    logic [SEL_W-1:0]           out_sel;      // port watched for LTP/LTD
    logic signed [WEIGHT_W-1:0] thr_weight;   // neuron threshold or synapse weight
    logic [SEL_W-1:0]           distance;     // synapse delay in network cycles
    logic [NPORTS-1:0]          in_en;        // enabled input ports
    logic [7:0]                 ltp_refrac;   // LTP/LTD refractory period
  } elem_cfg_t;

  // Direction of port p (p mod 8): N, NE, E, SE, S, SW, W, NW.
  // Ports 0..7 reach the nearest neighbour, ports 8..15 the element two
  // steps away in the same direction.
  function automatic int port_drow(input int p);
    case (p % 8)
      0, 1, 7: return -((p / 8) + 1);
      3, 4, 5: return  ((p / 8) + 1);
      default: return 0;
    endcase
  endfunction

  function automatic int port_dcol(input int p);
    case (p % 8)
      1, 2, 3: return  ((p / 8) + 1);
      5, 6, 7: return -((p / 8) + 1);
      default: return 0;
    endcase
  endfunction

endpackage
