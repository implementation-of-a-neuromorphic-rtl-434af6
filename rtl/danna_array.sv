// danna_array: a ROWS x COLS grid of DANNA elements.
//
// Each element's port p (p = 0..15) is fed by the element one step (p < 8) or
// two steps (p >= 8) away in direction p mod 8 (N, NE, E, SE, S, SW, W, NW);
// row 0 is the top row. Ports that point off the grid are tied off, except
// that the west port (port 6) of the first N_EXT elements of column 0 carries
// external input r, and the output of the first N_EXT elements of the last
// column is external output r.
//
// Each element knows its address {row[7:0], col[7:0]}; load commands are
// broadcast to all of them. The monitor shift registers of each column form a
// chain from the bottom row to the top row; the top element's serial output
// is bit `col` of `col_out`, which feeds the shift-output field of a status
// packet. Capture and shift reach every element, programmed or not.
//
// The default size, 47 x 47 = 2,209 elements, is the largest array reported
// for the development kit's Virtex-7 690T FPGA. Where the external I/O sits
// on the array edge is this design's choice. All timing inputs come from
// clock_gen and prng and reach every element unchanged.
module danna_array
  import danna_pkg::*;
#(
  parameter int unsigned ROWS = 47,
  parameter int unsigned COLS = 47
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clear,
  input  logic                               adv,
  input  logic                               sample_tick,
  input  logic                               acc_tick,
  input  logic                               gnc_tick,
  input  logic [SEL_W-1:0]                   sel,
  input  logic                               load_en,
  input  logic [15:0]                        load_addr,
  input  elem_cfg_t                          load_cfg,
  input  logic                               capture,
  input  logic                               shift,
  input  logic [N_EXT-1:0]                   ext_in_fire,
  input  logic [N_EXT-1:0][WEIGHT_W-1:0]     ext_in_w,
  output logic [N_EXT-1:0]                   ext_out_fire,
  output logic [N_EXT-1:0][WEIGHT_W-1:0]     ext_out_w,
  output logic [SHIFT_BITS-1:0]              col_out
);
  logic [ROWS-1:0][COLS-1:0]                fire;
  logic [ROWS-1:0][COLS-1:0][WEIGHT_W-1:0]  wval;
  logic [ROWS-1:0][COLS-1:0]                mon;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [NPORTS-1:0]                in_fire;
      logic [NPORTS-1:0][WEIGHT_W-1:0]  in_w;
      logic                             mon_in;

      for (genvar p = 0; p < NPORTS; p++) begin : g_port
        localparam int SR = int'(r) + port_drow(p);
        localparam int SC = int'(c) + port_dcol(p);
        if (SR >= 0 && SR < int'(ROWS) && SC >= 0 && SC < int'(COLS)) begin : g_in
          assign in_fire[p] = fire[SR][SC];
          assign in_w[p]    = wval[SR][SC];
        end else if (p == 6 && c == 0 && r < int'(N_EXT)) begin : g_ext
          assign in_fire[p] = ext_in_fire[r];
          assign in_w[p]    = ext_in_w[r];
        end else begin : g_off
          assign in_fire[p] = 1'b0;
          assign in_w[p]    = '0;
        end
      end

      if (r == ROWS - 1) begin : g_bottom
        assign mon_in = 1'b0;
      end else begin : g_chain
        assign mon_in = mon[r+1][c];
      end

      danna_element u_elem (
        .clk, .rst_n, .clear, .adv, .sample_tick, .acc_tick, .gnc_tick, .sel,
        .my_addr  ({8'(r), 8'(c)}),
        .load_en, .load_addr, .load_cfg,
        .capture, .shift,
        .mon_in   (mon_in),
        .mon_out  (mon[r][c]),
        .in_fire  (in_fire),
        .in_w     (in_w),
        .fire_out (fire[r][c]),
        .w_out    (wval[r][c])
      );
    end
  end

  for (genvar i = 0; i < int'(N_EXT); i++) begin : g_ext_out
    if (i < int'(ROWS)) begin : g_on
      assign ext_out_fire[i] = fire[i][COLS-1];
      assign ext_out_w[i]    = wval[i][COLS-1];
    end else begin : g_none
      assign ext_out_fire[i] = 1'b0;
      assign ext_out_w[i]    = '0;
    end
  end

  for (genvar c = 0; c < int'(SHIFT_BITS); c++) begin : g_col_out
    if (c < int'(COLS)) begin : g_on
      assign col_out[c] = mon[0][c];
    end else begin : g_none
      assign col_out[c] = 1'b0;
    end
  end

  initial begin
    assert (COLS <= 120) else $error("danna_array: at most 120 columns can be monitored");
    assert (ROWS <= 256 && COLS <= 256) else $error("danna_array: addresses are 8 bits per axis");
  end

endmodule
