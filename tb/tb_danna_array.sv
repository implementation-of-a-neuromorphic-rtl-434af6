// tb_danna_array: wiring of a 4 x 5 DANNA array.
//
// The bench drives the array timing itself (16 sample/accumulate slot pairs
// with a random start port, then a GNC enable) and reads element state through
// the monitor chains: capture, then 32 x ROWS shifts, column c arriving on
// col_out[c] top row first, MSB first.
//
//  1. Address decoding and monitor chains: every element is loaded as a
//     synapse with its own weight (row*COLS+col+1); a load to an address
//     outside the array changes nothing. The monitor read-out must show each
//     weight at the right position.
//  2. Port wiring: for each of the 16 ports, a random target element T whose
//     port p lies inside the array is made a synapse listening to port p
//     only, and the element at T + offset(p) is made a self-firing neuron
//     (threshold -1, so a charge of 0 exceeds it). T must fire. The same test
//     with all other ports enabled must leave T silent.
//  3. External input: neuron (r,0) listening to port 6 (west) fires when
//     external input r carries a charge above its threshold, and not for the
//     other inputs.
//  4. External output: a self-firing neuron at (r, COLS-1) appears on
//     external output r with its threshold as the value; the other outputs
//     stay quiet.
module tb_danna_array;
  import danna_pkg::*;

  localparam int ROWS = 4, COLS = 5;

  logic clk = 0, rst_n = 0, clear = 0;
  logic adv = 0, sample_tick = 0, acc_tick = 0, gnc_tick = 0;
  logic [3:0] sel = 0;
  logic load_en = 0;
  logic [15:0] load_addr = 0;
  elem_cfg_t load_cfg = '0;
  logic capture = 0, shift = 0;
  logic [N_EXT-1:0] ext_in_fire = '0;
  logic [N_EXT-1:0][7:0] ext_in_w = '0;
  logic [N_EXT-1:0] ext_out_fire;
  logic [N_EXT-1:0][7:0] ext_out_w;
  logic [SHIFT_BITS-1:0] col_out;
  int checks = 0, failures = 0;

  danna_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  // Counts of external output fires seen at gnc enables.
  int ext_seen [N_EXT];
  task automatic net_cycle();
    int start = $urandom_range(15);
    adv = 1;
    for (int s = 0; s < 16; s++) begin
      sel = 4'(start + s);
      sample_tick = 1; @(negedge clk); sample_tick = 0;
      acc_tick = 1;    @(negedge clk); acc_tick = 0;
    end
    gnc_tick = 1; @(negedge clk); gnc_tick = 0;
    adv = 0;
    for (int i = 0; i < N_EXT; i++) if (ext_out_fire[i]) ext_seen[i]++;
  endtask

  task automatic load(input int r, input int c, input bit syn, input int tw,
                      input logic [15:0] en);
    load_addr = {8'(r), 8'(c)};
    load_cfg = '{is_synapse: syn, out_sel: 4'd0, thr_weight: 8'(tw),
                 distance: 4'd1, in_en: en, ltp_refrac: 8'd255};
    pulse(load_en);
  endtask

  logic [31:0] mon [ROWS][COLS];
  task automatic read_monitors();
    pulse(capture);
    for (int r = 0; r < ROWS; r++)
      for (int b = 31; b >= 0; b--) begin
        for (int c = 0; c < COLS; c++) mon[r][c][b] = col_out[c];
        pulse(shift);
      end
  endtask

  // Offsets of port p: must match the paper's 16-port neighbourhood
  // (N, NE, E, SE, S, SW, W, NW at distance 1, then at distance 2).
  function automatic int drow(input int p);
    int d = (p < 8) ? 1 : 2;
    case (p % 8)
      0, 1, 7: return -d;
      3, 4, 5: return d;
      default: return 0;
    endcase
  endfunction
  function automatic int dcol(input int p);
    int d = (p < 8) ? 1 : 2;
    case (p % 8)
      1, 2, 3: return d;
      5, 6, 7: return -d;
      default: return 0;
    endcase
  endfunction

  bit ok;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 1. address decoding and monitor chains ----------------------------
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        load(r, c, 1, r * COLS + c + 1, 16'h0000);
    load(10, 10, 1, 99, 16'h0000);       // no such element
    load(0, 7, 1, 99, 16'h0000);         // column outside the array
    read_monitors();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        check(mon[r][c] == {16'(r * COLS + c + 1), 16'h0000},
              $sformatf("element (%0d,%0d) holds its own weight", r, c));
    check(col_out[SHIFT_BITS-1:COLS] == '0, "unused column outputs are 0");

    // ---- 2. port wiring ----------------------------------------------------
    for (int p = 0; p < NPORTS; p++) begin
      int tr, tc, sr, sc;
      do begin
        tr = $urandom_range(ROWS - 1);
        tc = $urandom_range(COLS - 1);
        sr = tr + drow(p);
        sc = tc + dcol(p);
      end while (sr < 0 || sr >= ROWS || sc < 0 || sc >= COLS);
      for (int neg = 0; neg < 2; neg++) begin
        pulse(clear);
        load(sr, sc, 0, -1, 16'h0000);                       // self-firing neuron
        load(tr, tc, 1, 3, neg ? ~(16'(1) << p) : (16'(1) << p));
        repeat (4) net_cycle();
        read_monitors();
        if (neg == 0)
          check(mon[tr][tc][15:8] != 0,
                $sformatf("port %0d of (%0d,%0d) hears (%0d,%0d)", p, tr, tc, sr, sc));
        else
          check(mon[tr][tc][15:8] == 0,
                $sformatf("other ports of (%0d,%0d) do not hear (%0d,%0d)", tr, tc, sr, sc));
        check(mon[sr][sc][15:8] == 8'd2, "self-firing neuron fires every other cycle");
      end
    end

    // ---- 3. external input -------------------------------------------------
    pulse(clear);
    for (int r = 0; r < ROWS; r++) load(r, 0, 0, 5, 16'h0040);
    ext_in_fire[2] = 1; ext_in_w[2] = 8'd10;
    ext_in_fire[1] = 1; ext_in_w[1] = 8'd3;       // below threshold
    net_cycle();
    ext_in_fire = '0; ext_in_w = '0;
    net_cycle();
    read_monitors();
    ok = 1;
    for (int r = 0; r < ROWS; r++)
      if (mon[r][0][15:8] != ((r == 2) ? 8'd1 : 8'd0)) ok = 0;
    check(ok, "external input 2 reaches the west port of (2,0) only");
    check(mon[1][0][31:16] == 16'd3, "external input 1 charge integrated by (1,0)");

    // ---- 4. external output ------------------------------------------------
    pulse(clear);
    load(1, COLS - 1, 0, -1, 16'h0000);
    load(3, COLS - 2, 0, -1, 16'h0000);           // not in the last column
    foreach (ext_seen[i]) ext_seen[i] = 0;
    net_cycle();
    check(ext_out_fire[1] && ext_out_w[1] == 8'hFF, "external output 1 carries the neuron's threshold");
    repeat (3) net_cycle();
    ok = 1;
    foreach (ext_seen[i]) if (ext_seen[i] != ((i == 1) ? 2 : 0)) ok = 0;
    check(ok, "only external output 1 fires, every other cycle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
