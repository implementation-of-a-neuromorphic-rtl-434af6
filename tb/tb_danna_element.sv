// tb_danna_element: self-checking test of one DANNA element.
//
// The bench plays the array timing itself: one network cycle is 16 slots,
// each with a sample enable and an accumulate enable, with the global port
// order start, start+1, ... (mod 16), followed by one GNC enable. The
// expected values below are worked out by hand from the element's rules.
//
// Neuron: addressing (a load for another address is ignored), accumulation
// below threshold, firing above it with the threshold on the output and the
// charge back at 0, the one-cycle refractory period (it still accumulates and
// fires a cycle later), disabled ports ignored, the effect of the sampling
// order (an excitatory and an inhibitory input: the threshold is crossed only
// if the excitatory one is sampled first), a cycle with adv low changes
// nothing.
// Synapse: an input fire leaves after exactly `distance` network cycles with
// the weight on the output, LTP when the watched neuron fires the cycle after
// the synapse, the LTP/LTD refractory period, LTD when the neuron fires
// alone.
// Monitor: capture and a 32-bit shift-out of {charge, fire count, stored
// fires}, the serial input arriving at the output after 32 shifts, and the
// reset command (clear) erasing the configuration.
module tb_danna_element;
  import danna_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic adv = 0, sample_tick = 0, acc_tick = 0, gnc_tick = 0;
  logic [3:0] sel = 0;
  logic [15:0] my_addr = 16'h0305;
  logic load_en = 0;
  logic [15:0] load_addr = 0;
  elem_cfg_t load_cfg = '0;
  logic capture = 0, shift = 0, mon_in = 0, mon_out;
  logic [15:0] in_fire = 0;
  logic [15:0][7:0] in_w = '0;
  logic fire_out;
  logic [7:0] w_out;

  int checks = 0, failures = 0;

  danna_element dut (.*);

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

  // One network cycle; `start` is the first port sampled.
  task automatic net_cycle(input int start, input bit run = 1);
    adv = run;
    for (int s = 0; s < 16; s++) begin
      sel = 4'(start + s);
      sample_tick = 1; @(negedge clk); sample_tick = 0;
      acc_tick = 1;    @(negedge clk); acc_tick = 0;
    end
    gnc_tick = 1; @(negedge clk); gnc_tick = 0;
    adv = 0;
  endtask

  task automatic load(input logic [15:0] a, input bit syn, input int osel,
                      input int tw, input int dst, input logic [15:0] en, input int refr);
    load_addr = a;
    load_cfg = '{is_synapse: syn, out_sel: 4'(osel), thr_weight: 8'(tw),
                 distance: 4'(dst), in_en: en, ltp_refrac: 8'(refr)};
    pulse(load_en);
  endtask

  logic [31:0] got;
  task automatic capture_and_shift(output logic [31:0] v);
    pulse(capture);
    for (int i = 31; i >= 0; i--) begin
      v[i] = mon_out;
      pulse(shift);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------------- neuron --------------------------------------------
    load(16'h0304, 0, 0, 50, 0, 16'hFFFF, 0);                 // other element
    load(16'h0305, 0, 0, 10, 0, 16'b0000_0000_0000_1001, 0);  // ports 0 and 3, thr 10
    in_fire = 0; in_fire[0] = 1; in_w[0] = 8'd6;
    net_cycle($urandom_range(15));
    check(fire_out == 0, "neuron: 6 <= 10 does not fire");
    capture_and_shift(got);
    check(got[31:16] == 16'd6, "neuron: monitor shows charge 6");
    check(got[15:8] == 8'd0, "neuron: no fires counted yet");
    net_cycle($urandom_range(15));
    check(fire_out == 1 && w_out == 8'd10, "neuron: 12 > 10 fires its threshold");
    capture_and_shift(got);
    check(got == {16'd0, 8'd1, 8'd0}, "neuron: charge back at bias, one fire counted");
    in_w[0] = 8'd20;
    net_cycle($urandom_range(15));
    check(fire_out == 0, "neuron: refractory cycle does not fire");
    capture_and_shift(got);
    check(got[31:16] == 16'd20, "neuron: accumulates while refractory");
    in_fire = 0;
    net_cycle($urandom_range(15));
    check(fire_out == 1, "neuron: fires after the refractory cycle");
    // disabled port
    in_fire = 0; in_fire[5] = 1; in_w[5] = 8'd100;
    net_cycle($urandom_range(15));
    capture_and_shift(got);
    check(fire_out == 0 && got == {16'd0, 8'd1, 8'd0}, "neuron: disabled port ignored");
    // sampling order: +20 on port 0, -15 on port 3
    in_fire = 0; in_fire[0] = 1; in_w[0] = 8'd20; in_fire[3] = 1; in_w[3] = 8'hF1;
    net_cycle(0);     // port 0 first: crosses 10 on the way
    check(fire_out == 1, "neuron: crossing seen when excitation comes first");
    capture_and_shift(got);
    check(got == {16'd0, 8'd1, 8'd0}, "neuron: charge reset, one fire counted");
    in_fire = 0;
    net_cycle(0);     // refractory, empty
    in_fire[0] = 1; in_fire[3] = 1;
    net_cycle(2);     // port 3 first: -15 then +20 = 5, no crossing
    check(fire_out == 0, "neuron: no crossing when inhibition comes first");
    // adv low: nothing moves
    in_fire = '1; in_w = '{default: 8'd50};
    net_cycle(0, 0);
    check(fire_out == 0, "adv low freezes the output");
    capture_and_shift(got);
    check(got == {16'd5, 8'd0, 8'd0}, "neuron: monitor word {charge 5, 0 fires, 0 stored}");

    // ---------------- synapse -------------------------------------------
    in_fire = 0; in_w = '0;
    // weight 5, distance 3, input port 2, watches port 9, refractory 2
    load(16'h0305, 1, 9, 5, 3, 16'b0000_0000_0000_0100, 2);
    in_fire[2] = 1; in_w[2] = 8'd77;
    net_cycle($urandom_range(15));        // cycle j: input fire sampled
    in_fire = 0;
    check(fire_out == 0, "synapse: not yet out after 1 cycle");
    net_cycle($urandom_range(15));
    check(fire_out == 0, "synapse: not yet out after 2 cycles");
    capture_and_shift(got);
    check(got == {16'd5, 8'd0, 8'd1}, "synapse: monitor {weight 5, 0 fires, 1 stored}");
    net_cycle($urandom_range(15));
    check(fire_out == 1 && w_out == 8'd5, "synapse: fires weight 5 after distance 3");
    capture_and_shift(got);
    check(got == {16'd5, 8'd1, 8'd0}, "synapse: one fire counted, FIFO empty");
    net_cycle($urandom_range(15));        // output visible; neuron integrates it
    check(fire_out == 0, "synapse: single event");
    in_fire[9] = 1;                       // watched neuron fires one cycle later
    net_cycle($urandom_range(15));
    in_fire = 0;
    capture_and_shift(got);
    check(got[31:16] == 16'd6, "synapse: LTP raised weight to 6");
    in_fire[9] = 1;                       // neuron fires alone, but refractory
    net_cycle($urandom_range(15));
    capture_and_shift(got);
    check(got[31:16] == 16'd6, "synapse: refractory blocks LTD (1)");
    net_cycle($urandom_range(15));
    capture_and_shift(got);
    check(got[31:16] == 16'd6, "synapse: refractory blocks LTD (2)");
    net_cycle($urandom_range(15));
    in_fire = 0;
    check(w_out == 8'd6, "synapse: output carries the weight of the previous cycle");
    capture_and_shift(got);
    check(got[31:16] == 16'd5, "synapse: LTD after the refractory period");

    // ---------------- monitor chain and clear ---------------------------
    capture_and_shift(got);
    check(got == {16'd5, 8'd0, 8'd0}, "synapse: monitor {weight 5, no new fire}");
    mon_in = 1;
    for (int i = 0; i < 32; i++) pulse(shift);
    check(mon_out == 1, "monitor: serial input reaches the output after 32 shifts");
    mon_in = 0;
    pulse(clear);
    check(fire_out == 0 && mon_out == 0, "clear empties the element");
    in_fire = '1; in_w = '{default: 8'd50};
    net_cycle(0);
    net_cycle(0);
    in_fire = 0;
    check(fire_out == 0, "clear erases the configuration (no port enabled)");

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
