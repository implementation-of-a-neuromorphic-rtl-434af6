// tb_clock_gen: checks the array clock enables of clock_gen at its default
// divider (6 system clocks per AC period).
//
// Over several network cycles it checks: 192 clocks per network cycle
// (16 AFC slots x 2 AC periods x 6 clocks, i.e. AFC = GNC x 16 and
// AC = AFC x 2 as in the reference clock rates), exactly one cyc_start and one
// gnc_tick per cycle at its first and last clock, 16 sample and 16 accumulate
// enables per cycle with slot numbers 0..15 in order, every accumulate enable
// inside an AEC high phase and two clocks after an AC rising edge, and AEC
// lagging AFC by a quarter of the AFC period.
module tb_clock_gen;
  localparam int CPA = 6;
  localparam int N   = CPA * 2 * 16;

  logic clk = 0, rst_n = 0, clear = 0;
  logic gnc_clk, afc_clk, aec_clk, ac_clk, cyc_start, sample_tick, acc_tick, gnc_tick;
  logic [3:0] slot;
  int checks = 0, failures = 0;

  clock_gen #(.CLK_PER_AC(CPA)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  int t, n_start, n_gnc, n_samp, n_acc;
  int exp_slot_s, exp_slot_a;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // reference counter in step with the DUT: cnt == 0 on the first clock after reset
    for (int cyc = 0; cyc < 4; cyc++) begin
      n_start = 0; n_gnc = 0; n_samp = 0; n_acc = 0; exp_slot_s = 0; exp_slot_a = 0;
      for (t = 0; t < N; t++) begin
        #1;
        if (cyc_start) begin n_start++; check(t == 0, "cyc_start on first clock"); end
        if (gnc_tick)  begin n_gnc++;   check(t == N-1, "gnc_tick on last clock"); end
        if (sample_tick) begin
          check(int'(slot) == exp_slot_s, "slot order at sample");
          check((t % (2*CPA)) == 2, "sample two clocks after AFC rise");
          exp_slot_s++; n_samp++;
        end
        if (acc_tick) begin
          check(int'(slot) == exp_slot_a, "slot order at accumulate");
          check((t % (2*CPA)) == CPA + 2, "accumulate two clocks after the AEC-window AC rise");
          exp_slot_a++; n_acc++;
        end
        check(gnc_clk == (t < N/2), "GNC level");
        check(afc_clk == ((t % (2*CPA)) < CPA), "AFC level");
        check(ac_clk == ((t % CPA) < CPA/2), "AC level");
        check(aec_clk == (((t % (2*CPA)) >= CPA/2) && ((t % (2*CPA)) < CPA/2 + CPA)), "AEC is AFC delayed by 90 degrees");
        @(negedge clk);
      end
      check(n_start == 1 && n_gnc == 1, "one start and one GNC tick per cycle");
      check(n_samp == 16 && n_acc == 16, "16 samples and 16 accumulations per cycle");
    end
    // clear restarts the cycle
    @(negedge clk); @(negedge clk); @(negedge clk);
    clear = 1; @(negedge clk); clear = 0; #1;
    check(cyc_start == 1, "clear restarts the network cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
