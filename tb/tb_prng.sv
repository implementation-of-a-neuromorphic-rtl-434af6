// tb_prng: checks the input-port selector against a bit-level reference
// model of a 63-bit Fibonacci LFSR with taps 63 and 62.
//
// Checks: the first start value equals the seed's low nibble, the register
// moves only when `step` is high, 300 consecutive start values match the
// model, `sel` walks start, start+1, ... (mod 16) over the 16 slots so every
// port is visited once per cycle, every start value 0..15 appears, and
// `clear` returns the exact same sequence (a repeatable run after reset).
module tb_prng;
  localparam logic [62:0] SEED = 63'h0123_4567_89AB_CDEF;

  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  logic [3:0] slot = 0, start, sel;
  int checks = 0, failures = 0;

  prng #(.SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  logic [62:0] model;
  logic [3:0]  first_run [300];
  bit          seen [16];

  function automatic logic [62:0] lfsr_next(input logic [62:0] s);
    logic fb;
    fb = s[62] ^ s[61];
    return {s[61:0], fb};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = SEED;
    #1 check(start == SEED[3:0], "seed after reset");
    // no step, no change
    repeat (3) @(negedge clk);
    check(start == SEED[3:0], "holds without step");
    for (int i = 0; i < 300; i++) begin
      first_run[i] = start;
      check(start == model[3:0], "start matches reference LFSR");
      seen[start] = 1;
      // walk the 16 slots
      for (int s = 0; s < 16; s++) begin
        slot = 4'(s); #1;
        check(sel == 4'(model[3:0] + 4'(s)), "sel = start + slot");
      end
      @(negedge clk); step = 1; @(negedge clk); step = 0;
      model = lfsr_next(model);
    end
    for (int v = 0; v < 16; v++) check(seen[v], "every start port occurs");
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < 300; i++) begin
      check(start == first_run[i], "same sequence after clear");
      step = 1; @(negedge clk); step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
