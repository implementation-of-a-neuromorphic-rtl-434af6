// clock_gen: the DANNA array clocking module.
//
// The array runs on four related clocks: the Global Network Clock (GNC, one
// period per network cycle), the Acquire Fire Clock (AFC, one period per input
// port sampled), the Accumulator Clock (AC, twice the AFC rate) and the
// Accumulator Enable Clock (AEC, AFC rate, shifted by 90 degrees). With 16
// ports per element there are 16 AFC periods per GNC period; the reference
// rates are AC 16 MHz, AFC/AEC 8 MHz and GNC 0.5 MHz.
//
// This implementation keeps the whole array in one clock domain: all four
// array clocks are produced as level signals for observation and as one-cycle
// enables for the logic, derived from a counter on the system clock `clk`.
// CLK_PER_AC system clocks make one AC period (6 at 100 MHz gives 16.7 MHz
// and a 1.92 us network cycle, close to the 2 us reference); that divider is
// this design's choice.
//
// Enables inside one network cycle of N = CLK_PER_AC*AC_PER_AFC*AFC_PER_GNC
// clocks (cnt = 0..N-1, AFC slot s = cnt / (CLK_PER_AC*AC_PER_AFC)):
//   cyc_start   cnt == 0        : control may change the array here
//   sample_tick 2 clocks after an AFC rising edge: latch the selected input
//   acc_tick    2 clocks after the AC rising edge that falls inside the AEC
//               high phase: accumulate the latched input
//   gnc_tick    cnt == N-1      : close the network cycle (fire / shift FIFO)
// The two-clock offset leaves the first clocks of a cycle to the programming
// interface, so a load or capture issued at cyc_start is seen by slot 0.
module clock_gen #(
  parameter int unsigned CLK_PER_AC  = 6,   // system clocks per AC period (>= 3)
  parameter int unsigned AC_PER_AFC  = 2,   // AC periods per AFC period
  parameter int unsigned AFC_PER_GNC = 16   // AFC periods (input slots) per network cycle
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,        // synchronous restart of the cycle counter
  output logic       gnc_clk,      // level views of the four array clocks
  output logic       afc_clk,
  output logic       aec_clk,
  output logic       ac_clk,
  output logic       cyc_start,
  output logic       sample_tick,
  output logic       acc_tick,
  output logic       gnc_tick,
  output logic [$clog2(AFC_PER_GNC)-1:0] slot   // current AFC slot
);
  localparam int unsigned CLK_PER_AFC = CLK_PER_AC * AC_PER_AFC;
  localparam int unsigned CLK_PER_GNC = CLK_PER_AFC * AFC_PER_GNC;
  localparam int unsigned CW = $clog2(CLK_PER_GNC);
  localparam int unsigned AW = $clog2(CLK_PER_AFC);

  logic [CW-1:0] cnt;
  logic [AW-1:0] afc_cnt;   // position inside the current AFC period

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      afc_cnt <= '0;
      slot    <= '0;
    end else if (clear || cnt == CW'(CLK_PER_GNC - 1)) begin
      cnt     <= '0;
      afc_cnt <= '0;
      slot    <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (afc_cnt == AW'(CLK_PER_AFC - 1)) begin
        afc_cnt <= '0;
        slot    <= slot + 1'b1;
      end else begin
        afc_cnt <= afc_cnt + 1'b1;
      end
    end
  end

  // Position inside the current AC period.
  logic [AW-1:0] ac_pos;
  always_comb ac_pos = afc_cnt % AW'(CLK_PER_AC);

  always_comb begin
    gnc_clk     = cnt < CW'(CLK_PER_GNC / 2);
    afc_clk     = afc_cnt < AW'(CLK_PER_AFC / 2);
    // 90 degrees behind the AFC: high for the middle half of the AFC period.
    aec_clk     = (afc_cnt >= AW'(CLK_PER_AFC / 4)) &&
                  (afc_cnt <  AW'(CLK_PER_AFC / 4 + CLK_PER_AFC / 2));
    ac_clk      = ac_pos < AW'(CLK_PER_AC / 2);
    cyc_start   = (cnt == '0) && !clear;
    sample_tick = (afc_cnt == AW'(2)) && !clear;
    acc_tick    = (afc_cnt == AW'(CLK_PER_AC + 2)) && !clear;
    gnc_tick    = (cnt == CW'(CLK_PER_GNC - 1)) && !clear;
  end

  initial begin
    assert (CLK_PER_AC >= 3) else $error("clock_gen: CLK_PER_AC must be at least 3");
    assert (AC_PER_AFC == 2) else $error("clock_gen: the AEC window assumes two AC periods per AFC");
  end

endmodule
