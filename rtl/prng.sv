// prng: global input-port selector of the DANNA array.
//
// Every element samples its 16 input ports one after another, one port per
// AFC slot, all elements in the same order. The first port of a network cycle
// is chosen pseudo-randomly so that no port is favoured; the following slots
// walk through the remaining ports in order (sel = start + slot, modulo 16).
//
// The start value is the low 4 bits of a 63-bit linear-feedback shift register
// built from plain flip-flops, so that a reset (the `clear` input, driven by
// the reset command, or rst_n) returns it to the same seed and a run can be
// repeated exactly. The register advances once per network cycle that the
// array actually executes (`step`). The feedback polynomial
// x^63 + x^62 + 1 (maximal length) and the seed are this design's choice.
//
// Timing: `sel` is combinational from the register and `slot`; the register
// changes on the clock edge where `step` is high.
module prng #(
  parameter logic [62:0] SEED = 63'h2B7E_1516_28AE_D2A6,
  parameter int unsigned SEL_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,   // reload the seed
  input  logic             step,    // advance once (end of a network cycle)
  input  logic [SEL_W-1:0] slot,    // current AFC slot
  output logic [SEL_W-1:0] start,   // first port of this network cycle
  output logic [SEL_W-1:0] sel      // port sampled in this slot
);
  logic [62:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       lfsr <= SEED;
    else if (clear)   lfsr <= SEED;
    else if (step)    lfsr <= {lfsr[61:0], lfsr[62] ^ lfsr[61]};
  end

  always_comb begin
    start = lfsr[SEL_W-1:0];
    sel   = start + slot;
  end

  initial assert (SEED != '0) else $error("prng: the seed must not be zero");

endmodule
