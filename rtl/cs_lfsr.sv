// cs_lfsr: 8-bit Fibonacci linear feedback shift register, the random source
// of the sensing-matrix generator. Its upper four bits are read as the
// candidate start index of a pixel's exposure bump.
// The register shifts left by one each cycle that en is high; the new bit 0 is
// the XOR of taps 7, 5, 4 and 3 (polynomial x^8 + x^6 + x^5 + x^4 + 1), which
// is maximal length: all 255 non-zero states recur with period 255.
// The width follows the design's 8-bit LFSR; polynomial and seed are this
// implementation's choice. A zero seed would lock up, so SEED must be non-zero.
// Timing: state updates on the rising clock edge; synchronous active-low reset
// loads SEED.
module cs_lfsr #(
  parameter int unsigned WIDTH = 8,
  parameter logic [WIDTH-1:0] SEED = 8'hA5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] state
);
  logic fb;
  assign fb = state[7] ^ state[5] ^ state[4] ^ state[3];

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[WIDTH-2:0], fb};
  end

  initial assert (SEED != '0) else $error("cs_lfsr: SEED must be non-zero");
endmodule
