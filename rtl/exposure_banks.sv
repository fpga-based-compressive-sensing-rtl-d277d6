// exposure_banks: two banks of NUM_FRAMES set/reset flip-flops, used
// ping-pong by the sensing-matrix generator, plus the 2:1 output multiplexer.
// Each flip-flop holds one frame's exposure bit of one sensing-matrix
// element. Even-indexed elements are collected in bank 0 and odd-indexed ones
// in bank 1: while one bank receives the four SET pulses of the current
// element, the other is read through the multiplexer into the register stack
// and cleared.
// Interface: set_vec (decoder output) is applied as S0 when set_bank is 0 and
// as S1 when it is 1; clr0/clr1 are the synchronous active-high RESET inputs
// R0/R1 and take priority over SET; sel chooses the bank seen on q_sel.
// Timing: SET and RESET act on the rising clock edge (the design's flip-flops
// are edge triggered); q_sel is combinational from the registers.
// The banks, their ping-pong use, SET/RESET inputs and the multiplexer follow
// the design; RESET taking priority over SET is this implementation's choice.
module exposure_banks #(
  parameter int unsigned NUM_FRAMES = cs_pkg::NUM_FRAMES
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_FRAMES-1:0] set_vec,
  input  logic                  set_bank,
  input  logic                  clr0,
  input  logic                  clr1,
  input  logic                  sel,
  output logic [NUM_FRAMES-1:0] q_sel
);
  logic [NUM_FRAMES-1:0] bank0, bank1;

  always_ff @(posedge clk) begin
    if (!rst_n || clr0)  bank0 <= '0;
    else if (!set_bank)  bank0 <= bank0 | set_vec;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr1)  bank1 <= '0;
    else if (set_bank)   bank1 <= bank1 | set_vec;
  end

  assign q_sel = sel ? bank1 : bank0;
endmodule
