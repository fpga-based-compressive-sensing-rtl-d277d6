// pixel_adder: the 8-bit adder of the compressed-frame generator with the
// right shift by two (RS2) on the camera pixel (combinational).
// sum = partial + (pixel >> SHIFT), where partial is the value read back
// from the compressed-frame RAM. In the first frame of a group the RAM is not
// read: with first high the partial sum is taken as zero, and with exposed
// low the pixel contributes nothing, so unexposed pixels are written as zero.
// The sum is PIX_W bits and wraps; with four exposures of pixel/4 it cannot
// exceed 4*63 = 252.
// The right shift by two before an 8-bit adder follows the design; the
// first/exposed inputs, which zero the accumulator during the first frame of a
// group, are this implementation's own.
// Each sample is truncated before the addition, so the result can be up to
// 3 below the exact mean of the four samples.
module pixel_adder #(
  parameter int unsigned PIX_W = cs_pkg::PIX_W,
  parameter int unsigned SHIFT = 2
) (
  input  logic [PIX_W-1:0] partial,
  input  logic [PIX_W-1:0] pixel,
  input  logic             exposed,
  input  logic             first,
  output logic [PIX_W-1:0] sum
);
  assign sum = (first ? '0 : partial) + (exposed ? (pixel >> SHIFT) : '0);
endmodule
