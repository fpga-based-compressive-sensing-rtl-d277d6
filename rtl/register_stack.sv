// register_stack: the 8x13-bit register stack that turns element-wise
// exposure words into frame-wise sensing-matrix rows.
// ld pushes the 13-bit word of one matrix element onto the top of the stack;
// the older words move one place down. After the BLK elements of one matrix
// row have been pushed, shift moves every word one bit towards bit 0 (frame 1)
// on each clock; the BLK bits that leave the words form one output byte, the
// row of the sensing matrix for one frame. Thirteen shifts give frames 1..13
// in order.
// Interface: dout[j] is bit 0 of word j. Word BLK-1 (the bottom) holds the
// first element pushed, i.e. column 0 of the row, so column 0 appears on
// dout[BLK-1], the MSB, which the compressor uses first.
// Timing: ld and shift act on the rising edge (ld wins if both are high);
// dout is combinational from the registers. The design drives each word with
// one ld/shift line; here ld and shift are separate enables so the stack can
// also hold its contents.
module register_stack #(
  parameter int unsigned NUM_FRAMES = cs_pkg::NUM_FRAMES,
  parameter int unsigned BLK        = cs_pkg::BLK
) (
  input  logic                  clk,
  input  logic                  ld,
  input  logic                  shift,
  input  logic [NUM_FRAMES-1:0] din,
  output logic [BLK-1:0]        dout
);
  logic [NUM_FRAMES-1:0] word [BLK];

  always_ff @(posedge clk) begin
    if (ld) begin
      word[0] <= din;
      for (int i = 1; i < BLK; i++) word[i] <= word[i-1];
    end else if (shift) begin
      for (int i = 0; i < BLK; i++) word[i] <= word[i] >> 1;
    end
  end

  always_comb
    for (int j = 0; j < BLK; j++) dout[j] = word[j][0];
endmodule
