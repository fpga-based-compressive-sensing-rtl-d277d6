// frame_decoder: the 4:13 decoder of the sensing-matrix generator
// (combinational). A frame index 1..NUM_FRAMES drives exactly one of the
// NUM_FRAMES outputs high (bit f-1 for frame f); these outputs are the
// active-high SET inputs of a DFF bank. With en low, or an index outside
// 1..NUM_FRAMES, all outputs are low.
// The 4:13 decoder feeding the flip-flop SET inputs is the design's; the
// enable input is this implementation's addition.
module frame_decoder #(
  parameter int unsigned NUM_FRAMES = cs_pkg::NUM_FRAMES,
  localparam int unsigned IW        = $clog2(NUM_FRAMES + 1)
) (
  input  logic [IW-1:0]         frame_index,
  input  logic                  en,
  output logic [NUM_FRAMES-1:0] onehot
);
  always_comb begin
    onehot = '0;
    for (int unsigned f = 1; f <= NUM_FRAMES; f++)
      if (en && frame_index == IW'(f)) onehot[f-1] = 1'b1;
  end
endmodule
