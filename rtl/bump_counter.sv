// bump_counter: the 2-bit counter and adder of the sensing-matrix generator.
// During the four SET clocks of one matrix element the counter runs 0..3 and
// the adder presents start_frame + count as the frame index, so the four
// consecutive frames of the exposure bump are addressed one per clock.
// Interface: clr (synchronous) returns the count to 0; en advances it by one
// (wrapping after BUMP-1); last is high while the count is BUMP-1.
// frame_index is combinational from start_frame and the count.
// The counter width and adder follow the design; clr/en/last are this
// implementation's control interface.
module bump_counter #(
  parameter int unsigned NUM_FRAMES = cs_pkg::NUM_FRAMES,
  parameter int unsigned BUMP       = cs_pkg::BUMP,
  localparam int unsigned IW        = $clog2(NUM_FRAMES + 1),
  localparam int unsigned CW        = $clog2(BUMP)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [IW-1:0] start_frame,
  output logic [IW-1:0] frame_index,
  output logic          last
);
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) count <= '0;
    else if (en)       count <= (count == CW'(BUMP - 1)) ? '0 : count + 1'b1;
  end

  assign frame_index = start_frame + IW'(count);
  assign last        = (count == CW'(BUMP - 1));
endmodule
