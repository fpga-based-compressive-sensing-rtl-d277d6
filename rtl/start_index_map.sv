// start_index_map: turns the random LFSR index into the first exposed frame
// of a pixel's bump (combinational).
// Indexes 1..NUM_FRAMES are valid; 0 and values above NUM_FRAMES are flagged
// invalid and the generator waits for the next LFSR value. A uniform start in
// 1..NUM_FRAMES-BUMP+1 would expose the first and last frames less often than
// the middle ones, so the valid range is spread over all NUM_FRAMES values and
// the ends are folded: an index up to BUMP maps to LOW_START (frame 1), an
// index above NUM_FRAMES-BUMP maps to NUM_FRAMES-BUMP+1 (frame 10), and the
// rest pass unchanged. With the defaults: 1..4 -> 1, 5..9 -> itself,
// 10..13 -> 10. Frames are numbered from 1.
// The folding and the valid range follow the design's algorithm. Its block
// diagram prints 4 as the start for low indexes while its algorithm and text
// say 1; 1 is used (LOW_START) because with 4 frames 1..3 would never be
// exposed. The invalid flag and the generalisation to other sizes are this
// implementation's own.
module start_index_map
#(
  parameter int unsigned NUM_FRAMES = cs_pkg::NUM_FRAMES,
  parameter int unsigned BUMP       = cs_pkg::BUMP,
  parameter int unsigned LOW_START  = cs_pkg::LOW_START,
  localparam int unsigned IW        = $clog2(NUM_FRAMES + 1)
) (
  input  logic [IW-1:0] index,
  output logic          valid,
  output logic [IW-1:0] start_frame
);
  localparam logic [IW-1:0] LOW_LIMIT  = IW'(BUMP);               // index < BUMP+1
  localparam logic [IW-1:0] HIGH_LIMIT = IW'(NUM_FRAMES - BUMP);  // index > this
  localparam logic [IW-1:0] HIGH_START = IW'(NUM_FRAMES - BUMP + 1);

  always_comb begin
    valid = (index != '0) && (index <= IW'(NUM_FRAMES));
    if (index <= LOW_LIMIT)      start_frame = IW'(LOW_START);
    else if (index > HIGH_LIMIT) start_frame = HIGH_START;
    else                         start_frame = index;
  end
endmodule
