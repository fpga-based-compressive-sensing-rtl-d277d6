// frame_dpram: dual-port RAM holding the compressed frame, 640x480 pixels of
// 8 bits (307200 words, 19-bit addresses).
// Port a reads and port b writes, as in the design's accumulator: a pixel is
// read on port a, the new partial sum is written back on port b a few clocks
// later.
// Timing: both ports share one clock. rddata_a is registered and valid one
// clock after a cycle with rden_a high; it holds its value while rden_a is
// low. A write takes effect on the rising edge when wten_b is high.
// Size, port split and signal names follow the design; the read latency and
// the hold behaviour are this implementation's choices.
module frame_dpram #(
  parameter int unsigned DEPTH = cs_pkg::FRAME_W * cs_pkg::FRAME_H,
  parameter int unsigned WIDTH = cs_pkg::PIX_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rden_a,
  input  logic [AW-1:0]    rdaddress_a,
  output logic [WIDTH-1:0] rddata_a,
  input  logic             wten_b,
  input  logic [AW-1:0]    wtaddress_b,
  input  logic [WIDTH-1:0] wtdata_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wten_b) mem[wtaddress_b] <= wtdata_b;
    if (rden_a) rddata_a <= mem[rdaddress_a];
  end
endmodule
