// sm_bram: the 104x8-bit block RAM that holds the sensing matrix.
// Address 8*(f-1)+r holds row r (0..7) of the 8x8 matrix for frame f (1..13);
// bit 7 of a byte is column 0. One write port (from the sensing-matrix
// generator) and one read port (to the compressed-frame generator).
// Timing: write on the rising edge when we is high; read data is registered,
// valid one clock after raddr (block-RAM style). A read of the address being
// written returns the old contents.
// Size and address layout follow the design; the registered read port is this
// implementation's choice.
module sm_bram #(
  parameter int unsigned DEPTH = cs_pkg::NUM_FRAMES * cs_pkg::BLK,
  parameter int unsigned WIDTH = cs_pkg::BLK,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
