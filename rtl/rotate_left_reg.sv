// rotate_left_reg: the 8-bit rotate-left register of the compressed-frame
// generator. It holds one row of the sensing matrix for the current frame and
// line. Its MSB (msbop) says whether the current pixel is exposed; rotating
// once per pixel repeats the 8-pixel pattern along the line.
// Interface: load (wins over rotate) copies din on the rising edge; rotate
// moves every bit one place towards the MSB and the MSB into bit 0. msbop,
// the register's MSB, is its only output. Reset clears it.
// The rotate-left register and msbop follow the design; load priority and
// reset are this implementation's choices.
module rotate_left_reg #(
  parameter int unsigned WIDTH = cs_pkg::BLK
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  input  logic             rotate,
  output logic             msbop
);
  logic [WIDTH-1:0] q;

  always_ff @(posedge clk) begin
    if (!rst_n)      q <= '0;
    else if (load)   q <= din;
    else if (rotate) q <= {q[WIDTH-2:0], q[WIDTH-1]};
  end

  assign msbop = q[WIDTH-1];
endmodule
