// compressed_frame_gen: accumulates NUM_FRAMES video frames into one
// coded-exposure frame, one pixel per clock.
//
// How it works: for every line y of frame f the sensing-matrix row
// 8*(f-1) + (y mod 8) is taken from the sensing-matrix BRAM into an 8-bit
// rotate-left register. Each clock the register's MSB (msbop) decides whether
// the current pixel is exposed in this frame; the register then rotates, so the
// 8-pixel pattern repeats across the line and the 8x8 tile covers the frame
// without overlap. An exposed pixel is read from the compressed-frame RAM on
// port a; one clock later the camera pixel divided by four (right shift by
// SHIFT=2) is added to it by an 8-bit adder, and the sum is written back to the
// same address on port b. Every pixel is exposed in exactly BUMP=4 frames, so
// the result is the average of its four exposed samples and cannot overflow.
// The next line's row is addressed during the whole current line and loaded
// into the rotate register on the line's last pixel, so lines follow without
// gaps.
// The accumulator needs no separate clearing: the first frame of a group
// visits every pixel once, so during that frame every location is written
// without a read, with (pixel >> 2) where the pixel is exposed and zero where
// it is not. Later frames read, add and write only exposed pixels.
//
// Sequence after start: for each frame, wait for frame_ready, two clocks to
// fetch the first row, FRAME_W*FRAME_H pixel clocks, release_frame; after the
// last frame two clocks drain the write pipeline and done pulses. A group of
// 13 frames therefore takes 13*(FRAME_W*FRAME_H + 3) clocks when frames are
// waiting: one pixel per clock, 651 frames/s at 200 MHz for 640x480.
// Interface: pix_addr/pix_data read the input frame buffer (one clock
// latency); sm_raddr/sm_rdata read the sensing-matrix BRAM (one clock
// latency); rden_a/rdaddress_a/rddata_a and wten_b/wtaddress_b/wtdata_b are the
// two ports of the compressed-frame RAM.
// Follows the design: the rotate register, msbop as read enable and (delayed)
// write enable, the shift-by-two before an 8-bit adder, one pixel per clock.
// This implementation's choices: overwriting instead of accumulating during
// the first frame (the design does not say how the RAM is zeroed), the row
// prefetch, and the handshake with the input frame buffer.
module compressed_frame_gen #(
  parameter int unsigned FRAME_W    = cs_pkg::FRAME_W,
  parameter int unsigned FRAME_H    = cs_pkg::FRAME_H,
  parameter int unsigned NUM_FRAMES = cs_pkg::NUM_FRAMES,
  parameter int unsigned BLK        = cs_pkg::BLK,
  parameter int unsigned PIX_W      = cs_pkg::PIX_W,
  parameter int unsigned SHIFT      = 2,
  localparam int unsigned NPIX      = FRAME_W * FRAME_H,
  localparam int unsigned AW        = $clog2(NPIX),
  localparam int unsigned SAW       = $clog2(NUM_FRAMES * BLK),
  localparam int unsigned BW        = $clog2(BLK),
  localparam int unsigned FW        = $clog2(NUM_FRAMES + 1),
  localparam int unsigned XW        = $clog2(FRAME_W),
  localparam int unsigned YW        = $clog2(FRAME_H)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // sensing-matrix BRAM read port
  output logic [SAW-1:0]   sm_raddr,
  input  logic [BLK-1:0]   sm_rdata,
  // input frame buffer read side
  input  logic             frame_ready,
  output logic [AW-1:0]    pix_addr,
  input  logic [PIX_W-1:0] pix_data,
  output logic             release_frame,
  // compressed-frame dual-port RAM
  output logic             rden_a,
  output logic [AW-1:0]    rdaddress_a,
  input  logic [PIX_W-1:0] rddata_a,
  output logic             wten_b,
  output logic [AW-1:0]    wtaddress_b,
  output logic [PIX_W-1:0] wtdata_b
);
  typedef enum logic [2:0] {S_IDLE, S_WAITF, S_PREF0, S_PREF1, S_RUN, S_DRAIN} state_t;
  state_t state;

  logic [FW-1:0]    f;
  logic [XW-1:0]    x;
  logic [YW-1:0]    y;
  logic [AW-1:0]    p;           // pixel address
  logic             rot_load, rot_rotate;
  logic [PIX_W-1:0] sum;
  logic [1:0]       drain;
  logic             msbop, line_end, frame_end;
  logic [BW-1:0]    next_row;
  logic             first;       // first frame of the group: overwrite
  // accumulate pipeline: stage 1 (read issued), stage 2 (write)
  logic             s1_en, s1_add, s1_first;
  logic [AW-1:0]    s1_addr;
  logic             s2_en;
  logic [AW-1:0]    s2_addr;
  logic [PIX_W-1:0] s2_data;

  assign line_end  = (x == XW'(FRAME_W - 1));
  assign frame_end = line_end && (y == YW'(FRAME_H - 1));
  assign next_row  = (state == S_RUN) ? BW'(y + 1'b1) : '0;
  assign sm_raddr  = SAW'(f * BLK + next_row);

  assign busy          = (state != S_IDLE);
  assign pix_addr      = p;
  assign first         = (f == '0);
  assign rden_a        = (state == S_RUN) && msbop && !first;
  assign rdaddress_a   = p;
  assign release_frame = (state == S_RUN) && frame_end;

  assign wten_b      = s2_en;
  assign wtaddress_b = s2_addr;
  assign wtdata_b    = s2_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_en <= 1'b0;
      s2_en <= 1'b0;
    end else begin
      s1_en <= (state == S_RUN) && (msbop || first);
      s2_en <= s1_en;
    end
    s1_add   <= msbop;
    s1_first <= first;
    s1_addr  <= p;
    s2_addr  <= s1_addr;
    // the 8-bit adder: old partial sum (zero in the first frame) plus the
    // exposed pixel divided by four
    s2_data  <= sum;
  end

  // the row register is loaded before each frame and at every line end, and
  // rotated on every other pixel
  assign rot_load   = (state == S_PREF1) || (state == S_RUN && line_end);
  assign rot_rotate = (state == S_RUN);

  rotate_left_reg #(.WIDTH(BLK)) u_rot (
    .clk, .rst_n, .load(rot_load), .din(sm_rdata), .rotate(rot_rotate),
    .msbop
  );

  pixel_adder #(.PIX_W(PIX_W), .SHIFT(SHIFT)) u_add (
    .partial(rddata_a), .pixel(pix_data), .exposed(s1_add), .first(s1_first), .sum
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      f     <= '0;
      x     <= '0;
      y     <= '0;
      p     <= '0;
      drain <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          f     <= '0;
          state <= S_WAITF;
        end
        S_WAITF: if (frame_ready) state <= S_PREF0;
        S_PREF0: state <= S_PREF1;              // BRAM read of row 0 in flight
        S_PREF1: begin
          x     <= '0;
          y     <= '0;
          p     <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          p <= p + 1'b1;
          if (line_end) begin
            x <= '0;                            // rot loads the next line's row
            y <= y + 1'b1;
          end else begin
            x <= x + 1'b1;
          end
          if (frame_end) begin
            f <= f + 1'b1;
            if (f == FW'(NUM_FRAMES - 1)) begin
              drain <= '0;
              state <= S_DRAIN;
            end else state <= S_WAITF;
          end
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 2'd2) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert ((1 << BW) == BLK && FRAME_W >= 2)
    else $error("compressed_frame_gen: BLK must be a power of two and FRAME_W >= 2");
endmodule
