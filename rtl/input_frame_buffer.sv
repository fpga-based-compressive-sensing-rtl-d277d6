// input_frame_buffer: camera-side ping-pong frame store. Two frame memories
// of FRAME_W x FRAME_H pixels alternate: the camera fills one while the
// compressor reads the other, so the camera never waits for the encoder.
//
// Write side: cam_valid/cam_pixel deliver one grayscale pixel per clock in
// raster order, frame after frame; pixels are counted to find frame borders.
// When a frame is complete its bank is marked full and the camera moves on to
// the other bank. If that bank is still full (the reader has not released it)
// the whole incoming frame is discarded and dropped is incremented; the
// decision is taken at the first pixel of each frame.
// Read side: frame_ready says the read bank holds a complete frame. rd_data is
// the pixel at rd_addr of the read bank, registered (one clock latency).
// A one-clock release_frame pulse marks the read bank empty and moves the
// reader to the other bank; the read issued in that same clock still returns
// data from the released bank.
// The two memories and their ping-pong use follow the design; the
// full/empty flags, the frame-drop policy and the pixel counting are this
// implementation's choices.
module input_frame_buffer #(
  parameter int unsigned FRAME_W = cs_pkg::FRAME_W,
  parameter int unsigned FRAME_H = cs_pkg::FRAME_H,
  parameter int unsigned PIX_W   = cs_pkg::PIX_W,
  localparam int unsigned NPIX   = FRAME_W * FRAME_H,
  localparam int unsigned AW     = $clog2(NPIX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cam_valid,
  input  logic [PIX_W-1:0] cam_pixel,
  output logic             frame_ready,
  input  logic [AW-1:0]    rd_addr,
  output logic [PIX_W-1:0] rd_data,
  input  logic             release_frame,
  output logic [15:0]      dropped
);
  logic [PIX_W-1:0] mem0 [NPIX];
  logic [PIX_W-1:0] mem1 [NPIX];

  logic          wbank, rbank;
  logic [1:0]    full;
  logic [AW-1:0] waddr;
  logic          drop_cur;     // current incoming frame is being discarded
  logic          accept, last_pix, frame_done;

  assign last_pix   = (waddr == AW'(NPIX - 1));
  assign accept     = (waddr == '0) ? !full[wbank] : !drop_cur;
  assign frame_done = cam_valid && last_pix && accept;

  always_ff @(posedge clk) begin
    if (cam_valid && accept) begin
      if (wbank) mem1[waddr] <= cam_pixel;
      else       mem0[waddr] <= cam_pixel;
    end
    rd_data <= rbank ? mem1[rd_addr] : mem0[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank    <= 1'b0;
      rbank    <= 1'b0;
      full     <= '0;
      waddr    <= '0;
      drop_cur <= 1'b0;
      dropped  <= '0;
    end else begin
      if (cam_valid) begin
        if (waddr == '0) drop_cur <= full[wbank];
        waddr <= last_pix ? '0 : waddr + 1'b1;
        if (last_pix) begin
          if (accept) wbank <= ~wbank;
          else        dropped <= dropped + 1'b1;
        end
      end
      for (int b = 0; b < 2; b++) begin
        if (frame_done && wbank == b[0])          full[b] <= 1'b1;
        else if (release_frame && rbank == b[0])  full[b] <= 1'b0;
      end
      if (release_frame) rbank <= ~rbank;
    end
  end

  assign frame_ready = full[rbank];

  // The reader may only release a bank that holds a frame.
  assert property (@(posedge clk) disable iff (!rst_n) release_frame |-> full[rbank]);
endmodule
