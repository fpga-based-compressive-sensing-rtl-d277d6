// cs_video_top: compressive-sensing video encoder for a conventional camera.
// It emulates pixel-wise coded exposure: out of every group of NUM_FRAMES
// (13) camera frames it produces one FRAME_W x FRAME_H (640x480) frame in
// which each pixel is the average of BUMP (4) consecutive samples of that
// pixel, starting at a random frame chosen per position of an 8x8 tile. Only
// the coded frame (and the 104-byte sensing matrix) need to leave the device:
// 13x less data; the 13 frames are recovered offline by sparse reconstruction.
//
// Structure: sensing_matrix_gen writes a new random matrix into sm_bram;
// then compressed_frame_gen accumulates 13 frames read from
// input_frame_buffer (which the camera fills ping-pong) into frame_dpram.
//
// Interface: start (one-clock pulse while not busy) runs one group: matrix
// generation (about 450 clocks), then 13 frames at one pixel per clock
// (FRAME_W*FRAME_H + 3 clocks each) as the camera delivers them. done pulses when
// the coded frame is complete. While busy is low the coded frame can be read
// at out_addr (out_data one clock later) and the sensing matrix at sm_addr
// (sm_data one clock later; address 8*(f-1)+row, bit 7 = column 0).
// cam_valid/cam_pixel take the camera's raster-order pixels at any time;
// frames_dropped counts camera frames discarded because both input banks
// were full.
// The partitioning and the sequence matrix-then-compression follow the
// design; the readout ports and the start/done handshake are this
// implementation's own.
module cs_video_top #(
  parameter int unsigned FRAME_W    = cs_pkg::FRAME_W,
  parameter int unsigned FRAME_H    = cs_pkg::FRAME_H,
  parameter int unsigned NUM_FRAMES = cs_pkg::NUM_FRAMES,
  parameter int unsigned BUMP       = cs_pkg::BUMP,
  parameter int unsigned BLK        = cs_pkg::BLK,
  parameter logic [7:0]  SEED       = 8'hA5,
  localparam int unsigned PIX_W     = cs_pkg::PIX_W,
  localparam int unsigned AW        = $clog2(FRAME_W * FRAME_H),
  localparam int unsigned SAW       = $clog2(NUM_FRAMES * BLK)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  logic             cam_valid,
  input  logic [PIX_W-1:0] cam_pixel,
  output logic [15:0]      frames_dropped,
  input  logic [AW-1:0]    out_addr,
  output logic [PIX_W-1:0] out_data,
  input  logic [SAW-1:0]   sm_addr,
  output logic [BLK-1:0]   sm_data
);
  logic smg_busy, smg_done, smg_we;
  logic [SAW-1:0] smg_waddr, cfg_sm_raddr;
  logic [BLK-1:0] smg_wdata, sm_rdata;
  logic cfg_busy, cfg_done;
  logic frame_ready, release_frame;
  logic [AW-1:0]    pix_addr, cfg_rdaddr, wtaddress_b;
  logic [PIX_W-1:0] pix_data, rddata_a, wtdata_b;
  logic cfg_rden, wten_b;

  sensing_matrix_gen #(
    .NUM_FRAMES(NUM_FRAMES), .BUMP(BUMP), .BLK(BLK), .SEED(SEED)
  ) u_smg (
    .clk, .rst_n, .start(start && !busy), .busy(smg_busy), .done(smg_done),
    .we(smg_we), .waddr(smg_waddr), .wdata(smg_wdata)
  );

  sm_bram #(.DEPTH(NUM_FRAMES * BLK), .WIDTH(BLK)) u_sm_bram (
    .clk, .we(smg_we), .waddr(smg_waddr), .wdata(smg_wdata),
    .raddr(cfg_busy ? cfg_sm_raddr : sm_addr), .rdata(sm_rdata)
  );

  input_frame_buffer #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .PIX_W(PIX_W)) u_inbuf (
    .clk, .rst_n, .cam_valid, .cam_pixel, .frame_ready,
    .rd_addr(pix_addr), .rd_data(pix_data), .release_frame, .dropped(frames_dropped)
  );

  compressed_frame_gen #(
    .FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .NUM_FRAMES(NUM_FRAMES), .BLK(BLK),
    .PIX_W(PIX_W), .SHIFT($clog2(BUMP))
  ) u_cfg (
    .clk, .rst_n, .start(smg_done), .busy(cfg_busy), .done(cfg_done),
    .sm_raddr(cfg_sm_raddr), .sm_rdata,
    .frame_ready, .pix_addr, .pix_data, .release_frame,
    .rden_a(cfg_rden), .rdaddress_a(cfg_rdaddr), .rddata_a,
    .wten_b, .wtaddress_b, .wtdata_b
  );

  frame_dpram #(.DEPTH(FRAME_W * FRAME_H), .WIDTH(PIX_W)) u_dpram (
    .clk,
    .rden_a(cfg_busy ? cfg_rden : 1'b1), .rdaddress_a(cfg_busy ? cfg_rdaddr : out_addr),
    .rddata_a,
    .wten_b, .wtaddress_b, .wtdata_b
  );

  assign busy     = smg_busy || smg_done || cfg_busy;
  assign done     = cfg_done;
  assign out_data = rddata_a;
  assign sm_data  = sm_rdata;
endmodule
