// tb_input_frame_buffer: an 8x4-pixel instance of the ping-pong input buffer.
// A camera process writes numbered frames (pixel value a function of frame
// number and position) with random blanking; a reader process waits for
// frame_ready, reads every pixel with one-clock latency and releases the bank,
// sometimes slowly enough that frames must be dropped. A model decides which
// frames are stored (the write bank is free when fewer than two frames are
// held at the frame's first pixel); the reader must see exactly the stored
// frames in order and the drop counter must match. Counts drops and swaps.
module tb_input_frame_buffer;
  localparam int W = 8, H = 4, NPIX = W * H;
  logic clk = 0, rst_n = 0;
  logic cam_valid = 0, release_frame = 0, frame_ready;
  logic [7:0] cam_pixel = '0, rd_data;
  logic [4:0] rd_addr = '0;
  logic [15:0] dropped;
  int checks = 0, failures = 0;
  int stored_q [$];
  int held = 0, model_dropped = 0, cur_frame = -1, frames_read = 0;
  bit cur_store;

  input_frame_buffer #(.FRAME_W(W), .FRAME_H(H)) dut (
    .clk, .rst_n, .cam_valid, .cam_pixel, .frame_ready, .rd_addr, .rd_data,
    .release_frame, .dropped);

  always #5 clk = ~clk;

  function automatic logic [7:0] pix(int k, int p);
    return 8'(k * 29 + p * 7 + 3);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // camera
  int cam_p = 0, cam_k = 0, cam_idx = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (cam_k = 0; cam_k < 60; cam_k++) begin
      for (cam_p = 0; cam_p < NPIX; cam_p++) begin
        @(negedge clk);
        cam_valid = 1; cam_pixel = pix(cam_k, cam_p); cam_idx = cam_p;
        cur_frame = cam_k;
      end
      @(negedge clk);
      cam_valid = 0;
      repeat ($urandom % 6) @(negedge clk);
    end
  end

  // reference model of the store/drop decision, evaluated with pre-edge values
  always @(posedge clk) if (rst_n) begin
    int p_now;
    p_now = cam_idx;
    if (cam_valid && p_now == 0) cur_store = (held < 2);
    if (cam_valid && p_now == NPIX - 1) begin
      if (cur_store) begin stored_q.push_back(cur_frame); held++; end
      else model_dropped++;
    end
    if (release_frame) held--;
  end

  // reader
  initial begin
    int k;
    @(posedge rst_n);
    while (frames_read < 25) begin
      @(negedge clk);
      if (!frame_ready) continue;
      if (frames_read % 3 == 0) repeat (40 + $urandom % 60) @(negedge clk);  // slow consumer
      check(stored_q.size() > 0, "a frame is ready only when one was stored");
      k = stored_q.pop_front();
      for (int p = 0; p <= NPIX; p++) begin
        if (p < NPIX) rd_addr = 5'(p);
        release_frame = (p == NPIX - 1);
        @(negedge clk);
        release_frame = 0;
        if (p < NPIX)
          check(rd_data == pix(k, p), $sformatf("frame %0d pixel %0d got %0d expected %0d", k, p, rd_data, pix(k, p)));
      end
      frames_read++;
    end
    check(dropped == 16'(model_dropped), $sformatf("dropped %0d expected %0d", dropped, model_dropped));
    check(model_dropped > 0, "frame drops were exercised");
    $display("frames read %0d, dropped %0d", frames_read, model_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
