// tb_cs_video_top: end-to-end test of the encoder on 16x16-pixel frames, two groups of 13 frames.
// A camera model streams numbered frames (pixel value a hash of frame number
// and position) with 8 clocks of blanking between frames; the first group
// starts after three frames have been delivered, so one frame is dropped. A frame is known to be stored or dropped
// from the frames_dropped port; each group consumes the next 13 stored frames.
// After each done pulse the sensing matrix is read through sm_addr and checked
// against an independent model (LFSR x^8+x^6+x^5+x^4+1 seeded A5, indexes
// 0/14/15 skipped, 1..4 -> frame 1, 10..13 -> frame 10, four-frame bump), then
// every coded pixel is read through out_addr and compared with the sum of its
// four exposed samples, each divided by four.
// Mechanisms counted (each must occur): skipped LFSR index, low and high
// folding, both flip-flop banks, register-stack shifts, first-frame overwrite,
// exposure-gated RAM reads, compressor waiting for a frame, camera frame drop,
// both input banks read, row reloads at line ends. The shortest interval
// between two frame releases in a group must be W*H+3 clocks (one pixel per
// clock; 651 frames/s at 200 MHz for 640x480).
module tb_cs_video_top;
  localparam int W = 16, H = 16, NPIX = W * H, NF = 13, BLANK = 8, GROUPS = 2;
  localparam int AW = $clog2(NPIX);
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, cam_valid = 0;
  logic [7:0] cam_pixel = '0, out_data, sm_data;
  logic [15:0] frames_dropped;
  logic [AW-1:0] out_addr = '0;
  logic [6:0] sm_addr = '0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  cs_video_top #(.FRAME_W(W), .FRAME_H(H)) dut (
    .clk, .rst_n, .start, .busy, .done, .cam_valid, .cam_pixel, .frames_dropped,
    .out_addr, .out_data, .sm_addr, .sm_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic logic [7:0] pix(int k, int p);
    int h;
    h = k * 1103 + p * 59 + (p / 7) * 13 + 17;
    return 8'(h ^ (h >> 5));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    while (cyc < 60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // camera: frame k, pixel p; record which frames were stored
  int stored_q [$];
  int n_dropped_seen = 0;
  initial begin
    logic [15:0] drop_before;
    @(posedge rst_n);
    for (int k = 0; ; k++) begin
      drop_before = frames_dropped;
      for (int p = 0; p < NPIX; p++) begin
        @(negedge clk);
        cam_valid = 1; cam_pixel = pix(k, p);
      end
      @(negedge clk);
      cam_valid = 0;
      if (frames_dropped != drop_before) n_dropped_seen++;
      else stored_q.push_back(k);
      repeat (BLANK - 1) @(negedge clk);
    end
  end

  // mechanism counters
  int c_bank [2], c_shift = 0, c_clear = 0, c_reads = 0, c_wait = 0, c_rbank [2], c_reload = 0;
  longint last_rel = -1, min_gap = 64'h7fffffffffffffff;
  always @(posedge clk) if (rst_n) begin
    if (dut.release_frame) begin
      if (last_rel >= 0 && dut.cfg_busy && cyc - last_rel < min_gap) min_gap = cyc - last_rel;
      last_rel = cyc;
    end
    if (dut.done) last_rel = -1;
    if (dut.u_smg.u_dec.en) c_bank[dut.u_smg.col[0]]++;
    if (dut.u_smg.we) c_shift++;
    if (dut.u_cfg.s1_en && dut.u_cfg.s1_first) c_clear++;
    if (dut.cfg_rden) c_reads++;
    if (dut.cfg_busy && !dut.frame_ready && !dut.u_cfg.wten_b && !dut.u_cfg.s1_en) c_wait++;
    if (dut.release_frame) c_rbank[dut.u_inbuf.rbank]++;
    if (dut.cfg_busy && dut.u_cfg.line_end && dut.u_cfg.u_rot.q != dut.u_cfg.sm_rdata) c_reload++;
  end

  // reference sensing matrix
  logic [7:0] lfsr_m = 8'hA5;
  logic [7:0] expmem [104];
  int n_skip = 0, n_low = 0, n_high = 0;
  task automatic build_expected();
    int idx, st;
    foreach (expmem[i]) expmem[i] = '0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        do begin
          idx = int'(lfsr_m[7:4]);
          lfsr_m = {lfsr_m[6:0], lfsr_m[7] ^ lfsr_m[5] ^ lfsr_m[4] ^ lfsr_m[3]};
          if (idx < 1 || idx > 13) n_skip++;
        end while (idx < 1 || idx > 13);
        if (idx < 5) begin st = 1; n_low++; end
        else if (idx > 9) begin st = 10; n_high++; end
        else st = idx;
        for (int k = 0; k < 4; k++) expmem[(st + k - 1) * 8 + r][7 - c] = 1'b1;
      end
  endtask

  initial begin
    logic [7:0] smm [104];
    logic [7:0] expv;
    int fr [NF];
    int mism, exp_reads;
    exp_reads = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // let the camera deliver three frames first, so that one must be dropped
    while (stored_q.size() + n_dropped_seen < 3) @(negedge clk);
    for (int g = 0; g < GROUPS; g++) begin
      build_expected();
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      check(!busy, "idle after done");
      // sensing matrix readout
      for (int a = 0; a < 104; a++) begin
        sm_addr = 7'(a);
        @(negedge clk);
        smm[a] = sm_data;
      end
      mism = 0;
      for (int a = 0; a < 104; a++) if (smm[a] != expmem[a]) mism++;
      check(mism == 0, $sformatf("group %0d: %0d sensing-matrix bytes differ", g, mism));
      // coded frame readout and comparison
      check(stored_q.size() >= NF * (g + 1), "enough frames stored");
      for (int f = 0; f < NF; f++) fr[f] = stored_q[NF * g + f];
      mism = 0;
      for (int p = 0; p < NPIX; p++) begin
        out_addr = AW'(p);
        @(negedge clk);
        begin
          int q, x, y;
          q = p; x = q % W; y = q / W;
          expv = '0;
          for (int f = 0; f < NF; f++)
            if (smm[f * 8 + (y % 8)][7 - (x % 8)]) begin
              expv += pix(fr[f], q) >> 2;
              if (f > 0) exp_reads++;
            end
          checks++;
          if (out_data != expv) begin
            mism++; failures++;
            if (mism < 10) $display("FAIL group %0d pixel (%0d,%0d) got %0d expected %0d", g, x, y, out_data, expv);
          end
        end
      end
      $display("group %0d: frames %0d..%0d, %0d coded pixels differ, cycle %0d", g, fr[0], fr[NF-1], mism, cyc);
    end
    check(n_skip > 0, "LFSR index skipped");
    check(n_low > 0 && n_high > 0, "low and high folding");
    check(c_bank[0] > 0 && c_bank[1] > 0, "both flip-flop banks set");
    check(c_shift == 104 * GROUPS, $sformatf("register-stack shifts %0d", c_shift));
    check(c_clear == NPIX * GROUPS, $sformatf("first-frame overwrites %0d", c_clear));
    check(c_reads == exp_reads, $sformatf("exposure-gated reads %0d expected %0d", c_reads, exp_reads));
    check(c_wait > 0, "compressor waited for a frame");
    check(n_dropped_seen > 0 && frames_dropped == 16'(n_dropped_seen), "camera frames dropped and counted");
    check(c_rbank[0] > 0 && c_rbank[1] > 0, "both input banks read");
    check(c_reload > 0, "row reloaded at line end");
    // a frame that is already buffered is encoded in W*H+3 clocks
    check(min_gap == NPIX + 3, $sformatf("shortest frame interval %0d clocks, expected %0d", min_gap, NPIX + 3));
    $display("frame interval %0d clocks: %0d frames/s at 200 MHz", min_gap, 200000000 / min_gap);
    $display("mechanisms: skip %0d low %0d high %0d banks %0d/%0d shifts %0d overwrite %0d reads %0d wait %0d drops %0d inbanks %0d/%0d reloads %0d",
             n_skip, n_low, n_high, c_bank[0], c_bank[1], c_shift, c_clear, c_reads, c_wait,
             n_dropped_seen, c_rbank[0], c_rbank[1], c_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
