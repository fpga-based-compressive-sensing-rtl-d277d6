// tb_compressed_frame_gen: a 16x16-pixel, 13-frame instance of the
// compressed-frame generator connected to behavioural models of the
// sensing-matrix BRAM, the input frame buffer and the compressed-frame RAM
// (all one-clock read latency). The matrix is a random single-bump, four-frame
// pattern per 8x8 tile position; the RAM starts with random contents, which
// the first frame of each group must overwrite. Checks, over two groups (one with frames
// always ready, one with random waits): every output pixel equals the sum of
// its four exposed samples divided by four, the number of RAM reads (the
// exposed pixels of frames 2..13) and writes (every pixel in frame 1 plus
// the reads), one pixel per clock (release-to-release
// interval of W*H+3 clocks when frames are always ready), and the done pulse.
module tb_compressed_frame_gen;
  localparam int W = 16, H = 16, NF = 13, NPIX = W * H;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic [6:0] sm_raddr;
  logic [7:0] sm_rdata;
  logic frame_ready, release_frame;
  logic [7:0] pix_addr, rdaddress_a, wtaddress_b;
  logic [7:0] pix_data, rddata_a, wtdata_b;
  logic rden_a, wten_b;
  int checks = 0, failures = 0;

  logic [7:0] smmem [104];
  logic [7:0] ram [NPIX];
  logic [7:0] frames [NF][NPIX];
  int cur = 0, n_reads = 0, n_writes = 0, skip_reads = 0, cyc = 0;

  compressed_frame_gen #(.FRAME_W(W), .FRAME_H(H), .NUM_FRAMES(NF)) dut (
    .clk, .rst_n, .start, .busy, .done, .sm_raddr, .sm_rdata,
    .frame_ready, .pix_addr, .pix_data, .release_frame,
    .rden_a, .rdaddress_a, .rddata_a, .wten_b, .wtaddress_b, .wtdata_b);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    sm_rdata <= smmem[sm_raddr];
    pix_data <= frames[cur % NF][pix_addr];
    if (rden_a) begin rddata_a <= ram[rdaddress_a]; n_reads++; end
    if (wten_b) begin ram[wtaddress_b] <= wtdata_b; n_writes++; end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame supplier: in the first group the next frame is always ready; in the
  // second, frame_ready rises a random number of clocks after each release
  bit random_wait;
  int last_rel = -1, rel_gaps_bad = 0, rel_gaps = 0, wait_cnt = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      frame_ready <= 1'b0;
    end else if (release_frame) begin
      cur <= cur + 1;
      if (last_rel >= 0) begin
        rel_gaps++;
        if (!random_wait && cyc - last_rel != NPIX + 3) rel_gaps_bad++;
      end
      last_rel = cyc;
      if (random_wait) begin
        frame_ready <= 1'b0;
        wait_cnt = $urandom % 20;
      end
    end else if (!frame_ready && busy) begin
      if (wait_cnt == 0) frame_ready <= 1'b1;
      else wait_cnt--;
    end
  end

  initial begin
    int st, r_exp, w_exp;
    logic [7:0] expv;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 2; run++) begin
      random_wait = (run == 1);
      foreach (smmem[i]) smmem[i] = '0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          st = $urandom % (NF - 3);
          for (int k = 0; k < 4; k++) smmem[(st + k) * 8 + r][7 - c] = 1'b1;
        end
      for (int f = 0; f < NF; f++) for (int p = 0; p < NPIX; p++) frames[f][p] = 8'($urandom);
      foreach (ram[i]) ram[i] = 8'($urandom);
      n_reads = 0; n_writes = 0;
      cur = 0;
      last_rel = -1;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      check(!busy, "idle after done");
      check(cur == NF, $sformatf("released %0d frames", cur));
      r_exp = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          expv = '0;
          for (int f = 0; f < NF; f++)
            if (smmem[f * 8 + (y % 8)][7 - (x % 8)]) begin
              expv += frames[f][y * W + x] >> 2;
              if (f > 0) r_exp++;
            end
          check(ram[y * W + x] == expv,
                $sformatf("run %0d pixel (%0d,%0d) got %0d expected %0d", run, x, y, ram[y * W + x], expv));
        end
      check(n_reads == r_exp && r_exp > 3 * NPIX, $sformatf("reads %0d expected %0d", n_reads, r_exp));
      check(n_writes == NPIX + r_exp, $sformatf("writes %0d expected %0d", n_writes, NPIX + r_exp));
    end
    check(rel_gaps > 0 && rel_gaps_bad == 0, $sformatf("frame interval W*H+3: %0d of %0d wrong", rel_gaps_bad, rel_gaps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
