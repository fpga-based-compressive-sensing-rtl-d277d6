// tb_sensing_matrix_gen: runs three matrix generations and compares every
// BRAM write with a reference built from an independent model of the LFSR
// (x^8+x^6+x^5+x^4+1, seed A5) and the start-frame rule (skip 0/14/15,
// 1..4 -> 1, 10..13 -> 10, bump of four frames). Checks the write addresses
// (frame*8+row), that every element is exposed in exactly four consecutive
// frames, the done pulse, and the clock count of 8*(8*5+14) + skipped
// indexes. Counts both folding cases, skipped indexes and the use of both
// flip-flop banks.
module tb_sensing_matrix_gen;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, we;
  logic [6:0] waddr;
  logic [7:0] wdata;
  int checks = 0, failures = 0;
  logic [7:0] lfsr_m = 8'hA5;
  logic [7:0] expmem [104];
  logic [7:0] gotmem [104];
  bit written [104];
  int tot_skipped, skipped, n_low, n_high, n_mid, cycles, runs_started;

  sensing_matrix_gen dut (.clk, .rst_n, .start, .busy, .done, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference matrix: S(row, col, frame) collected into per-frame row bytes
  task automatic build_expected();
    int idx, st;
    logic [12:0] bits;
    skipped = 0;
    foreach (expmem[i]) expmem[i] = '0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        do begin
          idx = int'(lfsr_m[7:4]);
          lfsr_m = {lfsr_m[6:0], lfsr_m[7] ^ lfsr_m[5] ^ lfsr_m[4] ^ lfsr_m[3]};
          if (idx < 1 || idx > 13) begin skipped++; tot_skipped++; end
        end while (idx < 1 || idx > 13);
        if (idx < 5) begin st = 1; n_low++; end
        else if (idx > 9) begin st = 10; n_high++; end
        else begin st = idx; n_mid++; end
        for (int k = 0; k < 4; k++) expmem[(st + k - 1) * 8 + r][7 - c] = 1'b1;
      end
  endtask

  always @(posedge clk) if (we) begin
    gotmem[waddr] <= wdata;
    written[waddr] <= 1'b1;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bank_use [2];
  always @(posedge clk) if (rst_n && dut.u_dec.en) bank_use[dut.col[0]]++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 3; run++) begin
      foreach (written[i]) written[i] = 0;
      build_expected();
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      check(busy, "busy after start");
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles == 8 * (8 * 5 + 14) + skipped + 1,
            $sformatf("run %0d took %0d clocks, expected %0d", run, cycles, 8 * (8 * 5 + 14) + skipped + 1));
      @(negedge clk);
      check(!busy && !done, "idle and done is one pulse");
      for (int a = 0; a < 104; a++) begin
        check(written[a], $sformatf("address %0d written", a));
        check(gotmem[a] == expmem[a],
              $sformatf("run %0d addr %0d got %b expected %b", run, a, gotmem[a], expmem[a]));
      end
      // every element: one bump of exactly four consecutive frames
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          int ones, first, last;
          ones = 0; first = -1; last = -1;
          for (int f = 0; f < 13; f++)
            if (gotmem[f * 8 + r][7 - c]) begin
              ones++; if (first < 0) first = f; last = f;
            end
          check(ones == 4 && last - first == 3, $sformatf("element %0d,%0d bump", r, c));
        end
    end
    check(tot_skipped > 0 && n_low > 0 && n_high > 0 && n_mid > 0, "all three folding cases occurred");
    check(bank_use[0] > 0 && bank_use[1] > 0, "both flip-flop banks used");
    $display("folding: low %0d high %0d mid %0d skipped %0d; banks %0d/%0d", n_low, n_high, n_mid, tot_skipped, bank_use[0], bank_use[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
