// tb_rotate_left_reg: loads random bytes and checks that msbop walks through
// bits 7, 6, ..., 0 of the loaded byte on successive rotations and repeats
// after eight, that the register holds without rotate, and that load wins
// over rotate.
module tb_rotate_left_reg;
  logic clk = 0, rst_n = 0, load = 0, rotate = 0, msbop;
  logic [7:0] din = '0, pattern;
  int checks = 0, failures = 0;

  rotate_left_reg dut (.clk, .rst_n, .load, .din, .rotate, .msbop);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 30; rep++) begin
      pattern = 8'($urandom);
      din = pattern; load = 1; rotate = (rep % 2 == 1);   // load wins
      @(negedge clk);
      load = 0;
      for (int i = 0; i < 20; i++) begin
        check(msbop == pattern[7 - (i % 8)], $sformatf("pattern %02x rotation %0d", pattern, i));
        rotate = (i != 5);
        @(negedge clk);
        if (i == 5) begin
          check(msbop == pattern[7 - (i % 8)], "holds without rotate");
          rotate = 1;
          @(negedge clk);
        end
      end
      rotate = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
