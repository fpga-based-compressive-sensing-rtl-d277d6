// tb_register_stack: pushes eight random 13-bit element words, then shifts
// thirteen times; output byte t must hold bit t of every word, with the first
// pushed word on bit 7. Also checks that the stack holds when idle.
module tb_register_stack;
  logic clk = 0, ld = 0, shift = 0;
  logic [12:0] din;
  logic [7:0] dout, expv;
  logic [12:0] words [8];
  int checks = 0, failures = 0;

  register_stack dut (.clk, .ld, .shift, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    for (int rep = 0; rep < 20; rep++) begin
      for (int e = 0; e < 8; e++) begin
        @(negedge clk);
        words[e] = 13'($urandom);
        din = words[e]; ld = 1;
      end
      @(negedge clk);
      ld = 0;
      repeat (2) @(negedge clk);       // idle: contents must stay
      for (int t = 0; t < 13; t++) begin
        for (int j = 0; j < 8; j++) expv[j] = words[7 - j][t];
        checks++;
        if (dout !== expv) begin
          failures++; $display("FAIL rep %0d frame %0d got %b expected %b", rep, t, dout, expv);
        end
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
