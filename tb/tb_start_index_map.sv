// tb_start_index_map: exhaustive check of the start-frame folding for the
// 13-frame, bump-4 configuration: 0, 14, 15 invalid; 1..4 -> 1; 5..9 kept;
// 10..13 -> 10.
module tb_start_index_map;
  logic [3:0] index, start_frame;
  logic valid;
  int checks = 0, failures = 0;
  int exp_start;
  bit exp_valid;

  start_index_map dut (.index, .valid, .start_frame);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      index = 4'(i);
      #1;
      exp_valid = (i >= 1 && i <= 13);
      exp_start = (i <= 4) ? 1 : (i >= 10) ? 10 : i;
      checks++;
      if (valid != exp_valid) begin failures++; $display("FAIL valid idx %0d", i); end
      if (exp_valid) begin
        checks++;
        if (start_frame != 4'(exp_start)) begin
          failures++; $display("FAIL idx %0d start %0d expected %0d", i, start_frame, exp_start);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
