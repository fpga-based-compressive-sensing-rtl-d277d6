// tb_frame_decoder: exhaustive check of the 4:13 decoder, with and without
// enable, including the out-of-range indexes 0, 14 and 15.
module tb_frame_decoder;
  logic [3:0] frame_index;
  logic en;
  logic [12:0] onehot, expv;
  int checks = 0, failures = 0;

  frame_decoder dut (.frame_index, .en, .onehot);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 16; i++) begin
        frame_index = 4'(i);
        en = e[0];
        #1;
        expv = '0;
        if (e == 1 && i >= 1 && i <= 13) expv = 13'(1) << (i - 1);
        checks++;
        if (onehot != expv) begin
          failures++; $display("FAIL en=%0d idx=%0d got %b expected %b", e, i, onehot, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
