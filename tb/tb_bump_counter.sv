// tb_bump_counter: for every start frame 1..10 the counter must present the
// frame indexes start, start+1, start+2, start+3 on four consecutive enabled
// clocks with last high only on the fourth, wrap to start afterwards, hold
// while en is low and return to start on clr.
module tb_bump_counter;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, last;
  logic [3:0] start_frame = 4'd1, frame_index;
  int checks = 0, failures = 0;

  bump_counter dut (.clk, .rst_n, .clr, .en, .start_frame, .frame_index, .last);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 1; s <= 10; s++) begin
      start_frame = 4'(s);
      clr = 1;
      @(negedge clk);
      clr = 0;
      for (int k = 0; k < 4; k++) begin
        check(frame_index == 4'(s + k), $sformatf("start %0d step %0d index %0d", s, k, frame_index));
        check(last == (k == 3), $sformatf("start %0d step %0d last %0d", s, k, last));
        en = 1;
        @(negedge clk);
        en = 0;
        if (k == 1) begin
          @(negedge clk);
          check(frame_index == 4'(s + 2), "holds while en is low");
        end
      end
      check(frame_index == 4'(s), $sformatf("start %0d wraps", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
