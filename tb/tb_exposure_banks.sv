// tb_exposure_banks: drives random SET vectors, bank choices and RESET pulses
// into the two flip-flop banks and compares the multiplexed output with a
// model of both banks after every clock.
module tb_exposure_banks;
  logic clk = 0, rst_n = 0;
  logic [12:0] set_vec, q_sel;
  logic set_bank, clr0, clr1, sel;
  logic [12:0] m0, m1;
  int checks = 0, failures = 0;

  exposure_banks dut (.clk, .rst_n, .set_vec, .set_bank, .clr0, .clr1, .sel, .q_sel);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_vec = '0; set_bank = 0; clr0 = 0; clr1 = 0; sel = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    m0 = '0; m1 = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      set_vec  = 13'(1) << ($urandom % 13);
      if ($urandom % 4 == 0) set_vec = '0;
      set_bank = 1'($urandom);
      clr0     = ($urandom % 8 == 0);
      clr1     = ($urandom % 8 == 0);
      sel      = 1'($urandom);
      @(posedge clk);
      if (clr0) m0 = '0; else if (!set_bank) m0 |= set_vec;
      if (clr1) m1 = '0; else if (set_bank)  m1 |= set_vec;
      #1;
      checks++;
      if (q_sel !== (sel ? m1 : m0)) begin
        failures++;
        $display("FAIL cycle %0d sel=%0d got %b expected %b", i, sel, q_sel, sel ? m1 : m0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
