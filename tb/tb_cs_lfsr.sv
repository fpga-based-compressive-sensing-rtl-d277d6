// tb_cs_lfsr: checks the 8-bit LFSR against a bit-level model of the
// polynomial x^8+x^6+x^5+x^4+1, its hold behaviour when en is low, its reset
// value and its maximal period of 255 distinct non-zero states.
module tb_cs_lfsr;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] state, model;
  int checks = 0, failures = 0;
  bit seen [256];

  cs_lfsr #(.SEED(8'hA5)) dut (.clk, .rst_n, .en, .state);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(state == 8'hA5, "reset loads seed");
    model = 8'hA5;
    en = 1;
    for (int i = 0; i < 255; i++) begin
      check(!seen[state], $sformatf("state %02x repeats early at step %0d", state, i));
      seen[state] = 1;
      @(negedge clk);
      model = {model[6:0], model[7] ^ model[5] ^ model[4] ^ model[3]};
      check(state == model, $sformatf("step %0d: got %02x expected %02x", i, state, model));
    end
    check(state == 8'hA5, "period is 255");
    en = 0;
    repeat (3) @(negedge clk);
    check(state == model, "holds while en is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
