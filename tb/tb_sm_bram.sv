// tb_sm_bram: fills the 104x8 sensing-matrix RAM with random bytes and reads
// every address back, checking the one-clock read latency and that a read
// during a write to the same address returns the old byte.
module tb_sm_bram;
  logic clk = 0, we = 0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [104];
  int checks = 0, failures = 0;

  sm_bram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 104; a++) begin
      @(negedge clk);
      model[a] = 8'($urandom);
      we = 1; waddr = 7'(a); wdata = model[a];
    end
    @(negedge clk);
    we = 0;
    for (int a = 103; a >= 0; a--) begin
      raddr = 7'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++; $display("FAIL addr %0d got %02x expected %02x", a, rdata, model[a]);
      end
    end
    // read-during-write returns the old value
    raddr = 7'd50; we = 1; waddr = 7'd50; wdata = ~model[50];
    @(negedge clk);
    we = 0;
    checks++;
    if (rdata !== model[50]) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk);
    checks++;
    if (rdata !== ~model[50]) begin failures++; $display("FAIL write after read-during-write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
