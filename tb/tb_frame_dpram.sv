// tb_frame_dpram: random simultaneous reads (port a) and writes (port b) on a
// 1024-word instance of the compressed-frame RAM, compared with a model;
// checks the one-clock read latency and that rddata_a holds while rden_a is
// low.
module tb_frame_dpram;
  localparam int DEPTH = 1024;
  logic clk = 0, rden_a = 0, wten_b = 0;
  logic [9:0] rdaddress_a = '0, wtaddress_b = '0;
  logic [7:0] rddata_a, wtdata_b = '0, expv, last;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  frame_dpram #(.DEPTH(DEPTH)) dut (.clk, .rden_a, .rdaddress_a, .rddata_a,
                                   .wten_b, .wtaddress_b, .wtdata_b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      model[a] = 8'($urandom);
      wten_b = 1; wtaddress_b = 10'(a); wtdata_b = model[a];
    end
    @(negedge clk);
    wten_b = 0;
    last = rddata_a;
    for (int i = 0; i < 5000; i++) begin
      rden_a = 1'($urandom);
      rdaddress_a = 10'($urandom);
      wten_b = 1'($urandom);
      wtaddress_b = 10'($urandom);
      if (wtaddress_b == rdaddress_a) wtaddress_b = wtaddress_b + 1'b1;
      wtdata_b = 8'($urandom);
      expv = rden_a ? model[rdaddress_a] : last;
      @(posedge clk);
      if (wten_b) model[wtaddress_b] = wtdata_b;
      @(negedge clk);
      checks++;
      if (rddata_a !== expv) begin
        failures++; $display("FAIL step %0d got %02x expected %02x", i, rddata_a, expv);
      end
      last = expv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
