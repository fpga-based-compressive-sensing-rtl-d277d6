// tb_pixel_adder: exhaustive over the pixel value, random partial sums, and
// all four combinations of exposed and first; the result must be
// (first ? 0 : partial) + (exposed ? pixel/4 : 0) modulo 256.
module tb_pixel_adder;
  logic [7:0] partial, pixel, sum;
  logic exposed, first;
  int checks = 0, failures = 0;
  int expv;

  pixel_adder dut (.partial, .pixel, .exposed, .first, .sum);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++)
      for (int m = 0; m < 4; m++) begin
        pixel = 8'(p);
        partial = 8'($urandom);
        exposed = m[0];
        first = m[1];
        #1;
        expv = ((first ? 0 : int'(partial)) + (exposed ? p / 4 : 0)) % 256;
        checks++;
        if (sum != 8'(expv)) begin
          failures++;
          $display("FAIL pixel %0d partial %0d exposed %0d first %0d: %0d expected %0d",
                   p, partial, exposed, first, sum, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
