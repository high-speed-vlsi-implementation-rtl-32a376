// tb_xtime - exhaustive check of xtime against a GF(2^8) reference product with 02.
module tb_xtime;
  import rijndael_ref_pkg::*;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  xtime dut (.a, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (y !== ref_mul(a, 8'h02)) begin
        failures++;
        $display("xtime(%02h) = %02h, expected %02h", a, y, ref_mul(a, 8'h02));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
