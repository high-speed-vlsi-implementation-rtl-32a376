// tb_sbox - exhaustive check of sbox against a table built by inverse search,
// plus values printed in the standard S-box table.
module tb_sbox;
  import rijndael_ref_pkg::*;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  sbox dut (.a, .y);

  task automatic expect_eq(input logic [7:0] got, input logic [7:0] exp, input logic [7:0] in);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("sbox(%02h) = %02h, expected %02h", in, got, exp);
    end
  endtask

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
      expect_eq(y, ref_sbox(a), a);
    end
    // spot values from the published table
    a = 8'h00; #1; expect_eq(y, 8'h63, a);
    a = 8'h53; #1; expect_eq(y, 8'hED, a);
    a = 8'h9A; #1; expect_eq(y, 8'hB8, a);
    a = 8'hFF; #1; expect_eq(y, 8'h16, a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
