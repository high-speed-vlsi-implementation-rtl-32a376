// tb_inv_s_box_logic_256 - random 256-bit states through inv_s_box_logic_256, compared with the reference model.
module tb_inv_s_box_logic_256;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  state_t     a, y;
  logic [3:0] nb;
  int checks = 0, failures = 0;

  inv_s_box_logic_256 dut (.a, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t exp;
    for (int n = 0; n < 3; n++) begin
      nb = 4'(8);
      for (int t = 0; t < 60; t++) begin
        a = (t == 0) ? '0 : rand_blk(int'(nb));
        #1;
        exp = blk_t'(ref_subbytes(a, 8, 1));
        checks++;
        if (y !== exp) begin
          failures++;
          $display("nb=%0d in=%h out=%h exp=%h", nb, a, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
