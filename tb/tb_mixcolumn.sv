// tb_mixcolumn - random columns through mixcolumn, compared with the reference model,
// plus the standard worked example column (db 13 53 45 <-> 8e 4d a1 bc).
module tb_mixcolumn;
  import rijndael_ref_pkg::*;
  logic [3:0][7:0] a, b;
  int checks = 0, failures = 0;

  mixcolumn dut (.a, .b);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t s, e;
    for (int t = 0; t < 300; t++) begin
      a = (t == 0) ? ((0 == 0) ? 32'h455313db : 32'hbca14d8e) : $urandom;
      #1;
      s = '0;
      s[3:0] = a;
      e = ref_mixcol(s, 1, 0);
      checks++;
      if (b !== e[3:0]) begin
        failures++;
        $display("in=%h out=%h exp=%h", a, b, e[3:0]);
      end
      if (t == 0) begin
        checks++;
        if (b !== ((0 == 0) ? 32'hbca14d8e : 32'h455313db)) begin
          failures++;
          $display("worked example mismatch: %h", b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
