// tb_input_buffer - random word writes at random indices against a byte-array model.
module tb_input_buffer;
  import rijndael_pkg::*;
  logic        clk = 0, rst = 1, we = 0;
  logic [3:0]  widx;
  logic [15:0] din;
  state_t      data;
  int checks = 0, failures = 0;

  input_buffer dut (.clk, .rst, .we, .widx, .din, .data);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] model [32];
    for (int i = 0; i < 32; i++) model[i] = 0;
    widx = 0; din = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      we   = ($urandom_range(0, 3) != 0);
      widx = 4'($urandom);
      din  = 16'($urandom);
      @(negedge clk);
      if (we) begin
        model[2*widx]     = din[15:8];
        model[2*widx + 1] = din[7:0];
      end
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (data[i] !== model[i]) begin
          failures++;
          $display("t=%0d byte %0d = %h, expected %h", t, i, data[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
