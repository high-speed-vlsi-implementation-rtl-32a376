// tb_output_buffer - loads random blocks and reads every 16-bit word back,
// including while a later load is pending (the held block must not change).
module tb_output_buffer;
  import rijndael_pkg::*;
  logic        clk = 0, rst = 1, load = 0;
  state_t      din;
  logic [3:0]  ridx;
  logic [15:0] dout;
  int checks = 0, failures = 0;

  output_buffer dut (.clk, .rst, .load, .din, .ridx, .dout);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state_t held;
    ridx = 0; din = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 32; i++) din[i] = 8'($urandom);
      held = din;
      load = 1;
      @(negedge clk);
      load = 0;
      for (int i = 0; i < 32; i++) din[i] = 8'($urandom);   // not loaded
      for (int k = 0; k < 16; k++) begin
        ridx = 4'(k);
        #1;
        checks++;
        if (dout !== {held[2*k], held[2*k + 1]}) begin
          failures++;
          $display("word %0d = %h, expected %h", k, dout, {held[2*k], held[2*k + 1]});
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
