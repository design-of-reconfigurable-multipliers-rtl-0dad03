// tb_carry_save_adder: random check of a 10-bit carry-save stage:
// s = x ^ y ^ z and x + y + z = s + 2c.
module tb_carry_save_adder;
  localparam int unsigned W = 10;
  logic [W-1:0] x, y, z, s, c;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  carry_save_adder #(.W(W)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      x = W'($urandom); y = W'($urandom); z = W'($urandom);
      if (n == 0) begin x = '1; y = '1; z = '1; end
      @(posedge clk);
      checks++;
      if (s != (x ^ y ^ z) ||
          (W+2)'(x) + (W+2)'(y) + (W+2)'(z) != (W+2)'(s) + ((W+2)'(c) << 1)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h z=%h -> s=%h c=%h", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
