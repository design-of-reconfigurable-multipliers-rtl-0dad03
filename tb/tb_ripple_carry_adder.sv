// tb_ripple_carry_adder: exhaustive check of the 8-bit ripple carry adder
// (all x, y and cin) against the + operator.
module tb_ripple_carry_adder;
  localparam int unsigned W = 8;
  logic [W-1:0] x, y, s;
  logic cin, cout;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(W)) dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      {cin, x, y} = (2*W+1)'(v);
      @(posedge clk);
      checks++;
      if ({cout, s} != (W+1)'(x) + (W+1)'(y) + (W+1)'(cin)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d + %0d -> %0d", x, y, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
