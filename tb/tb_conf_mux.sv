// tb_conf_mux: random check of the result multiplexer in both modes.
module tb_conf_mux;
  localparam int unsigned W = 16;
  logic [W-1:0] d0, d1, o;
  logic s;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  conf_mux #(.W(W)) dut (.d0(d0), .d1(d1), .s(s), .o(o));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      d0 = W'($urandom);
      d1 = ~d0;
      s = n[0];
      @(posedge clk);
      checks++;
      if (o != (s ? d1 : d0)) begin
        failures++;
        if (failures < 10) $display("FAIL s=%0b d0=%h d1=%h -> o=%h", s, d0, d1, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
