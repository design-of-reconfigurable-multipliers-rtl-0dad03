// tb_conf_demux: random check of the mode demultiplexer in both modes.
module tb_conf_demux;
  localparam int unsigned W = 15;
  logic [W-1:0] i, o0, o1;
  logic conf;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  conf_demux #(.W(W)) dut (.i(i), .conf(conf), .o0(o0), .o1(o1));

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
      i = W'($urandom) | 1'b1;
      conf = n[0];
      @(posedge clk);
      checks++;
      if (o0 != (conf ? '0 : i) || o1 != (conf ? i : '0)) begin
        failures++;
        if (failures < 10) $display("FAIL conf=%0b i=%h -> o0=%h o1=%h", conf, i, o0, o1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
