// tb_rcfg_cell: exhaustive check of the reconfigurable cell in both modes.
// conf = 1: {co, so} = si + a*b + ci. conf = 0: so = si ^ (a & b) and
// co = si & a & b (the carry input is ignored).
module tb_rcfg_cell;
  logic si, a, b, ci, conf, so, co;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  rcfg_cell dut (.si(si), .a(a), .b(b), .ci(ci), .conf(conf), .so(so), .co(co));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp_int;
    for (int v = 0; v < 32; v++) begin
      {conf, si, a, b, ci} = 5'(v);
      @(posedge clk);
      checks++;
      exp_int = 2'(si) + 2'(a & b) + 2'(ci);
      if (conf ? ({co, so} != exp_int) : (so != (si ^ (a & b)) || co != (si & a & b))) begin
        failures++;
        $display("FAIL conf=%0b si=%0b a=%0b b=%0b ci=%0b -> co=%0b so=%0b",
                 conf, si, a, b, ci, co, so);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
