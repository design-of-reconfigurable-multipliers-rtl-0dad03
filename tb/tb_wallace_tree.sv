// tb_wallace_tree: the tree must return sum_j (M_j << j) for any eight 8-bit
// rows M0..M7, not only for partial products. Random rows plus the all-ones
// case (largest sum, 0xFE01).
module tb_wallace_tree;
  localparam int unsigned N = 8;
  logic [2*N-2:0] s;
  logic [N-1:0] c [1:N-1];
  logic [2*N-1:0] m;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  wallace_tree #(.N(N)) dut (.s(s), .c(c), .m(m));

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp;
    for (int n = 0; n < 20000; n++) begin
      s = (2*N-1)'(N'($urandom));
      for (int j = 1; j < N; j++) c[j] = N'($urandom);
      if (n == 0) begin
        s = (2*N-1)'({N{1'b1}});
        for (int j = 1; j < N; j++) c[j] = '1;
      end
      @(posedge clk);
      exp = s;
      for (int j = 1; j < N; j++) exp += int'(c[j]) << j;
      checks++;
      if (m != exp[2*N-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL m=%h expected %h", m, exp[2*N-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
