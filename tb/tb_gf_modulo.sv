// tb_gf_modulo: checks the reduction array for N = 8.
// Known products: 0x57 * 0x83 = 0xC1 in the field x^8+x^4+x^3+x+1 (p = 0x1B),
// and 0x5D * 0xD0 = 0xC6 in x^8+x^4+x^3+x^2+1 (p = 0x1D). Then random q and p
// against a reference that adds x^k mod g(x) for every set bit k of q.
module tb_gf_modulo;
  import rmul_ref_pkg::*;
  localparam int unsigned N = 8;
  logic [2*N-2:0] q;
  logic [N-1:0] p, c;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  gf_modulo #(.N(N)) dut (.q(q), .p(p), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] exp);
    @(posedge clk);
    checks++;
    if (c != exp) begin
      failures++;
      if (failures < 10) $display("FAIL q=%h p=%h -> c=%h, expected %h", q, p, c, exp);
    end
  endtask

  initial begin
    q = clmul(8'h57, 8'h83); p = 8'h1B; check(8'hC1);
    q = clmul(8'h5D, 8'hD0); p = 8'h1D; check(8'hC6);
    q = 15'h7FFF;            p = 8'h1D; check(gf_reduce(q, p));
    for (int n = 0; n < 20000; n++) begin
      q = (2*N-1)'($urandom);
      p = (n < 10000) ? 8'h1D : N'($urandom);
      check(gf_reduce(q, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
