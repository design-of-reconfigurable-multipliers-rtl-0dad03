// tb_ba_mgf_mul: end-to-end check of the BA&MGF multiplier at N = 8.
// 1. The reference vectors of the original design (p = 0x1D, x^8+x^4+x^3+x^2+1).
// 2. Every a and b in both modes with p = 0x1D.
// 3. Random a, b and p in both modes (the polynomial is an input).
// The result must be valid in the cycle the operands are applied: the
// multiplier is combinational.
module tb_ba_mgf_mul;
  import rmul_ref_pkg::*;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b, p;
  logic conf;
  logic [2*N-1:0] m;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  ba_mgf_mul #(.N(N)) dut (.a(a), .b(b), .p(p), .conf(conf), .m(m));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] ta, logic [N-1:0] tb, logic [N-1:0] tp, logic tc,
                       logic [2*N-1:0] exp);
    a = ta; b = tb; p = tp; conf = tc;
    @(posedge clk);
    checks++;
    if (m !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL conf=%0b a=%h b=%h p=%h -> m=%h, expected %h", conf, a, b, p, m, exp);
    end
  endtask

  initial begin
    // reference vectors: {a, b, m with conf = 1, m with conf = 0}
    apply(8'h5d, 8'hd0, 8'h1d, 1'b1, 16'h4b90);
    apply(8'h5d, 8'hd0, 8'h1d, 1'b0, 16'h3cc6);
    apply(8'h60, 8'hd5, 8'h1d, 1'b1, 16'h4fe0);
    apply(8'h60, 8'hd5, 8'h1d, 1'b0, 16'h2fdc);
    apply(8'h63, 8'hda, 8'h1d, 1'b1, 16'h544e);
    apply(8'h63, 8'hda, 8'h1d, 1'b0, 16'h2cb5);
    for (int v = 0; v < (1 << (2*N+1)); v++) begin
      logic [N-1:0] va, vb;
      logic vc;
      {vc, va, vb} = (2*N+1)'(v);
      apply(va, vb, 8'h1d, vc, expected_m(va, vb, 8'h1d, vc));
    end
    for (int n = 0; n < 20000; n++) begin
      logic [N-1:0] va, vb, vp;
      va = N'($urandom); vb = N'($urandom); vp = N'($urandom);
      apply(va, vb, vp, n[0], expected_m(va, vb, vp, n[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
