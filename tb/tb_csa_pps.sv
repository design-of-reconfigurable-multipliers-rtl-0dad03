// tb_csa_pps: exhaustive check of the reconfigurable carry-save array (N = 8)
// for every a and b in both modes. Integer mode: the low sums are the product's
// low bits and the high sums plus the last-row carries give the rest.
// GF mode: the sums are the carry-less product.
module tb_csa_pps;
  import rmul_ref_pkg::*;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b;
  logic conf;
  logic [2*N-2:0] s;
  logic [N-1:0] c;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  csa_pps #(.N(N)) dut (.a(a), .b(b), .conf(conf), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (140000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] got;
    for (int v = 0; v < (1 << (2*N+1)); v++) begin
      {conf, a, b} = (2*N+1)'(v);
      @(posedge clk);
      checks++;
      got = (2*N)'(s[N-1:0]) + (((2*N)'(s[2*N-2:N]) + (2*N)'(c)) << N);
      if (conf ? (got != (2*N)'(a) * (2*N)'(b)) : (s != clmul(a, b))) begin
        failures++;
        if (failures < 10) $display("FAIL conf=%0b a=%h b=%h -> s=%h c=%h", conf, a, b, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
