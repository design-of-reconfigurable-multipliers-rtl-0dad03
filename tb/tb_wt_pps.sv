// tb_wt_pps: exhaustive check of the Wallace-tree partial-product stage
// (N = 8). Rows 1..7 must be a & b_j in both modes; s must be row 0 in
// integer mode and the carry-less product in GF mode.
module tb_wt_pps;
  import rmul_ref_pkg::*;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b;
  logic conf;
  logic [N-1:0] c [1:N-1];
  logic [2*N-2:0] s;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  wt_pps #(.N(N)) dut (.a(a), .b(b), .conf(conf), .c(c), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (140000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic bad;
    for (int v = 0; v < (1 << (2*N+1)); v++) begin
      {conf, a, b} = (2*N+1)'(v);
      @(posedge clk);
      checks++;
      bad = conf ? (s != (2*N-1)'(b[0] ? a : '0)) : (s != clmul(a, b));
      for (int j = 1; j < N; j++) if (c[j] != (b[j] ? a : '0)) bad = 1'b1;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL conf=%0b a=%h b=%h -> s=%h", conf, a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
