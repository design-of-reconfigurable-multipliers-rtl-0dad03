// tb_rmul_top: end-to-end test of the three multipliers at the default width.
//
// Each multiplier gets its own operand stream, so a wiring mix-up between them
// shows: CSA&MGF gets (a, b), BA&MGF (b, a), WT&MGF (~a, b).
//   Phase 1: the reference sequence of the original design: a, b step through
//            5d/d0, 60/d5, 63/da, 66/df with p = 0x1D while conf alternates.
//   Phase 2: every a, b in both modes, p = 0x1D, conf toggling every cycle.
//   Phase 3: random a, b, p and conf.
// Every result is checked in the cycle its operands are applied (the design is
// combinational). The test counts, per multiplier, the mechanisms the design
// has and fails if one never happened: switches integer -> GF and GF -> integer,
// GF products that need the modulo reduction (q of degree >= 8), integer
// products that carry into bit 15, and changes of the polynomial input.
module tb_rmul_top;
  import rmul_pkg::*;
  import rmul_ref_pkg::*;
  localparam int unsigned N = WIDTH;
  localparam int NM = 3;
  localparam string NAMES [NM] = '{"CSA&MGF", "BA&MGF", "WT&MGF"};

  rmul_in_t       in  [NM];
  logic [2*N-1:0] out [NM];
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  // mechanism counters, per multiplier
  int to_gf [NM], to_int [NM], reductions [NM], carries_top [NM], poly_changes [NM];
  rmul_in_t prev [NM];
  bit       have_prev = 1'b0;

  rmul_top dut (
    .csa_in(in[0]), .csa_m(out[0]),
    .ba_in (in[1]), .ba_m (out[1]),
    .wt_in (in[2]), .wt_m (out[2])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one operand set to all three (in their own orders) and check.
  task automatic step(logic [N-1:0] a, logic [N-1:0] b, logic [N-1:0] p, logic conf);
    in[0] = '{a: a,  b: b, p: p, conf: conf};
    in[1] = '{a: b,  b: a, p: p, conf: conf};
    in[2] = '{a: ~a, b: b, p: p, conf: conf};
    @(posedge clk);
    for (int k = 0; k < NM; k++) begin
      logic [2*N-1:0] exp;
      logic [2*N-2:0] q;
      exp = expected_m(in[k].a, in[k].b, in[k].p, in[k].conf);
      q   = clmul(in[k].a, in[k].b);
      checks++;
      if (out[k] !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s conf=%0b a=%h b=%h p=%h -> %h, expected %h", NAMES[k],
                   in[k].conf, in[k].a, in[k].b, in[k].p, out[k], exp);
      end
      if (have_prev) begin
        if (prev[k].conf == MODE_INT && in[k].conf == MODE_GF) to_gf[k]++;
        if (prev[k].conf == MODE_GF && in[k].conf == MODE_INT) to_int[k]++;
        if (prev[k].p != in[k].p) poly_changes[k]++;
      end
      if (in[k].conf == MODE_GF && q[2*N-2:N] != '0) reductions[k]++;
      if (in[k].conf == MODE_INT && exp[2*N-1]) carries_top[k]++;
      prev[k] = in[k];
    end
    have_prev = 1'b1;
  endtask

  initial begin
    logic [2*N-1:0] seq_exp [8] = '{16'h4b90, 16'h3cc6, 16'h4fe0, 16'h2fdc,
                                     16'h544e, 16'h2cb5, 16'h58da, 16'h2ec3};
    logic [N-1:0]   seq_a   [4] = '{8'h5d, 8'h60, 8'h63, 8'h66};
    logic [N-1:0]   seq_b   [4] = '{8'hd0, 8'hd5, 8'hda, 8'hdf};

    for (int k = 0; k < NM; k++) begin
      to_gf[k] = 0; to_int[k] = 0; reductions[k] = 0; carries_top[k] = 0; poly_changes[k] = 0;
    end

    // Phase 1: reference sequence, checked against its printed values too.
    for (int i = 0; i < 8; i++) begin
      step(seq_a[i/2], seq_b[i/2], POLY_X8_X4_X3_X2_1, (i % 2 == 0) ? MODE_INT : MODE_GF);
      checks++;
      if (out[0] !== seq_exp[i]) begin
        failures++;
        $display("FAIL reference vector %0d: %h, expected %h", i, out[0], seq_exp[i]);
      end
    end

    // Phase 2: exhaustive, both modes.
    for (int v = 0; v < (1 << (2*N)); v++) begin
      step(N'(v >> N), N'(v), POLY_X8_X4_X3_X2_1, MODE_INT);
      step(N'(v >> N), N'(v), POLY_X8_X4_X3_X2_1, MODE_GF);
    end

    // Phase 3: random operands, polynomials and modes.
    for (int n = 0; n < 20000; n++)
      step(N'($urandom), N'($urandom), N'($urandom), 1'($urandom));

    for (int k = 0; k < NM; k++) begin
      $display("%s: int->GF %0d, GF->int %0d, reductions %0d, carries into bit 15 %0d, polynomial changes %0d",
               NAMES[k], to_gf[k], to_int[k], reductions[k], carries_top[k], poly_changes[k]);
      checks++;
      if (to_gf[k] == 0 || to_int[k] == 0 || reductions[k] == 0 ||
          carries_top[k] == 0 || poly_changes[k] == 0) begin
        failures++;
        $display("FAIL %s: a mechanism was never exercised", NAMES[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
