// tb_vlla_error_correct -- self-checking testbench of the error correction
// unit. Its inputs (half-sums, propagates, speculative Ling carries, span
// propagates, row-2 blocks and the speculative sum) are produced by the
// reference model. The completion path must give a + b for every operand
// pair, including a sweep over every carry chain start and length; the
// grounding path must give a + b whenever E_r holds. Both paths
// must be exercised on cases where the speculative sum was wrong.
module tb_vlla_error_correct;
  import vlla_pkg::*;
  import vlla_ref_pkg::*;

  word_t d, p, h_spec, hp_spec, s_spec, s_gnd, s_fix;
  blk_t  blk;
  logic  cout_gnd, cout_fix;
  int checks = 0, failures = 0, n_fixed = 0, n_gnd = 0;

  vlla_error_correct dut (
    .d(d), .p(p), .h_spec(h_spec), .hp_spec(hp_spec), .blk(blk), .s_spec(s_spec),
    .s_gnd(s_gnd), .cout_gnd(cout_gnd), .s_fix(s_fix), .cout_fix(cout_fix));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(w32_t a, w32_t b);
    logic [1:0]  r;
    logic        sc;
    logic [32:0] want;
    d = a ^ b; p = a | b;
    for (int i = 0; i < 32; i++) begin
      r = ref_grp(a, b, i % 2, i / 2, lo_elem(i / 2));
      h_spec[i]  = r[1];
      hp_spec[i] = r[0];
    end
    for (int c = 0; c < 2; c++)
      for (int j = 0; j < 4; j++) blk[c][j] = ref_grp(a, b, c, 4 * j + 3, 4 * j);
    s_spec = ref_spec_sum(a, b, sc);
    want = 33'(a) + 33'(b);
    #1;
    checks++;
    if ({cout_fix, s_fix} !== want) begin
      failures++;
      if (failures < 10) $display("FAIL fix %h + %h: got %b_%h want %h", a, b, cout_fix, s_fix, want);
    end
    if ({sc, s_spec} != want) n_fixed++;
    if (ref_er(a, b)) begin
      checks++;
      n_gnd++;
      if ({cout_gnd, s_gnd} !== want) begin
        failures++;
        if (failures < 10) $display("FAIL gnd %h + %h: got %b_%h want %h", a, b, cout_gnd, s_gnd, want);
      end
    end
  endtask

  initial begin
    w32_t a, b;
    run(32'd29, -32'sd26);
    run(32'h00ff_ffff, 32'h0000_0001);
    run(32'h7fff_ffff, 32'h0000_0001);
    run('1, 1);
    run('1, '1);
    // every carry chain start and length, generated and propagated
    for (int i = 0; i < 32; i++)
      for (int len = 1; i + len <= 32; len++) begin
        w32_t chain;
        chain = w32_t'(((64'd1 << len) - 64'd1) << i);
        run(chain, w32_t'(64'd1 << i));
        run(chain ^ w32_t'(64'd1 << i), w32_t'(64'd1 << i) | ~chain);
      end
    for (int dsel = 0; dsel < 3; dsel++)
      for (int n = 0; n < 3000; n++) begin
        gen_pair(dsel, a, b);
        run(a, b);
      end
    $display("wrong speculative sums corrected=%0d grounding cases=%0d", n_fixed, n_gnd);
    checks++;
    if (n_fixed == 0 || n_gnd == 0) begin
      failures++;
      $display("FAIL a recovery path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
