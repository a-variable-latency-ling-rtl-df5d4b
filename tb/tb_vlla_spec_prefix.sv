// tb_vlla_spec_prefix -- self-checking testbench of the speculative prefix
// unit. G_i/P_i are formed in the testbench; every speculative Ling carry,
// its span propagate and the row-2 block groups are compared with the
// reference model, which computes them by partial integer additions. It
// also checks that H_0..H_13 equal the exact Ling carries, and counts how
// often an upper speculative carry differs from the exact one.
module tb_vlla_spec_prefix;
  import vlla_pkg::*;
  import vlla_ref_pkg::*;

  word_t gg, pp, h, hp;
  blk_t  blk;
  int checks = 0, failures = 0, spec_miss = 0;

  vlla_spec_prefix dut (.gg(gg), .pp(pp), .h(h), .hp(hp), .blk(blk));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what, w32_t a, w32_t b, int i);
    failures++;
    if (failures < 10) $display("FAIL %s a=%h b=%h index %0d", what, a, b, i);
  endtask

  task automatic run(w32_t a, w32_t b);
    logic [1:0] r;
    for (int i = 0; i < 32; i++) begin
      gg[i] = bG(a, b, i);
      pp[i] = bP(a, b, i);
    end
    #1;
    for (int i = 0; i < 32; i++) begin
      checks++;
      r = ref_grp(a, b, i % 2, i / 2, lo_elem(i / 2));
      if (h[i] !== ref_h(a, b, i) || h[i] !== r[1] || hp[i] !== r[0]) fail("span", a, b, i);
      if (i < EXACT_LSBS) begin
        checks++;
        if (h[i] !== ref_h_exact(a, b, i)) fail("exact low carry", a, b, i);
      end else if (h[i] !== ref_h_exact(a, b, i)) spec_miss++;
    end
    for (int c = 0; c < 2; c++)
      for (int j = 0; j < 4; j++) begin
        checks++;
        r = ref_grp(a, b, c, 4 * j + 3, 4 * j);
        if (blk[c][j] !== r) fail("block", a, b, 4 * c + j);
      end
  endtask

  initial begin
    run(0, 0);
    run('1, 1);
    run('1, '1);
    run(32'h0000_7fff, 32'h0000_0001);
    run(32'h00ff_ffff, 32'h0000_0001);
    run(32'd29, -32'sd26);
    for (int n = 0; n < 2000; n++) run($urandom, $urandom);
    $display("upper speculative carries that differ from exact: %0d", spec_miss);
    checks++;
    if (spec_miss == 0) begin
      failures++;
      $display("FAIL no speculative carry ever missed: truncation not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
