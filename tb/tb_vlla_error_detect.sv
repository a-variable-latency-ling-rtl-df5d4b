// tb_vlla_error_detect -- self-checking testbench of the error detection
// unit. Operands come from directed cases and from the three input
// distributions. E_u, E_r and E_s are compared with the reference model;
// in addition it checks the safety property the adder relies on: whenever
// the speculative sum is wrong and E_r is false, E_s is true, and E_r
// always implies E_u. Each flag must be seen both set and clear.
module tb_vlla_error_detect;
  import vlla_pkg::*;
  import vlla_ref_pkg::*;

  word_t d, p, gg, pp;
  logic  e_u, e_r, e_s;
  int checks = 0, failures = 0;
  int n_eu = 0, n_er = 0, n_es = 0, n_wrong = 0, n_tot = 0;

  vlla_error_detect dut (.d(d), .p(p), .gg(gg), .pp(pp),
                         .e_u(e_u), .e_r(e_r), .e_s(e_s));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(w32_t a, w32_t b);
    logic [32:0] spec, want;
    logic        sc;
    d = a ^ b; p = a | b;
    for (int i = 0; i < 32; i++) begin
      gg[i] = bG(a, b, i);
      pp[i] = bP(a, b, i);
    end
    #1;
    spec[31:0] = ref_spec_sum(a, b, sc);
    spec[32]   = sc;
    want = 33'(a) + 33'(b);
    checks++;
    if (e_u !== ref_eu(a, b) || e_r !== ref_er(a, b) || e_s !== ref_es(a, b)) begin
      failures++;
      if (failures < 10)
        $display("FAIL flags a=%h b=%h: Eu=%b Er=%b Es=%b want %b %b %b", a, b,
                 e_u, e_r, e_s, ref_eu(a, b), ref_er(a, b), ref_es(a, b));
    end
    checks++;
    if ((spec != want && !e_r && !e_s) || (e_r && !e_u) || ((&d[31:14]) && e_u != e_r)) begin
      failures++;
      if (failures < 10) $display("FAIL undetected error a=%h b=%h", a, b);
    end
    n_tot++;
    n_eu += int'(e_u); n_er += int'(e_r); n_es += int'(e_s);
    n_wrong += int'(spec != want);
  endtask

  initial begin
    w32_t a, b;
    run(32'd29, -32'sd26);               // opposite signs, positive result
    run(32'h0000_4000, 32'hFFFF_C000);   // carry into bit 14, all d upper one
    run(32'h0000_7fff, 32'h0000_0001);
    run(32'h00ff_ffff, 32'h0000_0001);   // long chain -> E_s
    run(0, 0);
    run('1, '1);
    for (int dsel = 0; dsel < 3; dsel++)
      for (int n = 0; n < 3000; n++) begin
        gen_pair(dsel, a, b);
        run(a, b);
      end
    $display("samples=%0d Eu=%0d Er=%0d Es=%0d speculative_wrong=%0d",
             n_tot, n_eu, n_er, n_es, n_wrong);
    checks++;
    if (n_eu == 0 || n_er == 0 || n_es == 0 || n_eu == n_tot || n_es == n_tot) begin
      failures++;
      $display("FAIL a flag was never set or never clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
