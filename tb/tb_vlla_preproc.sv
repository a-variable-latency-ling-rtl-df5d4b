// tb_vlla_preproc -- self-checking testbench of the pre-processing unit.
// Drives directed and random operands and checks d, g, p, G and P bit by
// bit against the defining equations evaluated in the testbench.
module tb_vlla_preproc;
  import vlla_pkg::*;

  word_t a, b, d, g, p, gg, pp;
  int checks = 0, failures = 0;

  vlla_preproc dut (.a(a), .b(b), .d(d), .g(g), .p(p), .gg(gg), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(word_t ta, word_t tb_);
    a = ta; b = tb_;
    #1;
    for (int i = 0; i < 32; i++) begin
      logic eg, ep;
      eg = (ta[i] & tb_[i]) | ((i > 0) ? (ta[i-1] & tb_[i-1]) : 1'b0);
      ep = (i > 0) ? ((ta[i] | tb_[i]) & (ta[i-1] | tb_[i-1])) : 1'b0;
      checks++;
      if (d[i] !== (ta[i] ^ tb_[i]) || g[i] !== (ta[i] & tb_[i]) ||
          p[i] !== (ta[i] | tb_[i]) || gg[i] !== eg || pp[i] !== ep) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h bit %0d: d=%b g=%b p=%b G=%b P=%b", ta, tb_, i,
                   d[i], g[i], p[i], gg[i], pp[i]);
      end
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, '0);
    check(32'h5555_5555, 32'hAAAA_AAAA);
    check(32'h0000_0001, 32'h0000_0001);
    check(32'h8000_0000, 32'h8000_0001);
    for (int n = 0; n < 500; n++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
