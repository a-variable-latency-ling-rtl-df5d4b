// tb_vlla_postproc -- self-checking testbench of the post-processing unit.
// Feeds exact Ling carries (H_i = g_i | c_i, from integer addition) and
// checks that sum and carry-out equal a + b; then feeds arbitrary Ling
// carries and checks every sum bit against s_i = d_i ^ (p_i-1 & H_i-1).
module tb_vlla_postproc;
  import vlla_pkg::*;
  import vlla_ref_pkg::*;

  word_t d, p, h, s;
  logic  cout;
  int checks = 0, failures = 0;

  vlla_postproc dut (.d(d), .p(p), .h(h), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exact(w32_t a, w32_t b);
    logic [32:0] r;
    d = a ^ b; p = a | b;
    for (int i = 0; i < 32; i++) h[i] = ref_h_exact(a, b, i);
    r = 33'(a) + 33'(b);
    #1;
    checks++;
    if ({cout, s} !== r) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h: got %b_%h want %h", a, b, cout, s, r);
    end
  endtask

  initial begin
    exact(0, 0);
    exact('1, 1);
    exact('1, '1);
    exact(32'd29, -32'sd26);
    for (int n = 0; n < 500; n++) exact($urandom, $urandom);
    for (int n = 0; n < 200; n++) begin
      word_t want;
      d = $urandom; p = $urandom; h = $urandom;
      #1;
      want[0] = d[0];
      for (int i = 1; i < 32; i++) want[i] = d[i] ^ (p[i-1] & h[i-1]);
      checks++;
      if (s !== want || cout !== (p[31] & h[31])) begin
        failures++;
        if (failures < 10) $display("FAIL formula d=%h p=%h h=%h s=%h", d, p, h, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
