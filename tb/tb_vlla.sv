// tb_vlla -- end-to-end self-checking testbench of the 32-bit variable
// latency Ling adder, at its default (and only) size.
//
// A driver presents operand pairs on the valid/ready handshake and a
// monitor checks every result against a + b, its latency (1 cycle, or 2
// when the reference model says E_s) and its path flags. It runs
//   1. directed cases: short and long carry chains, the grounding case,
//      back-to-back additions behind a correction, idle gaps;
//   2. the three input distributions the design is evaluated with
//      (uniform; half uniform / half Gaussian sigma 256; half uniform /
//      half Gaussian sigma 30000), issued back to back. For each it reports
//      the fraction of additions that needed a correction cycle (P_Es) and
//      the average latency, and checks that the total cycle count equals
//      N + corrections, i.e. T_avg = (1 + P_Es) T_clk.
// Every mechanism (one-cycle result, correction cycle, grounding, input
// stall, idle gap) must occur at least once.
module tb_vlla;
  import vlla_pkg::*;
  import vlla_ref_pkg::*;

  localparam int N_PER_DIST = 100000;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, in_ready;
  word_t a = '0, b = '0, sum;
  logic  out_valid, cout, out_corrected, out_grounded;

  vlla dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .out_valid(out_valid), .sum(sum), .cout(cout),
    .out_corrected(out_corrected), .out_grounded(out_grounded));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    w32_t   a, b;
    logic   es, gnd;
    longint acc_cyc;
  } op_t;
  op_t sb[$];

  int n_fast = 0, n_corr = 0, n_gnd = 0, n_stall = 0, n_idle = 0, n_done = 0;
  longint last_out_cyc = 0;

  initial begin : watchdog
    #(10 * 400000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Called at a falling edge; returns at the falling edge after acceptance.
  task automatic issue(w32_t ta, w32_t tb_);
    op_t o;
    a = ta; b = tb_; in_valid = 1'b1;
    while (!in_ready) begin
      n_stall++;
      @(negedge clk);
    end
    o.a = ta; o.b = tb_;
    o.es  = ref_es(ta, tb_);
    o.gnd = ref_eu(ta, tb_) && ref_er(ta, tb_);
    o.acc_cyc = cyc + 1;
    sb.push_back(o);
    @(negedge clk);
    in_valid = 1'b0;
    a = $urandom; b = $urandom;   // don't-care operands while idle
  endtask

  task automatic idle(int n);
    repeat (n) begin
      n_idle++;
      @(negedge clk);
    end
  endtask

  task automatic drain();
    int guard = 0;
    while (sb.size() != 0 && guard < 100) begin
      @(negedge clk);
      guard++;
    end
    if (sb.size() != 0) fail("results missing after drain");
  endtask

  // Monitor
  always @(negedge clk) if (rst_n && out_valid) begin
    op_t o;
    logic [32:0] want;
    checks++;
    if (sb.size() == 0) fail("result without an addition");
    else begin
      o = sb.pop_front();
      want = 33'(o.a) + 33'(o.b);
      if ({cout, sum} !== want)
        fail($sformatf("%h + %h = %b_%h, want %h", o.a, o.b, cout, sum, want));
      if (cyc - o.acc_cyc != (o.es ? 2 : 1))
        fail($sformatf("%h + %h latency %0d, want %0d", o.a, o.b, cyc - o.acc_cyc,
                       o.es ? 2 : 1));
      if (out_corrected !== o.es || out_grounded !== o.gnd)
        fail($sformatf("%h + %h path flags corr=%b gnd=%b want %b %b", o.a, o.b,
                       out_corrected, out_grounded, o.es, o.gnd));
      if (out_corrected) n_corr++;
      else n_fast++;
      if (out_grounded) n_gnd++;
      n_done++;
      last_out_cyc = cyc;
    end
  end

  initial begin
    w32_t x, y;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. directed
    issue(32'd1, 32'd2);
    issue(32'h00ff_ffff, 32'h0000_0001);     // long chain: correction
    issue(32'd5, 32'd6);                     // waits behind the correction
    idle(2);
    issue(32'd29, -32'sd26);                 // grounding
    issue(-32'sd100, 32'd100);               // grounding with zero sum
    issue(-32'sd5, 32'd3);                   // negative sum: no long chain
    issue(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    for (int i = 0; i < 32; i++) issue(32'hFFFF_FFFF >> i, 32'd1);
    idle(1);
    for (int n = 0; n < 200; n++) begin
      issue($urandom, $urandom);
      if ($urandom_range(3, 0) == 0) idle($urandom_range(2, 1));
    end
    drain();

    // 2. the three input distributions, back to back
    for (int dsel = 0; dsel < 3; dsel++) begin
      longint first_cyc;
      int corr0, done0, n_wrong;
      corr0 = n_corr; done0 = n_done; n_wrong = 0;
      first_cyc = cyc + 1;
      for (int n = 0; n < N_PER_DIST; n++) begin
        logic sc;
        gen_pair(dsel, x, y);
        if ({sc, ref_spec_sum(x, y, sc)} != 33'(x) + 33'(y)) n_wrong++;
        issue(x, y);
      end
      drain();
      checks++;
      if (n_done - done0 != N_PER_DIST) fail("result count");
      if (last_out_cyc - first_cyc != longint'(N_PER_DIST) + longint'(n_corr) - longint'(corr0))
        fail($sformatf("dsel %0d: %0d cycles for %0d additions with %0d corrections",
                       dsel, last_out_cyc - first_cyc, N_PER_DIST, n_corr - corr0));
      $display("distribution %0d: additions=%0d corrections=%0d P_Es=%f T_avg=%f cycles speculative_sum_wrong=%0d",
               dsel, N_PER_DIST, n_corr - corr0,
               real'(n_corr - corr0) / N_PER_DIST,
               real'(last_out_cyc - first_cyc) / N_PER_DIST, n_wrong);
    end

    $display("mechanisms: one_cycle=%0d corrected=%0d grounded=%0d stall_cycles=%0d idle_cycles=%0d",
             n_fast, n_corr, n_gnd, n_stall, n_idle);
    checks++;
    if (n_fast == 0 || n_corr == 0 || n_gnd == 0 || n_stall == 0 || n_idle == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
