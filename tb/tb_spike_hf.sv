// tb_spike_hf: self-checking test of the Spikes Hold & Fire.
// Directed cases follow the hold / fire / cancel rules from a held U+ spike:
// a U+ fires the held spike at once, U- or Y+ cancel it, Y- fires it, and a
// lone spike is fired when the hold time (HOLD cycles) runs out. A random
// part drives both inputs with signed spike trains and checks that the
// signed output count equals count(U) - count(Y) once all held spikes have
// left, and that the output never carries p and n together.
module tb_spike_hf;
  import spike_pkg::*;

  localparam int HOLD = HF_HOLD_DEFAULT;

  logic clk = 1'b0, rst = 1'b1;
  spike_t u = SPIKE_NONE, y = SPIKE_NONE, out;
  int checks = 0, failures = 0;
  int outsum = 0;  // signed output count

  always #10 clk = ~clk;

  spike_hf dut (.clk(clk), .rst(rst), .u(u), .y(y), .out(out));

  always @(posedge clk) if (!rst) begin
    if (out.p) outsum++;
    if (out.n) outsum--;
    if (out.p && out.n) begin failures++; $display("FAIL: p and n together"); end
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic give(spike_t su, spike_t sy);
    @(negedge clk); u = su; y = sy;
    @(negedge clk); u = SPIKE_NONE; y = SPIKE_NONE;
  endtask

  localparam spike_t P = '{p: 1'b1, n: 1'b0};
  localparam spike_t M = '{p: 1'b0, n: 1'b1};
  localparam spike_t Z = SPIKE_NONE;

  task automatic settle();
    repeat (HOLD + 10) @(negedge clk);
  endtask

  initial begin
    int s0, t_first, t;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    // Lone U+: held, then fired after the hold time.
    s0 = outsum;
    give(P, Z);
    t = 0;
    while (outsum == s0 && t < 2 * HOLD) begin @(negedge clk); t++; end
    check(outsum == s0 + 1, "lone U+ fired");
    check(t >= HOLD - 2 && t <= HOLD + 2, $sformatf("hold time %0d cycles", t));

    // U+ then U+: first fires at once, second held.
    settle(); s0 = outsum;
    give(P, Z); repeat (10) @(negedge clk);
    give(P, Z); @(negedge clk);
    check(outsum == s0 + 1, "U+,U+ fires immediately");
    settle();
    check(outsum == s0 + 2, "U+,U+ total 2");

    // U+ then U-: cancel.
    s0 = outsum;
    give(P, Z); repeat (10) @(negedge clk); give(M, Z); settle();
    check(outsum == s0, "U+,U- cancel");

    // U+ then Y+: cancel.
    s0 = outsum;
    give(P, Z); repeat (10) @(negedge clk); give(Z, P); settle();
    check(outsum == s0, "U+,Y+ cancel");

    // U+ then Y-: fire, hold positive.
    s0 = outsum;
    give(P, Z); repeat (10) @(negedge clk); give(Z, M); @(negedge clk);
    check(outsum == s0 + 1, "U+,Y- fires");
    settle();
    check(outsum == s0 + 2, "U+,Y- total 2");

    // Y+ alone gives a negative output spike.
    s0 = outsum;
    give(Z, P); settle();
    check(outsum == s0 - 1, "Y+ gives negative");

    // Same-cycle double positive with a held positive: nothing lost.
    s0 = outsum;
    give(P, Z); give(P, M); settle();
    check(outsum == s0 + 3, "double input with held spike");

    // Random signed trains: conservation of the signed count.
    for (int run = 0; run < 6; run++) begin
      int pu, pn, yu, yn, exp_sum;
      pu = $urandom_range(0, 40); pn = $urandom_range(0, 40);
      yu = $urandom_range(0, 40); yn = $urandom_range(0, 40);
      s0 = outsum; exp_sum = 0;
      for (int c = 0; c < 20000; c++) begin
        @(negedge clk);
        u = SPIKE_NONE; y = SPIKE_NONE;
        if ($urandom_range(0, 999) < pu) u.p = 1; else if ($urandom_range(0, 999) < pn) u.n = 1;
        if ($urandom_range(0, 999) < yu) y.p = 1; else if ($urandom_range(0, 999) < yn) y.n = 1;
        exp_sum += int'(u.p) - int'(u.n) - int'(y.p) + int'(y.n);
      end
      @(negedge clk); u = SPIKE_NONE; y = SPIKE_NONE;
      settle(); settle();
      check(outsum - s0 == exp_sum, $sformatf("run %0d: out %0d expected %0d", run, outsum - s0, exp_sum));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
