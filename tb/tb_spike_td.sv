// tb_spike_td: self-checking test of the Spikes Temporal Derivative.
// A step of input rate R (spikes per cycle) must produce a burst of output
// spikes that dies away: the loop settles when the internal SI&G count c
// satisfies c / (2^(N-1) (gen_fd+1)) = R, and every output spike has gone
// into that count, so the signed output total after the step is about
// R * 2^(N-1) * (gen_fd+1). The output rate at the end of the step must be
// far below R, and when the input stops the same amount comes back as
// negative spikes. An 8-bit integrator keeps the time constant short.
// clr must hold the block silent.
module tb_spike_td;
  import spike_pkg::*;

  localparam int N  = 8;
  localparam int FD = 1;
  localparam int ISI = 8;  // input spike every 8 cycles: R = 1/8
  localparam int EXPECT = (1 << (N - 1)) * (FD + 1) / ISI;  // 32

  logic clk = 1'b0, rst = 1'b1, clr = 1'b0;
  spike_t in = SPIKE_NONE, out;
  int checks = 0, failures = 0;
  int outsum = 0, tail_cnt = 0, n_in = 0;
  bit counting_tail = 0;

  always #10 clk = ~clk;

  spike_td #(.N(N)) dut (.clk(clk), .rst(rst), .clr(clr), .in(in), .gen_fd(16'(FD)), .out(out));

  always @(posedge clk) if (!rst) begin
    if (out.p) outsum++;
    if (out.n) outsum--;
    if (counting_tail && (out.p || out.n)) tail_cnt++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic drive(int cycles, bit on);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      in.p = on && (c % ISI == 0);
      if (in.p) n_in++;
    end
    @(negedge clk); in = SPIKE_NONE;
  endtask

  initial begin
    int sum_step;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // Positive step, long enough to settle (time constant 256 cycles)
    drive(20000, 1'b0);
    drive(16000, 1'b1);
    counting_tail = 1;
    n_in = 0;
    drive(4000, 1'b1);
    counting_tail = 0;
    sum_step = outsum;
    check(sum_step >= EXPECT - 4 && sum_step <= EXPECT + 4,
          $sformatf("step output total %0d, expected about %0d", sum_step, EXPECT));
    check(tail_cnt * 10 < n_in, $sformatf("settled output %0d spikes vs %0d in", tail_cnt, n_in));
    check(dut.u_ig.count >= EXPECT - 4 && dut.u_ig.count <= EXPECT + 4, "integrator count");
    // Input stops: derivative is negative, output total returns near 0
    drive(20000, 1'b0);
    check(outsum >= -2 && outsum <= 2, $sformatf("after step down total %0d", outsum));
    // clr holds it silent
    clr = 1'b1;
    begin
      int s0;
      s0 = outsum;
      drive(3000, 1'b1);
      check(outsum == s0, $sformatf("clr holds at rest %0d %0d", outsum, s0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
