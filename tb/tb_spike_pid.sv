// tb_spike_pid: self-checking test of the spike PID controller.
// The controller is driven with a random signed error stream in three modes.
// P (SI&G and STD at rest): the output must be the error stream itself, spike
// for spike in signed total, with silent SI&G and STD. PI and PID: the two
// SH&F adders must conserve spikes, so once held spikes drain the totals obey
// ig_td = ig + td and pid = ig_td + error; in PI the STD stays silent, and
// the SI&G output total over a fixed error must follow its gain.
module tb_spike_pid;
  import spike_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic ig_en = 1'b0, td_en = 1'b0;
  spike_t err = SPIKE_NONE, ig_out, td_out, ig_td, pid_out;
  int checks = 0, failures = 0;
  int s_err = 0, s_ig = 0, s_td = 0, s_igtd = 0, s_pid = 0;

  always #10 clk = ~clk;

  spike_pid #(.IG_N(10), .TD_N(10)) dut (
    .clk(clk), .rst(rst), .ig_en(ig_en), .td_en(td_en),
    .ig_fd(16'd0), .td_fd(16'd0), .err(err),
    .ig_out(ig_out), .td_out(td_out), .ig_td(ig_td), .pid_out(pid_out));

  function automatic int sv(spike_t s);
    return int'(s.p) - int'(s.n);
  endfunction

  always @(posedge clk) if (!rst) begin
    s_err  += sv(err);
    s_ig   += sv(ig_out);
    s_td   += sv(td_out);
    s_igtd += sv(ig_td);
    s_pid  += sv(pid_out);
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic clear_sums();
    s_err = 0; s_ig = 0; s_td = 0; s_igtd = 0; s_pid = 0;
  endtask

  // Random error train, then quiet time for the SH&F stages to drain. The
  // integrators are cleared at the end (enables dropped) so their outputs stop.
  task automatic run(int cycles, int pp, int pn);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      err = SPIKE_NONE;
      if ($urandom_range(0, 999) < pp) err.p = 1;
      else if ($urandom_range(0, 999) < pn) err.n = 1;
    end
    @(negedge clk); err = SPIKE_NONE;
  endtask

  task automatic drain();
    repeat (3 * HF_HOLD_DEFAULT) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // P mode
    clear_sums();
    run(20000, 30, 10);
    drain();
    check(s_pid == s_err, $sformatf("P: pid %0d err %0d", s_pid, s_err));
    check(s_ig == 0 && s_td == 0, "P: SI&G and STD silent");

    // PI mode: a fixed burst of 100 error spikes, then quiet. The SI&G keeps
    // a count of 100 and must fire 100 spikes per 2^9 cycles: 1000 over the
    // ten quiet windows plus about 20 during the 200-cycle burst.
    ig_en = 1'b1;
    clear_sums();
    for (int i = 0; i < 100; i++) begin @(negedge clk); err.p = 1; @(negedge clk); err = SPIKE_NONE; end
    repeat (10 * 512) @(negedge clk);
    check(s_ig >= 1000 && s_ig <= 1040, $sformatf("PI: SI&G out %0d over 10 windows", s_ig));
    check(s_td == 0, "PI: STD silent");
    ig_en = 1'b0;
    drain();
    check(s_igtd == s_ig + s_td, $sformatf("PI: adder1 %0d vs %0d", s_igtd, s_ig + s_td));
    check(s_pid == s_igtd + s_err, $sformatf("PI: adder2 %0d vs %0d", s_pid, s_igtd + s_err));

    // PID mode with a mixed error train
    ig_en = 1'b1; td_en = 1'b1;
    clear_sums();
    run(30000, 20, 15);
    repeat (2000) @(negedge clk);
    ig_en = 1'b0; td_en = 1'b0;
    drain();
    check(s_td != 0 && s_ig != 0, $sformatf("PID: both paths active ig=%0d td=%0d", s_ig, s_td));
    check(s_igtd == s_ig + s_td, $sformatf("PID: adder1 %0d vs %0d", s_igtd, s_ig + s_td));
    check(s_pid == s_igtd + s_err, $sformatf("PID: adder2 %0d vs %0d", s_pid, s_igtd + s_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
