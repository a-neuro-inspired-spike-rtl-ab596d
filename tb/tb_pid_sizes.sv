// tb_pid_sizes: the spike PID controller at the five SI&G / STD bit lengths
// of the synthesis table (14/14, 14/16, 16/14, 16/16, 18/18), all with
// gen_fd = 0. Each size runs the same sequence on its own copy:
//  - P mode: the output must equal the error spike for spike;
//  - SI&G gain: after a burst of 100 error spikes the SI&G must emit exactly
//    100 spikes in any 2^(IG_N-1) cycles (k = F_CLK / 2^(IG_N-1));
//  - STD gain: a regular error of one spike every 100 cycles (rate 0.01) for
//    eight time constants must make the STD emit 0.01 * 2^(TD_N-1) spikes in
//    total and then fall silent; removing the input must give the same count
//    back with the opposite sign;
//  - PID: with a random error both adders must conserve spikes,
//    pid = error + SI&G + STD once the held spikes drain.
module tb_pid_sizes;
  import spike_pkg::*;

  localparam int NCFG = 5;
  localparam int IGN[NCFG] = '{14, 14, 16, 16, 18};
  localparam int TDN[NCFG] = '{14, 16, 14, 16, 18};

  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  bit done [NCFG];

  always #10 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int sv(spike_t s);
    return int'(s.p) - int'(s.n);
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  for (genvar k = 0; k < NCFG; k++) begin : g_cfg
    logic ig_en = 1'b0, td_en = 1'b0;
    spike_t err = SPIKE_NONE, ig_out, td_out, ig_td, pid_out;
    int s_err = 0, s_ig = 0, s_td = 0, s_pid = 0;

    spike_pid #(.IG_N(IGN[k]), .TD_N(TDN[k])) dut (
      .clk(clk), .rst(rst), .ig_en(ig_en), .td_en(td_en),
      .ig_fd(16'd0), .td_fd(16'd0), .err(err),
      .ig_out(ig_out), .td_out(td_out), .ig_td(ig_td), .pid_out(pid_out));

    always @(posedge clk) if (!rst) begin
      s_err += sv(err);
      s_ig  += sv(ig_out);
      s_td  += sv(td_out);
      s_pid += sv(pid_out);
    end

    initial begin
      int tau, c0, expect_std, tot, tail;
      string tag;
      tag = $sformatf("SI&G %0d / STD %0d:", IGN[k], TDN[k]);
      tau = 1 << (TDN[k] - 1);
      wait (!rst);

      // P mode
      s_err = 0; s_pid = 0;
      for (int c = 0; c < 5000; c++) begin
        @(negedge clk);
        err = SPIKE_NONE;
        if ($urandom_range(0, 999) < 30) err.p = 1'b1;
        else if ($urandom_range(0, 999) < 10) err.n = 1'b1;
      end
      @(negedge clk); err = SPIKE_NONE;
      repeat (3 * HF_HOLD_DEFAULT) @(negedge clk);
      check(s_pid == s_err, $sformatf("%s P mode pid %0d err %0d", tag, s_pid, s_err));

      // SI&G gain
      ig_en = 1'b1;
      for (int i = 0; i < 100; i++) begin
        @(negedge clk); err.p = 1'b1;
        @(negedge clk); err = SPIKE_NONE;
      end
      repeat (4) @(negedge clk);
      c0 = s_ig;
      repeat (1 << (IGN[k] - 1)) @(negedge clk);
      check(s_ig - c0 == 100,
            $sformatf("%s SI&G emitted %0d in 2^%0d cycles", tag, s_ig - c0, IGN[k] - 1));
      ig_en = 1'b0;
      repeat (3 * HF_HOLD_DEFAULT) @(negedge clk);

      // STD step up and down
      td_en = 1'b1;
      expect_std = tau / 100;
      for (int dir = 0; dir < 2; dir++) begin
        c0 = s_td; tail = 0;
        for (int c = 0; c < 8 * tau; c++) begin
          @(negedge clk);
          err = SPIKE_NONE;
          if (dir == 0 && c % 100 == 0) err.p = 1'b1;
          if (c == 7 * tau) tail = s_td;
        end
        tot  = s_td - c0;
        tail = s_td - tail;
        $display("%s STD step %s: total %0d (expected %0d), last time constant %0d",
                 tag, dir == 0 ? "up" : "down", tot, dir == 0 ? expect_std : -expect_std, tail);
        check(iabs(tot - (dir == 0 ? expect_std : -expect_std)) <= expect_std / 25 + 3,
              $sformatf("%s STD step total %0d", tag, tot));
        check(iabs(tail) <= 3, $sformatf("%s STD not settled (%0d)", tag, tail));
      end
      td_en = 1'b0;
      repeat (3 * HF_HOLD_DEFAULT) @(negedge clk);

      // PID conservation
      ig_en = 1'b1; td_en = 1'b1;
      s_err = 0; s_ig = 0; s_td = 0; s_pid = 0;
      for (int c = 0; c < 20000; c++) begin
        @(negedge clk);
        err = SPIKE_NONE;
        if ($urandom_range(0, 999) < 20) err.p = 1'b1;
        else if ($urandom_range(0, 999) < 15) err.n = 1'b1;
      end
      @(negedge clk); err = SPIKE_NONE;
      repeat (1000) @(negedge clk);
      ig_en = 1'b0; td_en = 1'b0;
      repeat (3 * HF_HOLD_DEFAULT) @(negedge clk);
      check(s_ig != 0 && s_td != 0, $sformatf("%s PID paths silent", tag));
      check(s_pid == s_err + s_ig + s_td,
            $sformatf("%s PID pid %0d vs %0d", tag, s_pid, s_err + s_ig + s_td));
      done[k] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
