// tb_closed_loop: the closed-loop P, PI and PID speed experiments, run on
// one motor channel at its default sizes with the motor model.
// Settings as in the reported experiments:
//   P:   reference 190.73 kspikes/s (x = 125), spike width 10.1 us (505
//        cycles) and 8.2 us (410 cycles), SI&G and STD at rest;
//   PI:  reference 152.59 kspikes/s (x = 100), width 4 us (200 cycles),
//        16-bit SI&G with frequency divider 20;
//   PID: as PI, SI&G divider 18, STD (16-bit) divider 20;
// then the reference steps to 0. A second channel, built with an 18-bit STD
// (TD_N = 18), runs the PID case with SI&G 16 bits / divider 18 and STD
// 18 bits / divider 20 at the same time as the first PID run.
// Expected with the model's loop gain g = 0.04 * width: P settles at
// g/(1+g) of the reference (95.3 % at 505, 94.3 % at 410), so the wider
// spike leaves the smaller error; PI and PID remove the error (within 3 %).
// Speed is the QSR spike rate over 100k-cycle windows (2 ms).
module tb_closed_loop;
  import spike_pkg::*;

  localparam int WIN = 100_000;

  logic clk = 1'b0, rst = 1'b1;
  chan_cfg_t cfg;
  logic enc_a, enc_b, pfm_p, pfm_n;
  spike_t mon [MON_STREAMS];
  int edges;
  int checks = 0, failures = 0;
  int c_ref = 0, c_spd = 0;

  always #10 clk = ~clk;

  spid_channel dut (.clk(clk), .rst(rst), .cfg(cfg), .enc_a(enc_a), .enc_b(enc_b),
                    .pfm_p(pfm_p), .pfm_n(pfm_n), .mon(mon));
  dc_motor_model motor (.clk(clk), .pfm_p(pfm_p), .pfm_n(pfm_n), .enc_a(enc_a), .enc_b(enc_b), .edges(edges));

  // PID channel with an 18-bit STD, held in reset until its run.
  logic rst18 = 1'b1;
  logic enc_a18, enc_b18, pfm_p18, pfm_n18;
  spike_t mon18 [MON_STREAMS];
  int edges18, c_spd18 = 0;
  spid_channel #(.TD_N(18)) dut18 (.clk(clk), .rst(rst18),
    .cfg('{ref_speed: 16'sd100, ref_fd: 16'd0, ig_fd: 16'd18, td_fd: 16'd20,
           spikes_width: 16'd200, ig_en: 1'b1, td_en: 1'b1}),
    .enc_a(enc_a18), .enc_b(enc_b18), .pfm_p(pfm_p18), .pfm_n(pfm_n18), .mon(mon18));
  dc_motor_model motor18 (.clk(clk), .pfm_p(pfm_p18), .pfm_n(pfm_n18), .enc_a(enc_a18),
                          .enc_b(enc_b18), .edges(edges18));
  always @(posedge clk) if (!rst18)
    c_spd18 += int'(mon18[MON_SPEED].p) - int'(mon18[MON_SPEED].n);

  always @(posedge clk) if (!rst) begin
    c_ref += int'(mon[MON_REF].p) - int'(mon[MON_REF].n);
    c_spd += int'(mon[MON_SPEED].p) - int'(mon[MON_SPEED].n);
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Run nwin windows; return the last window's speed in per mille of the
  // reference rate x / 2^15 and the highest window seen.
  task automatic run(string name, int x, int nwin, output int last_pm, output int peak_pm);
    int s0;
    peak_pm = -100000;
    for (int w = 0; w < nwin; w++) begin
      s0 = c_spd;
      repeat (WIN) @(posedge clk);
      last_pm = (x == 0) ? (c_spd - s0) : int'(1000.0 * (c_spd - s0) * 32768.0 / (real'(x) * WIN));
      if (last_pm > peak_pm) peak_pm = last_pm;
    end
    $display("%-10s final %0d/1000 of reference, peak %0d/1000", name, last_pm, peak_pm);
  endtask

  initial begin
    int p505, p410, pk, pi_v, pid_v, pid18_v, s18, z;
    cfg = '{ref_speed: 16'sd125, ref_fd: 16'd0, ig_fd: 16'd20, td_fd: 16'd20,
            spikes_width: 16'd505, ig_en: 1'b0, td_en: 1'b0};
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run("P 10.1us", 125, 5, p505, pk);
    cfg.spikes_width = 16'd410;
    run("P 8.2us", 125, 5, p410, pk);
    check(p505 >= 933 && p505 <= 973, $sformatf("P 10.1 us: %0d/1000, model 953", p505));
    check(p410 >= 923 && p410 <= 963, $sformatf("P 8.2 us: %0d/1000, model 943", p410));
    check(p505 > p410, "wider spike leaves the smaller steady-state error");

    // PI from rest
    rst = 1'b1; repeat (3) @(posedge clk);
    cfg = '{ref_speed: 16'sd100, ref_fd: 16'd0, ig_fd: 16'd20, td_fd: 16'd20,
            spikes_width: 16'd200, ig_en: 1'b1, td_en: 1'b0};
    repeat (20000) @(posedge clk);  // motor model coasts down
    rst = 1'b0;
    run("PI", 100, 60, pi_v, pk);
    check(pi_v >= 970 && pi_v <= 1030, $sformatf("PI: %0d/1000", pi_v));

    // PID from rest
    rst = 1'b1; repeat (3) @(posedge clk);
    cfg.ig_fd = 16'd18; cfg.td_en = 1'b1;
    repeat (20000) @(posedge clk);
    rst = 1'b0; rst18 = 1'b0;
    run("PID", 100, 60, pid_v, pk);
    check(pid_v >= 970 && pid_v <= 1030, $sformatf("PID: %0d/1000", pid_v));
    s18 = c_spd18;
    repeat (WIN) @(posedge clk);
    pid18_v = int'(1000.0 * (c_spd18 - s18) * 32768.0 / (100.0 * WIN));
    $display("PID, 18-bit STD: %0d/1000 of reference", pid18_v);
    check(pid18_v >= 970 && pid18_v <= 1030, $sformatf("PID with 18-bit STD: %0d/1000", pid18_v));

    // Reference steps to zero: the motor must stop (spikes per window).
    cfg.ref_speed = 16'sd0;
    run("PID to 0", 0, 60, z, pk);
    check(z >= -40 && z <= 40, $sformatf("after stepping to 0: %0d spikes per window", z));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
