// tb_spid_channel: closed-loop test of one motor channel with a motor model.
// The channel controls dc_motor_model at its default sizes. Reference 100
// with ref_fd = 0 gives 152.59 kspikes/s (0.0030518 spikes per cycle).
// Loop gain of the model: KMAX * spike width = 0.04 * 200 = 8, so
//   P   control settles at 8/9 of the reference (steady-state error),
//   PI  and PID control settle at the reference.
// Speeds are measured as the QSR spike rate over a window after settling
// and compared with the reference spike count over the same window. A
// negative reference must turn the motor backward through pfm_n.
module tb_spid_channel;
  import spike_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  chan_cfg_t cfg;
  logic enc_a, enc_b, pfm_p, pfm_n;
  spike_t mon [MON_STREAMS];
  int edges;
  int checks = 0, failures = 0;
  int c_ref = 0, c_spd = 0, c_td = 0, c_ig = 0;

  always #10 clk = ~clk;

  spid_channel dut (.clk(clk), .rst(rst), .cfg(cfg), .enc_a(enc_a), .enc_b(enc_b),
                    .pfm_p(pfm_p), .pfm_n(pfm_n), .mon(mon));
  dc_motor_model motor (.clk(clk), .pfm_p(pfm_p), .pfm_n(pfm_n), .enc_a(enc_a), .enc_b(enc_b), .edges(edges));

  always @(posedge clk) if (!rst) begin
    c_ref += int'(mon[MON_REF].p) - int'(mon[MON_REF].n);
    c_spd += int'(mon[MON_SPEED].p) - int'(mon[MON_SPEED].n);
    if (mon[MON_TD].p || mon[MON_TD].n) c_td++;
    if (mon[MON_IG].p || mon[MON_IG].n) c_ig++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Settle, then measure speed / reference over a window; ratio in percent.
  task automatic measure(int settle, int win, output int pct, output int nref);
    int r0, s0;
    repeat (settle) @(posedge clk);
    r0 = c_ref; s0 = c_spd;
    repeat (win) @(posedge clk);
    nref = c_ref - r0;
    pct  = (nref == 0) ? 0 : (100 * (c_spd - s0)) / nref;
  endtask

  initial begin
    int pct, nref, td0, ig0;
    cfg = '{ref_speed: 16'sd100, ref_fd: 16'd0, ig_fd: 16'd0, td_fd: 16'd0,
            spikes_width: 16'd200, ig_en: 1'b0, td_en: 1'b0};
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // P
    measure(60000, 200000, pct, nref);
    check(nref >= 600 && nref <= 622, $sformatf("reference count %0d in 200k cycles", nref));
    check(pct >= 82 && pct <= 94, $sformatf("P: speed %0d%% of reference", pct));
    // PI
    cfg.ig_en = 1'b1; ig0 = c_ig;
    measure(300000, 200000, pct, nref);
    check(pct >= 97 && pct <= 103, $sformatf("PI: speed %0d%% of reference", pct));
    check(c_ig > ig0, "PI: SI&G active");
    // PID with a reversed reference
    cfg.td_en = 1'b1; cfg.ref_speed = -16'sd100; td0 = c_td;
    measure(400000, 200000, pct, nref);
    check(nref <= -600, $sformatf("negative reference count %0d", nref));
    check(pct >= 97 && pct <= 103, $sformatf("PID reversed: speed %0d%% of reference", pct));
    check(c_td > td0, "PID: STD active during the reversal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
