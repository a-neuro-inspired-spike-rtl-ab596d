// tb_spid_top: end-to-end test of the four-motor controller at its default
// sizes (16-bit reference and integrators, 10 us SH&F hold time).
//
// Four dc_motor_model instances close the loops. An SPI master model sets
// the channels: motor 0 in P mode, motor 1 in PI, motor 2 in PID at a lower
// reference, motor 3 in PID with a negative reference and a wider spike.
// Settings are read back over SPI. After settling, each motor's speed
// (edges of its encoder model over a window) is compared with the reference
// rate worked out from the settings: |x| / 2^15 spikes per cycle. With the
// model's loop gain KMAX * width (8 for 200 cycles, 12 for 300) P control
// must settle at gain/(1+gain) of the reference and PI / PID at the
// reference. An AER receiver model counts every event; a period of slow
// acknowledges overloads the AER port. Every spike on a monitored line must
// then be either received or counted as dropped. Motor 0 is finally switched
// to PID over SPI and must reach its reference.
// Mechanisms counted (each must occur): SE saturation (a spike during a
// running pulse), SH&F immediate fire, SH&F cancel, SH&F fire at hold-time
// end, AER drop, mode switch by SPI, negative-direction drive.
module tb_spid_top;
  import spike_pkg::*;

  localparam int NM = 4;
  localparam int HALF = 8;

  logic clk = 1'b0, rst = 1'b1;
  logic sck = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic [NM-1:0] enc_a, enc_b, pfm_p, pfm_n;
  logic [15:0] aer_addr, drop_count;
  logic aer_req_n, aer_ack_n = 1'b1;
  int edges [NM];
  int checks = 0, failures = 0;
  int ack_delay = 1;
  int aer_got [64];
  int aer_total = 0, line_total = 0, bad_addr = 0;
  int n_sat = 0, n_fire = 0, n_cancel = 0, n_timeout = 0, n_neg = 0, n_switch = 0;

  always #10 clk = ~clk;

  spid_top dut (
    .clk(clk), .rst(rst),
    .spi_sck(sck), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .enc_a(enc_a), .enc_b(enc_b), .pfm_p(pfm_p), .pfm_n(pfm_n),
    .aer_addr(aer_addr), .aer_req_n(aer_req_n), .aer_ack_n(aer_ack_n),
    .aer_drop_count(drop_count));

  for (genvar m = 0; m < NM; m++) begin : g_m
    dc_motor_model motor (.clk(clk), .pfm_p(pfm_p[m]), .pfm_n(pfm_n[m]),
                          .enc_a(enc_a[m]), .enc_b(enc_b[m]), .edges(edges[m]));
    // Mechanism counters, probing the error SH&F and the SE of each channel.
    always @(posedge clk) if (!rst) begin
      if (dut.g_motor[m].u_chan.u_se.ld && dut.g_motor[m].u_chan.u_se.cnt != 0) n_sat++;
      if (dut.g_motor[m].u_chan.u_err.net != 0 && dut.g_motor[m].u_chan.u_err.tot == 0
          && dut.g_motor[m].u_chan.u_err.held != 0) n_cancel++;
      if (dut.g_motor[m].u_chan.u_err.net != 0
          && (dut.g_motor[m].u_chan.u_err.fire_p || dut.g_motor[m].u_chan.u_err.fire_n)) n_fire++;
      if (dut.g_motor[m].u_chan.u_err.net == 0
          && (dut.g_motor[m].u_chan.u_err.fire_p || dut.g_motor[m].u_chan.u_err.fire_n)) n_timeout++;
      if (pfm_n[m]) n_neg++;
    end
  end

  // Every spike offered to the AER port.
  always @(posedge clk) if (!rst) line_total += $countones(dut.aer_lines);

  // AER receiver, four-phase, active low.
  initial begin
    forever begin
      @(negedge clk);
      if (!aer_req_n) begin
        if (aer_addr < 64 && aer_addr[3:0] < 14) aer_got[aer_addr]++; else bad_addr++;
        aer_total++;
        repeat (ack_delay) @(negedge clk);
        aer_ack_n = 1'b0;
        while (!aer_req_n) @(negedge clk);
        aer_ack_n = 1'b1;
      end
    end
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic spi(input logic [23:0] tx, output logic [15:0] rx);
    rx = '0;
    cs_n = 1'b0;
    repeat (HALF) @(negedge clk);
    for (int i = 23; i >= 0; i--) begin
      mosi = tx[i];
      repeat (HALF) @(negedge clk);
      sck = 1'b1;
      if (i < 16) rx[i] = miso;
      repeat (HALF) @(negedge clk);
      sck = 1'b0;
    end
    repeat (HALF) @(negedge clk);
    cs_n = 1'b1;
    repeat (2 * HALF) @(negedge clk);
  endtask

  task automatic wr(int m, int r, logic [15:0] v);
    logic [15:0] rx;
    spi({1'b1, 4'(m), 3'(r), v}, rx);
  endtask

  task automatic rd(int m, int r, output logic [15:0] v);
    spi({1'b0, 4'(m), 3'(r), 16'h0}, v);
  endtask

  // Speed over a window, in percent of the reference rate x / 2^15.
  task automatic speeds(int win, input int xref [NM], output int pct [NM]);
    int e0 [NM];
    foreach (e0[m]) e0[m] = edges[m];
    repeat (win) @(posedge clk);
    foreach (pct[m]) pct[m] = (100 * 32768 * (edges[m] - e0[m])) / (xref[m] * win);
  endtask

  initial begin
    int xref [NM], pct [NM];
    logic [15:0] v;
    foreach (aer_got[i]) aer_got[i] = 0;
    xref = '{100, 100, 80, -100};
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    for (int m = 0; m < NM; m++) begin
      wr(m, 0, 16'(xref[m]));
      wr(m, 1, 16'd0);                           // ref_fd
      wr(m, 2, 16'd0);                           // ig_fd
      wr(m, 3, 16'd0);                           // td_fd
      wr(m, 4, (m == 3) ? 16'd300 : 16'd200);    // spike width
    end
    wr(0, 5, 16'b00);  // P
    wr(1, 5, 16'b01);  // PI
    wr(2, 5, 16'b11);  // PID
    wr(3, 5, 16'b11);  // PID
    rd(3, 0, v); check(v == 16'hFF9C, $sformatf("read back ref 3 = %h", v));
    rd(3, 4, v); check(v == 16'd300, $sformatf("read back width 3 = %0d", v));
    rd(1, 5, v); check(v == 16'b01, $sformatf("read back mode 1 = %b", v));

    repeat (400000) @(posedge clk);
    speeds(200000, xref, pct);
    $display("speeds in %% of reference: P %0d, PI %0d, PID %0d, PID reversed %0d", pct[0], pct[1], pct[2], pct[3]);
    check(pct[0] >= 82 && pct[0] <= 94, $sformatf("motor 0 P: %0d%%", pct[0]));
    for (int m = 1; m < NM; m++)
      check(pct[m] >= 97 && pct[m] <= 103, $sformatf("motor %0d: %0d%%", m, pct[m]));
    check(edges[3] < 0, "motor 3 turns backward");

    // Overload the AER port with slow acknowledges.
    ack_delay = 40;
    repeat (20000) @(posedge clk);
    ack_delay = 1;
    repeat (2000) @(posedge clk);

    // Switch motor 0 to PID.
    wr(0, 5, 16'b11); n_switch++;
    rd(0, 5, v); check(v == 16'b11, "mode switch read back");
    repeat (400000) @(posedge clk);
    speeds(200000, xref, pct);
    check(pct[0] >= 97 && pct[0] <= 103, $sformatf("motor 0 after switch to PID: %0d%%", pct[0]));

    // Let the AER port drain, then check conservation of events.
    begin
      int s0;
      do begin s0 = aer_total; repeat (200) @(posedge clk); end while (aer_total != s0);
    end
    check(bad_addr == 0, $sformatf("%0d events on unused addresses", bad_addr));
    // Lines keep firing while the drain is checked; allow the few in flight.
    check(aer_total + int'(drop_count) <= line_total && line_total - aer_total - int'(drop_count) <= 64,
          $sformatf("AER: got %0d + dropped %0d vs offered %0d", aer_total, drop_count, line_total));
    check(aer_got[0*16 + 2] > 1000 && aer_got[3*16 + 3] > 1000, "speed events for motors 0 and 3");

    $display("mechanisms: se_saturation=%0d hf_fire=%0d hf_cancel=%0d hf_hold_timeout=%0d aer_drop=%0d mode_switch=%0d negative_drive=%0d",
             n_sat, n_fire, n_cancel, n_timeout, drop_count, n_switch, n_neg);
    check(n_sat > 0, "SE saturation never happened");
    check(n_fire > 0, "SH&F immediate fire never happened");
    check(n_cancel > 0, "SH&F cancel never happened");
    check(n_timeout > 0, "SH&F hold-time fire never happened");
    check(drop_count > 0, "AER drop never happened");
    check(n_switch > 0, "mode switch never happened");
    check(n_neg > 0, "negative drive never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
