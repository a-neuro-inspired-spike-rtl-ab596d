// tb_open_loop: open-loop drive experiment and static characteristic.
// An RB-SSG (16 bits, gen_fd = 0) feeds the Spikes Expansor, which drives
// the motor model directly. Part 1 repeats the constant-rate test with
// x = 100 (152.59 kspikes/s) and spike widths of 4.0, 5.2, 6.4, 7.6 and
// 9.4 us (200, 260, 320, 380, 470 cycles). Part 2 sweeps rate and width
// for the static characteristic, up to SE saturation.
// For every point the high time of the SE output over one generator window
// (2^15 cycles) is compared with an independent model of the expansion:
// each spike at cycle t makes the output high over [t+1, t+width], and
// overlapping intervals merge. The steady motor speed must then be
// KMAX * duty, and must grow with the width and the rate.
module tb_open_loop;
  import spike_pkg::*;

  localparam int WIN = 1 << 15;
  localparam real KMAX = 0.04;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [15:0] x = '0;
  logic [15:0] width = 16'd200;
  spike_t s;
  logic pfm_p, pfm_n, enc_a, enc_b;
  int edges;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  rb_ssg gen (.clk(clk), .rst(rst), .x(x), .gen_fd(16'd0), .spike(s));
  spike_expansor se (.clk(clk), .rst(rst), .in(s), .spikes_width(width), .pfm_p(pfm_p), .pfm_n(pfm_n));
  dc_motor_model #(.KMAX(KMAX), .TAU(5000.0)) motor (.clk(clk), .pfm_p(pfm_p), .pfm_n(pfm_n),
    .enc_a(enc_a), .enc_b(enc_b), .edges(edges));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Run one point; returns measured duty (per mille) and speed (per mille of KMAX).
  task automatic point(int xv, int w, output int duty_pm, output int speed_pm);
    int high, model_high, remain, e0;
    x = 16'(xv); width = 16'(w);
    repeat (40000) @(negedge clk);   // motor settles (8 time constants)
    high = 0; model_high = 0; remain = 0;
    e0 = edges;
    for (int c = 0; c < WIN; c++) begin
      @(negedge clk);
      // model: a spike seen now starts a pulse from the next cycle
      if (remain > 0) model_high++;
      if (remain > 0) remain--;
      if (s.p) remain = w;
      if (pfm_p) high++;
    end
    check(high >= model_high - w && high <= model_high + w,
          $sformatf("x=%0d w=%0d: high %0d, model %0d", xv, w, high, model_high));
    duty_pm  = (1000 * high) / WIN;
    speed_pm = int'(1000.0 * (edges - e0) / (KMAX * WIN));
    check(speed_pm >= duty_pm - 30 && speed_pm <= duty_pm + 30,
          $sformatf("x=%0d w=%0d: speed %0d vs duty %0d per mille", xv, w, speed_pm, duty_pm));
  endtask

  initial begin
    int ws [5] = '{200, 260, 320, 380, 470};
    int rs [4] = '{33, 66, 100, 300};
    int d, sp, prev;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    $display("Part 1: 152.59 kspikes/s, widths 4.0-9.4 us");
    prev = -1;
    foreach (ws[i]) begin
      point(100, ws[i], d, sp);
      $display("  width %4.1f us: duty %0d/1000, speed %0d/1000 of full", ws[i] / 50.0, d, sp);
      check(sp > prev, "speed grows with the spike width");
      prev = sp;
    end
    $display("Part 2: static characteristic");
    foreach (rs[j]) begin
      prev = -1;
      foreach (ws[i]) begin
        point(rs[j], ws[i], d, sp);
        $display("  rate %7.2f kspk/s width %4.1f us: duty %0d/1000", 50000.0 * rs[j] / WIN, ws[i] / 50.0, d);
        check(d >= prev, "duty does not fall with width");
        prev = d;
      end
    end
    // Saturation: rate * width well above 1 keeps the output high.
    point(1000, 470, d, sp);
    check(d >= 995, $sformatf("SE saturation: duty %0d/1000", d));
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
