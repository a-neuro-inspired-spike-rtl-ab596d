// tb_hf_sweep: SH&F characterisation over input rates from -1.5 to
// +1.5 Mspikes/s on both inputs (25 operating points).
// Two 16-bit RB-SSGs (gen_fd = 0) produce the U and Y streams; x = 983 gives
// 50e6 * 983 / 2^15 = 1.49997 Mspikes/s. Over a window of 2^15 cycles each
// generator emits exactly |x| spikes, so the ideal signed output count is
// xu - xy. The measured count must match within the two spikes the SH&F can
// hold. The spread of the output inter-spike interval is also reported for
// each point.
module tb_hf_sweep;
  import spike_pkg::*;

  localparam int WIN = 1 << 15;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [15:0] xu = '0, xy = '0;
  spike_t su, sy, out;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  rb_ssg gu (.clk(clk), .rst(rst), .x(xu), .gen_fd(16'd0), .spike(su));
  rb_ssg gy (.clk(clk), .rst(rst), .x(xy), .gen_fd(16'd0), .spike(sy));
  spike_hf dut (.clk(clk), .rst(rst), .u(su), .y(sy), .out(out));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int xs [5] = '{-983, -491, 0, 491, 983};
    int worst = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    foreach (xs[i]) foreach (xs[j]) begin
      int cnt, e, last, nisi;
      real sum, sum2, mean, sd;
      xu = 16'(xs[i]); xy = 16'(xs[j]);
      repeat (2 * HF_HOLD_DEFAULT) @(negedge clk);
      cnt = 0; last = -1; nisi = 0; sum = 0; sum2 = 0;
      for (int c = 0; c < WIN; c++) begin
        @(negedge clk);
        if (out.p || out.n) begin
          cnt += out.p ? 1 : -1;
          if (last >= 0) begin sum += c - last; sum2 += (c - last) * (c - last); nisi++; end
          last = c;
        end
      end
      e = cnt - (xs[i] - xs[j]);
      if (e < 0) e = -e;
      if (e > worst) worst = e;
      mean = nisi > 0 ? sum / nisi : 0.0;
      sd   = nisi > 1 ? $sqrt(sum2 / nisi - mean * mean) : 0.0;
      $display("U %6.3f Mspk/s  Y %6.3f Mspk/s  out %6.3f Mspk/s (ideal %6.3f)  ISI sd %5.1f%%",
               50.0 * xs[i] / WIN, 50.0 * xs[j] / WIN, 50.0 * cnt / WIN, 50.0 * (xs[i] - xs[j]) / WIN,
               mean > 0 ? 100.0 * sd / mean : 0.0);
      check(e <= 2, $sformatf("U=%0d Y=%0d: count %0d", xs[i], xs[j], cnt));
    end
    $display("worst count error %0d spikes per window", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
