// tb_rb_ssg: self-checking test of the RB-SSG.
// Over any window of 2^(N-1) * (gen_fd + 1) cycles the generator must fire
// exactly |x| spikes, all on the output selected by the sign of x. The test
// also checks the rate quoted for the reference generator (x = 100,
// gen_fd = 0 at 50 MHz gives 152.59 kspikes/s, i.e. 100 spikes per 32768
// cycles), the saturation of the most negative x, and that x = 2^(N-2)
// gives perfectly regular spikes, one every second enable.
module tb_rb_ssg;
  import spike_pkg::*;

  localparam int N = 16;
  localparam int W = 1 << (N - 1);

  logic clk = 1'b0, rst = 1'b1;
  logic signed [N-1:0] x = '0;
  logic [15:0] gen_fd = '0;
  spike_t spike;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;  // 50 MHz

  rb_ssg #(.N(N)) dut (.clk(clk), .rst(rst), .x(x), .gen_fd(gen_fd), .spike(spike));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Count spikes over one full window after letting x settle.
  task automatic window(input logic signed [N-1:0] xv, input int fd, input int expect_mag);
    int np, nn, cycles;
    x = xv; gen_fd = 16'(fd);
    repeat (fd + 3) @(posedge clk);
    np = 0; nn = 0;
    cycles = W * (fd + 1);
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk); #1;
      if (spike.p) np++;
      if (spike.n) nn++;
      if (spike.p && spike.n) check(0, "p and n together");
    end
    if (xv >= 0) check(np == expect_mag && nn == 0, $sformatf("x=%0d fd=%0d p=%0d n=%0d", xv, fd, np, nn));
    else         check(nn == expect_mag && np == 0, $sformatf("x=%0d fd=%0d p=%0d n=%0d", xv, fd, np, nn));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    window(16'sd100, 0, 100);     // 152.59 kspikes/s at 50 MHz
    window(-16'sd100, 0, 100);
    window(16'sd0, 0, 0);
    window(16'sd12345, 1, 12345);
    window(16'sd32767, 0, 32767);
    window(-16'sd32768, 0, 32767); // saturated magnitude
    window(-16'sd7, 2, 7);

    // Regular spacing for x = 2^(N-2): one spike every 2*(fd+1) cycles.
    begin
      int last, isi_bad, seen;
      x = 16'sd16384; gen_fd = 16'd2;
      repeat (20) @(posedge clk);
      last = -1; isi_bad = 0; seen = 0;
      for (int t = 0; t < 3000; t++) begin
        @(posedge clk); #1;
        if (spike.p) begin
          if (last >= 0 && t - last != 6) isi_bad++;
          last = t; seen++;
        end
      end
      check(seen > 400 && isi_bad == 0, $sformatf("half scale ISI: seen=%0d bad=%0d", seen, isi_bad));
    end
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
