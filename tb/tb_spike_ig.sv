// tb_spike_ig: self-checking test of the Spikes Integrate & Generate.
// Positive and negative spike bursts must move the counter by their signed
// count, and over a full generator window of 2^(N-1)*(gen_fd+1) cycles the
// output must carry exactly |count| spikes of the count's sign (the
// integrator gain F_CLK / (2^(N-1) (gen_fd+1))). Also checks clr and, on a
// 4-bit instance, that the counter saturates instead of wrapping.
module tb_spike_ig;
  import spike_pkg::*;

  localparam int N = 16;
  localparam int W = 1 << (N - 1);

  logic clk = 1'b0, rst = 1'b1, clr = 1'b0;
  spike_t in = SPIKE_NONE, out, in4 = SPIKE_NONE, out4;
  logic [15:0] fd = '0;
  logic signed [N-1:0] count;
  logic signed [3:0] count4;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  spike_ig #(.N(N)) dut (.clk(clk), .rst(rst), .clr(clr), .in(in), .gen_fd(fd), .out(out), .count(count));
  spike_ig #(.N(4)) dut4 (.clk(clk), .rst(rst), .clr(1'b0), .in(in4), .gen_fd(16'd0), .out(out4), .count(count4));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic burst(int k);
    for (int i = 0; i < (k < 0 ? -k : k); i++) begin
      @(negedge clk); in.p = (k > 0); in.n = (k < 0);
      @(negedge clk); in = SPIKE_NONE;
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
  endtask

  task automatic window(int expect_signed);
    int np, nn;
    np = 0; nn = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < W * (int'(fd) + 1); i++) begin
      @(negedge clk);
      if (out.p) np++;
      if (out.n) nn++;
    end
    check(np - nn == expect_signed && (np == 0 || nn == 0),
          $sformatf("window p=%0d n=%0d expected %0d", np, nn, expect_signed));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    burst(300);
    check(count == 300, $sformatf("count %0d after +300", count));
    window(300);
    burst(-500);
    check(count == -200, $sformatf("count %0d after -500", count));
    fd = 16'd1;
    window(-200);
    // clr empties the counter and silences the output
    @(negedge clk); clr = 1'b1;
    begin
      int n_out = 0;
      repeat (1000) begin @(negedge clk); if (out.p || out.n) n_out++; end
      check(n_out == 0 && count == 0, "clr holds at rest");
    end
    @(negedge clk); clr = 1'b0;
    // Saturation of a 4-bit counter
    for (int i = 0; i < 20; i++) begin @(negedge clk); in4.p = 1; @(negedge clk); in4 = SPIKE_NONE; end
    check(count4 == 4'sd7, $sformatf("saturate high %0d", count4));
    for (int i = 0; i < 30; i++) begin @(negedge clk); in4.n = 1; @(negedge clk); in4 = SPIKE_NONE; end
    check(count4 == -4'sd8, $sformatf("saturate low %0d", count4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
