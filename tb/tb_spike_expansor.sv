// tb_spike_expansor: self-checking test of the Spikes Expansor.
// Checks that a single spike becomes a pulse of exactly spikes_width cycles
// on the side given by its sign, that a spike during a pulse restarts the
// full width (saturation) and can switch the side, that the two outputs are
// never high together, and the average duty T_h * rate for a spike train.
module tb_spike_expansor;
  import spike_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  spike_t in = SPIKE_NONE;
  logic [15:0] sw = 16'd200;
  logic pfm_p, pfm_n;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  spike_expansor dut (.clk(clk), .rst(rst), .in(in), .spikes_width(sw), .pfm_p(pfm_p), .pfm_n(pfm_n));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse(bit pos);
    @(negedge clk); in.p = pos; in.n = !pos;
    @(negedge clk); in = SPIKE_NONE;
  endtask

  // Measure the length of the pulse that starts now on one side.
  task automatic measure(bit pos, int expect_len);
    int len;
    len = 0;
    while ((pos ? pfm_p : pfm_n) && len < 100000) begin
      check(!(pos ? pfm_n : pfm_p), "other side high");
      @(negedge clk); len++;
    end
    check(len == expect_len, $sformatf("width %0d expected %0d", len, expect_len));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // Single spikes, widths 200 (4 us) and 470 (9.4 us)
    pulse(1); measure(1, 200);
    repeat (5) @(negedge clk);
    check(!pfm_p && !pfm_n, "idle after pulse");
    sw = 16'd470;
    pulse(0); measure(0, 470);
    // Saturation: second spike 100 cycles into the pulse restarts the width
    sw = 16'd200;
    pulse(1);
    repeat (99) @(negedge clk);
    pulse(1);
    measure(1, 200);
    check(1, "");
    // Sign switch during a pulse
    pulse(1);
    repeat (49) @(negedge clk);
    pulse(0);
    measure(0, 200);
    // Duty: 100 spikes, one every 400 cycles, width 200 -> 20000 high cycles
    begin
      int high;
      high = 0;
      for (int k = 0; k < 100; k++) begin
        @(negedge clk); in.p = 1;
        @(negedge clk); in = SPIKE_NONE; if (pfm_p) high++;
        for (int c = 0; c < 398; c++) begin @(negedge clk); if (pfm_p) high++; end
      end
      check(high == 20000 - 1 || high == 20000, $sformatf("duty high=%0d", high));
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
