// tb_ig_td_response: response of the integrator and the derivative blocks
// at their default 16-bit size, gen_fd = 0 (gain k = F_CLK / 2^15).
// SI&G: the input rate is a sawtooth swinging between -0.02 and +0.02
// spikes per cycle (-1 to +1 Mspikes/s). The testbench integrates its own
// input and, for every 4096-cycle window, predicts the output count as
// sum(count) / 2^15; the measurement must match within 2 spikes + 2 %.
// STD: the input rate is a square wave of +-0.01 spikes per cycle with
// half-period 250k cycles (about 7.6 time constants of 2^15 cycles). After
// each edge (a step of 0.02) the output total must be about
// 0.02 * 2^15 = 655 spikes of the step's sign, and the net output rate must
// have died down to under 5 % of the input rate before the next edge (the
// random input leaves a noise of spikes of both signs that cancel).
module tb_ig_td_response;
  import spike_pkg::*;

  localparam int WIN = 4096;

  logic clk = 1'b0, rst = 1'b1;
  spike_t in_ig = SPIKE_NONE, out_ig, in_td = SPIKE_NONE, out_td;
  logic signed [15:0] ig_count;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  spike_ig ig (.clk(clk), .rst(rst), .clr(1'b0), .in(in_ig), .gen_fd(16'd0), .out(out_ig), .count(ig_count));
  spike_td td (.clk(clk), .rst(rst), .clr(1'b0), .in(in_td), .gen_fd(16'd0), .out(out_td));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Bernoulli spike with signed probability r (spikes per cycle).
  function automatic spike_t draw(real r);
    spike_t s;
    s = SPIKE_NONE;
    if ($urandom_range(0, 999_999) < $rtoi((r < 0 ? -r : r) * 1.0e6)) begin
      s.p = (r > 0);
      s.n = (r < 0);
    end
    return s;
  endfunction

  initial begin
    int model_cnt, out_cnt, bad_ig;
    real pred;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    // SI&G with a sawtooth input, 2 periods of 200k cycles.
    model_cnt = 0; bad_ig = 0;
    for (int w = 0; w < 100; w++) begin
      pred = 0.0; out_cnt = 0;
      for (int c = 0; c < WIN; c++) begin
        int t;
        t = (w * WIN + c) % 204800;
        @(negedge clk);
        in_ig = draw(-0.02 + 0.04 * t / 204800.0);
        // the block sees this spike at the next edge; its generator one later
        pred += model_cnt / 32768.0;
        model_cnt += int'(in_ig.p) - int'(in_ig.n);
        out_cnt += int'(out_ig.p) - int'(out_ig.n);
      end
      if ((out_cnt - pred) > 2 + 0.02 * (pred < 0 ? -pred : pred) ||
          (pred - out_cnt) > 2 + 0.02 * (pred < 0 ? -pred : pred)) begin
        bad_ig++;
        $display("SI&G window %0d: out %0d predicted %0.1f", w, out_cnt, pred);
      end
    end
    in_ig = SPIKE_NONE;
    check(bad_ig == 0, $sformatf("SI&G sawtooth: %0d windows off", bad_ig));
    check(ig_count == 16'(model_cnt), "SI&G count equals the integrated input");

    // STD with a square input.
    for (int h = 0; h < 4; h++) begin
      real r;
      int tot, tail, nin;
      r = (h % 2 == 0) ? 0.01 : -0.01;
      tot = 0; tail = 0; nin = 0;
      for (int c = 0; c < 250_000; c++) begin
        @(negedge clk);
        in_td = draw(r);
        tot += int'(out_td.p) - int'(out_td.n);
        if (c >= 230_000) begin
          tail += int'(out_td.p) - int'(out_td.n);
          nin  += (in_td.p || in_td.n) ? 1 : 0;
        end
      end
      // the first half-period starts from rest: a step of 0.01, not 0.02
      begin
        real expect_tot;
        expect_tot = (h == 0 ? 0.01 : 0.02) * 32768.0 * (r > 0 ? 1 : -1);
        $display("STD half %0d: output total %0d (expected %0.0f), settled net output %0d vs %0d input spikes",
                 h, tot, expect_tot, tail, nin);
        check(tot > expect_tot - 0.06 * (expect_tot < 0 ? -expect_tot : expect_tot) - 5 &&
              tot < expect_tot + 0.06 * (expect_tot < 0 ? -expect_tot : expect_tot) + 5,
              $sformatf("STD half %0d total %0d", h, tot));
        check(tail * 20 < nin && -tail * 20 < nin, $sformatf("STD half %0d settled", h));
      end
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
