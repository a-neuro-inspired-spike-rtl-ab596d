// tb_qsr: self-checking test of the quadrature-encoder-to-spikes converter.
// Drives the encoder through forward steps (A leads B), backward steps and
// invalid double changes, and checks one positive spike per forward edge,
// one negative spike per backward edge, none for an invalid step, and the
// latency of three clock cycles from an edge to its spike.
module tb_qsr;
  import spike_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic a = 1'b0, b = 1'b0;
  spike_t spike;
  int checks = 0, failures = 0;
  int np = 0, nn = 0;

  always #10 clk = ~clk;

  qsr dut (.clk(clk), .rst(rst), .enc_a(a), .enc_b(b), .spike(spike));

  always @(posedge clk) if (!rst) begin
    if (spike.p) np++;
    if (spike.n) nn++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Quadrature order for forward rotation: (A,B) = 00, 10, 11, 01.
  int phase = 0;
  function automatic logic [1:0] ab_of(int ph);
    case (ph & 3)
      0: return 2'b00;
      1: return 2'b10;
      2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  task automatic step(int dir);
    phase += dir;
    @(negedge clk); {a, b} = ab_of(phase);
    repeat ($urandom_range(3, 12)) @(negedge clk);
  endtask

  initial begin
    int p0, n0, lat;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 200; i++) step(1);
    repeat (5) @(negedge clk);
    check(np == 200 && nn == 0, $sformatf("forward p=%0d n=%0d", np, nn));
    for (int i = 0; i < 150; i++) step(-1);
    repeat (5) @(negedge clk);
    check(np == 200 && nn == 150, $sformatf("backward p=%0d n=%0d", np, nn));
    // Invalid step: both lines change together
    p0 = np; n0 = nn;
    @(negedge clk); {a, b} = ~{a, b}; phase += 2;
    repeat (10) @(negedge clk);
    check(np == p0 && nn == n0, "invalid step gives no spike");
    // Latency of one forward edge
    p0 = np;
    phase += 1;
    @(negedge clk); {a, b} = ab_of(phase);
    lat = 0;
    while (!spike.p && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 3, $sformatf("latency %0d cycles", lat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
