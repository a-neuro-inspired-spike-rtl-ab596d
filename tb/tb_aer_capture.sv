// tb_aer_capture: monitoring one PID controller through the AER port with a
// receiver limited to 5 Mevents/s (at most one event per 10 clock cycles).
//
// Motor 0 of the full four-motor design runs PID (SI&G divider 20, STD
// divider 18, 4 us spikes) after a reference step to 152.59 kspikes/s; the
// other three motors are held at rest by their own loops (they may exchange a
// few spikes if a motor model starts a fraction of an edge off zero). The
// receiver records every event by address, as a monitor would for an
// off-line reconstruction of the spike rates. Checks:
//  - no event is dropped during the step response;
//  - every event carries a used address (stream code below 14);
//  - per address, the events received equal the spikes offered on that
//    monitor line, short only of the few still pending at the end;
//  - the speed rebuilt from the events of addresses 2 and 3 over the last
//    window equals the encoder edges of the motor model over that window;
//  - the reference rebuilt from addresses 0 and 1 equals 100 / 2^15 spikes
//    per cycle.
// The mean event rate is printed.
module tb_aer_capture;
  import spike_pkg::*;

  localparam int NM = 4;
  localparam int HALF = 8;
  localparam int MIN_CYCLE = 10;   // 200 ns per event at 50 MHz
  localparam int WIN = 1 << 17;    // a multiple of the reference period 2^15

  logic clk = 1'b0, rst = 1'b1;
  logic sck = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic [NM-1:0] enc_a, enc_b, pfm_p, pfm_n;
  logic [15:0] aer_addr, drop_count;
  logic aer_req_n, aer_ack_n = 1'b1;
  int edges [NM];
  int checks = 0, failures = 0;
  int got [64], offered [64];
  int bad_addr = 0, n_events = 0;
  longint cyc = 0;

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
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) for (int i = 0; i < 64; i++) offered[i] += int'(dut.aer_lines[i]);
  end

  // Four-phase receiver that accepts at most one event every MIN_CYCLE cycles.
  initial begin
    longint last;
    last = -longint'(MIN_CYCLE);
    forever begin
      @(negedge clk);
      if (!aer_req_n && cyc - last >= longint'(MIN_CYCLE)) begin
        last = cyc;
        if (aer_addr < 64 && aer_addr[3:0] < 14) got[aer_addr[5:0]]++; else bad_addr++;
        n_events++;
        repeat (3) @(negedge clk);
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

  task automatic spi_wr(int m, int r, logic [15:0] v);
    logic [23:0] tx;
    tx = {1'b1, 4'(m), 3'(r), v};
    cs_n = 1'b0;
    repeat (HALF) @(negedge clk);
    for (int i = 23; i >= 0; i--) begin
      mosi = tx[i];
      repeat (HALF) @(negedge clk);
      sck = 1'b1;
      repeat (HALF) @(negedge clk);
      sck = 1'b0;
    end
    repeat (HALF) @(negedge clk);
    cs_n = 1'b1;
    repeat (2 * HALF) @(negedge clk);
  endtask

  initial begin
    int e0, g0 [4], bad;
    longint c0;
    foreach (got[i]) begin got[i] = 0; offered[i] = 0; end
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    spi_wr(0, 2, 16'd20);    // ig_fd
    spi_wr(0, 3, 16'd18);    // td_fd
    spi_wr(0, 4, 16'd200);   // 4 us spikes
    spi_wr(0, 5, 16'b11);    // PID
    c0 = cyc;
    spi_wr(0, 0, 16'd100);   // reference step
    repeat (400000) @(posedge clk);

    e0 = edges[0];
    for (int a = 0; a < 4; a++) g0[a] = got[a];
    repeat (WIN) @(posedge clk);
    // Let the receiver take the events still pending, with the lines quiet
    // enough that no new ones matter: compare only against the window.
    repeat (200) @(posedge clk);
    $display("speed from AER %0d edges, encoder %0d edges; reference from AER %0d spikes",
             (got[2] - g0[2]) - (got[3] - g0[3]), edges[0] - e0, (got[0] - g0[0]) - (got[1] - g0[1]));
    check((got[2] - g0[2]) - (got[3] - g0[3]) - (edges[0] - e0) <= 3 &&
          (edges[0] - e0) - ((got[2] - g0[2]) - (got[3] - g0[3])) <= 3,
          "speed rebuilt from AER events matches the encoder");
    check((got[0] - g0[0]) - (got[1] - g0[1]) >= 100 * (WIN >> 15) - 2 &&
          (got[0] - g0[0]) - (got[1] - g0[1]) <= 100 * (WIN >> 15) + 2,
          "reference rebuilt from AER events");

    $display("%0d events in %0d cycles: %0.2f Mevents/s, %0d dropped", n_events, cyc - c0,
             50.0 * n_events / (cyc - c0), drop_count);
    check(drop_count == 0, $sformatf("%0d events dropped", drop_count));
    check(bad_addr == 0, $sformatf("%0d events on unused addresses", bad_addr));
    bad = 0;
    for (int a = 0; a < 64; a++) begin
      if (a % 16 >= 14 && offered[a] != 0) bad++;
      if (offered[a] - got[a] < 0 || offered[a] - got[a] > 3) begin
        bad++;
        $display("address %0d: offered %0d, received %0d", a, offered[a], got[a]);
      end
    end
    check(bad == 0, "events per address match the monitor lines");
    check(got[0] > 0 && got[2] > 0 && got[4] > 0 && got[6] > 0 && got[8] > 0 && got[12] > 0,
          "reference, speed, error, SI&G, STD and PID lines all produced events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
