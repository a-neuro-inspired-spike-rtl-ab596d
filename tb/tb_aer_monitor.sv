// tb_aer_monitor: self-checking test of the AER monitor output.
// A receiver model acknowledges each request after a random delay, following
// the four-phase handshake, and counts events per address. At a low spike
// rate every spike must arrive once, on the address of its line, with no
// drops. A dense burst then overloads the port: every spike must either
// arrive or be counted in drop_count. The receiver also checks that a request
// never starts while acknowledge is still low and that the address is held
// while the request is out.
module tb_aer_monitor;
  localparam int NL = 16;

  logic clk = 1'b0, rst = 1'b1;
  logic [NL-1:0] spikes = '0;
  logic [15:0] addr;
  logic req_n, ack_n = 1'b1;
  logic [15:0] drop_count;
  int checks = 0, failures = 0;
  int sent [NL], got [NL];
  int n_drop, proto_err = 0;
  assign n_drop = int'(drop_count);

  always #10 clk = ~clk;

  aer_monitor #(.NLINES(NL)) dut (.clk(clk), .rst(rst), .spikes(spikes),
    .aer_addr(addr), .aer_req_n(req_n), .aer_ack_n(ack_n), .drop_count(drop_count));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Receiver: four-phase, active low.
  initial begin
    logic [15:0] a;
    forever begin
      @(negedge clk);
      if (!req_n) begin
        a = addr;
        if (a < NL) got[a]++; else proto_err++;
        repeat ($urandom_range(0, 6)) begin
          @(negedge clk);
          if (addr != a) proto_err++;
        end
        ack_n = 1'b0;
        while (!req_n) begin @(negedge clk); if (addr != a) proto_err++; end
        repeat ($urandom_range(0, 4)) begin @(negedge clk); if (!req_n) proto_err++; end
        ack_n = 1'b1;
      end
    end
  end


  task automatic traffic(int cycles, int per_10k);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      for (int i = 0; i < NL; i++) begin
        spikes[i] = ($urandom_range(0, 9999) < per_10k);
        if (spikes[i]) sent[i]++;
      end
    end
    @(negedge clk); spikes = '0;
    repeat (2000) @(negedge clk);
  endtask

  initial begin
    int ts, tg;
    foreach (sent[i]) begin sent[i] = 0; got[i] = 0; end
    repeat (3) @(posedge clk);
    rst = 1'b0;
    traffic(40000, 3);
    ts = 0; tg = 0;
    foreach (sent[i]) begin
      check(got[i] == sent[i], $sformatf("line %0d sent %0d got %0d", i, sent[i], got[i]));
      ts += sent[i]; tg += got[i];
    end
    check(ts > 100 && n_drop == 0, $sformatf("low rate: %0d events, %0d drops", ts, n_drop));
    // Overload
    traffic(3000, 1000);
    ts = 0; tg = 0;
    foreach (sent[i]) begin ts += sent[i]; tg += got[i]; end
    check(n_drop > 0, "overload produced drops");
    check(tg + n_drop == ts, $sformatf("overload: got %0d + dropped %0d vs sent %0d", tg, n_drop, ts));
    check(proto_err == 0, $sformatf("%0d handshake errors", proto_err));
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
