// tb_spi_config: self-checking test of the SPI register file.
// An SPI master model (mode 0, SCK at clk/16) writes every register of every
// channel with random data, checks the decoded settings on cfg, reads each
// register back over MISO, and checks the reset values and that a frame cut
// short by cs_n has no effect.
module tb_spi_config;
  import spike_pkg::*;

  localparam int NCH = 4;

  logic clk = 1'b0, rst = 1'b1;
  logic sck = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  chan_cfg_t cfg [NCH];
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  spi_config #(.NUM_CH(NCH)) dut (.clk(clk), .rst(rst), .spi_sck(sck), .spi_cs_n(cs_n),
    .spi_mosi(mosi), .spi_miso(miso), .cfg(cfg));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int HALF = 8;  // clk cycles per SCK half period

  task automatic frame(input logic [23:0] tx, output logic [15:0] rx, input int nbits = 24);
    rx = '0;
    cs_n = 1'b0;
    repeat (HALF) @(negedge clk);
    for (int i = 23; i >= 24 - nbits; i--) begin
      mosi = tx[i];
      repeat (HALF) @(negedge clk);
      sck = 1'b1;                       // slave samples mosi, master samples miso
      if (i < 16) rx[i] = miso;
      repeat (HALF) @(negedge clk);
      sck = 1'b0;
    end
    repeat (HALF) @(negedge clk);
    cs_n = 1'b1;
    repeat (2 * HALF) @(negedge clk);
  endtask

  function automatic logic [15:0] field(chan_cfg_t c, int r);
    case (r)
      0: return c.ref_speed;
      1: return c.ref_fd;
      2: return c.ig_fd;
      3: return c.td_fd;
      4: return c.spikes_width;
      5: return {14'd0, c.td_en, c.ig_en};
      default: return '0;
    endcase
  endfunction

  initial begin
    logic [15:0] rx, exp_v [NCH][6];
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      check(cfg[c].spikes_width == 16'd200 && cfg[c].ig_fd == 16'd20 && cfg[c].td_fd == 16'd20
            && cfg[c].ig_en && cfg[c].td_en && cfg[c].ref_speed == 0, $sformatf("reset values ch %0d", c));
    end
    for (int c = 0; c < NCH; c++)
      for (int r = 0; r < 6; r++) begin
        exp_v[c][r] = (r == 5) ? 16'($urandom_range(0, 3)) : 16'($urandom);
        frame({1'b1, 4'(c), 3'(r), exp_v[c][r]}, rx);
      end
    for (int c = 0; c < NCH; c++)
      for (int r = 0; r < 6; r++) begin
        check(field(cfg[c], r) == exp_v[c][r], $sformatf("cfg ch %0d reg %0d = %h", c, r, field(cfg[c], r)));
        frame({1'b0, 4'(c), 3'(r), 16'h0000}, rx);
        check(rx == exp_v[c][r], $sformatf("read ch %0d reg %0d = %h expected %h", c, r, rx, exp_v[c][r]));
      end
    // A frame aborted after 20 bits changes nothing
    frame({1'b1, 4'd1, 3'd4, 16'hBEEF}, rx, 20);
    check(cfg[1].spikes_width == exp_v[1][4], "aborted frame ignored");
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
