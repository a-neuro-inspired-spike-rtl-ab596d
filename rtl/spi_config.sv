// spi_config: SPI slave register file holding the channel settings.
//
// The board's microcontroller sets each motor channel's parameters over SPI.
// Frame (SPI mode 0, MSB first, cs_n low for 24 SCK cycles):
//   bit 23      1 = write, 0 = read
//   bits 22:16  address: channel = addr[6:3], register = addr[2:0]
//   bits 15:0   data (write) / register contents on miso (read)
// Registers: 0 ref_speed (signed), 1 ref_fd, 2 ig_fd, 3 td_fd,
// 4 spikes_width, 5 control {td_en, ig_en} in bits 1:0.
// The source design only says that the microcontroller reaches the FPGA
// through an SPI port to manage the controller parameters; the frame, the
// register map and the reset values are this design's choices (reset values
// follow the settings of the reported experiments: spike width 4 us = 200
// cycles, frequency dividers 20, SI&G and STD enabled, reference 0).
// SCK, cs_n and mosi are sampled with the system clock through two-flop
// synchronizers, so SCK must be slower than clk/8. A write takes effect
// three clock cycles after the 24th rising SCK edge.
module spi_config
  import spike_pkg::*;
#(
  parameter int unsigned NUM_CH = 4
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      spi_sck,
  input  logic      spi_cs_n,
  input  logic      spi_mosi,
  output logic      spi_miso,
  output chan_cfg_t cfg [NUM_CH]
);

  localparam chan_cfg_t CFG_RESET = '{
    ref_speed: '0, ref_fd: '0, ig_fd: 16'd20, td_fd: 16'd20,
    spikes_width: 16'd200, ig_en: 1'b1, td_en: 1'b1};

  logic [2:0]  sck_s;
  logic [1:0]  cs_s;
  logic [1:0]  mosi_s;
  logic        sck_rise, sck_fall, cs_act;
  logic [4:0]  bitcnt;
  logic [22:0] shin;  // the last bit of a frame is used straight from mosi_s
  logic [15:0] shout;
  logic [3:0]  ch;
  logic [2:0]  rg;
  logic [15:0] rdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      sck_s  <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sck_s  <= {sck_s[1:0], spi_sck};
      cs_s   <= {cs_s[0], spi_cs_n};
      mosi_s <= {mosi_s[0], spi_mosi};
    end
  end

  assign sck_rise = sck_s[1] && !sck_s[2];
  assign sck_fall = !sck_s[1] && sck_s[2];
  assign cs_act   = !cs_s[1];

  // Register read mux, addressed by the first byte received.
  assign ch = shin[6:3];
  assign rg = shin[2:0];
  always_comb begin
    rdata = '0;
    for (int c = 0; c < NUM_CH; c++) begin
      if (ch == 4'(c)) begin
        unique case (rg)
          3'd0: rdata = cfg[c].ref_speed;
          3'd1: rdata = cfg[c].ref_fd;
          3'd2: rdata = cfg[c].ig_fd;
          3'd3: rdata = cfg[c].td_fd;
          3'd4: rdata = cfg[c].spikes_width;
          3'd5: rdata = {14'd0, cfg[c].td_en, cfg[c].ig_en};
          default: rdata = '0;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bitcnt   <= '0;
      shin     <= '0;
      shout    <= '0;
      spi_miso <= 1'b0;
      for (int c = 0; c < NUM_CH; c++) cfg[c] <= CFG_RESET;
    end else if (!cs_act) begin
      bitcnt <= '0;
    end else begin
      if (sck_rise) begin
        shin   <= {shin[21:0], mosi_s[1]};
        bitcnt <= bitcnt + 1'b1;
        if (bitcnt == 5'd23 && shin[22]) begin
          // 24th bit: shin[22:0] plus this bit form the whole frame.
          for (int c = 0; c < NUM_CH; c++) begin
            if (shin[21:18] == 4'(c)) begin
              unique case (shin[17:15])
                3'd0: cfg[c].ref_speed    <= {shin[14:0], mosi_s[1]};
                3'd1: cfg[c].ref_fd       <= {shin[14:0], mosi_s[1]};
                3'd2: cfg[c].ig_fd        <= {shin[14:0], mosi_s[1]};
                3'd3: cfg[c].td_fd        <= {shin[14:0], mosi_s[1]};
                3'd4: cfg[c].spikes_width <= {shin[14:0], mosi_s[1]};
                3'd5: begin
                  cfg[c].ig_en <= mosi_s[1];
                  cfg[c].td_en <= shin[0];
                end
                default: ;
              endcase
            end
          end
        end
      end
      if (sck_fall) begin
        if (bitcnt == 5'd8) begin
          // Address byte complete: load the read data, present its MSB.
          spi_miso <= rdata[15];
          shout    <= {rdata[14:0], 1'b0};
        end else begin
          spi_miso <= shout[15];
          shout    <= {shout[14:0], 1'b0};
        end
      end
    end
  end

endmodule
