// spid_top: FPGA of the multi-motor spike-based controller board.
//
// NUM_MOTORS independent closed-loop channels (spid_channel), each driving
// one DC motor through an H-bridge with pulse-frequency-modulated spikes and
// reading the motor's quadrature encoder. The board's microcontroller writes
// every channel's settings (reference speed, frequency dividers, spike width,
// P/PI/PID mode) through the SPI register file. All internal spike streams
// leave on one parallel AER output bus so that an external monitor can
// record them: event address = motor * 16 + stream * 2 + sign, where stream
// numbers 0..6 are reference, motor speed, error, SI&G, STD, SI&G+STD and
// SI&G+STD+error, and sign is 0 for a positive spike, 1 for a negative one.
// Four motors, the 50 MHz clock, the stream order and the per-stream address
// pairs follow the source design; the motor field of the address, the SPI
// frame and the handshake are this design's choices (see spi_config and
// aer_monitor).
module spid_top
  import spike_pkg::*;
#(
  parameter int unsigned NUM_MOTORS = 4,
  parameter int unsigned IG_N       = 16,
  parameter int unsigned TD_N       = 16,
  parameter int unsigned HOLD       = HF_HOLD_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst,
  // SPI from the microcontroller
  input  logic                  spi_sck,
  input  logic                  spi_cs_n,
  input  logic                  spi_mosi,
  output logic                  spi_miso,
  // Motors: encoder inputs and H-bridge drive
  input  logic [NUM_MOTORS-1:0] enc_a,
  input  logic [NUM_MOTORS-1:0] enc_b,
  output logic [NUM_MOTORS-1:0] pfm_p,
  output logic [NUM_MOTORS-1:0] pfm_n,
  // AER monitor output bus
  output logic [15:0]           aer_addr,
  output logic                  aer_req_n,
  input  logic                  aer_ack_n,
  output logic [15:0]           aer_drop_count
);

  localparam int unsigned NLINES = NUM_MOTORS * 16;

  chan_cfg_t         cfg [NUM_MOTORS];
  spike_t            mon [NUM_MOTORS][MON_STREAMS];
  logic [NLINES-1:0] aer_lines;

  spi_config #(.NUM_CH(NUM_MOTORS)) u_spi (
    .clk(clk), .rst(rst),
    .spi_sck(spi_sck), .spi_cs_n(spi_cs_n),
    .spi_mosi(spi_mosi), .spi_miso(spi_miso),
    .cfg(cfg)
  );

  for (genvar m = 0; m < NUM_MOTORS; m++) begin : g_motor
    spid_channel #(.IG_N(IG_N), .TD_N(TD_N), .HOLD(HOLD)) u_chan (
      .clk(clk), .rst(rst),
      .cfg(cfg[m]),
      .enc_a(enc_a[m]), .enc_b(enc_b[m]),
      .pfm_p(pfm_p[m]), .pfm_n(pfm_n[m]),
      .mon(mon[m])
    );
    for (genvar s = 0; s < MON_STREAMS; s++) begin : g_line
      assign aer_lines[m*16 + 2*s]     = mon[m][s].p;
      assign aer_lines[m*16 + 2*s + 1] = mon[m][s].n;
    end
    assign aer_lines[m*16 + 14] = 1'b0;
    assign aer_lines[m*16 + 15] = 1'b0;
  end

  aer_monitor #(.NLINES(NLINES), .ADDR_W(16)) u_aer (
    .clk(clk), .rst(rst),
    .spikes(aer_lines),
    .aer_addr(aer_addr), .aer_req_n(aer_req_n), .aer_ack_n(aer_ack_n),
    .drop_count(aer_drop_count)
  );

endmodule
