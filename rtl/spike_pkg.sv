// spike_pkg: types and constants shared by the spike-processing blocks.
//
// Every spike stream in this design is a pair of one-clock pulses: p for a
// positive spike and n for a negative one. A stream carries a signed spike
// rate (positive rate minus negative rate). Blocks never emit p and n in the
// same cycle. The default clock is 50 MHz, the clock of the controller board.
package spike_pkg;

  // One signed spike stream, one clock cycle wide.
  typedef struct packed {
    logic p;  // positive spike
    logic n;  // negative spike
  } spike_t;

  localparam spike_t SPIKE_NONE = '{p: 1'b0, n: 1'b0};

  // Sign inversion of a stream: turns an SH&F subtractor into an adder.
  function automatic spike_t spike_neg(spike_t s);
    return '{p: s.n, n: s.p};
  endfunction

  // Default clock frequency (Hz) and SH&F hold time (10 us) in cycles.
  localparam int unsigned F_CLK_HZ        = 50_000_000;
  localparam int unsigned HF_HOLD_DEFAULT = F_CLK_HZ / 100_000;  // 10 us

  // AER monitor sub-addresses of one controller's internal streams.
  // Even address = positive spike, odd address = negative spike.
  typedef enum logic [2:0] {
    MON_REF    = 3'd0,  // speed reference       (addresses 0/1)
    MON_SPEED  = 3'd1,  // DC motor speed        (2/3)
    MON_ERROR  = 3'd2,  // speed error           (4/5)
    MON_IG     = 3'd3,  // SI&G output           (6/7)
    MON_TD     = 3'd4,  // STD output            (8/9)
    MON_IG_TD  = 3'd5,  // SI&G + STD            (10/11)
    MON_PID    = 3'd6   // SI&G + STD + error    (12/13)
  } mon_sig_e;

  localparam int unsigned MON_STREAMS = 7;

  // Run-time settings of one motor channel, written over SPI. All words are
  // 16 bits wide: the reference speed is a 16-bit signed number.
  localparam int unsigned CFG_W = 16;

  typedef struct packed {
    logic signed [CFG_W-1:0] ref_speed;     // reference RB-SSG input x
    logic        [CFG_W-1:0] ref_fd;        // reference RB-SSG genFD
    logic        [CFG_W-1:0] ig_fd;         // SI&G genFD
    logic        [CFG_W-1:0] td_fd;         // genFD of the SI&G inside STD
    logic        [CFG_W-1:0] spikes_width;  // SE pulse width, clock cycles
    logic                    ig_en;         // 0 holds the SI&G at rest
    logic                    td_en;         // 0 holds the STD at rest
  } chan_cfg_t;

endpackage
