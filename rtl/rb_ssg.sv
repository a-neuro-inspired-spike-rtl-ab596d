// rb_ssg: Reverse Bit-wise Synthetic Spike Generator (RB-SSG).
//
// Turns a signed N-bit word x into a spike stream whose rate is
//   rate = F_CLK * |x| / (2^(N-1) * (gen_fd + 1))   spikes/s.
// A clock divider raises a clock enable (ce) once every gen_fd+1 cycles.
// On each ce an (N-1)-bit counter advances; its value, read with the bit
// order reversed, is compared with |x|, and a spike is fired when
// |x| > reversed(counter). Reversing the bits spreads the |x| spikes of every
// 2^(N-1) enables evenly in time. The sign bit of x steers the spike to the
// positive or negative output (the demultiplexer). The structure, the rate
// formula and N = 16 for the reference generator follow the source design.
// Own choices: synchronous active-high reset, |x| of the most negative value
// saturates to 2^(N-1)-1, the divider is a counter that wraps at gen_fd, and
// the output spike is registered (one cycle after the enable).
//
// Interface: x and gen_fd may change at any time; the new value applies from
// the next enable. spike is a one-cycle pulse on p or n.
module rb_ssg
  import spike_pkg::*;
#(
  parameter int unsigned N    = 16,  // bit length of x, sign included
  parameter int unsigned FD_W = 16   // width of the clock divider value
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [N-1:0]    x,
  input  logic        [FD_W-1:0] gen_fd,
  output spike_t                 spike
);

  localparam int unsigned M = N - 1;  // counter / magnitude width

  logic [FD_W-1:0] div_cnt;
  logic            ce;
  logic [M-1:0]    cnt;
  logic [M-1:0]    cnt_rev;
  logic [M-1:0]    mag;

  assign ce = (div_cnt >= gen_fd);

  // Clock frequency divider.
  always_ff @(posedge clk) begin
    if (rst)     div_cnt <= '0;
    else if (ce) div_cnt <= '0;
    else         div_cnt <= div_cnt + 1'b1;
  end

  // Continuous digital counter, advanced by the enable.
  always_ff @(posedge clk) begin
    if (rst)     cnt <= '0;
    else if (ce) cnt <= cnt + 1'b1;
  end

  // Bit-wise reversal and absolute value.
  always_comb begin
    for (int i = 0; i < M; i++) cnt_rev[i] = cnt[M-1-i];
    if (!x[N-1])                    mag = x[M-1:0];
    else if (x[M-1:0] == '0)        mag = '1;            // -2^(N-1) saturates
    else                            mag = M'(-x);
  end

  // Comparator A > B gated by the enable, then the sign demultiplexer.
  always_ff @(posedge clk) begin
    if (rst) begin
      spike <= SPIKE_NONE;
    end else begin
      spike.p <= ce && (mag > cnt_rev) && !x[N-1];
      spike.n <= ce && (mag > cnt_rev) &&  x[N-1];
    end
  end

endmodule
