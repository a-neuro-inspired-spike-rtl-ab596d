// spike_td: Spikes Temporal Derivative (STD).
//
// An SH&F subtracts from the input stream the SI&G integral of the STD's own
// output: out = in - k * integral(out). The loop settles where the output is
// the input's derivative scaled by k_STD = 2^(N-1) * (gen_fd + 1) / F_CLK,
// seen through a first-order high-pass with its pole at 1/k_STD rad/s:
//   STD(s) = s / (s + F_CLK / (2^(N-1) * (gen_fd + 1))).
// The SH&F + SI&G loop follows the source design. Own choice: clr empties
// the integrator and blocks the output, holding the block at rest.
//
// Interface: spike streams in and out; the path from in to out is the SH&F
// latency (one cycle when it fires at once, up to HOLD cycles when held).
module spike_td
  import spike_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned FD_W = 16,
  parameter int unsigned HOLD = HF_HOLD_DEFAULT
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            clr,
  input  spike_t          in,
  input  logic [FD_W-1:0] gen_fd,
  output spike_t          out
);

  spike_t hf_out, ig_out;
  logic signed [N-1:0] ig_count;

  spike_hf #(.HOLD(HOLD)) u_hf (
    .clk(clk), .rst(rst || clr),
    .u  (in),  .y  (ig_out),
    .out(hf_out)
  );

  spike_ig #(.N(N), .FD_W(FD_W)) u_ig (
    .clk(clk), .rst(rst), .clr(clr),
    .in (hf_out), .gen_fd(gen_fd),
    .out(ig_out), .count(ig_count)
  );

  assign out = clr ? SPIKE_NONE : hf_out;

endmodule
