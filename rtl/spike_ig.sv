// spike_ig: Spikes Integrate & Generate (SI&G), a spike-rate integrator.
//
// A signed N-bit spike counter goes up on each positive input spike and down
// on each negative one, so it holds the integral of the input rate. An
// RB-SSG of the same width turns the count back into spikes:
//   out rate = F_CLK / (2^(N-1) * (gen_fd + 1)) * integral(in rate) dt.
// The counter + RB-SSG structure follows the source design. Own choices: the
// counter saturates at the signed limits instead of wrapping; a p and an n in
// the same cycle leave it unchanged; clr (synchronous) empties it and silences
// the output, which is how the controller holds the block at rest.
//
// Interface: in/out are spike streams; count is the current integral. The
// generator sees a new count one cycle after the input spike.
module spike_ig
  import spike_pkg::*;
#(
  parameter int unsigned N    = 16,  // counter and RB-SSG bit length
  parameter int unsigned FD_W = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   clr,
  input  spike_t                 in,
  input  logic        [FD_W-1:0] gen_fd,
  output spike_t                 out,
  output logic signed [N-1:0]    count
);

  localparam logic signed [N-1:0] CMAX = {1'b0, {(N-1){1'b1}}};
  localparam logic signed [N-1:0] CMIN = {1'b1, {(N-1){1'b0}}};

  spike_t gen_out;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      count <= '0;
    end else if (in.p && !in.n && count != CMAX) begin
      count <= count + 1'b1;
    end else if (in.n && !in.p && count != CMIN) begin
      count <= count - 1'b1;
    end
  end

  rb_ssg #(.N(N), .FD_W(FD_W)) u_gen (
    .clk   (clk),
    .rst   (rst),
    .x     (count),
    .gen_fd(gen_fd),
    .spike (gen_out)
  );

  assign out = clr ? SPIKE_NONE : gen_out;

endmodule
