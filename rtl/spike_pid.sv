// spike_pid: spike-based PID controller.
//
// The error stream feeds three paths: the error itself (proportional), an
// SI&G (integral) and an STD (derivative). A first SH&F, used as an adder,
// sums the SI&G and STD outputs; a second one adds the error to that sum.
// The result goes to the Spikes Expansor, whose spike width sets the overall
// gain: SPID(s) = (1 + SI&G(s) + STD(s)) * k_SE. Each SH&F adds by feeding
// the sign-inverted second operand to its subtracting input. ig_en and td_en
// hold the SI&G or STD at rest (cleared, silent), giving P, PI or PID
// control. The topology is the source design's; the enables as synchronous
// clears are this design's choice. Internal streams are brought out for the
// AER monitor.
//
// Timing: the proportional path is two SH&F stages (two cycles when spikes
// fire at once, longer while a spike is held).
module spike_pid
  import spike_pkg::*;
#(
  parameter int unsigned IG_N = 16,  // SI&G bit length
  parameter int unsigned TD_N = 16,  // bit length of the SI&G inside the STD
  parameter int unsigned FD_W = 16,
  parameter int unsigned HOLD = HF_HOLD_DEFAULT
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ig_en,
  input  logic            td_en,
  input  logic [FD_W-1:0] ig_fd,
  input  logic [FD_W-1:0] td_fd,
  input  spike_t          err,
  output spike_t          ig_out,
  output spike_t          td_out,
  output spike_t          ig_td,
  output spike_t          pid_out
);

  logic signed [IG_N-1:0] ig_count;

  spike_ig #(.N(IG_N), .FD_W(FD_W)) u_ig (
    .clk(clk), .rst(rst), .clr(!ig_en),
    .in (err), .gen_fd(ig_fd),
    .out(ig_out), .count(ig_count)
  );

  spike_td #(.N(TD_N), .FD_W(FD_W), .HOLD(HOLD)) u_td (
    .clk(clk), .rst(rst), .clr(!td_en),
    .in (err), .gen_fd(td_fd),
    .out(td_out)
  );

  // SI&G + STD
  spike_hf #(.HOLD(HOLD)) u_add_ig_td (
    .clk(clk), .rst(rst),
    .u  (ig_out), .y(spike_neg(td_out)),
    .out(ig_td)
  );

  // error + (SI&G + STD)
  spike_hf #(.HOLD(HOLD)) u_add_err (
    .clk(clk), .rst(rst),
    .u  (ig_td), .y(spike_neg(err)),
    .out(pid_out)
  );

endmodule
