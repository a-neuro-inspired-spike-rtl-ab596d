// spid_channel: one closed-loop spike-based speed control channel.
//
// A reference RB-SSG turns the 16-bit signed speed word into reference
// spikes. The QSR turns the motor's quadrature encoder into speed spikes. An
// SH&F subtracts speed from reference to give error spikes, the spike PID
// processes them, and the Spikes Expansor widens the result into PFM_p/PFM_n
// for the H-bridge. Nothing but spikes passes between the stages. The chain
// follows the source design; the settings come in as one chan_cfg_t word.
//
// Interface: cfg may change at any time. mon carries the seven internal
// streams for the AER monitor, indexed by mon_sig_e.
module spid_channel
  import spike_pkg::*;
#(
  parameter int unsigned IG_N = 16,
  parameter int unsigned TD_N = 16,
  parameter int unsigned HOLD = HF_HOLD_DEFAULT
) (
  input  logic      clk,
  input  logic      rst,
  input  chan_cfg_t cfg,
  input  logic      enc_a,
  input  logic      enc_b,
  output logic      pfm_p,
  output logic      pfm_n,
  output spike_t    mon [MON_STREAMS]
);

  spike_t ref_s, speed_s, err_s, ig_s, td_s, igtd_s, pid_s;

  rb_ssg #(.N(CFG_W), .FD_W(CFG_W)) u_ref (
    .clk(clk), .rst(rst),
    .x(cfg.ref_speed), .gen_fd(cfg.ref_fd),
    .spike(ref_s)
  );

  qsr u_qsr (
    .clk(clk), .rst(rst),
    .enc_a(enc_a), .enc_b(enc_b),
    .spike(speed_s)
  );

  spike_hf #(.HOLD(HOLD)) u_err (
    .clk(clk), .rst(rst),
    .u(ref_s), .y(speed_s),
    .out(err_s)
  );

  spike_pid #(.IG_N(IG_N), .TD_N(TD_N), .FD_W(CFG_W), .HOLD(HOLD)) u_pid (
    .clk(clk), .rst(rst),
    .ig_en(cfg.ig_en), .td_en(cfg.td_en),
    .ig_fd(cfg.ig_fd), .td_fd(cfg.td_fd),
    .err(err_s),
    .ig_out(ig_s), .td_out(td_s), .ig_td(igtd_s), .pid_out(pid_s)
  );

  spike_expansor #(.SW_W(CFG_W)) u_se (
    .clk(clk), .rst(rst),
    .in(pid_s), .spikes_width(cfg.spikes_width),
    .pfm_p(pfm_p), .pfm_n(pfm_n)
  );

  assign mon[MON_REF]   = ref_s;
  assign mon[MON_SPEED] = speed_s;
  assign mon[MON_ERROR] = err_s;
  assign mon[MON_IG]    = ig_s;
  assign mon[MON_TD]    = td_s;
  assign mon[MON_IG_TD] = igtd_s;
  assign mon[MON_PID]   = pid_s;

endmodule
