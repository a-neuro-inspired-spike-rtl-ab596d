// spike_hf: Spikes Hold & Fire (SH&F), a spike-stream subtractor.
//
// Output rate = rate(u) - rate(y). Input spikes are classed by their effect:
// u.p and y.n count as positive, u.n and y.p as negative. An arriving spike
// is held. A later spike of the same sign fires the held one and is held in
// its place; a spike of the opposite sign cancels the held one and neither
// appears at the output. A held spike that meets no other spike within the
// hold time (HOLD cycles, 10 us at 50 MHz by default) is fired. Feeding
// spike_neg(b) to y makes the block an adder (a + b).
// The hold/fire/cancel rules and the 10 us hold time follow the source
// design. Own choices: spikes arriving in the same cycle are summed first;
// the holding register counts from -2 to +2 so that no spike is lost when two
// same-signed inputs meet a held spike of that sign (the extra one fires on
// the next cycle); the hold timer restarts at every input spike; the output
// is registered.
//
// Interface: u, y in; out is a one-cycle pulse, one clock after the input
// that fired it.
module spike_hf
  import spike_pkg::*;
#(
  parameter int unsigned HOLD = HF_HOLD_DEFAULT  // hold time in clock cycles
) (
  input  logic   clk,
  input  logic   rst,
  input  spike_t u,
  input  spike_t y,
  output spike_t out
);

  localparam int unsigned TW = (HOLD > 1) ? $clog2(HOLD + 1) : 1;

  logic signed [2:0] held, held_nx, tot;
  logic signed [2:0] net;
  logic [TW-1:0]     timer;
  logic              fire_p, fire_n;

  // Net signed contribution of this cycle's input spikes: -2 .. +2.
  always_comb begin
    net = 3'sd0;
    if (u.p) net = net + 3'sd1;
    if (u.n) net = net - 3'sd1;
    if (y.n) net = net + 3'sd1;
    if (y.p) net = net - 3'sd1;
  end

  always_comb begin
    tot     = held + net;
    fire_p  = 1'b0;
    fire_n  = 1'b0;
    held_nx = tot;
    if (tot >= 3'sd2) begin
      fire_p  = 1'b1;
      held_nx = tot - 3'sd1;
    end else if (tot <= -3'sd2) begin
      fire_n  = 1'b1;
      held_nx = tot + 3'sd1;
    end else if (net == 3'sd0 && held != 3'sd0 && timer == '0) begin
      // Hold time over with nothing new: fire the held spike.
      fire_p  = (held > 3'sd0);
      fire_n  = (held < 3'sd0);
      held_nx = 3'sd0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      held  <= 3'sd0;
      timer <= '0;
      out   <= SPIKE_NONE;
    end else begin
      held  <= held_nx;
      out.p <= fire_p;
      out.n <= fire_n;
      if (net != 3'sd0)     timer <= TW'(HOLD - 1);
      else if (timer != '0) timer <= timer - 1'b1;
    end
  end

endmodule
