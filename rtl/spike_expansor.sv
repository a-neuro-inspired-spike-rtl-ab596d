// spike_expansor: Spikes Expansor (SE), the motor driver stage.
//
// Each input spike loads a down counter with spikes_width; while the counter
// is not zero the expanded spike is high, so every spike becomes a pulse of
// T_h = spikes_width * T_CLK and the motor sees the average
// V = T_h * spike_rate * V_PS (pulse frequency modulation). A one-bit
// register keeps the sign of the last input spike and a 1-bit multiplexer
// routes the pulse to pfm_p or pfm_n, the two sides of an H-bridge. A spike
// that comes while a pulse is running reloads the counter, which stretches
// the pulse (saturation) and may switch its sign. The counter, the sign
// register and the multiplexer follow the source design. Own choices:
// synchronous reset, a width of SW_W bits for spikes_width.
//
// Timing: a spike in cycle t drives the output high from cycle t+1 for
// exactly spikes_width cycles (spikes_width = 0 gives no pulse).
module spike_expansor
  import spike_pkg::*;
#(
  parameter int unsigned SW_W = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  spike_t          in,
  input  logic [SW_W-1:0] spikes_width,
  output logic            pfm_p,
  output logic            pfm_n
);

  logic [SW_W-1:0] cnt;
  logic            sign_p;
  logic            ld;
  logic            active;

  assign ld = in.p | in.n;

  // Down counter with auto-stop; active is the inverted ZERO output.
  always_ff @(posedge clk) begin
    if (rst)              cnt <= '0;
    else if (ld)          cnt <= spikes_width;
    else if (cnt != '0)   cnt <= cnt - 1'b1;
  end

  // Sign register: loaded with the positive line on every spike.
  always_ff @(posedge clk) begin
    if (rst)     sign_p <= 1'b0;
    else if (ld) sign_p <= in.p;
  end

  assign active = (cnt != '0);
  assign pfm_p  = active &&  sign_p;
  assign pfm_n  = active && !sign_p;

  // The two bridge sides are never driven together.
  a_no_shoot: assert property (@(posedge clk) !(pfm_p && pfm_n));

endmodule
