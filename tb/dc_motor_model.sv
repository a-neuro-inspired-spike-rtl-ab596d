// dc_motor_model: behavioural model of an H-bridge, DC motor and quadrature
// encoder, for closed-loop testbenches only (not synthesizable).
//
// The bridge applies +V_PS while pfm_p is high and -V_PS while pfm_n is
// high. The motor is a first-order low-pass: its speed, expressed directly
// as encoder edges per clock cycle, moves toward KMAX * drive with time
// constant TAU clock cycles. The encoder integrates the speed into a shaft
// position counted in edges and outputs the quadrature pair (A, B) for that
// position: 00, 10, 11, 01 going forward. KMAX = 0.04 edges/cycle at 50 MHz
// is 2 M edges/s, four edges per line at the encoder's 500 kHz maximum line
// rate. TAU is far shorter than a real motor's so simulations stay short.
module dc_motor_model #(
  parameter real KMAX = 0.04,    // edges per cycle at full drive
  parameter real TAU  = 20000.0  // mechanical time constant, cycles
) (
  input  logic clk,
  input  logic pfm_p,
  input  logic pfm_n,
  output logic enc_a,
  output logic enc_b,
  output int   edges            // signed edge count (position)
);

  real speed = 0.0;
  real pos   = 0.0;

  initial begin
    enc_a = 1'b0;
    enc_b = 1'b0;
    edges = 0;
  end

  always @(posedge clk) begin
    real drive;
    int  p;
    drive = pfm_p ? 1.0 : (pfm_n ? -1.0 : 0.0);
    speed = speed + (KMAX * drive - speed) / TAU;
    pos   = pos + speed;
    p     = $rtoi(pos >= 0.0 ? pos : pos - 1.0);
    edges <= p;
    case (p & 3)
      0: {enc_a, enc_b} <= 2'b00;
      1: {enc_a, enc_b} <= 2'b10;
      2: {enc_a, enc_b} <= 2'b11;
      default: {enc_a, enc_b} <= 2'b01;
    endcase
  end

endmodule
