// qsr: Quadrature encoder to Spike Rate converter (QSR).
//
// Fires one spike for every edge of encoder channel A or B, so the spike rate
// is four times the encoder line frequency. The sign gives the direction:
// forward (A leads B, edge order A rise, B rise, A fall, B fall) gives
// positive spikes and the reverse order gives negative ones. A small state
// machine keeps the last (A, B) state; an edge on A is forward when the new A
// differs from B, an edge on B is forward when the new B equals A.
// Spikes per edge and the sign convention follow the source design. Own
// choices: the encoder lines pass a two-flop synchronizer (SYNC stages) as
// they come from off-chip; a step in which A and B change together is an
// invalid quadrature transition and fires nothing.
//
// Timing: a spike leaves SYNC+1 cycles after the encoder edge.
module qsr
  import spike_pkg::*;
#(
  parameter int unsigned SYNC = 2  // synchronizer stages
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   enc_a,
  input  logic   enc_b,
  output spike_t spike
);

  typedef enum logic [1:0] {S00 = 2'b00, S01 = 2'b01, S10 = 2'b10, S11 = 2'b11} qstate_e;

  logic [SYNC-1:0] sync_a, sync_b;
  qstate_e         state, state_nx;
  logic            a, b;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_a <= '0;
      sync_b <= '0;
    end else begin
      sync_a <= {sync_a[SYNC-2:0], enc_a};
      sync_b <= {sync_b[SYNC-2:0], enc_b};
    end
  end

  assign a        = sync_a[SYNC-1];
  assign b        = sync_b[SYNC-1];
  assign state_nx = qstate_e'({a, b});

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S00;
      spike <= SPIKE_NONE;
    end else begin
      state <= state_nx;
      spike <= SPIKE_NONE;
      unique case ({state[1] ^ a, state[0] ^ b})
        2'b10:   begin spike.p <= (a != b); spike.n <= (a == b); end  // A edge
        2'b01:   begin spike.p <= (b == a); spike.n <= (b != a); end  // B edge
        default: ;                                                    // none or invalid
      endcase
    end
  end

endmodule
