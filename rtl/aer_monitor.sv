// aer_monitor: AER output port for monitoring the controllers' spikes.
//
// Each input line is one spike stream sign; a spike on line i becomes one
// Address-Event with address i on a parallel AER bus. Per line a small
// saturating counter (PEND_W bits) records the spikes not yet sent, so a
// line may fire again, up to 2^PEND_W - 1 times, while it waits for the bus.
// A rotating-priority arbiter picks the next pending line after the one last
// sent, and a four-phase handshake with active-low request and acknowledge
// sends it: the address is put on the bus with req_n low, the receiver pulls
// ack_n low, req_n goes high, the receiver releases ack_n, and the next event
// may start.
// The source design only states that the controller's internal spikes are
// sent as AER events (positive and negative spikes of each signal on
// consecutive addresses); the pending counters, the arbiter, the handshake
// polarity and the 16-bit address are this design's choices. A spike that
// arrives on a line whose counter is full is lost and counted in drop_count
// (saturating at its maximum).
//
// Timing: one event takes at least four clock cycles plus the receiver's
// response; ack_n passes a two-flop synchronizer.
module aer_monitor #(
  parameter int unsigned NLINES = 64,
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned PEND_W = 2    // bits of each line's pending counter
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NLINES-1:0] spikes,
  output logic [ADDR_W-1:0] aer_addr,
  output logic              aer_req_n,
  input  logic              aer_ack_n,
  output logic [15:0]       drop_count
);

  localparam int unsigned IW = (NLINES > 1) ? $clog2(NLINES) : 1;

  typedef enum logic [1:0] {IDLE, WAIT_ACK, WAIT_REL} hs_state_e;

  hs_state_e         state;
  logic [NLINES-1:0] pending, grant_mask;
  logic [IW-1:0]     ptr, sel;
  logic              any, ack_s, ack_q;

  // Rotating priority: first pending line at or after ptr, else the lowest.
  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int i = NLINES - 1; i >= 0; i--) begin
      if (pending[i]) begin
        any = 1'b1;
        sel = IW'(i);
      end
    end
    for (int i = NLINES - 1; i >= 0; i--) begin
      if (pending[i] && IW'(i) >= ptr) sel = IW'(i);
    end
  end

  always_comb begin
    grant_mask = '0;
    if (state == IDLE && any && ack_s) grant_mask[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_q <= 1'b1;
      ack_s <= 1'b1;
    end else begin
      ack_q <= aer_ack_n;
      ack_s <= ack_q;
    end
  end

  logic [PEND_W-1:0] pcnt [NLINES];
  logic [NLINES-1:0] full, lost;
  logic [IW:0]       n_lost;
  logic [16:0]       drop_sum;

  // A spike is lost when its line's counter is full and the line is not
  // being granted in the same cycle.
  for (genvar i = 0; i < NLINES; i++) begin : g_line
    assign pending[i] = (pcnt[i] != '0);
    assign full[i]    = (pcnt[i] == '1);

    always_ff @(posedge clk) begin
      if (rst) pcnt[i] <= '0;
      else if (spikes[i] && !grant_mask[i] && !full[i]) pcnt[i] <= pcnt[i] + 1'b1;
      else if (!spikes[i] && grant_mask[i])              pcnt[i] <= pcnt[i] - 1'b1;
    end
  end

  always_comb begin
    lost   = spikes & full & ~grant_mask;
    n_lost = '0;
    for (int i = 0; i < NLINES; i++) n_lost = n_lost + (IW+1)'(lost[i]);
    drop_sum = {1'b0, drop_count} + 17'(n_lost);
  end

  always_ff @(posedge clk) begin
    if (rst) drop_count <= '0;
    else     drop_count <= drop_sum[16] ? 16'hFFFF : drop_sum[15:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      aer_req_n <= 1'b1;
      aer_addr  <= '0;
      ptr       <= '0;
    end else begin
      unique case (state)
        IDLE: if (any && ack_s) begin
          aer_addr  <= ADDR_W'(sel);
          aer_req_n <= 1'b0;
          ptr       <= (sel == IW'(NLINES - 1)) ? '0 : sel + 1'b1;
          state     <= WAIT_ACK;
        end
        WAIT_ACK: if (!ack_s) begin
          aer_req_n <= 1'b1;
          state     <= WAIT_REL;
        end
        WAIT_REL: if (ack_s) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // The address is held steady while a request is out.
  a_addr_stable: assert property (@(posedge clk) disable iff (rst)
    (!aer_req_n && !$rose(state == WAIT_ACK)) |-> $stable(aer_addr));

endmodule
