// eib_arbiter: shared-memory arbiter between master and target.
//
// Requests MSMR and TSMR (active low) are served first come, first
// served: a request finding the memory free is granted (MSMRA or TSMRA)
// and keeps the grant until it is withdrawn; the other side waits. When
// both arrive in the same clock the side named by MASTER_FIRST wins.
// The state register samples the requests on a 16 MHz clock; a grant
// appears one clock after the request and is dropped one clock after the
// request is withdrawn, after which a waiting request is granted on the
// next clock.
//
// First-come-first-served behaviour and the 16 MHz clock follow the
// original board. The tie-break order and the one-clock latencies are
// choices of this design.
//
// The mutual-exclusion assertion is disabled during reset; lint reports
// rst_n as used both asynchronously (the state register) and
// synchronously (the assertion's disable condition). That is intended:
// the assertion is not logic.
module eib_arbiter #(
  parameter bit MASTER_FIRST = 1'b1   // winner of simultaneous requests
) (
  input  logic clk,
  input  logic rst_n,
  input  logic msmr_n,
  input  logic tsmr_n,
  output logic msmra_n,
  output logic tsmra_n
);

  typedef enum logic [1:0] {ARB_IDLE, ARB_MASTER, ARB_TARGET} arb_state_e;
  arb_state_e state, state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      ARB_IDLE: begin
        if (!msmr_n && !tsmr_n) state_nx = MASTER_FIRST ? ARB_MASTER : ARB_TARGET;
        else if (!msmr_n)       state_nx = ARB_MASTER;
        else if (!tsmr_n)       state_nx = ARB_TARGET;
      end
      ARB_MASTER: if (msmr_n) state_nx = ARB_IDLE;
      ARB_TARGET: if (tsmr_n) state_nx = ARB_IDLE;
      default:    state_nx = ARB_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ARB_IDLE;
    else        state <= state_nx;
  end

  assign msmra_n = (state != ARB_MASTER);
  assign tsmra_n = (state != ARB_TARGET);

  // Both processors must never own the shared memory together.
  a_mutex: assert property (@(posedge clk) disable iff (!rst_n) msmra_n || tsmra_n);

endmodule
