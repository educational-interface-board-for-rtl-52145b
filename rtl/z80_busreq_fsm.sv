// z80_busreq_fsm: master-to-Z80 bus request sequencing on the Z80 card.
//
// A master target request (MTR) asserts the Z80 bus request TBUSREQ. The
// Z80 answers with BUSACK once it has floated its bus; BUSACK goes back to
// the interface as MTMRA. RELWAIT_CYCLES clocks after BUSACK the card
// asserts RELWAIT, which lets the interface assert the master's DTACK.
// The release of TBUSREQ depends on the direction so that data is never
// lost: in a write the target cycle must end first, so TBUSREQ is released
// as soon as the master's DTACK is seen; in a read the master must capture
// the data first, so TBUSREQ is held until the master's DTACK is negated.
// The machine then waits for MTR to go away before accepting a new one.
//
// Timing: all inputs are sampled on the rising edge of the 8 MHz clock;
// TBUSREQ follows MTR by one clock. The request, acknowledge, RELWAIT and
// read/write release order follow the original card; the state encoding,
// the 4-clock (500 ns) RELWAIT delay and waiting for MTR to end are
// choices of this design.
module z80_busreq_fsm #(
  parameter int unsigned RELWAIT_CYCLES = 4   // 500 ns at 8 MHz
) (
  input  logic clk,          // 8 MHz
  input  logic rst_n,
  input  logic mtr_n,        // master target request
  input  logic trw,          // master R/W as passed to the target (1 = read)
  input  logic mdtack_n,     // master DTACK
  input  logic busack_n,     // Z80 BUSACK
  output logic tbusreq_n,    // Z80 BUSREQ
  output logic relwait_n,    // release the master cycle
  output logic mtmra_n       // master owns the target bus
);

  typedef enum logic [2:0] {
    BR_IDLE, BR_REQ, BR_ACK, BR_RELW, BR_RDHOLD, BR_DONE
  } br_state_e;

  br_state_e state;
  localparam int unsigned CW = $clog2(RELWAIT_CYCLES + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= BR_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        BR_IDLE:   if (!mtr_n) state <= BR_REQ;
        BR_REQ: begin
          cnt <= '0;
          if (mtr_n)          state <= BR_IDLE;
          else if (!busack_n) state <= BR_ACK;
        end
        BR_ACK: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(RELWAIT_CYCLES - 1)) state <= BR_RELW;
        end
        BR_RELW: begin
          if (!mdtack_n) state <= trw ? BR_RDHOLD : BR_DONE;
          else if (mtr_n) state <= BR_DONE;
        end
        BR_RDHOLD: begin
          // AS (hence MTR) and DTACK can end at the same clock edge
          if (mtr_n)         state <= BR_IDLE;
          else if (mdtack_n) state <= BR_DONE;
        end
        BR_DONE:   if (mtr_n)    state <= BR_IDLE;
        default:   state <= BR_IDLE;
      endcase
    end
  end

  assign tbusreq_n = !(state inside {BR_REQ, BR_ACK, BR_RELW, BR_RDHOLD});
  assign relwait_n = !(state inside {BR_RELW, BR_RDHOLD});
  assign mtmra_n   = busack_n;

endmodule
