// m68k_twait_fsm: ends an MC68000 target's cycle to the shared memory.
//
// A 68000 target waits for DTACK, so the card's TWAIT output acts as the
// target's DTACK for shared-memory cycles. Once the arbiter grants the
// shared memory to the target (TSMRA), the card counts READ_CYCLES clocks
// for a read or WRITE_CYCLES clocks for a write and then asserts TWAIT. It
// keeps TWAIT until the target ends the cycle (TSMR or TSMRA negated).
//
// Timing: the count starts on the first rising clock edge with TSMR and
// TSMRA both asserted; TWAIT falls READ_CYCLES (WRITE_CYCLES) edges later.
// At 8 MHz the defaults give 250 ns and 375 ns, the smallest whole-clock
// delays not shorter than the 200 ns and 300 ns of the original card. The
// inputs used and the two delays follow the original card; rounding to
// whole clocks is a choice of this design.
module m68k_twait_fsm #(
  parameter int unsigned READ_CYCLES  = 2,   // 200 ns at 8 MHz, rounded up
  parameter int unsigned WRITE_CYCLES = 3    // 300 ns at 8 MHz, rounded up
) (
  input  logic clk,        // 8 MHz
  input  logic rst_n,
  input  logic tsmr_n,
  input  logic tsmra_n,
  input  logic trw,        // target R/W (1 = read)
  output logic twait_n     // target DTACK for shared-memory cycles
);

  localparam int unsigned CW = $clog2((READ_CYCLES > WRITE_CYCLES ? READ_CYCLES : WRITE_CYCLES) + 1);

  typedef enum logic [1:0] {TW_IDLE, TW_COUNT, TW_ACK} tw_state_e;
  tw_state_e state;
  logic [CW-1:0] cnt;
  logic [CW-1:0] target;

  assign target = trw ? CW'(READ_CYCLES) : CW'(WRITE_CYCLES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TW_IDLE;
      cnt   <= '0;
    end else if (tsmr_n || tsmra_n) begin
      state <= TW_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        TW_IDLE:  begin state <= TW_COUNT; cnt <= CW'(1); if (target <= CW'(1)) state <= TW_ACK; end
        TW_COUNT: begin
          cnt <= cnt + 1'b1;
          if (cnt + 1'b1 >= target) state <= TW_ACK;
        end
        TW_ACK:   state <= TW_ACK;
        default:  state <= TW_IDLE;
      endcase
    end
  end

  assign twait_n = (state != TW_ACK);

endmodule
