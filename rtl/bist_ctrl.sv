// bist_ctrl -- BIST control unit.
//
// Idle, the circuit under test is in normal mode (test_mode = 0). A pulse on
// start puts it in test mode and runs NUM_PATTERNS test steps:
//   SEED     tpg_load: the generator takes the seed.
//   LOAD     piso_load: the pattern's frame enters both PISOs; both SIPOs
//            are cleared (sipo_clr_n, a register, is low in this cycle).
//   SEND     piso_shift every CLKS_PER_BIT cycles puts the frame on the UART
//            inputs one bit per bit time, until the reference UART starts its
//            echo (echo_start) -- or, after TIMEOUT_BITS bit times without
//            one, the step goes straight to COMPARE and fails there.
//   CAPTURE  sipo_shift in the middle of each of the FRAME_BITS echo bits,
//            counted from echo_start, so both SIPOs take the whole frame.
//   COMPARE  tra_strobe: the analyzer judges the captured responses.
//   NEXT     tpg_step; after the last pattern, DONE, else LOAD.
// DONE returns to normal mode and sets done (held until the next start).
// Each tra_error sets irq; irq_clear clears it (a new error in the same
// cycle wins). busy is high from start until DONE. One step takes 19 bit
// times plus a few cycles: the echo starts about 9.5 bit times into the
// stimulus and its 10 bits are sampled at their middles.
//
// Mode control, seed feeding, analyzer control and the interrupt with its
// clear input follow the design description; the step sequence, the timing
// and the timeout are this design's choices.
module bist_ctrl
  import uart_bist_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 5208,
  parameter int unsigned NUM_PATTERNS = 512,
  parameter int unsigned TIMEOUT_BITS = 2 * FRAME_BITS
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic irq_clear,
  input  logic echo_start,
  input  logic tra_error,
  output logic test_mode,
  output logic busy,
  output logic done,
  output logic irq,
  output logic tpg_load,
  output logic tpg_step,
  output logic piso_load,
  output logic piso_shift,
  output logic sipo_clr_n,
  output logic sipo_shift,
  output logic tra_strobe
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  localparam int unsigned BW = $clog2(TIMEOUT_BITS + FRAME_BITS + 1);
  localparam int unsigned PW = $clog2(NUM_PATTERNS + 1);

  typedef enum logic [2:0] {
    C_IDLE, C_SEED, C_LOAD, C_SEND, C_CAPTURE, C_COMPARE, C_NEXT, C_DONE
  } ctrl_state_e;

  ctrl_state_e   state;
  logic [CW-1:0] cnt;
  logic [BW-1:0] bits;
  logic [PW-1:0] pat_cnt;
  logic          bit_end, mid_bit;

  assign bit_end = (cnt == CW'(CLKS_PER_BIT - 1));
  assign mid_bit = (cnt == CW'(CLKS_PER_BIT / 2));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= C_IDLE;
      cnt       <= '0;
      bits      <= '0;
      pat_cnt   <= '0;
      test_mode <= 1'b0;
      done      <= 1'b0;
      irq       <= 1'b0;
      sipo_clr_n <= 1'b1;
    end else begin
      // registered so the asynchronous clear of the SIPOs is glitch-free:
      // low exactly during the LOAD cycle
      sipo_clr_n <= !((state == C_SEED) ||
                      ((state == C_NEXT) && (pat_cnt != PW'(NUM_PATTERNS - 1))));
      if (tra_error)      irq <= 1'b1;
      else if (irq_clear) irq <= 1'b0;

      unique case (state)
        C_IDLE: if (start) begin
          test_mode <= 1'b1;
          done      <= 1'b0;
          state     <= C_SEED;
        end
        C_SEED: begin
          pat_cnt <= '0;
          state   <= C_LOAD;
        end
        C_LOAD: begin
          cnt   <= '0;
          bits  <= '0;
          state <= C_SEND;
        end
        C_SEND: begin
          if (echo_start) begin
            cnt   <= CW'(1);      // this cycle is the first of the start bit
            bits  <= '0;
            state <= C_CAPTURE;
          end else if (bit_end) begin
            cnt  <= '0;
            bits <= bits + 1'b1;
            if (bits == BW'(TIMEOUT_BITS - 1)) state <= C_COMPARE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        C_CAPTURE: begin
          cnt <= bit_end ? '0 : cnt + 1'b1;
          if (mid_bit) begin
            bits <= bits + 1'b1;
            if (bits == BW'(FRAME_BITS - 1)) state <= C_COMPARE;
          end
        end
        C_COMPARE: state <= C_NEXT;
        C_NEXT: begin
          pat_cnt <= pat_cnt + 1'b1;
          state   <= (pat_cnt == PW'(NUM_PATTERNS - 1)) ? C_DONE : C_LOAD;
        end
        C_DONE: begin
          test_mode <= 1'b0;
          done      <= 1'b1;
          state     <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    busy       = (state != C_IDLE);
    tpg_load   = (state == C_SEED);
    tpg_step   = (state == C_NEXT);
    piso_load  = (state == C_LOAD);
    piso_shift = (state == C_SEND) && bit_end && !echo_start;
    sipo_shift = (state == C_CAPTURE) && mid_bit;
    tra_strobe = (state == C_COMPARE);
  end

  // at most one step of the sequence acts in any cycle
  a_one_action: assert property (@(posedge clk) disable iff (rst)
    $onehot0({tpg_load, tpg_step, piso_load, piso_shift, sipo_shift, tra_strobe}));
  // every comparison is followed by a generator step
  a_step_after_compare: assert property (@(posedge clk) disable iff (rst)
    tra_strobe |=> tpg_step);
endmodule
