// uart_rx -- UART receiver (serial to parallel, removes start and stop bits).
//
// The line is first passed through a two-flop synchronizer. A falling edge
// while idle starts a frame; the receiver waits half a bit time and checks
// that the line is still low (a shorter glitch is ignored), then samples one
// bit every CLKS_PER_BIT cycles, near the middle of each bit: DATA_BITS data
// bits LSB first and the stop bit. At the middle of the stop bit valid pulses
// for one cycle with the byte on data; frame_err pulses instead if the stop
// bit is 0. The receiver is ready for the next start bit right after. The
// bit-time counter is incremented by the reversible-gate adder.
//
// Mid-bit sampling, LSB-first order and no parity follow the design
// description; the synchronizer, the start-bit check, frame_err and the
// synchronous active-high reset are this design's choices.
module uart_rx
  import uart_bist_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 5208   // 50 MHz / 9600 baud
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  rx,
  output byte_t data,
  output logic  valid,
  output logic  frame_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  localparam int unsigned BW = $clog2(FRAME_BITS + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_BITS} rx_state_e;

  rx_state_e     state;
  logic [1:0]    sync;
  logic          line;
  logic [CW-1:0] cnt, cnt_inc;
  logic [BW-1:0] bit_idx;
  byte_t         shreg;
  logic          unused_cout;

  assign line = sync[1];

  rev_adder #(.WIDTH(CW)) u_inc (
    .a(cnt), .b('0), .cin(1'b1), .sum(cnt_inc), .cout(unused_cout)
  );

  always_ff @(posedge clk) begin
    valid     <= 1'b0;
    frame_err <= 1'b0;
    if (rst) begin
      sync    <= '1;
      state   <= R_IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
    end else begin
      sync <= {sync[0], rx};
      unique case (state)
        R_IDLE: begin
          cnt     <= '0;
          bit_idx <= '0;
          if (!line) state <= R_START;
        end
        R_START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt   <= '0;
            state <= line ? R_IDLE : R_BITS;
          end else begin
            cnt <= cnt_inc;
          end
        end
        R_BITS: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt <= '0;
            if (bit_idx == BW'(DATA_BITS)) begin
              // stop bit
              state <= R_IDLE;
              if (line) begin
                valid <= 1'b1;
                data  <= shreg;
              end else begin
                frame_err <= 1'b1;
              end
            end else begin
              shreg   <= {line, shreg[DATA_BITS-1:1]};
              bit_idx <= bit_idx + 1'b1;
            end
          end else begin
            cnt <= cnt_inc;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
