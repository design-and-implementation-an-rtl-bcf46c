// uart_tx -- UART transmitter (parallel to serial, adds start and stop bits).
//
// A one-cycle pulse on start with the byte on data begins a frame: start bit
// (0), DATA_BITS data bits least significant first, one stop bit (1). Each
// bit is held for CLKS_PER_BIT clock cycles, so a frame lasts
// FRAME_BITS * CLKS_PER_BIT cycles from the cycle after start. The line idles
// high. busy is high for the whole frame; done pulses for one cycle at its
// end; start while busy is ignored. The bit-time counter is incremented by
// the reversible-gate adder (rev_adder).
//
// Frame format, no parity and LSB first follow the design description;
// the single stop bit, the start/busy/done handshake and synchronous
// active-high reset are this design's choices.
module uart_tx
  import uart_bist_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 5208   // 50 MHz / 9600 baud
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  byte_t data,
  output logic  tx,
  output logic  busy,
  output logic  done
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  localparam int unsigned BW = $clog2(FRAME_BITS + 1);

  logic [CW-1:0] cnt, cnt_inc;
  logic [BW-1:0] bit_idx;
  frame_t        shreg;
  logic          unused_cout;

  // cnt + 1 through the reversible adder
  rev_adder #(.WIDTH(CW)) u_inc (
    .a(cnt), .b('0), .cin(1'b1), .sum(cnt_inc), .cout(unused_cout)
  );

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy    <= 1'b0;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '1;
    end else if (!busy) begin
      if (start) begin
        busy    <= 1'b1;
        cnt     <= '0;
        bit_idx <= '0;
        shreg   <= make_frame(data);
      end
    end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
      cnt   <= '0;
      shreg <= {1'b1, shreg[FRAME_BITS-1:1]};
      if (bit_idx == BW'(FRAME_BITS - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        bit_idx <= bit_idx + 1'b1;
      end
    end else begin
      cnt <= cnt_inc;
    end
  end

  assign tx = busy ? shreg[0] : 1'b1;

  // handshake: done ends a frame, so busy was high just before it
  a_done_after_busy: assert property (@(posedge clk) disable iff (rst)
    done |-> !busy && $past(busy));
endmodule
