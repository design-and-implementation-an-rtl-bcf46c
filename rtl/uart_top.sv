// uart_top -- the UART that serves as circuit under test (CUT).
//
// One receiver (uart_rx) and one transmitter (uart_tx) sharing a bit time of
// CLKS_PER_BIT cycles. In normal mode (loopback = 0) both sides are
// independent: tx_start/tx_data send a frame on tx, a frame on rx comes out on
// rx_data with rx_valid. In test mode (loopback = 1) every byte received is
// sent straight back on tx (echo), so a serial stimulus applied to rx returns
// as a serial response on tx, exercising both halves; the external
// tx_start is then ignored. The echo frame starts the cycle after rx_valid,
// half a bit time before the end of the received stop bit.
//
// flt_sa0 / flt_sa1 force bit FAULT_BIT of the received byte to 0 / 1
// (stuck-at fault injection; sa0 wins if both are set). The design tests the
// UART for stuck-at-0 and stuck-at-1 faults but does not say where they are
// placed; the site, the echo path and the loopback input are this design's
// choices.
module uart_top
  import uart_bist_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 5208,
  parameter int unsigned FAULT_BIT    = 0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  loopback,
  input  logic  flt_sa0,
  input  logic  flt_sa1,
  // serial side
  input  logic  rx,
  output logic  tx,
  // parallel side
  input  logic  tx_start,
  input  byte_t tx_data,
  output logic  tx_busy,
  output byte_t rx_data,
  output logic  rx_valid,
  output logic  rx_frame_err
);
  byte_t rx_raw;
  logic  tx_done_unused;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rx,
    .data(rx_raw), .valid(rx_valid), .frame_err(rx_frame_err)
  );

  always_comb begin
    rx_data = rx_raw;
    if (flt_sa0)      rx_data[FAULT_BIT] = 1'b0;
    else if (flt_sa1) rx_data[FAULT_BIT] = 1'b1;
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst,
    .start(loopback ? rx_valid : tx_start),
    .data (loopback ? rx_data  : tx_data),
    .tx, .busy(tx_busy), .done(tx_done_unused)
  );
endmodule
