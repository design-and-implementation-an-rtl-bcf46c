// uart_bist_top -- UART with built-in self-test.
//
// Two identical paths run side by side, each a PISO feeding a UART feeding
// a SIPO. Path 1 holds a fault-free reference UART; path 2 holds the UART
// under test (CUT), whose stuck-at faults can be injected from outside.
// A test pattern generator (tpg, a 9-bit counter from 0 to 511) supplies the
// patterns; for each one the control unit (bist_ctrl) loads the pattern's low
// byte, framed with a start and a stop bit, into both PISOs, shifts it out
// one bit per bit time into the UARTs' receivers, waits for the UARTs to
// echo the byte on their transmitters and shifts the echoed frames into the
// SIPOs at mid-bit. The comparator (tra) then checks the CUT's frame against
// the reference frame and against the pattern; a failure drops result and
// raises irq, which interrupt_clear_i clears. After NUM_PATTERNS patterns
// bist_done rises and the CUT goes back to normal mode, where rx_i/tx_o and
// the byte ports reach it directly.
//
// Timing: one bit time is CLK_HZ / BAUD cycles (5208 at the defaults). The
// echo starts about 9.5 bit times after a stimulus frame starts and is
// sampled for another 9.5, so one pattern takes 19 bit times plus a few
// cycles, and the full 512-pattern test about 50.7 million cycles (1.01 s at
// 50 MHz). Reset is synchronous and active high, except the SIPOs, which the
// control unit clears asynchronously before each pattern.
//
// The block structure (generator, two PISO-UART-SIPO paths, comparator,
// control unit), the 9-bit counting generator, the baud rate, one byte per
// frame without parity, the stuck-at testing and the interrupt with its
// clear input follow the design description. The 50 MHz clock, the echo
// operation of the UART in test mode, the fault site, sending only the low
// 8 bits of each 9-bit pattern and the port names not listed above are this
// design's choices.
module uart_bist_top
  import uart_bist_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned BAUD         = 9600,
  parameter int unsigned PAT_W        = 9,
  parameter int unsigned NUM_PATTERNS = 512,
  parameter tpg_mode_e   TPG_MODE     = TPG_COUNT,
  parameter int unsigned FAULT_BIT    = 0
) (
  input  logic             clk,
  input  logic             rst,
  // BIST control
  input  logic             bist_start,
  input  logic [PAT_W-1:0] seed,
  input  logic             interrupt_clear_i,
  input  logic             inject_sa0,
  input  logic             inject_sa1,
  output logic             test_mode,
  output logic             bist_busy,
  output logic             bist_done,
  output logic             irq,
  output logic             result,
  // observation
  output logic [PAT_W-1:0] lfsr_out,
  output logic             doutp1,
  output logic             uart_out1,
  output logic             doutp2,
  output logic             uart_out2,
  output frame_t           reference_out,
  output frame_t           tested_out,
  // CUT in normal mode
  input  logic             rx_i,
  output logic             tx_o,
  input  logic             tx_start_i,
  input  byte_t            tx_data_i,
  output logic             tx_busy_o,
  output byte_t            rx_data_o,
  output logic             rx_valid_o,
  output logic             rx_frame_err_o
);
  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;

  // control
  logic tpg_load, tpg_step, piso_load, piso_shift;
  logic sipo_clr_n, sipo_shift, tra_strobe, tra_error;
  logic echo_start, ref_busy, ref_busy_q;
  logic tpg_wrapped_unused;
  logic mis_ref_unused, mis_pat_unused;

  // ---------------------------------------------------------------- generator
  tpg #(.WIDTH(PAT_W), .MODE(TPG_MODE)) u_tpg (
    .clk, .rst, .load(tpg_load), .seed, .step(tpg_step),
    .pattern(lfsr_out), .wrapped(tpg_wrapped_unused)
  );

  byte_t  stim_byte;
  frame_t stim_frame;
  assign stim_byte  = lfsr_out[DATA_BITS-1:0];
  assign stim_frame = make_frame(stim_byte);

  // ------------------------------------------------------- path 1: reference
  byte_t ref_rx_data_unused;
  logic  ref_rx_valid_unused, ref_frame_err_unused, ref_so_unused;

  piso #(.WIDTH(FRAME_BITS)) u_piso1 (
    .clk, .rst, .load(piso_load), .shift(piso_shift),
    .din(stim_frame), .dout(doutp1)
  );

  uart_top #(.CLKS_PER_BIT(CLKS_PER_BIT), .FAULT_BIT(FAULT_BIT)) u_uart1 (
    .clk, .rst, .loopback(1'b1), .flt_sa0(1'b0), .flt_sa1(1'b0),
    .rx(doutp1), .tx(uart_out1),
    .tx_start(1'b0), .tx_data('0), .tx_busy(ref_busy),
    .rx_data(ref_rx_data_unused), .rx_valid(ref_rx_valid_unused),
    .rx_frame_err(ref_frame_err_unused)
  );

  sipo #(.WIDTH(FRAME_BITS)) u_sipo1 (
    .clk, .clr_n(sipo_clr_n), .shift(sipo_shift), .si(uart_out1),
    .q(reference_out), .so(ref_so_unused)
  );

  // ------------------------------------------------ path 2: circuit under test
  logic  cut_rx, cut_tx, cut_busy, cut_valid, cut_ferr, cut_so_unused;
  byte_t cut_data;

  piso #(.WIDTH(FRAME_BITS)) u_piso2 (
    .clk, .rst, .load(piso_load), .shift(piso_shift),
    .din(stim_frame), .dout(doutp2)
  );

  assign cut_rx = test_mode ? doutp2 : rx_i;

  uart_top #(.CLKS_PER_BIT(CLKS_PER_BIT), .FAULT_BIT(FAULT_BIT)) u_uart2 (
    .clk, .rst, .loopback(test_mode), .flt_sa0(inject_sa0), .flt_sa1(inject_sa1),
    .rx(cut_rx), .tx(cut_tx),
    .tx_start(tx_start_i && !test_mode), .tx_data(tx_data_i), .tx_busy(cut_busy),
    .rx_data(cut_data), .rx_valid(cut_valid), .rx_frame_err(cut_ferr)
  );

  assign uart_out2 = cut_tx;

  sipo #(.WIDTH(FRAME_BITS)) u_sipo2 (
    .clk, .clr_n(sipo_clr_n), .shift(sipo_shift), .si(cut_tx),
    .q(tested_out), .so(cut_so_unused)
  );

  // normal-mode view of the CUT
  always_comb begin
    tx_o           = test_mode ? 1'b1 : cut_tx;
    tx_busy_o      = cut_busy;
    rx_data_o      = cut_data;
    rx_valid_o     = cut_valid && !test_mode;
    rx_frame_err_o = cut_ferr && !test_mode;
  end

  // -------------------------------------------------------------- analyzer
  tra u_tra (
    .clk, .rst, .strobe(tra_strobe),
    .ref_frame(reference_out), .cut_frame(tested_out), .expected(stim_byte),
    .result, .error(tra_error), .mis_ref(mis_ref_unused), .mis_pat(mis_pat_unused)
  );

  // ---------------------------------------------------------- control unit
  always_ff @(posedge clk) begin
    if (rst) ref_busy_q <= 1'b0;
    else     ref_busy_q <= ref_busy;
  end
  assign echo_start = ref_busy && !ref_busy_q;

  bist_ctrl #(.CLKS_PER_BIT(CLKS_PER_BIT), .NUM_PATTERNS(NUM_PATTERNS)) u_ctrl (
    .clk, .rst, .start(bist_start), .irq_clear(interrupt_clear_i),
    .echo_start, .tra_error,
    .test_mode, .busy(bist_busy), .done(bist_done), .irq,
    .tpg_load, .tpg_step, .piso_load, .piso_shift,
    .sipo_clr_n, .sipo_shift, .tra_strobe
  );
endmodule
