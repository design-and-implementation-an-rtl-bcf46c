// uart_bist_pkg -- types and constants shared by the UART built-in self-test.
//
// The UART frame follows the usual asynchronous format: one start bit (0),
// DATA_BITS data bits sent least significant bit first, no parity bit, and one
// stop bit (1). The byte width and the absence of parity follow the design
// description; the single stop bit and the frame packing helpers are this
// design's choice. The test-pattern generator can run either as the 0..511
// counter the design specifies or as a Fibonacci LFSR (the generic generator
// architecture); tpg_mode_e selects between them at elaboration time.
package uart_bist_pkg;

  localparam int unsigned DATA_BITS  = 8;               // one byte per frame
  localparam int unsigned FRAME_BITS = DATA_BITS + 2;   // start + data + stop

  typedef logic [DATA_BITS-1:0]  byte_t;
  typedef logic [FRAME_BITS-1:0] frame_t;

  // Pattern-generator flavour.
  typedef enum logic {
    TPG_COUNT = 1'b0,   // count up by one, wrap from all-ones to zero
    TPG_LFSR  = 1'b1    // Fibonacci LFSR, feedback into the LSB stage
  } tpg_mode_e;

  // Frame as it leaves a shift register LSB first: bit 0 is the start bit,
  // bits 1..DATA_BITS the data (d0 first), the top bit the stop bit.
  function automatic frame_t make_frame(byte_t d);
    return {1'b1, d, 1'b0};
  endfunction

  // Frame captured by a SIPO whose stage A takes the line: the first bit
  // received (the start bit) ends in the last stage, so the data sit reversed.
  function automatic byte_t sipo_data(frame_t q);
    byte_t d;
    for (int i = 0; i < DATA_BITS; i++) d[i] = q[FRAME_BITS-2-i];
    return d;
  endfunction

  // A captured frame is well formed when start is 0 and stop is 1.
  function automatic logic sipo_framed(frame_t q);
    return (q[FRAME_BITS-1] == 1'b0) && (q[0] == 1'b1);
  endfunction

endpackage
