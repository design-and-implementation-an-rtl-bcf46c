// tra -- test response analyzer (comparator).
//
// On a one-cycle strobe it judges the frame captured from the circuit under
// test (cut_frame) against the frame captured from the fault-free reference
// UART (ref_frame, the stored good response) and against the pattern byte
// that was applied (expected). The response passes when the two frames are
// equal, the tested frame has a 0 start bit and a 1 stop bit, and its data
// equal the applied byte. The verdict is registered: result holds 1 for pass
// and 0 for fail until the next strobe (1 after reset); error pulses for one
// cycle, the cycle after a failing strobe; mis_ref and mis_pat tell which
// comparison failed and are held with result.
//
// A comparator against stored responses, the reference/tested pair and the
// check against the generator's pattern follow the design description; the
// framing check and the registered flags are this design's choices.
module tra
  import uart_bist_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   strobe,
  input  frame_t ref_frame,
  input  frame_t cut_frame,
  input  byte_t  expected,
  output logic   result,
  output logic   error,
  output logic   mis_ref,
  output logic   mis_pat
);
  logic ref_bad, pat_bad;
  always_comb begin
    ref_bad = (cut_frame != ref_frame);
    pat_bad = !sipo_framed(cut_frame) || (sipo_data(cut_frame) != expected);
  end

  always_ff @(posedge clk) begin
    error <= 1'b0;
    if (rst) begin
      result  <= 1'b1;
      mis_ref <= 1'b0;
      mis_pat <= 1'b0;
    end else if (strobe) begin
      result  <= !(ref_bad || pat_bad);
      error   <= ref_bad || pat_bad;
      mis_ref <= ref_bad;
      mis_pat <= pat_bad;
    end
  end
endmodule
