// tb_tra -- self-checking testbench for the test response analyzer.
//
// Builds captured frames the way a SIPO holds them (first bit received in
// the top stage) and checks: equal, well-formed frames carrying the applied
// byte pass; a tested frame differing from the reference fails with mis_ref;
// a wrong data byte (in both frames) fails with mis_pat only; a bad start or
// stop bit fails; without strobe nothing changes; error pulses one cycle.
module tb_tra;
  import uart_bist_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic   rst, strobe, result, error, mis_ref, mis_pat;
  frame_t rf, cf;
  byte_t  expected;

  tra dut (.clk, .rst, .strobe, .ref_frame(rf), .cut_frame(cf), .expected,
           .result, .error, .mis_ref, .mis_pat);

  // frame as captured: q[9] = start, q[8..1] = d0..d7, q[0] = stop
  function automatic frame_t cap(byte_t d, bit start_b, bit stop_b);
    frame_t q;
    q[9] = start_b; q[0] = stop_b;
    for (int i = 0; i < 8; i++) q[8 - i] = d[i];
    return q;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic judge(frame_t r, frame_t c, byte_t e, bit exp_pass, bit exp_ref, bit exp_pat,
                       string what);
    rf = r; cf = c; expected = e; strobe = 1;
    @(posedge clk); #1;
    strobe = 0;
    check(result == exp_pass && error == !exp_pass, {what, ": verdict"});
    check(mis_ref == exp_ref && mis_pat == exp_pat, {what, ": flags"});
    @(posedge clk); #1;
    check(!error && result == exp_pass, {what, ": error is one pulse, result held"});
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; strobe = 0; rf = '0; cf = '0; expected = '0;
    @(posedge clk); #1;
    rst = 0;
    check(result == 1'b1 && !error, "reset state");
    for (int n = 0; n < 50; n++) begin
      byte_t d, d2;
      int k;
      d = byte_t'($urandom);
      judge(cap(d, 0, 1), cap(d, 0, 1), d, 1, 0, 0, "good");
      k = $urandom_range(0, 7);
      d2 = d ^ byte_t'(1 << k);
      judge(cap(d, 0, 1), cap(d2, 0, 1), d, 0, 1, 1, "tested bit flipped");
      judge(cap(d2, 0, 1), cap(d2, 0, 1), d, 0, 0, 1, "both wrong data");
      judge(cap(d, 0, 0), cap(d, 0, 0), d, 0, 0, 1, "bad stop bit");
      judge(cap(d, 1, 1), cap(d, 0, 1), d, 0, 1, 0, "reference start differs");
    end
    // no strobe: verdict holds
    rf = cap(8'h12, 0, 1); cf = cap(8'h34, 0, 1); expected = 8'h12;
    repeat (3) @(posedge clk); #1;
    check(result == 1'b0 && !error, "no strobe, last verdict held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
