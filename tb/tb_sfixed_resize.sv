// tb_sfixed_resize: checks the fixed-point converter in all four
// combinations of rounding (round-to-nearest-even / truncate) and overflow
// (saturate / wrap), on a conversion that discards low bits and high bits
// (sfixed(7 downto -10) -> sfixed(3 downto -4)), plus a conversion that
// discards exactly one bit (ties only, no sticky bits) and one that appends
// low bits. Inputs are random plus directed ties and range edges; expected
// values come from fx_ref_pkg::ref_resize, which works by integer division.
// The converter is combinational; a clock paces the stimulus and the
// watchdog.
module tb_sfixed_resize;
  import fx_pkg::*;
  import fx_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [17:0] din;    // sfixed(7 downto -10)
  logic signed [7:0]  d_rs, d_rw, d_ts, d_tw;  // sfixed(3 downto -4)
  logic signed [11:0] din1;   // sfixed(5 downto -6)
  logic signed [10:0] d1;     // sfixed(5 downto -5)
  logic signed [7:0]  din2;   // sfixed(3 downto -4)
  logic signed [11:0] d2;     // sfixed(4 downto -7)

  sfixed_resize #(.IN_H(7), .IN_L(-10), .OUT_H(3), .OUT_L(-4),
                  .ROUND(FX_ROUND), .OVERFLOW(FX_SATURATE)) u_rs (.din(din), .dout(d_rs));
  sfixed_resize #(.IN_H(7), .IN_L(-10), .OUT_H(3), .OUT_L(-4),
                  .ROUND(FX_ROUND), .OVERFLOW(FX_WRAP))     u_rw (.din(din), .dout(d_rw));
  sfixed_resize #(.IN_H(7), .IN_L(-10), .OUT_H(3), .OUT_L(-4),
                  .ROUND(FX_TRUNCATE), .OVERFLOW(FX_SATURATE)) u_ts (.din(din), .dout(d_ts));
  sfixed_resize #(.IN_H(7), .IN_L(-10), .OUT_H(3), .OUT_L(-4),
                  .ROUND(FX_TRUNCATE), .OVERFLOW(FX_WRAP))     u_tw (.din(din), .dout(d_tw));
  sfixed_resize #(.IN_H(5), .IN_L(-6), .OUT_H(5), .OUT_L(-5)) u_one (.din(din1), .dout(d1));
  sfixed_resize #(.IN_H(3), .IN_L(-4), .OUT_H(4), .OUT_L(-7)) u_pad (.din(din2), .dout(d2));

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: din=%0d got %0d expected %0d", what, din, got, exp);
    end
  endtask

  task automatic apply(logic signed [17:0] v);
    @(negedge clk);
    din  = v;
    din1 = v[11:0];
    din2 = v[7:0];
    #1;
    chk(d_rs, ref_resize(din, -10, 3, -4, 1'b0, 1'b0), "round/saturate");
    chk(d_rw, ref_resize(din, -10, 3, -4, 1'b0, 1'b1), "round/wrap");
    chk(d_ts, ref_resize(din, -10, 3, -4, 1'b1, 1'b0), "truncate/saturate");
    chk(d_tw, ref_resize(din, -10, 3, -4, 1'b1, 1'b1), "truncate/wrap");
    chk(d1,   ref_resize(din1, -6, 5, -5, 1'b0, 1'b0), "one-bit round");
    chk(d2,   ref_resize(din2, -4, 4, -7, 1'b0, 1'b0), "pad");
  endtask

  initial begin
    // directed: exact ties, both parities, both signs (LSB step 2^6 codes)
    apply(18'sd32);  apply(18'sd96);  apply(-18'sd32); apply(-18'sd96);
    apply(18'sd33);  apply(18'sd31);  apply(-18'sd33);
    // range edges of the output: 7.9375 = 508 codes of 2^-6 in, +-8
    apply(18'sd8127); apply(18'sd8128); apply(18'sd8160); apply(18'sd8161);
    apply(-18'sd8192); apply(-18'sd8193); apply(-18'sd8224); apply(-18'sd8225);
    apply(18'sh1FFFF); apply(-18'sh20000); apply(18'sd0);
    // random
    for (int i = 0; i < 20_000; i++) begin
      logic signed [17:0] r;
      r = 18'($urandom);
      if (i % 2 == 0) r = 18'(signed'(r) >>> 4);   // favour in-range values
      apply(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
