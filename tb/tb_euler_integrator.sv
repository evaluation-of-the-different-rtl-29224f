// tb_euler_integrator: checks one forward-Euler state variable at the coil
// current's formats (state sfixed(6 downto -18), constant dt/L = 1907 *
// 2^-21, input sfixed(5 downto -6), increment sfixed(-4 downto -18),
// feedback sfixed(6 downto -8)), round + saturate.
// Random inputs drive it for many steps, including long runs of the largest
// positive and negative inputs so that the state saturates at both ends.
// Each clock the state, increment and feedback are compared with a model
// built from fx_ref_pkg::ref_resize; the state must change on the clock edge
// after its input is applied (one step per clock). The synchronous reset is
// checked at start and in the middle.
module tb_euler_integrator;
  import fx_pkg::*;
  import fx_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0;

  logic               rst = 1'b1;
  logic signed [11:0] u = '0;
  logic signed [24:0] x;
  logic signed [14:0] x_fb;
  logic signed [14:0] inc;

  euler_integrator dut (.clk(clk), .rst(rst), .u(u), .x(x), .x_fb(x_fb), .inc(inc));

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  longint x_ref = 0;

  task automatic step(logic signed [11:0] uu);
    longint inc_ref;
    @(negedge clk);
    rst = 1'b0;
    u   = uu;
    #1;
    inc_ref = ref_resize(1907 * longint'(uu), -27, -4, -18, 1'b0, 1'b0);
    chk(x,    x_ref, "state");
    chk(inc,  inc_ref, "increment");
    chk(x_fb, ref_resize(x_ref, -18, 6, -8, 1'b0, 1'b0), "feedback");
    x_ref = ref_resize(x_ref + inc_ref, -18, 6, -18, 1'b0, 1'b0);
    if (x_ref == (longint'(1) << 24) - 1) n_sat_hi++;
    if (x_ref == -(longint'(1) << 24))    n_sat_lo++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 chk(x, 0, "reset value");
    for (int i = 0; i < 5_000; i++) step(12'($urandom));
    for (int i = 0; i < 10_000; i++) step(12'sd2047);    // up to +64 A
    for (int i = 0; i < 20_000; i++) step(-12'sd2048);   // down to -64 A
    for (int i = 0; i < 5_000; i++) step(12'($urandom));
    // reset in the middle of operation
    @(negedge clk) rst = 1'b1;
    @(posedge clk); #1 chk(x, 0, "reset in operation");
    x_ref = 0;
    for (int i = 0; i < 1_000; i++) step(12'($urandom));
    chk(longint'(n_sat_hi > 0 && n_sat_lo > 0), 1, "saturation at both ends");
    $display("saturated steps: high %0d, low %0d", n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
