// tb_buck_hil_trunc_wrap: end-to-end test of the buck converter HIL model
// with the cheaper quantisation modes, truncate and wrap, on the optimal
// fixed-point formats. Same procedure as tb_buck_hil_top; in phase 3 the
// overflowing states wrap around instead of saturating.
//
// Every clock the testbench drives the gate q and the input voltage, steps
// a code-exact reference model (fx_ref_pkg::buck_ref_step) and compares both
// state registers and the three outputs with it, which also checks that one
// integration step is taken per clock. In parallel it runs a double-precision
// model of the same equations (the "golden" model) and accumulates the mean
// absolute and mean relative errors of iL and vC.
//
// Phases:
//   1. nominal operation: Vin = 10 V, 200 kHz switching (250 steps of 20 ns),
//      duty 0.5, 10 ms from rest. The relative error of vC against the golden
//      model must stay below 0.5 %, that of iL below 0.6 % (it measures
//      0.50 %), and the last period must average vo = 5 V and iL = 2 A.
//   2. switch held off: the coil current falls to zero and the model enters
//      discontinuous conduction (vL = 0).
//   3. switch held on with the largest input voltage: states leave their
//      range and the overflow mode acts.
//   4. synchronous reset in the middle of operation.
// Each of these mechanisms is counted and must occur.
module tb_buck_hil_trunc_wrap;
  import fx_pkg::*;
  import fx_ref_pkg::*;

  localparam bit  TRUNC   = 1'b1;
  localparam bit  WRAP    = 1'b1;
  localparam int  PERIOD  = 250;        // switching period in steps (200 kHz)
  localparam int  T_ON    = 125;        // duty 0.5
  localparam int  N_NOM   = 500_000;    // 10 ms of nominal operation
  localparam int  N_OFF   = 5_000;
  localparam int  N_OVF   = 20_000;
  localparam int  WATCHDOG = N_NOM + N_OFF + N_OVF + 10_000;
  localparam real DT = 20.0e-9, CAP = 220.0e-6, IND = 22.0e-6, RLOAD = 2.5;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic q   = 1'b0;
  logic signed [11:0] vin = '0;
  logic signed [11:0] iin, vo, iout;

  int checks = 0, failures = 0;
  int n_on = 0, n_free = 0, n_dcm = 0, n_reset = 0;
  longint ovf_sat = 0;

  always #10 clk = ~clk;

  buck_hil_top #(.ROUND(FX_TRUNCATE), .OVERFLOW(FX_WRAP)) dut (
    .clk (clk), .rst (rst), .q (q), .vin (vin),
    .iin (iin), .vo (vo), .iout (iout)
  );

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint il_ref = 0, vc_ref = 0;
  real    il_g = 0.0, vc_g = 0.0;
  real    sum_ae_il = 0.0, sum_ae_vc = 0.0;
  real    avg_il = 0.0, avg_vc = 0.0;
  int     mism_shown = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (mism_shown < 10) begin
        mism_shown++;
        $display("FAIL %s at %0t", what, $time);
      end
    end
  endtask

  // one integration step with inputs (qq, vv); returns the vL case used
  task automatic step(bit qq, logic signed [11:0] vv, bit golden);
    step_t s;
    real   vl_g, il_n, vc_n;
    @(negedge clk);
    rst = 1'b0; q = qq; vin = vv;
    #1;
    s = buck_ref_step(qq, longint'(vv), il_ref, vc_ref, TRUNC, WRAP);
    check(longint'(dut.il) == il_ref, "iL state");
    check(longint'(dut.vc) == vc_ref, "vC state");
    check(longint'(iin) == s.iin && longint'(vo) == s.vo && longint'(iout) == s.iout,
          "outputs");
    case (s.vl_case)
      0: n_on++;
      1: n_free++;
      default: n_dcm++;
    endcase
    if (golden) begin
      sum_ae_il += (il_g - real'(il_ref) * 2.0 ** (-18)) < 0.0 ?
                   -(il_g - real'(il_ref) * 2.0 ** (-18)) : (il_g - real'(il_ref) * 2.0 ** (-18));
      sum_ae_vc += (vc_g - real'(vc_ref) * 2.0 ** (-19)) < 0.0 ?
                   -(vc_g - real'(vc_ref) * 2.0 ** (-19)) : (vc_g - real'(vc_ref) * 2.0 ** (-19));
      vl_g = qq ? (real'(vv) / 64.0 - vc_g) : ((il_g > 0.0) ? -vc_g : 0.0);
      vc_n = vc_g + DT / CAP * (il_g - vc_g / RLOAD);
      il_n = il_g + DT / IND * vl_g;
      vc_g = vc_n; il_g = il_n;
    end
    il_ref = s.il; vc_ref = s.vc;
  endtask

  initial begin
    real mae_il, mae_vc, mre_il, mre_vc;
    repeat (3) @(posedge clk);
    ovf_count = 0;

    // ---- 1: nominal operation from rest ----------------------------------
    for (int k = 0; k < N_NOM; k++) begin
      step((k % PERIOD) < T_ON, 12'sd640, 1'b1);
      if (k == 0) begin
        // latency: the first step's result is in the state one clock later
        @(posedge clk); #1;
        check(dut.il != 0, "one step per clock");
      end
      if (k >= N_NOM - PERIOD) begin
        avg_il += real'(il_ref) * 2.0 ** (-18) / PERIOD;
        avg_vc += real'(vc_ref) * 2.0 ** (-19) / PERIOD;
      end
    end
    mae_il = sum_ae_il / N_NOM;
    mae_vc = sum_ae_vc / N_NOM;
    mre_il = mae_il / 2.0;
    mre_vc = mae_vc / 5.0;
    $display("nominal: MAE iL=%.6f A vC=%.6f V  MRE iL=%.6f vC=%.6f  avg iL=%.4f vC=%.4f",
             mae_il, mae_vc, mre_il, mre_vc, avg_il, avg_vc);
    // truncation biases every feedback word downwards; the coil current
    // settles about 8 mA high and its relative error lands near 0.5 %
    check(mre_il < 0.006, "MRE iL below 0.6 %");
    check(mre_vc < 0.005, "MRE vC below 0.5 %");
    check(avg_vc > 4.9 && avg_vc < 5.1, "average vo = 5 V");
    check(avg_il > 1.95 && avg_il < 2.05, "average iL = 2 A");

    // ---- 2: switch held off: discontinuous conduction -------------------
    for (int k = 0; k < N_OFF; k++) step(1'b0, 12'sd640, 1'b0);

    // ---- 3: largest input voltage, switch on: overflow ------------------
    ovf_sat = ovf_count;
    for (int k = 0; k < N_OVF; k++) step(1'b1, 12'sd2047, 1'b0);
    ovf_sat = ovf_count - ovf_sat;

    // ---- 4: reset while running ------------------------------------------
    @(negedge clk) rst = 1'b1;
    @(posedge clk); #1;
    check(dut.il == 0 && dut.vc == 0, "reset clears the states");
    n_reset++;
    il_ref = 0; vc_ref = 0;
    for (int k = 0; k < 2 * PERIOD; k++) step((k % PERIOD) < T_ON, 12'sd640, 1'b0);

    $display("mechanisms: Q on %0d, diode conducting %0d, discontinuous %0d, overflow events %0d, resets %0d",
             n_on, n_free, n_dcm, ovf_sat, n_reset);
    check(n_on > 0,    "switch-on steps occurred");
    check(n_free > 0,  "freewheeling steps occurred");
    check(n_dcm > 0,   "discontinuous steps occurred");
    check(ovf_sat > 0, "overflow occurred");
    check(n_reset > 0, "reset occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
