// tb_buck_vl_select: checks the coil-voltage selector at the model's formats
// (Vin, vC in sfixed(5 downto -6), vL in sfixed(5 downto -6), iL feedback 15
// bits). Random switch states, voltages and currents, including iL = 0 and
// negative iL, are applied; the expected vL follows the three cases
// Vin - vC (Q on), -vC (Q off, iL > 0), 0 (Q off, iL <= 0), computed in real
// volts, then rounded to the output grid and saturated. Also counts that
// every case and a saturation occurred. Combinational; a clock paces the
// stimulus and the watchdog.
module tb_buck_vl_select;
  import fx_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_case[3] = '{0, 0, 0};
  int n_sat = 0;

  logic               q;
  logic signed [11:0] vin, vc_fb, vl;
  logic signed [14:0] il_fb;

  buck_vl_select dut (.q(q), .vin(vin), .vc_fb(vc_fb), .il_fb(il_fb), .vl(vl));

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real    v_exp;
    longint code;
    for (int i = 0; i < 20_000; i++) begin
      @(negedge clk);
      q     = 1'($urandom);
      vin   = 12'($urandom);
      vc_fb = 12'($urandom);
      case ($urandom % 4)
        0: il_fb = '0;
        1: il_fb = -15'sd1;
        default: il_fb = 15'($urandom);
      endcase
      #1;
      if (q) begin
        v_exp = (real'(vin) - real'(vc_fb)) / 64.0; n_case[0]++;
      end else if (il_fb > 0) begin
        v_exp = -real'(vc_fb) / 64.0;               n_case[1]++;
      end else begin
        v_exp = 0.0;                                 n_case[2]++;
      end
      // inputs already lie on the 2^-6 grid: no rounding, only saturation
      code = longint'($rtoi(v_exp * 64.0));
      if (code > 2047)  begin code = 2047;  n_sat++; end
      if (code < -2048) begin code = -2048; n_sat++; end
      checks++;
      if (longint'(vl) != code) begin
        failures++;
        if (failures < 10)
          $display("FAIL q=%0b vin=%0d vc=%0d il=%0d: vl=%0d expected %0d",
                   q, vin, vc_fb, il_fb, vl, code);
      end
    end
    checks++;
    if (n_case[0] == 0 || n_case[1] == 0 || n_case[2] == 0 || n_sat == 0) failures++;
    $display("cases: on %0d, diode %0d, zero %0d, saturated %0d",
             n_case[0], n_case[1], n_case[2], n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
