// buck_vl_select: coil voltage of the ideal buck converter, the switch-state
// selector of the HIL model.
//
// vL = Vin - vC   when the MOSFET Q is on,
//      -vC        when Q is off and the coil current is positive (the diode
//                 conducts),
//      0          when Q is off and the coil current has fallen to zero or
//                 below (discontinuous conduction: the coil holds no voltage).
//
// Vin and vC share the format sfixed(V_H downto V_L). The difference and the
// negation are formed at full precision (one extra integer bit) and the
// selected value is resized to sfixed(VL_H downto VL_L) with the model's
// rounding and overflow modes. The sign test uses the coil-current feedback
// word il_fb (any width). The three cases are those of the converter's
// switching model; formats and the placement of the resize after the
// selection are this design's reading of the model's data flow.
//
// Purely combinational.
module buck_vl_select
  import fx_pkg::*;
#(
  parameter int           V_H      = 5,
  parameter int           V_L      = -6,
  parameter int           VL_H     = 5,
  parameter int           VL_L     = -6,
  parameter int           IL_W     = 15,
  parameter fx_round_e    ROUND    = FX_ROUND,
  parameter fx_overflow_e OVERFLOW = FX_SATURATE
) (
  input  logic                      q,       // switch state, 1 = on
  input  logic signed [V_H-V_L:0]   vin,     // input voltage Vin
  input  logic signed [V_H-V_L:0]   vc_fb,   // capacitor voltage feedback
  input  logic signed [IL_W-1:0]    il_fb,   // coil current feedback (sign only)
  output logic signed [VL_H-VL_L:0] vl       // coil voltage vL
);

  localparam int SW = V_H - V_L + 2;  // full-precision width of vin - vc

  logic                 il_positive;
  logic signed [SW-1:0] vl_full;

  assign il_positive = (il_fb > 0);

  always_comb begin
    if (q) begin
      vl_full = SW'(vin) - SW'(vc_fb);
    end else if (il_positive) begin
      vl_full = -SW'(vc_fb);
    end else begin
      vl_full = '0;
    end
  end

  sfixed_resize #(
    .IN_H (V_H + 1), .IN_L (V_L),
    .OUT_H(VL_H),    .OUT_L(VL_L),
    .ROUND(ROUND),   .OVERFLOW(OVERFLOW)
  ) u_resize (
    .din (vl_full),
    .dout(vl)
  );

endmodule
