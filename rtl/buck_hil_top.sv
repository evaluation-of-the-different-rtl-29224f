// buck_hil_top: real-time hardware-in-the-loop model of an ideal DC-DC buck
// converter (switch Q, diode, LC filter, resistive load), in signed
// fixed-point arithmetic with one forward-Euler integration step per clock.
//
// State equations, advanced every clock (dt = one clock period):
//   vC(k+1) = vC(k) + dt/C * (iL(k) - vo(k)/R)      capacitor voltage
//   iL(k+1) = iL(k) + dt/L * vL(k)                  coil current
//   vL      = Vin - vC (Q on), -vC (Q off, iL > 0), 0 (Q off, iL <= 0)
//
// Data flow of one step: the two state words are shortened to feedback
// words vC_FB and iL_FB; the load current IoutAux = vC_FB / R and the
// capacitor current Iaux = iL_FB - IoutAux are formed; buck_vl_select picks
// vL (Vaux); two euler_integrator instances multiply Iaux by dt/C and Vaux by
// dt/L and add the increments to the states. Every intermediate signal has
// its own fixed-point format (the "optimal" word lengths, all given below
// as parameters); every conversion uses the ROUND and OVERFLOW modes.
//
// Interface: clk, synchronous active-high rst (both states return to 0),
// q = switch gate (1 = on), vin = input voltage in sfixed(5 downto -6).
// Outputs, 12 bits each as for the converters that follow the model:
// vo = capacitor voltage, sfixed(5 downto -6); iin = input current (coil
// current while Q is on, else 0), sfixed(6 downto -5); iout = load current,
// sfixed(3 downto -8). Outputs are combinational from the state registers,
// so they change one clock after the step that produced them; iin is in
// addition gated combinationally by q. q and vin are sampled at every rising
// edge. The state registers (25 + 25 bits) are the
// only storage. The full-precision states il/vc and the increments
// inc_i/inc_v are named here for observation in simulation and drive no
// output; lint reports them as unused for that reason.
//
// Follows the specification: the equations, the circuit values
// (dt = 20 ns, C = 220 uF, L = 22 uH, R = 2.5 ohm), the signal formats and
// word lengths, the rounding/overflow modes and their defaults. This
// design's own choices: the format of the load conductance constant 1/R
// (sfixed(-1 downto -12)), the place of each resize, the reset, and that
// the input current is the iL feedback word gated by Q.
module buck_hil_top
  import fx_pkg::*;
#(
  // circuit and integration step
  parameter real          DT       = 20.0e-9,
  parameter real          CAP      = 220.0e-6,
  parameter real          IND      = 22.0e-6,
  parameter real          RLOAD    = 2.5,
  // quantisation modes
  parameter fx_round_e    ROUND    = FX_ROUND,
  parameter fx_overflow_e OVERFLOW = FX_SATURATE,
  // signal formats sfixed(H downto L)
  parameter int IL_H   = 6,   parameter int IL_L   = -18,  // iL state
  parameter int VC_H   = 5,   parameter int VC_L   = -19,  // vC state
  parameter int DTC_H  = -13, parameter int DTC_L  = -24,  // dt/C
  parameter int DTL_H  = -10, parameter int DTL_L  = -21,  // dt/L
  parameter int INCI_H = -4,  parameter int INCI_L = -18,  // iL increment
  parameter int INCV_H = -6,  parameter int INCV_L = -19,  // vC increment
  parameter int IAUX_H = 6,   parameter int IAUX_L = -8,   // iL - vo/R
  parameter int VAUX_H = 5,   parameter int VAUX_L = -6,   // vL
  parameter int VIN_H  = 5,   parameter int VIN_L  = -6,   // Vin input
  parameter int IIN_H  = 6,   parameter int IIN_L  = -5,   // iIn output
  parameter int VOUT_H = 5,   parameter int VOUT_L = -6,   // vo output
  parameter int IOUT_H = 3,   parameter int IOUT_L = -8,   // Iout output / vo/R
  parameter int VCFB_H = 5,   parameter int VCFB_L = -6,   // vC feedback
  parameter int ILFB_H = 6,   parameter int ILFB_L = -8,   // iL feedback
  parameter int GL_H   = -1,  parameter int GL_L   = -12   // 1/R constant
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          q,
  input  logic signed [VIN_H-VIN_L:0]   vin,
  output logic signed [IIN_H-IIN_L:0]   iin,
  output logic signed [VOUT_H-VOUT_L:0] vo,
  output logic signed [IOUT_H-IOUT_L:0] iout
);

  localparam longint DTC_CODE = fx_code(DT / CAP, DTC_L);
  localparam longint DTL_CODE = fx_code(DT / IND, DTL_L);
  localparam int     GLW      = GL_H - GL_L + 1;
  localparam logic signed [GLW-1:0] GL = GLW'(fx_code(1.0 / RLOAD, GL_L));

  // full-precision load current GL * vC_FB
  localparam int GVW = GLW + (VCFB_H - VCFB_L + 1);
  // full-precision capacitor current iL_FB - IoutAux on a common LSB
  localparam int CL  = (ILFB_L < IOUT_L) ? ILFB_L : IOUT_L;
  localparam int CH  = ((ILFB_H > IOUT_H) ? ILFB_H : IOUT_H) + 1;
  localparam int CW  = CH - CL + 1;

  logic signed [IL_H-IL_L:0]       il;
  logic signed [VC_H-VC_L:0]       vc;
  logic signed [ILFB_H-ILFB_L:0]   il_fb;
  logic signed [VCFB_H-VCFB_L:0]   vc_fb;
  logic signed [INCI_H-INCI_L:0]   inc_i;
  logic signed [INCV_H-INCV_L:0]   inc_v;
  logic signed [VAUX_H-VAUX_L:0]   vaux;
  logic signed [IAUX_H-IAUX_L:0]   iaux;
  logic signed [IOUT_H-IOUT_L:0]   iout_aux;
  logic signed [IIN_H-IIN_L:0]     il_out;
  logic signed [GVW-1:0]           gv_full;
  logic signed [CW-1:0]            ic_full;

  if (VCFB_H != VIN_H || VCFB_L != VIN_L) begin : g_bad_fmt
    $error("buck_hil_top: vC feedback and Vin must share one format");
  end

  // ---- coil voltage (switch model), Vaux = vL ----------------------------
  buck_vl_select #(
    .V_H (VIN_H),  .V_L (VIN_L),
    .VL_H(VAUX_H), .VL_L(VAUX_L),
    .IL_W(ILFB_H - ILFB_L + 1),
    .ROUND(ROUND), .OVERFLOW(OVERFLOW)
  ) u_vl (
    .q    (q),
    .vin  (vin),
    .vc_fb(vc_fb),
    .il_fb(il_fb),
    .vl   (vaux)
  );

  // ---- load current IoutAux = vC_FB / R and capacitor current Iaux --------
  assign gv_full = GVW'(GL) * GVW'(vc_fb);

  sfixed_resize #(
    .IN_H (GL_H + VCFB_H + 1), .IN_L (GL_L + VCFB_L),
    .OUT_H(IOUT_H),            .OUT_L(IOUT_L),
    .ROUND(ROUND),             .OVERFLOW(OVERFLOW)
  ) u_iout (
    .din (gv_full),
    .dout(iout_aux)
  );

  assign ic_full = (CW'(il_fb) <<< (ILFB_L - CL)) - (CW'(iout_aux) <<< (IOUT_L - CL));

  sfixed_resize #(
    .IN_H (CH),     .IN_L (CL),
    .OUT_H(IAUX_H), .OUT_L(IAUX_L),
    .ROUND(ROUND),  .OVERFLOW(OVERFLOW)
  ) u_iaux (
    .din (ic_full),
    .dout(iaux)
  );

  // ---- state variables ----------------------------------------------------
  euler_integrator #(
    .X_H  (IL_H),   .X_L  (IL_L),
    .K_H  (DTL_H),  .K_L  (DTL_L),  .K_CODE(DTL_CODE),
    .U_H  (VAUX_H), .U_L  (VAUX_L),
    .INC_H(INCI_H), .INC_L(INCI_L),
    .FB_H (ILFB_H), .FB_L (ILFB_L),
    .X_INIT(0),
    .ROUND(ROUND),  .OVERFLOW(OVERFLOW)
  ) u_il (
    .clk (clk),
    .rst (rst),
    .u   (vaux),
    .x   (il),
    .x_fb(il_fb),
    .inc (inc_i)
  );

  euler_integrator #(
    .X_H  (VC_H),   .X_L  (VC_L),
    .K_H  (DTC_H),  .K_L  (DTC_L),  .K_CODE(DTC_CODE),
    .U_H  (IAUX_H), .U_L  (IAUX_L),
    .INC_H(INCV_H), .INC_L(INCV_L),
    .FB_H (VCFB_H), .FB_L (VCFB_L),
    .X_INIT(0),
    .ROUND(ROUND),  .OVERFLOW(OVERFLOW)
  ) u_vc (
    .clk (clk),
    .rst (rst),
    .u   (iaux),
    .x   (vc),
    .x_fb(vc_fb),
    .inc (inc_v)
  );

  // ---- 12-bit outputs -----------------------------------------------------
  sfixed_resize #(
    .IN_H (ILFB_H), .IN_L (ILFB_L),
    .OUT_H(IIN_H),  .OUT_L(IIN_L),
    .ROUND(ROUND),  .OVERFLOW(OVERFLOW)
  ) u_iin (
    .din (il_fb),
    .dout(il_out)
  );

  sfixed_resize #(
    .IN_H (VCFB_H), .IN_L (VCFB_L),
    .OUT_H(VOUT_H), .OUT_L(VOUT_L),
    .ROUND(ROUND),  .OVERFLOW(OVERFLOW)
  ) u_vo (
    .din (vc_fb),
    .dout(vo)
  );

  assign iin  = q ? il_out : '0;
  assign iout = iout_aux;

endmodule
