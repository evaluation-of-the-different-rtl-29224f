// euler_integrator: one state variable of the HIL model, advanced by the
// forward Euler rule once per clock:
//
//   inc    = resize(K * u)          K = dt/C or dt/L, a constant
//   x(k+1) = resize(x(k) + inc)
//   x_fb   = resize(x(k))           shortened copy fed back into the model
//
// Each resize uses the model's rounding and overflow modes (see
// sfixed_resize). The product K*u is formed at full precision, format
// sfixed(K_H+U_H+1 downto K_L+U_L); the sum x+inc is formed at full precision
// on the common LSB with one extra integer bit. Only the state word x is
// stored, so one clock period is one integration step.
//
// Interface: clk, synchronous active-high rst (x returns to X_INIT), the
// right-hand-side input u; outputs the state x, its feedback copy x_fb and
// the increment inc of the current step. x, x_fb and inc are valid in the
// cycle after the clock edge that produced x; inc depends combinationally on
// u.
//
// The update rule, the increment and feedback signals and their formats follow
// the model's specification; the reset and the constant being passed as an
// integer code K_CODE are this design's choices.
module euler_integrator
  import fx_pkg::*;
#(
  parameter int           X_H      = 6,     // state x: sfixed(X_H downto X_L)
  parameter int           X_L      = -18,
  parameter int           K_H      = -10,   // constant K
  parameter int           K_L      = -21,
  parameter longint       K_CODE   = 1907,  // K = K_CODE * 2^K_L (dt/L)
  parameter int           U_H      = 5,     // input u
  parameter int           U_L      = -6,
  parameter int           INC_H    = -4,    // increment K*u after resize
  parameter int           INC_L    = -18,
  parameter int           FB_H     = 6,     // feedback copy of x
  parameter int           FB_L     = -8,
  parameter longint       X_INIT   = 0,     // reset value, code of x
  parameter fx_round_e    ROUND    = FX_ROUND,
  parameter fx_overflow_e OVERFLOW = FX_SATURATE
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic signed [U_H-U_L:0]     u,
  output logic signed [X_H-X_L:0]     x,
  output logic signed [FB_H-FB_L:0]   x_fb,
  output logic signed [INC_H-INC_L:0] inc
);

  localparam int XW  = X_H - X_L + 1;
  localparam int KW  = K_H - K_L + 1;
  localparam int UW  = U_H - U_L + 1;
  localparam int PW  = KW + UW;
  localparam int SL  = (X_L < INC_L) ? X_L : INC_L;
  localparam int SH  = ((X_H > INC_H) ? X_H : INC_H) + 1;
  localparam int SW  = SH - SL + 1;

  localparam logic signed [KW-1:0] K = KW'(K_CODE);

  logic signed [PW-1:0] prod;
  logic signed [SW-1:0] sum;
  logic signed [XW-1:0] x_next;

  assign prod = PW'(K) * PW'(u);

  sfixed_resize #(
    .IN_H (K_H + U_H + 1), .IN_L (K_L + U_L),
    .OUT_H(INC_H),         .OUT_L(INC_L),
    .ROUND(ROUND),         .OVERFLOW(OVERFLOW)
  ) u_inc (
    .din (prod),
    .dout(inc)
  );

  assign sum = (SW'(x) <<< (X_L - SL)) + (SW'(inc) <<< (INC_L - SL));

  sfixed_resize #(
    .IN_H (SH),    .IN_L (SL),
    .OUT_H(X_H),   .OUT_L(X_L),
    .ROUND(ROUND), .OVERFLOW(OVERFLOW)
  ) u_sum (
    .din (sum),
    .dout(x_next)
  );

  always_ff @(posedge clk) begin
    if (rst) x <= XW'(X_INIT);
    else     x <= x_next;
  end

  sfixed_resize #(
    .IN_H (X_H),   .IN_L (X_L),
    .OUT_H(FB_H),  .OUT_L(FB_L),
    .ROUND(ROUND), .OVERFLOW(OVERFLOW)
  ) u_fb (
    .din (x),
    .dout(x_fb)
  );

endmodule
