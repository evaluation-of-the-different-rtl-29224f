// sfixed_resize: converts a signed fixed-point word from format
// sfixed(IN_H downto IN_L) to sfixed(OUT_H downto OUT_L), the combinational
// equivalent of the VHDL-2008 fixed-point resize.
//
// How it works: the input is first aligned to the output LSB. When low bits
// are discarded (OUT_L > IN_L) and ROUND is FX_ROUND, the result is rounded to
// the nearest code; a tie (discarded bits exactly one half) goes to the even
// code, i.e. the decision uses the first discarded bit, the OR of the rest and
// the rightmost kept bit. With FX_TRUNCATE the discarded bits are simply
// dropped, which rounds towards minus infinity in two's complement. The
// aligned value is then fitted into OUT_H: FX_SATURATE clamps it to the
// largest or most negative code, FX_WRAP keeps the low bits only.
//
// Interface: din (IN_H-IN_L+1 bits) in, dout (OUT_H-OUT_L+1 bits) out, both
// two's complement. Purely combinational, no latency.
//
// The two quantisation modes and their defaults (round, saturate) follow the
// fixed-point library behaviour the model is specified against; the
// implementation is this design's own. Discarding more bits than the input
// holds is not supported (checked at elaboration).
module sfixed_resize
  import fx_pkg::*;
#(
  parameter int           IN_H     = 7,
  parameter int           IN_L     = -8,
  parameter int           OUT_H    = 6,
  parameter int           OUT_L    = -5,
  parameter fx_round_e    ROUND    = FX_ROUND,
  parameter fx_overflow_e OVERFLOW = FX_SATURATE
) (
  input  logic signed [IN_H-IN_L:0]   din,
  output logic signed [OUT_H-OUT_L:0] dout
);

  localparam int IW   = IN_H - IN_L + 1;
  localparam int OW   = OUT_H - OUT_L + 1;
  localparam int DROP = OUT_L - IN_L;            // > 0: LSBs discarded
  localparam int PAD  = (DROP < 0) ? -DROP : 0;  // zero LSBs appended
  localparam int AW   = IW + PAD + 1;            // aligned width, +1 for rounding carry

  if (DROP >= IW) begin : g_bad
    $error("sfixed_resize: cannot discard %0d bits of a %0d-bit input", DROP, IW);
  end

  logic signed [AW-1:0] aligned;
  logic                 round_up;
  logic signed [AW-1:0] rounded;

  if (DROP > 0) begin : g_drop
    logic guard, sticky, keep_lsb;
    assign guard    = din[DROP-1];
    assign keep_lsb = din[DROP];
    if (DROP > 1) begin : g_sticky
      assign sticky = |din[DROP-2:0];
    end else begin : g_nosticky
      assign sticky = 1'b0;
    end
    assign aligned  = AW'(din >>> DROP);
    assign round_up = (ROUND == FX_ROUND) && guard && (sticky || keep_lsb);
  end else begin : g_pad
    assign aligned  = AW'(din) <<< PAD;
    assign round_up = 1'b0;
  end

  assign rounded = aligned + AW'(round_up);

  if (AW <= OW) begin : g_fits
    assign dout = OW'(rounded);
  end else begin : g_narrow
    localparam logic signed [AW-1:0] MAXV = AW'((longint'(1) <<< (OW - 1)) - 1);
    localparam logic signed [AW-1:0] MINV = -AW'(longint'(1) <<< (OW - 1));
    always_comb begin
      if (OVERFLOW == FX_SATURATE && rounded > MAXV) begin
        dout = {1'b0, {(OW-1){1'b1}}};
      end else if (OVERFLOW == FX_SATURATE && rounded < MINV) begin
        dout = {1'b1, {(OW-1){1'b0}}};
      end else begin
        dout = rounded[OW-1:0];
      end
    end
  end

endmodule
