// Termination step shared by the three-operand adder and the output
// converter: normalize and round a two's complement integer.
//
// The input value is v * 2^e_base. The magnitude of v is taken, its leading
// one is found (leading-zero detection by priority search), and it is
// shifted so that a 24-bit significand m with its top bit set remains; bits
// shifted out are rounded to nearest, ties to even, with a guard bit and a
// sticky bit. A carry out of the rounding renormalizes m. The result is
//     value = (-1)^sign * m * 2^(exp - 23)
// Interface: combinational. zero is set, and m and exp are zero, when v is
// zero. The exponent is returned as a 16-bit signed number so that callers
// can detect overflow of their own formats.
module fp_norm_round #(
  parameter int unsigned IW = 83   // width of the two's complement input
) (
  input  logic signed [IW-1:0] v,
  input  logic signed [15:0]   e_base,
  output logic                 sign,
  output logic [23:0]          m,
  output logic signed [15:0]   exp,
  output logic                 zero
);

  logic [IW-1:0] mag;
  logic [IW-1:0] shifted;
  logic [IW-1:0] low_mask;
  logic [24:0]   rounded;
  int            lead;
  logic          guard, sticky;

  always_comb begin
    sign = v[IW-1];
    mag  = sign ? IW'(-v) : IW'(v);
    zero = (mag == '0);
    lead = 0;
    for (int i = 0; i < IW; i++)
      if (mag[i]) lead = i;
    guard    = 1'b0;
    sticky   = 1'b0;
    low_mask = '0;
    if (lead > 23) begin
      shifted = mag >> (lead - 23);
      guard   = mag[lead - 24];
      if (lead > 24) low_mask = ({IW{1'b1}} >> (IW - (lead - 24)));
      sticky  = |(mag & low_mask);
    end else begin
      shifted = mag << (23 - lead);
    end
    rounded = {1'b0, shifted[23:0]} + {24'd0, guard & (sticky | shifted[0])};
    if (rounded[24]) begin
      m   = rounded[24:1];
      exp = e_base + 16'(lead) + 16'sd1;
    end else begin
      m   = rounded[23:0];
      exp = e_base + 16'(lead);
    end
    if (zero) begin
      m   = '0;
      exp = '0;
    end
  end

endmodule
