// gf128_mul: multiplication in GF(2^128) as used by GCM (GF_Mult_H).
//
// Combinational. Bit order and reduction polynomial follow the GCM standard:
// bit 127 of the vector is the coefficient of x^0, and the field is reduced
// by x^128 + x^7 + x^2 + x + 1, which in this order is the constant
// R = 0xE1 followed by 120 zero bits. The product is formed by the
// shift-and-add method: walk the bits of `a` from x^0 upwards, add the
// running multiple of `b` when the bit is set, and multiply that multiple by
// x (a right shift, folding R back in) after each bit. The design places one
// register after each multiplier (see gcm_tag), so a product takes one cycle.
module gf128_mul (
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic [127:0] p
);

  localparam logic [127:0] R = {8'hE1, 120'h0};

  always_comb begin
    logic [127:0] z, v;
    z = '0;
    v = b;
    for (int i = 127; i >= 0; i--) begin
      if (a[i]) z = z ^ v;
      v = v[0] ? ((v >> 1) ^ R) : (v >> 1);
    end
    p = z;
  end

endmodule
