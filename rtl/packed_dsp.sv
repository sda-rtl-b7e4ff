// packed_dsp: one DSP48E2-style multiply carrying several 4-bit products.
//
// Three 4-bit activations are placed 11 bits apart on the 27-bit A port and
// two 4-bit weights 11 bits apart on the 18-bit B port; one signed 27x18
// multiply then leaves four result fields at bits 0, 11, 22 and 33 of P.
//   MM-OS  : a = {a1, 0, a0}, w = {w1, w0}  -> f = {a1w1, a1w0, a0w1, a0w0}
//   CONV-WS: a = {x2, x1, x0}, w = {w0, w1} -> f1 = x0w0+x1w1, f2 = x1w0+x2w1
// (six multiplications and two additions in one DSP for the convolution).
// Because fields are signed, a negative field borrows one from the field
// above it; the bit-width correction (BitCR) adds back the top bit of the bits
// below each field. The packing of both modes into one layout and the 11-bit
// spacing are this design's choices; the document gives the product counts
// per DSP and the existence of BitCR.
// Interface: operands are 5-bit signed (a 4-bit nibble extended as signed or
// unsigned by the caller). Purely combinational; the PE registers around it.
module packed_dsp
  import sda_pkg::*;
(
  input  logic signed [4:0]        a [3],
  input  logic signed [4:0]        w [2],
  output logic signed [FIELD-1:0]  f [4]
);
  logic signed [26:0] port_a;
  logic signed [17:0] port_b;
  logic signed [47:0] p;

  always_comb begin
    port_a = 27'(a[0]) + (27'(a[1]) <<< FIELD) + (27'(a[2]) <<< (2*FIELD));
    port_b = 18'(w[0]) + (18'(w[1]) <<< FIELD);
    p      = 48'(port_a) * 48'(port_b);
    // BitCR: field k = raw bits + sign of everything below it
    f[0] = p[FIELD-1:0];
    for (int k = 1; k < 4; k++)
      f[k] = p[k*FIELD +: FIELD] + FIELD'({10'd0, p[k*FIELD-1]});
  end
endmodule
