// dequant_unit: converts hybridSA sums to the 16-bit fixed point of the SFU.
//
// y = saturate16((acc * scale + 2^(shift-1)) >>> shift). In pair mode (all
// 8-bit matrix products such as Q x K^T) the array delivers, per output
// column, one sum computed with the low weight nibble and one with the high
// weight nibble in neighbouring lanes; they are first joined as
// (hi << 4) + lo (the stage-1 ADD of the SoftMax path) and the N/2 results go
// to lanes 0..N/2-1. The document names the units and the ADD; the scale and
// shift format is this design's choice. Purely combinational.
module dequant_unit
  import sda_pkg::*;
#(
  parameter int N = 20
) (
  input  logic                     pair,
  input  logic signed [ACC_W-1:0]  acc [N],
  input  logic signed [15:0]       scale,
  input  logic        [4:0]        shift,
  output logic signed [D_W-1:0]    y [N]
);
  logic signed [ACC_W+4:0] v [N];
  logic signed [ACC_W+20:0] p;
  logic signed [ACC_W+20:0] rnd;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      if (!pair) v[k] = (ACC_W+5)'(acc[k]);
      else if (2*k+1 < N) v[k] = ((ACC_W+5)'(acc[2*k+1]) <<< 4) + (ACC_W+5)'(acc[2*k]);
      else v[k] = '0;
    end
    rnd = (shift == 0) ? '0 : ((ACC_W+21)'(1) <<< (shift - 5'd1));
    for (int k = 0; k < N; k++) begin
      p = ((ACC_W+21)'(v[k]) * (ACC_W+21)'(scale) + rnd) >>> shift;
      if (p > 32767) y[k] = 16'sd32767;
      else if (p < -32768) y[k] = -16'sd32768;
      else y[k] = D_W'(p);
    end
  end
endmodule
