// quant_unit: converts 16-bit fixed-point SFU results to 8-bit activations.
//
// q = saturate8((x * scale + 2^(shift-1)) >>> shift), on N lanes, one
// register stage. The per-instruction scale lets each denoising step use its
// own activation scale, as the quantization scheme requires; the formula is
// this design's choice. Latency: one cycle from x to q.
module quant_unit
  import sda_pkg::*;
#(
  parameter int N = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [D_W-1:0]  x [N],
  input  logic signed [15:0]     scale,
  input  logic        [4:0]      shift,
  output logic signed [A_W-1:0]  q [N]
);
  logic signed [A_W-1:0] qc [N];
  logic signed [39:0]    p;
  logic signed [39:0]    rnd;

  always_comb begin
    rnd = (shift == 0) ? '0 : (40'sd1 <<< (shift - 5'd1));
    for (int k = 0; k < N; k++) begin
      p = (40'(x[k]) * 40'(scale) + rnd) >>> shift;
      if (p > 127) qc[k] = 8'sd127;
      else if (p < -128) qc[k] = -8'sd128;
      else qc[k] = A_W'(p);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int k = 0; k < N; k++) q[k] <= '0;
    else q <= qc;
endmodule
