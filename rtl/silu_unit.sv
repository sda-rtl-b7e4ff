// silu_unit: SiLU by the hard approximation x * ReLU6(x + 3) / 6.
//
// P lanes of Q8.8 fixed point, two pipeline stages (clamp and first multiply,
// then the multiply by 1/6 = 43691 / 2^18 and saturation). It takes a beat
// every cycle; valid and lane mask travel with the data. The formula and the
// parallelism P = 5 come from the document; the fixed-point details are this
// design's choices. Latency: two cycles.
module silu_unit
  import sda_pkg::*;
#(
  parameter int P = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [D_W-1:0]  in_data [P],
  input  logic        [P-1:0]    in_mask,
  output logic                   out_valid,
  output logic signed [D_W-1:0]  out_data [P],
  output logic        [P-1:0]    out_mask
);
  localparam int THREE = 3 << FRAC;
  localparam int SIX   = 6 << FRAC;
  logic                v1;
  logic [P-1:0]        m1;
  logic signed [31:0]  prod1 [P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; m1 <= '0; out_valid <= 1'b0; out_mask <= '0;
      for (int k = 0; k < P; k++) begin prod1[k] <= '0; out_data[k] <= '0; end
    end else begin
      v1 <= in_valid; m1 <= in_mask;
      for (int k = 0; k < P; k++) begin
        logic signed [31:0] r;
        r = 32'(in_data[k]) + THREE;
        if (r < 0) r = '0;
        else if (r > SIX) r = SIX;
        prod1[k] <= 32'(in_data[k]) * 32'(r);
      end
      out_valid <= v1; out_mask <= m1;
      for (int k = 0; k < P; k++) begin
        logic signed [55:0] t;
        t = (56'(prod1[k]) * 56'sd43691) >>> (FRAC + 18);
        if (t > 32767) out_data[k] <= 16'sd32767;
        else if (t < -32768) out_data[k] <= -16'sd32768;
        else out_data[k] <= D_W'(t);
      end
    end
  end
endmodule
