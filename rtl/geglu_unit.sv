// geglu_unit: GeGLU(x)_i = x_i * GeLU(x_{L+i}) over a row of 2L values.
//
// The first L values of a row (half_len beats' worth) are written to a row
// buffer. While the second L values stream in, each is passed through the
// hard GeLU approximation x * ReLU6(1.702 x + 3) / 6, and multiplied by the
// buffered value of the same position. P lanes per cycle, a beat every cycle,
// two cycles of latency for the second half. 1.702 is 436/256 and 1/6 is
// 43691/2^18; data are Q8.8. The formulas and the row-buffer dataflow follow
// the document, which reuses the SoftMax row buffer for this; here the unit
// has its own buffer. half_len must be a multiple of P.
module geglu_unit
  import sda_pkg::*;
#(
  parameter int P    = 5,
  parameter int MAXL = 5120
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [LEN_W-1:0]       half_len,     // L, in elements
  input  logic                   in_valid,
  input  logic signed [D_W-1:0]  in_data [P],
  input  logic        [P-1:0]    in_mask,
  output logic                   out_valid,
  output logic signed [D_W-1:0]  out_data [P],
  output logic        [P-1:0]    out_mask,
  output logic                   idle
);
  localparam int WD = (MAXL + P - 1) / P;
  localparam int IW = $clog2(WD);

  logic [LEN_W-1:0]   bidx;        // beat index within the row
  logic [LEN_W-1:0]   hbeats;
  logic               second;
  logic signed [D_W-1:0] rb [WD][P];
  logic signed [D_W-1:0] x1 [P];
  logic signed [31:0] g1 [P];      // GeLU of the second-half value, Q8.8
  logic               v1;
  logic [P-1:0]       m1;

  assign hbeats = half_len / LEN_W'(P);
  assign second = bidx >= hbeats;

  function automatic logic signed [31:0] gelu(input logic signed [D_W-1:0] x);
    logic signed [31:0] t;
    logic signed [63:0] p;
    t = ((32'(x) * 32'sd436) >>> FRAC) + (32'sd3 <<< FRAC);
    if (t < 0) t = 0;
    else if (t > (32'sd6 <<< FRAC)) t = 32'sd6 <<< FRAC;
    p = (64'(x) * 64'(t) * 64'sd43691) >>> (FRAC + 18);
    return 32'(p);
  endfunction

  always_ff @(posedge clk) begin
    if (in_valid && !second) rb[IW'(bidx)] <= in_data;
    x1 <= rb[IW'(bidx - hbeats)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bidx <= '0; v1 <= 1'b0; m1 <= '0; out_valid <= 1'b0; out_mask <= '0;
      for (int k = 0; k < P; k++) begin g1[k] <= '0; out_data[k] <= '0; end
    end else begin
      v1 <= in_valid && second;
      m1 <= in_mask;
      for (int k = 0; k < P; k++) g1[k] <= gelu(in_data[k]);
      if (in_valid) bidx <= (bidx == 2 * hbeats - 1) ? '0 : bidx + 1'b1;
      out_valid <= v1; out_mask <= m1;
      for (int k = 0; k < P; k++) begin
        logic signed [47:0] y;
        y = (48'(x1[k]) * 48'(g1[k])) >>> FRAC;
        if (y > 32767) out_data[k] <= 16'sd32767;
        else if (y < -32768) out_data[k] <= -16'sd32768;
        else out_data[k] <= D_W'(y);
      end
    end
  end

  assign idle = (bidx == '0) && !v1 && !out_valid;
endmodule
