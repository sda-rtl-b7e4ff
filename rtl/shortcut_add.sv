// shortcut_add: residual (shortcut) addition y = saturate16(x + r).
//
// P lanes of Q8.8, one register stage, a beat every cycle. x comes from the
// shared tile buffer and r from the residual stream; the caller presents a
// beat only when both are there. The document names the operator; the
// saturation is this design's choice. Latency: one cycle.
module shortcut_add
  import sda_pkg::*;
#(
  parameter int P = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [D_W-1:0]  x [P],
  input  logic signed [D_W-1:0]  r [P],
  input  logic        [P-1:0]    in_mask,
  output logic                   out_valid,
  output logic signed [D_W-1:0]  y [P],
  output logic        [P-1:0]    out_mask
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_mask <= '0;
      for (int k = 0; k < P; k++) y[k] <= '0;
    end else begin
      out_valid <= in_valid; out_mask <= in_mask;
      for (int k = 0; k < P; k++) begin
        logic signed [D_W:0] s;
        s = (D_W+1)'(x[k]) + (D_W+1)'(r[k]);
        if (s > 32767) y[k] <= 16'sd32767;
        else if (s < -32768) y[k] <= -16'sd32768;
        else y[k] <= D_W'(s);
      end
    end
  end
endmodule
