// buffer_controller: read-address generator of the shared tile buffer for the
// special function unit.
//
// A job walks   for unit u, for pass p < npass, for segment s, for beat b
// and issues one P-lane read per beat:
//   normal    : addr = u*unit_stride + s*seg_stride + b*P,  b < ceil(seg_len/P),
//               lane l valid if b*P + l < seg_len
//   transpose : addr = u*unit_stride + s*P + b*seg_stride,  b < P (P rows of
//               a P x P block), lane l valid if s*P + l < seg_len
// A unit is a row (SoftMax, LNorm, GeGLU, ...) or a channel group (GNorm);
// npass = 2 replays the unit for the statistics and output passes of the
// norm unit. Each beat carries its pass, segment/unit end flags, the unit
// number and per-lane norm parameter indices u*gb_unit + ((b*P+l) >> gb_shift).
// The document only names the buffer controller; these patterns are this
// design's. A read issues in every cycle with issue_ok high; done pulses after
// the last one.
module buffer_controller
  import sda_pkg::*;
#(
  parameter int P = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  sda_instr_t             cfg,
  input  logic                   two_pass,
  input  logic                   transpose,
  input  logic                   issue_ok,
  output logic                   rd_valid,
  output logic [TB_AW-1:0]       rd_addr,
  output logic [P-1:0]           rd_mask,
  output sfu_tag_t               rd_tag,
  output logic [LEN_W-1:0]       rd_gb_idx [P],
  output logic                   busy,
  output logic                   done
);
  sda_instr_t       c;
  logic             tp, np2;
  logic [LEN_W-1:0] u, s, b;
  logic             p;
  logic [TB_AW-1:0] ubase, sbase, boff;
  logic [LEN_W-1:0] gbase;
  logic [LEN_W-1:0] nbeats;
  logic             last_b, last_s, last_p, last_u;

  assign nbeats = tp ? LEN_W'(P) : (c.seg_len + LEN_W'(P - 1)) / LEN_W'(P);
  assign last_b = (b == nbeats - 1'b1);
  assign last_s = (s == c.seg_per_unit - 1'b1);
  assign last_p = (p == np2);
  assign last_u = (u == c.n_units - 1'b1);

  assign rd_valid = busy && issue_ok;
  assign rd_addr  = ubase + sbase + boff;

  always_comb begin
    for (int l = 0; l < P; l++) begin
      if (tp) rd_mask[l] = (32'(s) * P + l) < 32'(c.seg_len);
      else    rd_mask[l] = (32'(b) * P + l) < 32'(c.seg_len);
      rd_gb_idx[l] = gbase + LEN_W'((32'(b) * P + l) >> c.gb_shift);
    end
    rd_tag.pass      = p;
    rd_tag.seg_last  = last_b;
    rd_tag.unit_last = last_b && last_s;
    rd_tag.unit      = u;
    rd_tag.gb_idx    = gbase;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; tp <= 1'b0; np2 <= 1'b0; u <= '0; s <= '0; b <= '0; p <= 1'b0;
      ubase <= '0; sbase <= '0; boff <= '0; gbase <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        c <= cfg; tp <= transpose; np2 <= two_pass;
        u <= '0; s <= '0; b <= '0; p <= 1'b0;
        ubase <= '0; sbase <= '0; boff <= '0; gbase <= '0;
        busy <= 1'b1;
      end else if (rd_valid) begin
        if (!last_b) begin
          b <= b + 1'b1;
          boff <= boff + (tp ? TB_AW'(c.seg_stride) : TB_AW'(P));
        end else begin
          b <= '0; boff <= '0;
          if (!last_s) begin
            s <= s + 1'b1;
            sbase <= sbase + (tp ? TB_AW'(P) : TB_AW'(c.seg_stride));
          end else begin
            s <= '0; sbase <= '0;
            if (!last_p) p <= 1'b1;
            else begin
              p <= 1'b0;
              if (!last_u) begin
                u <= u + 1'b1;
                ubase <= ubase + TB_AW'(c.unit_stride);
                gbase <= gbase + c.gb_unit;
              end else begin
                busy <= 1'b0; done <= 1'b1;
              end
            end
          end
        end
      end
    end
  end
endmodule
