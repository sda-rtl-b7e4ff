// norm_unit: shared LayerNorm / GroupNorm, gamma * (x - mu) / sigma + beta.
//
// The buffer controller streams each normalisation unit (a row for LNorm, a
// group of channels over all pixels for GNorm) twice.
//   stage 1 (pass 0): P lanes per cycle accumulate sum and sum of squares of
//     the current segment.
//   stage 2: at each segment end the segment totals become the unit totals;
//     in GNorm mode they are added to the totals of earlier segments (the
//     extra accumulator the document adds for GNorm). At the unit end a small
//     sequencer forms mu = sum/N, E[x^2] = sumsq/N, var = E[x^2] - mu^2 + eps
//     (eps = one LSB), sigma = isqrt(var * 2^8) and 1/sigma = 2^28/sigma,
//     using one sequential divider and one square-root unit (about 170
//     cycles).
//   stage 3 (pass 1): each beat is normalised and scaled by per-lane
//     gamma/beta read from a parameter table, two cycles of latency.
// in_ready is low while the statistics are being formed. Data are Q8.8;
// mu is Q8.16, var Q16.16, sigma has 12 fraction bits and 1/sigma is Q16;
// the extra fraction bits keep rows with a small spread accurate. The three-pass structure, the shared LNorm/GNorm
// logic and the GNorm extra accumulation follow the document; it computes the
// statistics from running sums rather than a per-sample update. The table
// holds NPARAM entries, replicated per lane so all lanes read in one cycle.
module norm_unit
  import sda_pkg::*;
#(
  parameter int P      = 5,
  parameter int NPARAM = 1280
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   gnorm,        // accumulate across segments
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [D_W-1:0]  in_data [P],
  input  logic        [P-1:0]    in_mask,
  input  logic                   in_pass,
  input  logic                   in_seg_last,
  input  logic                   in_unit_last,
  input  logic        [LEN_W-1:0] in_gb_idx [P],
  input  logic                   gb_we,
  input  logic        [LEN_W-1:0] gb_addr,
  input  logic signed [D_W-1:0]  gb_gamma,
  input  logic signed [D_W-1:0]  gb_beta,
  output logic                   out_valid,
  output logic signed [D_W-1:0]  out_data [P],
  output logic        [P-1:0]    out_mask,
  output logic                   idle
);
  localparam int GW = $clog2(NPARAM);

  typedef enum logic [2:0] {S_IDLE, S_MEAN, S_MSQ, S_SQRT, S_INV, S_READY} nstate_e;
  nstate_e st;

  // ---------------- stage 1 / 2: accumulation ----------------
  logic signed [39:0] seg_sum, grp_sum, fin_sum;
  logic        [55:0] seg_sq,  grp_sq,  fin_sq;
  logic        [23:0] seg_cnt, grp_cnt, fin_cnt;
  logic signed [39:0] b_sum;
  logic        [55:0] b_sq;
  logic        [23:0] b_cnt;
  logic               acc_beat, out_beat;

  assign in_ready = (st == S_IDLE) || (st == S_READY);
  assign acc_beat = in_valid && in_ready && !in_pass;
  assign out_beat = in_valid && in_ready && in_pass;

  always_comb begin
    b_sum = '0; b_sq = '0; b_cnt = '0;
    for (int k = 0; k < P; k++)
      if (in_mask[k]) begin
        b_sum = b_sum + 40'(in_data[k]);
        b_sq  = b_sq + 56'(32'(in_data[k]) * 32'(in_data[k]));
        b_cnt = b_cnt + 1'b1;
      end
  end

  // ---------------- statistics sequencer ----------------
  logic               div_start, div_done, div_busy;
  logic        [47:0] div_num, div_q;
  logic        [23:0] div_den;
  logic               sq_start, sq_done, sq_busy;
  logic        [39:0] sq_x;
  logic        [19:0] sq_r;     // sigma, 12 fraction bits
  logic signed [D_W+8:0] mean;    // Q8.16
  logic        [31:0]   msq;      // Q16.16
  logic        [24:0]   inv;      // Q16
  logic                 neg_sum;
  logic signed [47:0]   var_s;

  seq_div #(.NW(48), .DW(24)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quo(div_q)
  );
  seq_isqrt #(.W(40)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .x(sq_x), .busy(sq_busy), .done(sq_done), .r(sq_r)
  );

  always_comb begin
    var_s = 48'(msq) - ((48'(mean) * 48'(mean)) >>> 16) + 48'sd1;
    if (var_s < 1) var_s = 48'sd1;
    if (var_s > 48'sh0_FFFF_FFFF) var_s = 48'sh0_FFFF_FFFF;
    sq_x = {var_s[31:0], 8'd0};   // sqrt(var * 2^8): sigma with 12 fraction bits
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      seg_sum <= '0; seg_sq <= '0; seg_cnt <= '0;
      grp_sum <= '0; grp_sq <= '0; grp_cnt <= '0;
      fin_sum <= '0; fin_sq <= '0; fin_cnt <= '0;
      div_start <= 1'b0; div_num <= '0; div_den <= '0; sq_start <= 1'b0;
      mean <= '0; msq <= '0; inv <= '0; neg_sum <= 1'b0;
    end else begin
      div_start <= 1'b0; sq_start <= 1'b0;
      if (acc_beat) begin
        if (in_seg_last) begin
          seg_sum <= '0; seg_sq <= '0; seg_cnt <= '0;
          if (in_unit_last) begin
            fin_sum <= (gnorm ? grp_sum : '0) + seg_sum + b_sum;
            fin_sq  <= (gnorm ? grp_sq  : '0) + seg_sq  + b_sq;
            fin_cnt <= (gnorm ? grp_cnt : '0) + seg_cnt + b_cnt;
            grp_sum <= '0; grp_sq <= '0; grp_cnt <= '0;
          end else if (gnorm) begin
            grp_sum <= grp_sum + seg_sum + b_sum;
            grp_sq  <= grp_sq  + seg_sq  + b_sq;
            grp_cnt <= grp_cnt + seg_cnt + b_cnt;
          end
        end else begin
          seg_sum <= seg_sum + b_sum;
          seg_sq  <= seg_sq  + b_sq;
          seg_cnt <= seg_cnt + b_cnt;
        end
      end
      case (st)
        S_IDLE: if (acc_beat && in_unit_last) st <= S_MEAN;
        S_MEAN: begin
          if (!div_busy && !div_start && !div_done) begin
            div_start <= 1'b1;
            neg_sum   <= fin_sum < 0;
            div_num   <= 48'(fin_sum < 0 ? -fin_sum : fin_sum) << 8;
            div_den   <= (fin_cnt == '0) ? 24'd1 : fin_cnt;
          end
          if (div_done) begin
            mean <= neg_sum ? -(D_W+9)'(div_q) : (D_W+9)'(div_q);
            div_start <= 1'b1;
            div_num   <= 48'(fin_sq);
            st <= S_MSQ;
          end
        end
        S_MSQ: if (div_done) begin msq <= div_q[31:0]; st <= S_SQRT; sq_start <= 1'b1; end
        S_SQRT: if (sq_done) begin
          div_start <= 1'b1;
          div_num   <= 48'h1000_0000;      // 2^28 / (sigma * 2^12) = 2^16 / sigma
          div_den   <= 24'(sq_r);
          st <= S_INV;
        end
        S_INV: if (div_done) begin inv <= div_q[24:0]; st <= S_READY; end
        S_READY: if (out_beat && in_unit_last) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---------------- stage 3: normalise and apply gamma/beta ----------------
  logic               v1;
  logic [P-1:0]       m1;
  logic signed [31:0] yn1 [P];
  logic signed [D_W-1:0] g1 [P], b1 [P];

  for (genvar k = 0; k < P; k++) begin : g_lane
    logic signed [D_W-1:0] gam [NPARAM];
    logic signed [D_W-1:0] bet [NPARAM];
    always_ff @(posedge clk) begin
      if (gb_we) begin
        gam[GW'(gb_addr) % NPARAM] <= gb_gamma;
        bet[GW'(gb_addr) % NPARAM] <= gb_beta;
      end
      g1[k] <= gam[GW'(in_gb_idx[k]) % NPARAM];
      b1[k] <= bet[GW'(in_gb_idx[k]) % NPARAM];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; m1 <= '0; out_valid <= 1'b0; out_mask <= '0;
      for (int k = 0; k < P; k++) begin yn1[k] <= '0; out_data[k] <= '0; end
    end else begin
      v1 <= out_beat; m1 <= in_mask;
      for (int k = 0; k < P; k++) begin
        logic signed [55:0] t;
        t = (56'(((D_W+9)'(in_data[k]) <<< 8) - mean) * 56'(signed'({1'b0, inv}))) >>> 24;
        if (t > 56'sh7FFF_FFFF) yn1[k] <= 32'sh7FFF_FFFF;
        else if (t < -56'sh8000_0000) yn1[k] <= 32'sh8000_0000;
        else yn1[k] <= 32'(t);
      end
      out_valid <= v1; out_mask <= m1;
      for (int k = 0; k < P; k++) begin
        logic signed [55:0] y;
        y = ((56'(yn1[k]) * 56'(g1[k])) >>> FRAC) + 56'(b1[k]);
        if (y > 32767) out_data[k] <= 16'sd32767;
        else if (y < -32768) out_data[k] <= -16'sd32768;
        else out_data[k] <= D_W'(y);
      end
    end
  end

  assign idle = (st == S_IDLE) && !v1 && !out_valid;
endmodule
