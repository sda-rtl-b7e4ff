// hybrid_sa: X x Y hybrid systolic array (hybridSA).
//
// Rows are fed activations from the left, columns weights from the top. The
// array skews its inputs itself: row i is delayed by i cycles and column j by
// j cycles, so the caller presents each beat unskewed.
//   MM-OS  : a beat carries A[2i][k], A[2i+1][k] for every PE row i (slots 0
//            and 2 of a_in[i]) and W[k][2j], W[k][2j+1] for every PE column j.
//            in_first/in_last mark the first and last k of a tile. The whole
//            2X x 2Y output tile is in the drain registers X+Y-1 cycles after
//            the last beat is presented; each drain_shift then moves it one PE
//            row down, so dr_out shows PE row X-1 first and PE row 0 after
//            X-1 shifts. dr_out[j][2*r+c] is C[2i+r][2j+c].
//   CONV-WS: weights are loaded through the column chain: X beats on w_in,
//            each with wload_shift set and the last one also with
//            wload_latch; beat b ends up in PE row X-1-b. Gaps between load
//            beats are allowed. A streaming beat gives every PE row three pixels;
//            each column sums the two-tap results of all its rows.
//            cv_valid/cv_out appear X+Y-1 cycles after the beat, de-skewed so
//            that all columns line up: cv_out[j] = two outputs of column j.
// Both dataflows share the activation supply, as in the document; the skew and
// de-skew registers and the load protocol are this design's choices.
module hybrid_sa
  import sda_pkg::*;
#(
  parameter int X = 20,
  parameter int Y = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  sa_mode_e                 mode,
  input  logic [1:0]               w_signed,  // per weight column of a PE
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic                     in_last,
  input  logic signed [A_W-1:0]    a_in [X][3],
  input  logic        [W_W-1:0]    w_in [Y][2],
  input  logic                     wload_shift,
  input  logic                     wload_latch,
  input  logic                     drain_shift,
  output logic signed [ACC_W-1:0]  dr_out [Y][4],
  output logic                     cv_valid,
  output logic signed [ACC_W-1:0]  cv_out [Y][2]
);
  // horizontal nets: a_h[i][j] enters PE(i,j)
  logic signed [A_W-1:0]   a_h  [X][Y+1][3];
  logic                    v_h  [X][Y+1];
  logic                    f_h  [X][Y+1];
  logic                    l_h  [X][Y+1];
  // vertical nets: w_v[i][j] enters PE(i,j)
  logic        [W_W-1:0]   w_v  [X+1][Y][2];
  logic signed [ACC_W-1:0] ps_v [X+1][Y][2];
  logic signed [ACC_W-1:0] dr_v [X+1][Y][4];
  logic                    wl_col [Y];
  logic                    ws_col [Y];

  // ---------------- input skew ----------------
  for (genvar i = 0; i < X; i++) begin : g_rskew
    if (i == 0) begin : g_none
      assign a_h[0][0] = a_in[0];
      assign v_h[0][0] = in_valid;
      assign f_h[0][0] = in_first;
      assign l_h[0][0] = in_last;
    end else begin : g_dly
      logic signed [A_W-1:0] sa [i][3];
      logic                  sv [i], sf [i], sl [i];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int d = 0; d < i; d++) begin
            sv[d] <= 1'b0; sf[d] <= 1'b0; sl[d] <= 1'b0;
            for (int k = 0; k < 3; k++) sa[d][k] <= '0;
          end
        end else begin
          sa[0] <= a_in[i]; sv[0] <= in_valid; sf[0] <= in_first; sl[0] <= in_last;
          for (int d = 1; d < i; d++) begin
            sa[d] <= sa[d-1]; sv[d] <= sv[d-1]; sf[d] <= sf[d-1]; sl[d] <= sl[d-1];
          end
        end
      end
      assign a_h[i][0] = sa[i-1];
      assign v_h[i][0] = sv[i-1];
      assign f_h[i][0] = sf[i-1];
      assign l_h[i][0] = sl[i-1];
    end
  end

  for (genvar j = 0; j < Y; j++) begin : g_cskew
    assign ps_v[0][j][0] = '0;
    assign ps_v[0][j][1] = '0;
    for (genvar k = 0; k < 4; k++) begin : g_dr0
      assign dr_v[0][j][k] = '0;
    end
    if (j == 0) begin : g_none
      assign w_v[0][0] = w_in[0];
      assign wl_col[0] = wload_latch;
      assign ws_col[0] = wload_shift;
    end else begin : g_dly
      logic [W_W-1:0] sw [j][2];
      logic           sl [j], ss [j];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int d = 0; d < j; d++) begin sw[d][0] <= '0; sw[d][1] <= '0; sl[d] <= 1'b0; ss[d] <= 1'b0; end
        end else begin
          sw[0] <= w_in[j]; sl[0] <= wload_latch; ss[0] <= wload_shift;
          for (int d = 1; d < j; d++) begin sw[d] <= sw[d-1]; sl[d] <= sl[d-1]; ss[d] <= ss[d-1]; end
        end
      end
      assign w_v[0][j] = sw[j-1];
      assign wl_col[j] = sl[j-1];
      assign ws_col[j] = ss[j-1];
    end
  end

  // ---------------- PE grid ----------------
  for (genvar i = 0; i < X; i++) begin : g_row
    for (genvar j = 0; j < Y; j++) begin : g_col
      hybrid_pe u_pe (
        .clk, .rst_n, .mode, .w_signed,
        .v_in(v_h[i][j]), .first_in(f_h[i][j]), .last_in(l_h[i][j]), .a_in(a_h[i][j]),
        .v_out(v_h[i][j+1]), .first_out(f_h[i][j+1]), .last_out(l_h[i][j+1]), .a_out(a_h[i][j+1]),
        .w_in(w_v[i][j]), .w_out(w_v[i+1][j]), .wshift(ws_col[j]), .wlatch(wl_col[j]),
        .ps_in(ps_v[i][j]), .ps_out(ps_v[i+1][j]),
        .drain_shift, .dr_in(dr_v[i][j]), .dr_out(dr_v[i+1][j])
      );
    end
  end

  assign dr_out = dr_v[X];

  // ---------------- CONV output de-skew ----------------
  // Column j's result leaves PE(X-1,j) together with that PE's beat valid;
  // column j is delayed by Y-1-j more cycles so that all columns align.
  for (genvar j = 0; j < Y; j++) begin : g_dskew
    localparam int D = Y - 1 - j;
    if (D == 0) begin : g_none
      assign cv_out[j] = ps_v[X][j];
      if (j == Y - 1) begin : g_v
        assign cv_valid = v_h[X-1][Y];
      end
    end else begin : g_dly
      logic signed [ACC_W-1:0] sp [D][2];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int d = 0; d < D; d++) begin sp[d][0] <= '0; sp[d][1] <= '0; end
        end else begin
          sp[0] <= ps_v[X][j];
          for (int d = 1; d < D; d++) sp[d] <= sp[d-1];
        end
      end
      assign cv_out[j] = sp[D-1];
    end
  end
endmodule
