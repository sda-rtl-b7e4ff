// softmax_unit: row SoftMax, exp(x - max) / sum(exp(x - max)).
//
// The row maximum is found while hybridSA writes the tile (stage 1, outside
// this unit) and arrives on in_max with every beat of the row. Inside:
//   stage 2-1 (SUB-EXP-ACC): subtract the maximum, exponentiate P lanes per
//     cycle, accumulate the row sum and store the exponentials in one of two
//     row buffers;
//   stage 2-2 (DIV): once a row buffer is complete, form 2^40 / sum with a
//     sequential divider and stream the buffer out multiplied by it.
// The two row buffers let stage 2-2 of row r overlap stage 2-1 of row r+1
// (the row-level pipeline). exp(d) is evaluated as 2^(d*log2 e): the integer
// part becomes a shift and 2^f for the fraction f uses
// 1 + f*(0.6565 + 0.3435 f) (error below 0.3 %). Exponentials are Q1.15,
// outputs Q8.8. The stage structure and the double row buffers follow the
// document; the exp approximation and the reciprocal are this design's.
// Interface: in_ready drops when both row buffers hold unfinished rows.
// in_last marks the last beat of a row; rows of 1..MAXLEN elements.
// Timing: a row of n beats leaves about n + 45 cycles after its last beat
// when stage 2-2 is free.
module softmax_unit
  import sda_pkg::*;
#(
  parameter int P      = 5,
  parameter int MAXLEN = 4096
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [D_W-1:0]  in_data [P],
  input  logic        [P-1:0]    in_mask,
  input  logic                   in_last,
  input  logic signed [D_W-1:0]  in_max,
  output logic                   out_valid,
  output logic signed [D_W-1:0]  out_data [P],
  output logic        [P-1:0]    out_mask,
  output logic                   idle
);
  localparam int WD = (MAXLEN + P - 1) / P;   // words per row buffer
  localparam int IW = $clog2(WD + 1);
  localparam int MW = P * 16 + P;             // {mask, P x Q1.15}

  function automatic logic [15:0] exp_q15(input logic signed [D_W:0] d);
    logic signed [31:0] t;
    logic signed [31:0] n;
    logic [7:0]         f;
    logic [16:0]        pf;
    t  = (32'(d) * 32'sd23637) >>> 14;        // d * log2(e), Q8.8, <= 0
    n  = -(t >>> 8);                          // shift count >= 0
    f  = t[7:0];
    pf = 17'd256 + 17'((32'(f) * (32'd168 + ((32'd88 * 32'(f)) >> 8))) >> 8);
    if (n >= 16) return 16'd0;
    return 16'((32'(pf) << 7) >> n);
  endfunction

  // ---------------- stage 2-1: SUB-EXP-ACC ----------------
  logic          wb;                 // row buffer being filled
  logic [1:0]    full;
  logic [31:0]   sum_row [2];
  logic [IW-1:0] len_row [2];
  logic [IW-1:0] widx;
  logic [31:0]   sum;
  logic          v1, last1;
  logic [P-1:0]  m1;
  logic [15:0]   e1 [P];
  logic          accept;

  logic [MW-1:0] rbuf [2 * WD];

  assign in_ready = (v1 && last1) ? !full[!wb] : !full[wb];
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; last1 <= 1'b0; m1 <= '0;
      for (int k = 0; k < P; k++) e1[k] <= '0;
    end else begin
      v1 <= accept; last1 <= in_last; m1 <= in_mask;
      for (int k = 0; k < P; k++)
        e1[k] <= exp_q15((D_W+1)'(in_data[k]) - (D_W+1)'(in_max));
    end
  end

  logic [31:0] beat_sum;
  logic [MW-1:0] wword;
  always_comb begin
    beat_sum = '0;
    for (int k = 0; k < P; k++) begin
      if (m1[k]) beat_sum = beat_sum + 32'(e1[k]);
      wword[k*16 +: 16] = m1[k] ? e1[k] : 16'd0;
    end
    wword[P*16 +: P] = m1;
  end

  // ---------------- stage 2-2: DIV ----------------
  typedef enum logic [1:0] {D_IDLE, D_DIV, D_OUT} dstate_e;
  dstate_e       ds;
  logic          rb;                 // row buffer being emptied
  logic [IW-1:0] ridx;
  logic          div_start, div_done;
  logic          div_busy;
  logic [40:0]   div_q;
  logic [31:0]   recip;
  logic          rv;
  logic [MW-1:0] rword;
  logic [1:0]    clr_full;

  seq_div #(.NW(41), .DW(32)) u_div (
    .clk, .rst_n, .start(div_start), .num(41'h100_0000_0000), .den(sum_row[rb]),
    .busy(div_busy), .done(div_done), .quo(div_q)
  );

  assign div_start = (ds == D_IDLE) && full[rb];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb <= 1'b0; widx <= '0; sum <= '0; full <= '0;
      sum_row[0] <= '0; sum_row[1] <= '0; len_row[0] <= '0; len_row[1] <= '0;
    end else begin
      full <= full & ~clr_full;
      if (v1) begin
        if (last1) begin
          sum_row[wb] <= sum + beat_sum;
          len_row[wb] <= widx + 1'b1;
          full[wb]    <= 1'b1;
          wb   <= !wb;
          widx <= '0;
          sum  <= '0;
        end else begin
          widx <= widx + 1'b1;
          sum  <= sum + beat_sum;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (v1) rbuf[(wb ? WD : 0) + 32'(widx)] <= wword;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds <= D_IDLE; rb <= 1'b0; ridx <= '0; recip <= '0; rv <= 1'b0; clr_full <= '0;
      rword <= '0;
    end else begin
      rv <= 1'b0; clr_full <= '0;
      case (ds)
        D_IDLE: if (full[rb]) ds <= D_DIV;
        D_DIV: if (div_done) begin recip <= div_q[31:0]; ridx <= '0; ds <= D_OUT; end
        D_OUT: begin
          rword <= rbuf[(rb ? WD : 0) + 32'(ridx)];
          rv    <= 1'b1;
          if (ridx == len_row[rb] - 1'b1) begin
            clr_full[rb] <= 1'b1;
            rb <= !rb;
            ds <= D_IDLE;
          end else ridx <= ridx + 1'b1;
        end
        default: ds <= D_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_mask <= '0;
      for (int k = 0; k < P; k++) out_data[k] <= '0;
    end else begin
      out_valid <= rv;
      out_mask  <= rword[P*16 +: P];
      for (int k = 0; k < P; k++)
        out_data[k] <= D_W'((48'(rword[k*16 +: 16]) * 48'(recip)) >> 32);
    end
  end

  assign idle = (full == '0) && !v1 && (ds == D_IDLE) && !rv && !out_valid && clr_full == '0;
endmodule
