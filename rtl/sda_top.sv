// sda_top: stable diffusion core - hybrid systolic array, shared tile buffer
// and special function unit, driven by scheduling instructions.
//
// Dataflow of one instruction:
//   1. The datapath scheduler runs hybridSA in MM-OS or CONV-WS mode on the
//      operand stream (a_in: activations per PE row, w_in: weights per PE
//      column). Array outputs pass the dequantization unit (with the stage-1
//      ADD that joins low- and high-nibble results of 8x8 products) and are
//      written to one half of the tile buffer; for MM-OS rows the running
//      row maximum needed by SoftMax is kept alongside (stage 1).
//   2. When the half is complete, the buffer controller streams it, P lanes
//      per cycle, into the nonlinear unit selected by the instruction:
//      SoftMax, LNorm, GNorm, GNorm followed by SiLU, SiLU, GeGLU, shortcut
//      add (with res_data), transpose, or a plain copy.
//   3. Results leave as 16-bit fixed point (out_fx) and, one register later
//      together with it, quantized to 8 bits (out_q).
// While the SFU works on one half, hybridSA fills the other: the two-level
// pipeline of the design. The host CPU, AXI bus and off-chip memory are
// outside: instructions, operands, residuals, norm parameters and results are
// plain ports. Defaults: 20 x 10 array and SFU parallelism 5 as in the
// document; everything else is this design's choice (see the module files).
// MAXLEN = 4096 is the self-attention row of a 64 x 64 latent and MAXROW =
// 10240 the GeGLU input row (2 x 4 x 1280) of SD-v1.5; each tile-buffer half
// holds 2X rows of MAXROW elements.
// Interfaces: instr and in/res are valid/ready; gb_* writes the norm gamma/beta
// table; out_* has no back-pressure.
module sda_top
  import sda_pkg::*;
#(
  parameter int X      = 20,
  parameter int Y      = 10,
  parameter int P      = 5,
  parameter int MAXLEN = 4096,     // longest SoftMax row
  parameter int MAXROW = 10240,    // longest tile-buffer row (GeGLU input 2L)
  parameter int BANK_DEPTH = (2 * X * MAXROW + 31) / 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   instr_valid,
  output logic                   instr_ready,
  input  sda_instr_t             instr,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [A_W-1:0]  a_in [X][3],
  input  logic        [W_W-1:0]  w_in [Y][2],
  input  logic                   res_valid,
  output logic                   res_ready,
  input  logic signed [D_W-1:0]  res_data [P],
  input  logic                   gb_we,
  input  logic [LEN_W-1:0]       gb_addr,
  input  logic signed [D_W-1:0]  gb_gamma,
  input  logic signed [D_W-1:0]  gb_beta,
  output logic                   out_valid,
  output logic signed [D_W-1:0]  out_fx [P],
  output logic signed [A_W-1:0]  out_q [P],
  output logic [P-1:0]           out_mask,
  output logic                   sa_busy,
  output logic                   sfu_busy,
  output logic                   drain_stall
);
  localparam int WL = 2 * Y;
  localparam int FD = 4;          // SFU input FIFO depth

  // ---------------- scheduler ----------------
  sa_mode_e sa_mode;
  logic [1:0] sa_w_signed;
  logic sa_in_valid, sa_in_first, sa_in_last;
  logic sa_wload_shift, sa_wload_latch, sa_drain_shift, sa_cv_valid;
  logic wr_en, wr_conv, wr_h, wr_pair, wr_half, wr_first_ct;
  logic [TB_AW-1:0] wr_addr;
  logic [LEN_W-1:0] wr_row;
  logic [15:0] wr_dq_scale;
  logic [4:0]  wr_dq_shift;
  logic sfu_start, sfu_half, sfu_done;
  sda_instr_t sfu_instr;

  datapath_scheduler #(.X(X), .Y(Y)) u_sched (
    .clk, .rst_n, .instr_valid, .instr_ready, .instr, .in_valid, .in_ready,
    .sa_mode, .sa_w_signed, .sa_in_valid, .sa_in_first, .sa_in_last,
    .sa_wload_shift, .sa_wload_latch, .sa_drain_shift, .sa_cv_valid,
    .wr_en, .wr_conv, .wr_h, .wr_pair, .wr_half, .wr_addr, .wr_row, .wr_first_ct,
    .wr_dq_scale, .wr_dq_shift,
    .sfu_start, .sfu_half, .sfu_instr, .sfu_done, .sa_busy, .sfu_busy, .drain_stall
  );

  // ---------------- hybridSA ----------------
  logic signed [ACC_W-1:0] dr_out [Y][4];
  logic signed [ACC_W-1:0] cv_out [Y][2];

  hybrid_sa #(.X(X), .Y(Y)) u_sa (
    .clk, .rst_n, .mode(sa_mode), .w_signed(sa_w_signed),
    .in_valid(sa_in_valid), .in_first(sa_in_first), .in_last(sa_in_last),
    .a_in, .w_in, .wload_shift(sa_wload_shift), .wload_latch(sa_wload_latch),
    .drain_shift(sa_drain_shift), .dr_out, .cv_valid(sa_cv_valid), .cv_out
  );

  // ---------------- dequantization, stage-1 maximum, tile write ----------------
  logic signed [ACC_W-1:0] wacc [WL];
  logic signed [D_W-1:0]   wdq  [WL];
  logic [WL-1:0]           wmask_c;
  logic signed [D_W-1:0]   rmax [2][2*X];
  logic signed [D_W-1:0]   bmax;

  always_comb begin
    for (int j = 0; j < Y; j++)
      for (int c = 0; c < 2; c++)
        wacc[2*j+c] = wr_conv ? cv_out[j][c] : dr_out[j][2*wr_h + c];
    for (int l = 0; l < WL; l++)
      wmask_c[l] = (wr_pair && !wr_conv) ? (l < Y) : 1'b1;
  end

  dequant_unit #(.N(WL)) u_dq (
    .pair(wr_pair && !wr_conv), .acc(wacc), .scale(wr_dq_scale), .shift(wr_dq_shift), .y(wdq)
  );

  always_comb begin
    bmax = -16'sd32768;
    for (int l = 0; l < WL; l++)
      if (wmask_c[l] && wdq[l] > bmax) bmax = wdq[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < 2; h++) for (int r = 0; r < 2*X; r++) rmax[h][r] <= -16'sd32768;
    end else if (wr_en && !wr_conv) begin
      if (wr_first_ct || bmax > rmax[wr_half][32'(wr_row) % (2*X)])
        rmax[wr_half][32'(wr_row) % (2*X)] <= bmax;
    end
  end

  // ---------------- tile buffer ----------------
  logic              rd_valid;
  logic [TB_AW-1:0]  rd_addr;
  logic [P-1:0]      rd_mask;
  sfu_tag_t          rd_tag;
  logic [LEN_W-1:0]  rd_gb_idx [P];
  logic signed [D_W-1:0] rdata [P];

  tile_buffer #(.NBANK(32), .BANK_DEPTH(BANK_DEPTH), .WL(WL), .RL(P)) u_tb (
    .clk, .we(wr_en), .wh(wr_half), .waddr(wr_addr), .wdata(wdq), .wmask(wmask_c),
    .re(rd_valid), .rh(sfu_half), .raddr(rd_addr), .rdata
  );

  // ---------------- buffer controller and SFU input FIFO ----------------
  sfu_op_e          op;
  sda_instr_t       si;
  logic             ctl_busy, ctl_done, ctl_done_seen;
  logic             issue_ok;
  logic             rv_q;
  logic [P-1:0]     rmask_q;
  sfu_tag_t         rtag_q;
  logic [LEN_W-1:0] rgb_q [P];
  logic [$clog2(FD+1)-1:0] fcnt;
  logic [$clog2(FD)-1:0]   fwp, frp;
  logic signed [D_W-1:0] f_data [FD][P];
  logic [P-1:0]          f_mask [FD];
  sfu_tag_t              f_tag  [FD];
  logic [LEN_W-1:0]      f_gb   [FD][P];
  logic                  f_pop, f_nonempty;

  assign issue_ok = (32'(fcnt) + 32'(rv_q)) < FD - 1;

  buffer_controller #(.P(P)) u_bc (
    .clk, .rst_n, .start(sfu_start), .cfg(sfu_instr),
    .two_pass(sfu_instr.sfu_op inside {SFU_LNORM, SFU_GNORM, SFU_GNORM_SILU}),
    .transpose(sfu_instr.sfu_op == SFU_TRANSPOSE),
    .issue_ok, .rd_valid, .rd_addr, .rd_mask, .rd_tag, .rd_gb_idx,
    .busy(ctl_busy), .done(ctl_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rv_q <= 1'b0; rmask_q <= '0; rtag_q <= '0; fcnt <= '0; fwp <= '0; frp <= '0;
      for (int l = 0; l < P; l++) rgb_q[l] <= '0;
      op <= SFU_NONE; si <= '0;
    end else begin
      rv_q <= rd_valid; rmask_q <= rd_mask; rtag_q <= rd_tag; rgb_q <= rd_gb_idx;
      if (sfu_start) begin op <= sfu_instr.sfu_op; si <= sfu_instr; end
      if (rv_q) fwp <= fwp + 1'b1;
      if (f_pop) frp <= frp + 1'b1;
      fcnt <= fcnt + (rv_q ? 1'b1 : 1'b0) - (f_pop ? 1'b1 : 1'b0);
    end
  end

  always_ff @(posedge clk)
    if (rv_q) begin
      f_data[fwp] <= rdata; f_mask[fwp] <= rmask_q; f_tag[fwp] <= rtag_q; f_gb[fwp] <= rgb_q;
    end

  assign f_nonempty = (fcnt != '0);
  logic signed [D_W-1:0] h_data [P];
  logic [P-1:0]          h_mask;
  sfu_tag_t              h_tag;
  assign h_data = f_data[frp];
  assign h_mask = f_mask[frp];
  assign h_tag  = f_tag[frp];

  // ---------------- special function unit ----------------
  logic sm_ready, sm_ov, sm_idle;
  logic signed [D_W-1:0] sm_od [P];
  logic [P-1:0] sm_om;
  logic nm_ready, nm_ov, nm_idle;
  logic signed [D_W-1:0] nm_od [P];
  logic [P-1:0] nm_om;
  logic si_v, si_ov;
  logic signed [D_W-1:0] si_d [P], si_od [P];
  logic [P-1:0] si_m, si_om;
  logic gg_ov, gg_idle;
  logic signed [D_W-1:0] gg_od [P];
  logic [P-1:0] gg_om;
  logic ad_ov;
  logic signed [D_W-1:0] ad_od [P];
  logic [P-1:0] ad_om;
  logic tr_ready, tr_ov, tr_idle;
  logic signed [D_W-1:0] tr_od [P];
  logic [P-1:0] tr_om;
  logic cp_ov;
  logic signed [D_W-1:0] cp_od [P];
  logic [P-1:0] cp_om;
  logic unit_ready;

  always_comb begin
    case (op)
      SFU_SOFTMAX:   unit_ready = sm_ready;
      SFU_LNORM, SFU_GNORM, SFU_GNORM_SILU: unit_ready = nm_ready;
      SFU_ADD:       unit_ready = res_valid;
      SFU_TRANSPOSE: unit_ready = tr_ready;
      default:       unit_ready = 1'b1;
    endcase
  end
  assign f_pop     = f_nonempty && unit_ready;
  assign res_ready = f_pop && (op == SFU_ADD);

  softmax_unit #(.P(P), .MAXLEN(MAXLEN)) u_softmax (
    .clk, .rst_n, .in_valid(f_pop && op == SFU_SOFTMAX), .in_ready(sm_ready),
    .in_data(h_data), .in_mask(h_mask), .in_last(h_tag.unit_last),
    .in_max(rmax[sfu_half][32'(h_tag.unit) % (2*X)]),
    .out_valid(sm_ov), .out_data(sm_od), .out_mask(sm_om), .idle(sm_idle)
  );

  norm_unit #(.P(P)) u_norm (
    .clk, .rst_n, .gnorm(op != SFU_LNORM),
    .in_valid(f_pop && op inside {SFU_LNORM, SFU_GNORM, SFU_GNORM_SILU}), .in_ready(nm_ready),
    .in_data(h_data), .in_mask(h_mask), .in_pass(h_tag.pass), .in_seg_last(h_tag.seg_last),
    .in_unit_last(h_tag.unit_last), .in_gb_idx(f_gb[frp]),
    .gb_we, .gb_addr, .gb_gamma, .gb_beta,
    .out_valid(nm_ov), .out_data(nm_od), .out_mask(nm_om), .idle(nm_idle)
  );

  // SiLU follows GNorm in the ResNet block, or runs alone
  always_comb begin
    if (op == SFU_GNORM_SILU) begin si_v = nm_ov; si_d = nm_od; si_m = nm_om; end
    else begin si_v = f_pop && op == SFU_SILU; si_d = h_data; si_m = h_mask; end
  end

  silu_unit #(.P(P)) u_silu (
    .clk, .rst_n, .in_valid(si_v), .in_data(si_d), .in_mask(si_m),
    .out_valid(si_ov), .out_data(si_od), .out_mask(si_om)
  );

  geglu_unit #(.P(P), .MAXL(MAXROW / 2)) u_geglu (
    .clk, .rst_n, .half_len(si.seg_len >> 1), .in_valid(f_pop && op == SFU_GEGLU),
    .in_data(h_data), .in_mask(h_mask),
    .out_valid(gg_ov), .out_data(gg_od), .out_mask(gg_om), .idle(gg_idle)
  );

  shortcut_add #(.P(P)) u_add (
    .clk, .rst_n, .in_valid(f_pop && op == SFU_ADD), .x(h_data), .r(res_data), .in_mask(h_mask),
    .out_valid(ad_ov), .y(ad_od), .out_mask(ad_om)
  );

  transpose_unit #(.P(P)) u_tr (
    .clk, .rst_n, .in_valid(f_pop && op == SFU_TRANSPOSE), .in_ready(tr_ready),
    .in_data(h_data), .in_mask(h_mask),
    .out_valid(tr_ov), .out_data(tr_od), .out_mask(tr_om), .idle(tr_idle)
  );

  // plain copy
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cp_ov <= 1'b0; cp_om <= '0;
      for (int l = 0; l < P; l++) cp_od[l] <= '0;
    end else begin
      cp_ov <= f_pop && op == SFU_NONE; cp_od <= h_data; cp_om <= h_mask;
    end
  end

  // ---------------- output select and quantization ----------------
  logic                  o_v;
  logic signed [D_W-1:0] o_d [P];
  logic [P-1:0]          o_m;

  always_comb begin
    case (op)
      SFU_SOFTMAX:   begin o_v = sm_ov; o_d = sm_od; o_m = sm_om; end
      SFU_LNORM, SFU_GNORM: begin o_v = nm_ov; o_d = nm_od; o_m = nm_om; end
      SFU_GNORM_SILU, SFU_SILU: begin o_v = si_ov; o_d = si_od; o_m = si_om; end
      SFU_GEGLU:     begin o_v = gg_ov; o_d = gg_od; o_m = gg_om; end
      SFU_ADD:       begin o_v = ad_ov; o_d = ad_od; o_m = ad_om; end
      SFU_TRANSPOSE: begin o_v = tr_ov; o_d = tr_od; o_m = tr_om; end
      default:       begin o_v = cp_ov; o_d = cp_od; o_m = cp_om; end
    endcase
  end

  quant_unit #(.N(P)) u_q (
    .clk, .rst_n, .x(o_d), .scale(si.q_scale), .shift(si.q_shift), .q(out_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_mask <= '0;
      for (int l = 0; l < P; l++) out_fx[l] <= '0;
    end else begin
      out_valid <= o_v; out_fx <= o_d; out_mask <= o_v ? o_m : '0;
    end
  end

  // ---------------- SFU job completion ----------------
  logic [2:0] flush;
  logic       all_idle;
  assign all_idle = ctl_done_seen && !ctl_busy && !f_nonempty && !rv_q &&
                    sm_idle && nm_idle && gg_idle && tr_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl_done_seen <= 1'b0; flush <= '0; sfu_done <= 1'b0;
    end else begin
      sfu_done <= 1'b0;
      if (sfu_start) begin ctl_done_seen <= 1'b0; flush <= '0; end
      else begin
        if (ctl_done) ctl_done_seen <= 1'b1;
        if (all_idle && !sfu_done) begin
          if (flush == 3'd5) begin sfu_done <= 1'b1; ctl_done_seen <= 1'b0; flush <= '0; end
          else flush <= flush + 1'b1;
        end else flush <= '0;
      end
    end
  end
endmodule
