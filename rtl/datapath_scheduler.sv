// datapath_scheduler: sequences one instruction through hybridSA and hands
// the filled tile-buffer half to the special function unit.
//
// hybridSA side (one instruction at a time, needs a free tile-buffer half):
//   MM-OS  : for each of n_ctile column tiles, accept k_len beats from the
//            input stream (first/last flags to the array). X+Y-1 cycles after
//            the last beat the tile is in the drain registers; the drain
//            sequencer then writes two output rows per PE row into the tile
//            buffer (one per cycle, column offset t*CW) and shifts the drain
//            chain. The last beat of the next column tile is held back until
//            the drain of the previous one has finished (a drain stall);
//            otherwise compute and drain overlap.
//   CONV-WS: accept X weight-load beats (the last one latches), then k_len
//            pixel beats; every de-skewed output beat of the array is written
//            as 2Y consecutive elements at n*row_len.
//   When all writes are done the half is marked full and its instruction
//   is kept for the SFU.
// SFU side: when the next half in order is full and the SFU is free, pulse
// sfu_start with that half and its instruction; sfu_done frees the half. So
// hybridSA fills one half while the SFU drains the other (the coarse-grained
// pipeline). The document gives the roles (instructions from the host select
// the dataflow mode and the nonlinear operator, and steer the buffer
// controller); the sequencing details are this design's.
module datapath_scheduler
  import sda_pkg::*;
#(
  parameter int X = 20,
  parameter int Y = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  // instructions
  input  logic              instr_valid,
  output logic              instr_ready,
  input  sda_instr_t        instr,
  // operand stream
  input  logic              in_valid,
  output logic              in_ready,
  // hybridSA control
  output sa_mode_e          sa_mode,
  output logic [1:0]        sa_w_signed,  // pair mode: low nibble unsigned, high signed
  output logic              sa_in_valid,
  output logic              sa_in_first,
  output logic              sa_in_last,
  output logic              sa_wload_shift,
  output logic              sa_wload_latch,
  output logic              sa_drain_shift,
  input  logic              sa_cv_valid,
  // tile-buffer write control
  output logic              wr_en,
  output logic              wr_conv,     // source: CONV outputs (else drain row)
  output logic              wr_h,        // drain row half: output row 2i+wr_h
  output logic              wr_pair,
  output logic              wr_half,
  output logic [TB_AW-1:0]  wr_addr,
  output logic [LEN_W-1:0]  wr_row,      // MM output row (for the row maximum)
  output logic              wr_first_ct, // first column tile: restart row maximum
  output logic [15:0]       wr_dq_scale,
  output logic [4:0]        wr_dq_shift,
  // SFU
  output logic              sfu_start,
  output logic              sfu_half,
  output sda_instr_t        sfu_instr,
  input  logic              sfu_done,
  output logic              sa_busy,
  output logic              sfu_busy,
  output logic              drain_stall
);
  localparam int CW2 = 2 * Y;

  typedef enum logic [2:0] {A_IDLE, A_MM, A_WLOAD, A_CONV, A_FIN} astate_e;
  typedef enum logic [1:0] {DR_IDLE, DR_WAIT, DR_RUN} dstate_e;

  astate_e          as;
  dstate_e          dsq;
  sda_instr_t       ci;                  // instruction on hybridSA
  sda_instr_t       hi [2];              // instruction owning each half
  logic [1:0]       half_full;
  logic             wh, rh;
  logic [LEN_W-1:0] kb;                  // beat counter
  logic [7:0]       ct;                  // column tile being computed
  logic [7:0]       dct;                 // column tile being drained
  logic [$clog2(X+Y+1)-1:0] dwait;
  logic [$clog2(X+1)-1:0]   dpr;         // PE rows drained
  logic             dh;
  logic [LEN_W-1:0] cv_n;                // CONV output beats written
  logic             accept;
  logic             last_beat;
  logic             sfu_run;

  assign sa_mode     = ci.mode;
  assign sa_w_signed = ci.pair ? 2'b10 : {2{ci.w_signed}};
  assign instr_ready = (as == A_IDLE) && !half_full[wh];
  assign last_beat   = (kb == ci.k_len - 1'b1);

  always_comb begin
    in_ready = 1'b0;
    case (as)
      A_MM:    in_ready = !(last_beat && dsq != DR_IDLE);
      A_WLOAD: in_ready = 1'b1;
      A_CONV:  in_ready = (kb < ci.k_len);
      default: in_ready = 1'b0;
    endcase
  end
  assign accept      = in_valid && in_ready;
  assign drain_stall = (as == A_MM) && in_valid && !in_ready;

  assign sa_in_valid    = accept && (as == A_MM || as == A_CONV);
  assign sa_in_first    = (kb == '0);
  assign sa_in_last     = last_beat;
  assign sa_wload_shift = accept && (as == A_WLOAD);
  assign sa_wload_latch = accept && (as == A_WLOAD) && (kb == LEN_W'(X - 1));

  // tile-buffer writes
  always_comb begin
    wr_en = 1'b0; wr_conv = 1'b0; wr_h = dh; wr_pair = ci.pair; wr_half = wh;
    wr_addr = '0; wr_row = '0; wr_first_ct = (dct == '0);
    wr_dq_scale = ci.dq_scale; wr_dq_shift = ci.dq_shift;
    if (ci.mode == SA_CONV_WS) begin
      wr_conv = 1'b1;
      wr_en   = sa_cv_valid && (as == A_CONV || as == A_FIN);
      wr_addr = TB_AW'(32'(cv_n) * 32'(ci.row_len));
    end else begin
      wr_en   = (dsq == DR_RUN);
      wr_row  = LEN_W'(2 * (X - 1 - 32'(dpr)) + 32'(dh));
      wr_addr = TB_AW'(32'(wr_row) * 32'(ci.row_len) + 32'(dct) * (ci.pair ? Y : CW2));
    end
  end
  assign sa_drain_shift = (dsq == DR_RUN) && dh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as <= A_IDLE; dsq <= DR_IDLE; ci <= '0; hi[0] <= '0; hi[1] <= '0;
      half_full <= '0; wh <= 1'b0; rh <= 1'b0; kb <= '0; ct <= '0; dct <= '0;
      dwait <= '0; dpr <= '0; dh <= 1'b0; cv_n <= '0; sfu_run <= 1'b0;
      sfu_start <= 1'b0; sfu_half <= 1'b0; sfu_instr <= '0;
    end else begin
      sfu_start <= 1'b0;
      // ---------- hybridSA sequencing ----------
      case (as)
        A_IDLE: if (instr_valid && instr_ready) begin
          ci <= instr; kb <= '0; ct <= '0; cv_n <= '0;
          as <= (instr.mode == SA_MM_OS) ? A_MM : A_WLOAD;
        end
        A_MM: if (accept) begin
          if (last_beat) begin
            kb <= '0;
            dsq <= DR_WAIT; dwait <= '0; dct <= ct; dpr <= '0; dh <= 1'b0;
            if (ct == ci.n_ctile - 1'b1) as <= A_FIN;
            else ct <= ct + 1'b1;
          end else kb <= kb + 1'b1;
        end
        A_WLOAD: if (accept) begin
          if (kb == LEN_W'(X - 1)) begin kb <= '0; as <= A_CONV; end
          else kb <= kb + 1'b1;
        end
        A_CONV: begin
          if (accept) kb <= kb + 1'b1;
          if (kb == ci.k_len) as <= A_FIN;
        end
        A_FIN: if ((ci.mode == SA_MM_OS && dsq == DR_IDLE) ||
                   (ci.mode == SA_CONV_WS && cv_n == ci.k_len)) begin
          half_full[wh] <= 1'b1;
          hi[wh] <= ci;
          wh <= !wh;
          as <= A_IDLE;
        end
        default: as <= A_IDLE;
      endcase
      if (wr_en && wr_conv) cv_n <= cv_n + 1'b1;
      // ---------- drain sequencing ----------
      case (dsq)
        DR_WAIT: if (32'(dwait) == X + Y - 2) dsq <= DR_RUN; else dwait <= dwait + 1'b1;
        DR_RUN: begin
          dh <= !dh;
          if (dh) begin
            if (32'(dpr) == X - 1) dsq <= DR_IDLE;
            else dpr <= dpr + 1'b1;
          end
        end
        default: ;
      endcase
      // ---------- SFU hand-off ----------
      if (!sfu_run && half_full[rh] && !sfu_start) begin
        sfu_start <= 1'b1; sfu_half <= rh; sfu_instr <= hi[rh]; sfu_run <= 1'b1;
      end
      if (sfu_run && sfu_done) begin
        half_full[rh] <= 1'b0;
        rh <= !rh;
        sfu_run <= 1'b0;
      end
    end
  end

  assign sa_busy  = (as != A_IDLE) || (dsq != DR_IDLE);
  assign sfu_busy = sfu_run;
endmodule
