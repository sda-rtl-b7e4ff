// tb_datapath_scheduler: a random mix of MM-OS and CONV-WS instructions is
// run with a random operand stream and a behavioural SFU that answers each
// sfu_start with sfu_done after a random delay. The array is replaced by a
// delay line that returns a CONV output beat X+Y-1 cycles after each pixel
// beat. The checks:
//   - MM: k_len beats per column tile with first/last on the right beats;
//     the drain of a tile starts exactly X+Y cycles after its last beat was
//     accepted (the array needs X+Y-1 cycles), writes 2X rows in the order
//     2(X-1), 2(X-1)+1, ..., 0, 1 at row*row_len + tile*width (2Y, or Y
//     in pair mode) with a drain shift on every second write, and no
//     further last beat is accepted
//     while a drain is pending (the drain stall, which must occur);
//   - CONV: X weight-load beats with the latch on the last, then k_len
//     pixel beats and k_len writes at n*row_len;
//   - halves alternate, the SFU receives the instructions in order, the
//     array never writes the half the SFU is reading, and array and SFU
//     are busy at the same time at least once.
module tb_datapath_scheduler;
  import sda_pkg::*;
  localparam int X = 4, Y = 3, CW = 2 * Y, NI = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic instr_valid, instr_ready, in_valid, in_ready;
  sda_instr_t instr, sfu_instr;
  sa_mode_e sa_mode;
  logic [1:0] sa_w_signed;
  logic sa_in_valid, sa_in_first, sa_in_last, sa_wload_shift, sa_wload_latch, sa_drain_shift, sa_cv_valid;
  logic wr_en, wr_conv, wr_h, wr_pair, wr_half, wr_first_ct, sfu_start, sfu_half, sfu_done, sa_busy, sfu_busy, drain_stall;
  logic [TB_AW-1:0] wr_addr;
  logic [LEN_W-1:0] wr_row;
  logic [15:0] wr_dq_scale;
  logic [4:0] wr_dq_shift;
  int checks = 0, failures = 0, cyc = 0;
  int stalls = 0, overlaps = 0;
  sda_instr_t iq [$], sq [$];
  logic [X+Y-2:0] cvd;

  datapath_scheduler #(.X(X), .Y(Y)) dut (.*);

  // array stand-in: CONV outputs X+Y-1 cycles after each pixel beat
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cvd <= '0;
    else cvd <= {cvd[X+Y-3:0], sa_in_valid && sa_mode == SA_CONV_WS};
  assign sa_cv_valid = cvd[X+Y-2];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  // behavioural SFU
  int sfu_wait, sfu_h;
  bit sfu_on;
  always @(posedge clk) begin
    if (!rst_n) begin sfu_on = 0; sfu_done <= 0; sfu_h = 0; end
    else begin
      sfu_done <= 0;
      if (sfu_start) begin
        sda_instr_t e;
        chk(!sfu_on, "start while busy");
        chk(int'(sfu_half) == sfu_h, "half order");
        e = sq.pop_front();
        chk(sfu_instr == e, "sfu instruction order");
        sfu_on = 1; sfu_wait = $urandom_range(5, 150); sfu_h = 1 - sfu_h;
      end else if (sfu_on) begin
        if (sfu_wait == 0) begin sfu_done <= 1; sfu_on = 0; end
        else sfu_wait--;
      end
    end
  end

  // protocol monitor
  sda_instr_t cur;
  int kb, ct, pend [$], nwr, dtile, cvn, wl;
  bit have;
  always @(posedge clk) if (rst_n) begin
    if (sa_busy && sfu_busy) overlaps++;
    if (drain_stall) stalls++;
    if (sfu_busy && wr_en) chk(wr_half != sfu_half, "write into half under SFU");
    if (instr_valid && instr_ready) begin
      cur = instr; have = 1; kb = 0; ct = 0; nwr = 0; dtile = 0; cvn = 0; wl = 0;
    end
    if (have && cur.mode == SA_MM_OS) begin
      if (sa_in_valid) begin
        chk(sa_in_first == (kb == 0) && sa_in_last == (kb == cur.k_len - 1), "MM first/last flags");
        if (sa_in_last) begin
          chk(pend.size() == 0 && nwr == 0, "last beat during a pending drain");
          pend.push_back(cyc + X + Y);
          kb = 0; ct++;
        end else kb++;
      end
      if (wr_en) begin
        int row;
        chk(!wr_conv, "MM write flagged as CONV");
        if (nwr == 0) begin
          chk(pend.size() == 1 && pend[0] == cyc, "drain start time");
          void'(pend.pop_front());
        end
        row = 2 * (X - 1 - nwr / 2) + nwr % 2;
        chk(int'(wr_row) == row && int'(wr_addr) == row * cur.row_len + dtile * (cur.pair ? Y : CW), "MM write row/address");
        chk(sa_drain_shift == (nwr % 2 == 1) && wr_first_ct == (dtile == 0), "drain shift / first tile");
        nwr++;
        if (nwr == 2 * X) begin nwr = 0; dtile++; end
      end else chk(!sa_drain_shift, "drain shift without write");
    end
    if (have && cur.mode == SA_CONV_WS) begin
      if (sa_wload_shift) begin
        chk(sa_wload_latch == (wl == X - 1), "weight latch position");
        wl++;
      end
      if (sa_in_valid) begin chk(wl == X, "pixel before weights"); kb++; end
      if (wr_en) begin
        chk(wr_conv && int'(wr_addr) == cvn * cur.row_len, "CONV write address");
        cvn++;
      end
    end
    cyc++;
  end

  initial begin
    instr_valid = 0; in_valid = 0; instr = '0;
    for (int i = 0; i < NI; i++) begin
      sda_instr_t e;
      e = '0;
      e.mode = (i % 4 == 2) ? SA_CONV_WS : SA_MM_OS;
      e.pair = $urandom_range(1);
      e.k_len = (i % 3 == 0) ? LEN_W'($urandom_range(1, 4)) : LEN_W'($urandom_range(5, 40));
      e.n_ctile = 8'($urandom_range(1, 4));
      e.row_len = LEN_W'(e.n_ctile * CW + $urandom_range(0, 3));
      e.dq_scale = 16'($urandom); e.sfu_op = sfu_op_e'($urandom_range(0, 8));
      iq.push_back(e);
    end
    repeat (2) @(negedge clk); rst_n = 1;
    fork
      begin
        foreach (iq[i]) begin
          instr_valid = 1; instr = iq[i];
          @(posedge clk);
          while (!instr_ready) @(posedge clk);
          sq.push_back(iq[i]);
          #1 instr_valid = 0;
          @(negedge clk);
        end
      end
      begin
        forever begin
          @(negedge clk);
          in_valid = ($urandom_range(5) != 0);
        end
      end
    join_any
    while (sq.size() != 0 || sfu_busy || sa_busy) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(stalls > 0, "no drain stall seen");
    chk(overlaps > 0, "no array/SFU overlap seen");
    $display("drain stall cycles %0d, overlap cycles %0d", stalls, overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
