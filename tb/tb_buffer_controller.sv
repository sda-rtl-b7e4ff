// tb_buffer_controller: random jobs (normal / transpose, one or two passes,
// 1..4 units of 1..4 segments of 1..23 elements, random strides and norm
// parameter mapping) are run with a random issue_ok. Every issued read is
// compared, in order, with a reference walk of unit x pass x segment x beat:
// address, lane mask, tag fields and per-lane parameter indices. With
// issue_ok held high a job of N reads must issue one read per cycle and
// pulse done on the cycle after the last read.
module tb_buffer_controller;
  import sda_pkg::*;
  localparam int P = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, two_pass, transpose, issue_ok, rd_valid, busy, done;
  sda_instr_t cfg;
  logic [TB_AW-1:0] rd_addr;
  logic [P-1:0] rd_mask;
  sfu_tag_t rd_tag;
  logic [LEN_W-1:0] rd_gb_idx [P];
  int checks = 0, failures = 0;
  typedef struct { int addr; logic [P-1:0] mask; bit pass, sl, ul; int unit; int gb [P]; } rd_t;
  rd_t exp_q [$];
  int nrd, ndone;

  buffer_controller #(.P(P)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (done) ndone++;
    if (rd_valid) begin
      rd_t e;
      nrd++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected read"); end
      else begin
        bit bad;
        e = exp_q.pop_front();
        bad = (int'(rd_addr) != e.addr) || (rd_mask != e.mask) || (rd_tag.pass != e.pass) ||
              (rd_tag.seg_last != e.sl) || (rd_tag.unit_last != e.ul) || (int'(rd_tag.unit) != e.unit);
        for (int l = 0; l < P; l++) if (e.mask[l] && int'(rd_gb_idx[l]) != e.gb[l]) bad = 1;
        if (bad) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d/%0d mask %b/%b tag %0d%0d%0d/%0d%0d%0d", rd_addr, e.addr,
                                      rd_mask, e.mask, rd_tag.pass, rd_tag.seg_last, rd_tag.unit_last, e.pass, e.sl, e.ul);
        end
      end
    end
  end

  task automatic run_job(input bit full_rate);
    int nu, ns, sl, ss, us, gs, gu, np, nb, t0, n;
    bit tp;
    rd_t e;
    tp = $urandom_range(1); np = $urandom_range(1, 2);
    nu = $urandom_range(1, 4); ns = $urandom_range(1, 4);
    sl = tp ? $urandom_range(1, ns * P) : $urandom_range(1, 23);
    if (tp) ns = (sl + P - 1) / P;
    ss = $urandom_range(24, 60); us = $urandom_range(200, 400);
    gs = $urandom_range(0, 3); gu = $urandom_range(0, 9);
    n = 0;
    for (int u = 0; u < nu; u++)
      for (int p = 0; p < np; p++)
        for (int s = 0; s < ns; s++) begin
          nb = tp ? P : (sl + P - 1) / P;
          for (int b = 0; b < nb; b++) begin
            e.addr = u * us + (tp ? s * P + b * ss : s * ss + b * P);
            for (int l = 0; l < P; l++) begin
              e.mask[l] = tp ? (s * P + l < sl) : (b * P + l < sl);
              e.gb[l] = u * gu + ((b * P + l) >> gs);
            end
            e.pass = p[0]; e.sl = (b == nb - 1); e.ul = e.sl && (s == ns - 1); e.unit = u;
            exp_q.push_back(e);
            n++;
          end
        end
    cfg = '0;
    cfg.n_units = LEN_W'(nu); cfg.seg_per_unit = LEN_W'(ns); cfg.seg_len = LEN_W'(sl);
    cfg.seg_stride = LEN_W'(ss); cfg.unit_stride = LEN_W'(us); cfg.gb_shift = 4'(gs); cfg.gb_unit = LEN_W'(gu);
    two_pass = (np == 2); transpose = tp;
    nrd = 0; ndone = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = 0;
    while (busy) begin
      issue_ok = full_rate ? 1'b1 : 1'($urandom_range(2) != 0);
      @(negedge clk);
      t0++;
    end
    issue_ok = 0;
    @(negedge clk);
    checks += 3;
    if (nrd != n || exp_q.size() != 0) begin failures++; $display("FAIL %0d reads of %0d", nrd, n); end
    if (ndone != 1) begin failures++; $display("FAIL done pulses %0d", ndone); end
    if (full_rate && t0 != n) begin failures++; $display("FAIL %0d cycles for %0d reads", t0, n); end
    exp_q.delete();
  endtask

  initial begin
    start = 0; two_pass = 0; transpose = 0; issue_ok = 0; cfg = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int j = 0; j < 300; j++) run_job(j % 3 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (500000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
