// tb_norm_unit: LayerNorm units (one segment, 3..83 elements, partial last
// beat) and GroupNorm units (3..5 segments of 10..25 elements) with random
// Q8.8 data, per-unit offsets and random gamma/beta. Each unit is streamed
// twice (statistics pass, then normalise pass) as the buffer controller does.
// Every output must be within 4 LSB + 2 % of gamma*(x-mu)/sigma + beta
// computed in real arithmetic, and must appear exactly two cycles after its
// input beat (the stage-3 latency).
module tb_norm_unit;
  import sda_pkg::*;
  localparam int P = 5, NU = 40, MAXE = 130, NPARAM = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic gnorm, in_valid, in_ready, in_pass, in_seg_last, in_unit_last, out_valid, idle, gb_we;
  logic signed [D_W-1:0] in_data [P], out_data [P], gb_gamma, gb_beta;
  logic [P-1:0] in_mask, out_mask;
  logic [LEN_W-1:0] in_gb_idx [P], gb_addr;
  int checks = 0, failures = 0, cyc = 0;
  int gam [NPARAM], bet [NPARAM];
  real expq [$];
  int  latq [$];
  logic [P-1:0] mq [$];

  norm_unit #(.P(P), .NPARAM(NPARAM)) dut (.*);

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready && in_pass) latq.push_back(cyc);
    if (rst_n && out_valid) begin
      int t;
      t = latq.pop_front();
      checks++;
      if (cyc - t != 2) begin failures++; $display("FAIL latency %0d", cyc - t); end
      for (int l = 0; l < P; l++) begin
        real e;
        e = expq.pop_front();
        if (mq[0][l]) begin
          checks++;
          if (real'(out_data[l]) > e + 4.0 + 0.02 * (e < 0 ? -e : e) ||
              real'(out_data[l]) < e - 4.0 - 0.02 * (e < 0 ? -e : e)) begin
            failures++;
            if (failures < 10) $display("FAIL got %0d exp %f", out_data[l], e);
          end
        end
        checks++;
        if (out_mask[l] != mq[0][l]) failures++;
      end
      void'(mq.pop_front());
    end
    cyc++;
  end

  task automatic run_unit(input bit gn);
    int nseg, slen [6], n, off;
    int x [MAXE], gi [MAXE];
    real mu, var_, sd;
    n = 0;
    nseg = gn ? $urandom_range(3, 5) : 1;
    off = int'($urandom_range(1024)) - 512;
    for (int s = 0; s < nseg; s++) begin
      slen[s] = gn ? $urandom_range(10, 25) : $urandom_range(3, 83);
      for (int i = 0; i < slen[s]; i++) begin
        x[n] = off + int'($urandom_range(2048)) - 1024;
        gi[n] = $urandom_range(NPARAM - 1);
        n++;
      end
    end
    mu = 0; var_ = 0;
    for (int i = 0; i < n; i++) mu += x[i] / 256.0;
    mu /= n;
    for (int i = 0; i < n; i++) var_ += (x[i] / 256.0 - mu) * (x[i] / 256.0 - mu);
    var_ /= n;
    sd = $sqrt(var_);
    gnorm = gn;
    for (int pass = 0; pass < 2; pass++) begin
      int base;
      base = 0;
      for (int s = 0; s < nseg; s++) begin
        for (int b = 0; b * P < slen[s]; b++) begin
          in_valid = 1; in_pass = pass[0];
          in_seg_last = (b + 1) * P >= slen[s];
          in_unit_last = in_seg_last && (s == nseg - 1);
          for (int l = 0; l < P; l++) begin
            int e;
            e = base + b * P + l;
            in_mask[l] = (b * P + l) < slen[s];
            in_data[l] = in_mask[l] ? 16'(x[e]) : 16'($urandom);
            in_gb_idx[l] = in_mask[l] ? LEN_W'(gi[e]) : LEN_W'($urandom_range(NPARAM - 1));
          end
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          if (pass == 1) begin
            mq.push_back(in_mask);
            for (int l = 0; l < P; l++) begin
              int e;
              e = base + b * P + l;
              if (in_mask[l]) expq.push_back(256.0 * (gam[gi[e]] / 256.0 * (x[e] / 256.0 - mu) / sd + bet[gi[e]] / 256.0));
              else expq.push_back(0.0);
            end
          end
          #1;
          if ($urandom_range(5) == 0) begin in_valid = 0; @(posedge clk); #1; end
        end
        base += slen[s];
      end
      in_valid = 0;
    end
  endtask

  initial begin
    in_valid = 0; in_pass = 0; in_seg_last = 0; in_unit_last = 0; in_mask = '0; gnorm = 0;
    gb_we = 0; gb_addr = 0; gb_gamma = 0; gb_beta = 0;
    foreach (in_data[k]) begin in_data[k] = 0; in_gb_idx[k] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < NPARAM; i++) begin
      gam[i] = $urandom_range(128, 384); bet[i] = int'($urandom_range(512)) - 256;
      gb_we = 1; gb_addr = LEN_W'(i); gb_gamma = 16'(gam[i]); gb_beta = 16'(bet[i]);
      @(negedge clk);
    end
    gb_we = 0;
    for (int u = 0; u < NU; u++) begin
      @(negedge clk);
      run_unit(u % 2 == 1);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (!idle || expq.size() != 0) begin failures++; $display("FAIL leftover %0d", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
