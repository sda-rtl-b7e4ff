// tb_geglu_unit: rows of 2L Q8.8 values (L a random multiple of P, changed
// between rows) are streamed one beat per cycle with random gaps. For every
// element of the second half the output must be within 2 LSB + 1 % of
// x_i * g * ReLU6(1.702 g + 3) / 6 (g = x_{L+i}) in real arithmetic, and
// must appear exactly two cycles after its input beat. The tolerance adds
// 1.5*|x_i| LSB because GeLU(g) is held in Q8.8 before the final multiply.
module tb_geglu_unit;
  import sda_pkg::*;
  localparam int P = 5, NROW = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [LEN_W-1:0] half_len;
  logic in_valid, out_valid, idle;
  logic signed [D_W-1:0] in_data [P], out_data [P];
  logic [P-1:0] in_mask, out_mask;
  int checks = 0, failures = 0, cyc = 0, sec = 0, bcnt = 0;
  real expq [$], tolq [$];
  int latq [$];
  logic [P-1:0] mq [$];

  geglu_unit #(.P(P), .MAXL(320)) dut (.*);

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (bcnt >= half_len / P) latq.push_back(cyc);
      bcnt = (bcnt == 2 * half_len / P - 1) ? 0 : bcnt + 1;
    end
    if (rst_n && out_valid) begin
      int t;
      t = latq.pop_front();
      checks++;
      if (cyc - t != 2) begin failures++; $display("FAIL latency %0d", cyc - t); end
      for (int l = 0; l < P; l++) begin
        real e, tl;
        e = expq.pop_front(); tl = tolq.pop_front();
        if (mq[0][l]) begin
          checks++;
          if (real'(out_data[l]) > e + tl || real'(out_data[l]) < e - tl) begin
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

  initial begin
    in_valid = 0; in_mask = '0; half_len = 10;
    foreach (in_data[k]) in_data[k] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < NROW; r++) begin
      int L, xs [320];
      L = P * $urandom_range(1, 12);
      if (r % 3 == 0) L = P;
      while (!idle) @(negedge clk);
      half_len = LEN_W'(L);
      for (int i = 0; i < 2 * L; i++) xs[i] = int'($urandom_range(3072)) - 1536;
      for (int b = 0; b < 2 * L / P; b++) begin
        in_valid = 1;
        in_mask = P'($urandom);
        for (int l = 0; l < P; l++) in_data[l] = 16'(xs[b*P+l]);
        if (b >= L / P) begin
          mq.push_back(in_mask);
          for (int l = 0; l < P; l++) begin
            real g, x, t;
            x = xs[b*P+l-L] / 256.0; g = xs[b*P+l] / 256.0;
            t = 1.702 * g + 3.0; if (t < 0) t = 0; if (t > 6) t = 6;
            expq.push_back(256.0 * x * g * t / 6.0);
            tolq.push_back(2.0 + 1.5 * (x < 0 ? -x : x) + 0.01 * 256.0 * (x * g * t / 6.0 < 0 ? -x * g * t / 6.0 : x * g * t / 6.0));
          end
        end
        @(negedge clk);
        if ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
      end
      in_valid = 0;
      if (r % 5 == 0) repeat (3) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (!idle || expq.size() != 0) begin failures++; $display("FAIL leftover %0d", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
