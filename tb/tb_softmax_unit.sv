// tb_softmax_unit: rows of random length (1..97 elements, partial last beat)
// and random Q8.8 values are streamed back to back with their maximum. Every
// output must be within 2 LSB + 1 % of 256*exp(x - max)/sum computed in real
// arithmetic, rows must leave in order, and stage 2-2 of one row must overlap
// stage 2-1 of the next (the double row buffers) at least once.
module tb_softmax_unit;
  import sda_pkg::*;
  localparam int P = 5, NROW = 40, MAXN = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_last, out_valid, idle;
  logic signed [D_W-1:0] in_data [P], out_data [P], in_max;
  logic [P-1:0] in_mask, out_mask;
  int checks = 0, failures = 0, overlap = 0, stalls = 0;
  int rlen [NROW];
  int xv [NROW][MAXN];
  int orow = 0, oidx = 0;

  softmax_unit #(.P(P), .MAXLEN(128)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (out_valid && in_valid && in_ready) overlap++;
    if (in_valid && !in_ready) stalls++;
    if (out_valid) begin
      real mx, s;
      mx = -1.0e9; s = 0;
      for (int i = 0; i < rlen[orow]; i++) if (xv[orow][i] > mx) mx = xv[orow][i];
      for (int i = 0; i < rlen[orow]; i++) s += $exp((xv[orow][i] - mx) / 256.0);
      for (int l = 0; l < P; l++) begin
        if (oidx < rlen[orow]) begin
          real e;
          e = 256.0 * $exp((xv[orow][oidx] - mx) / 256.0) / s;
          checks++;
          if (!out_mask[l] || real'(out_data[l]) > e + 2.0 + 0.01 * e || real'(out_data[l]) < e - 2.0 - 0.01 * e) begin
            failures++;
            if (failures < 10) $display("FAIL row%0d i%0d got %0d exp %f", orow, oidx, out_data[l], e);
          end
          oidx++;
        end else begin
          checks++;
          if (out_mask[l]) failures++;
        end
      end
      if (oidx >= rlen[orow]) begin orow++; oidx = 0; end
    end
  end

  initial begin
    in_valid = 0; in_last = 0; in_mask = '0; in_max = 0; foreach (in_data[k]) in_data[k] = 0;
    for (int r = 0; r < NROW; r++) begin
      rlen[r] = (r % 4 == 0) ? $urandom_range(1, 6) : $urandom_range(20, 97);
      for (int i = 0; i < rlen[r]; i++) xv[r][i] = int'($urandom_range(4096)) - 2048;
    end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < NROW; r++) begin
      int mx;
      mx = -32768;
      for (int i = 0; i < rlen[r]; i++) if (xv[r][i] > mx) mx = xv[r][i];
      for (int b = 0; b * P < rlen[r]; b++) begin
        in_valid = 1; in_max = 16'(mx); in_last = ((b + 1) * P >= rlen[r]);
        for (int l = 0; l < P; l++) begin
          in_mask[l] = (b * P + l) < rlen[r];
          in_data[l] = in_mask[l] ? 16'(xv[r][b*P+l]) : 16'($urandom);
        end
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
      end
      in_valid = 0;
    end
    while (orow < NROW) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL no overlap between row stages"); end
    checks++;
    if (!idle) begin failures++; $display("FAIL not idle at end"); end
    $display("row overlap cycles %0d, input stall cycles %0d", overlap, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
