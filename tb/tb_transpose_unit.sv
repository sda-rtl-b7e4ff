// tb_transpose_unit: random P x P blocks fed with random gaps; every output
// beat c must be column c of its block, with the matching mask bits, and each
// block must leave in exactly P cycles after its last row.
module tb_transpose_unit;
  import sda_pkg::*;
  localparam int P = 5, NBLK = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, idle;
  logic signed [D_W-1:0] in_data [P], out_data [P];
  logic [P-1:0] in_mask, out_mask;
  int checks = 0, failures = 0, nout = 0;
  logic signed [D_W-1:0] blk [NBLK][P][P];
  logic [P-1:0] msk [NBLK][P];

  transpose_unit #(.P(P)) dut (.*);

  always @(posedge clk) if (rst_n && out_valid) begin
    int b, c;
    b = nout / P; c = nout % P;
    for (int r = 0; r < P; r++) begin
      checks += 2;
      if (out_data[r] != blk[b][r][c]) begin failures++; if (failures < 10) $display("FAIL b%0d r%0d c%0d", b, r, c); end
      if (out_mask[r] != msk[b][r][c]) failures++;
    end
    nout++;
  end

  initial begin
    in_valid = 0; in_mask = '0; foreach (in_data[k]) in_data[k] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < P; r++) begin
        @(negedge clk);
        while (!in_ready || $urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_mask = P'($urandom); msk[b][r] = in_mask;
        foreach (in_data[k]) begin in_data[k] = 16'($urandom); blk[b][r][k] = in_data[k]; end
      end
    @(negedge clk); in_valid = 0;
    repeat (P + 1) @(negedge clk);
    checks++;
    if (nout != NBLK * P || !idle) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
