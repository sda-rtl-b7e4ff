// tb_shortcut_add: random operands including saturating sums; checks y and the
// one-cycle latency.
module tb_shortcut_add;
  import sda_pkg::*;
  localparam int P = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic signed [D_W-1:0] x [P], r [P], y [P];
  logic [P-1:0] in_mask, out_mask;
  int checks = 0, failures = 0;

  shortcut_add #(.P(P)) dut (.*);

  initial begin
    in_valid = 0; in_mask = '0; foreach (x[k]) begin x[k] = 0; r[k] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      in_valid = 1; in_mask = P'($urandom);
      foreach (x[k]) begin x[k] = 16'($urandom); r[k] = 16'($urandom); end
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_mask != in_mask) failures++;
      for (int k = 0; k < P; k++) begin
        int e;
        e = int'(x[k]) + int'(r[k]);
        if (e > 32767) e = 32767;
        if (e < -32768) e = -32768;
        checks++;
        if (y[k] != 16'(e)) begin failures++; if (failures < 10) $display("FAIL got %0d exp %0d", y[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
