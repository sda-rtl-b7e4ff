// tb_quant_unit: random fixed-point inputs, scales and shifts against a direct
// round-shift-saturate to int8, checking the one-cycle latency.
module tb_quant_unit;
  import sda_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [D_W-1:0] x [N];
  logic signed [15:0] scale;
  logic [4:0] shift;
  logic signed [A_W-1:0] q [N];
  int checks = 0, failures = 0;

  quant_unit #(.N(N)) dut (.*);

  initial begin
    foreach (x[k]) x[k] = 0; scale = 0; shift = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      longint e [N];
      @(negedge clk);
      scale = 16'($urandom); shift = 5'($urandom_range(20));
      foreach (x[k]) x[k] = 16'($urandom);
      for (int k = 0; k < N; k++) begin
        e[k] = (longint'(x[k]) * scale + (shift == 0 ? 0 : (longint'(1) << (shift - 1)))) >>> shift;
        if (e[k] > 127) e[k] = 127;
        if (e[k] < -128) e[k] = -128;
      end
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (q[k] != 8'(e[k])) begin failures++; if (failures < 10) $display("FAIL got %0d exp %0d", q[k], e[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
