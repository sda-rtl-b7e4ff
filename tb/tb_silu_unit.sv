// tb_silu_unit: random Q8.8 inputs (covering the clamp regions) against the
// formula x*ReLU6(x+3)/6 evaluated in real arithmetic, within 1 LSB; checks
// the two-cycle latency and mask forwarding.
module tb_silu_unit;
  import sda_pkg::*;
  localparam int P = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic signed [D_W-1:0] in_data [P], out_data [P];
  logic [P-1:0] in_mask, out_mask;
  int checks = 0, failures = 0;
  real exp_q [$];
  logic [P-1:0] exp_m [$];

  silu_unit #(.P(P)) dut (.*);

  initial begin
    in_valid = 0; in_mask = '0; foreach (in_data[k]) in_data[k] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      in_valid = 1; in_mask = P'($urandom);
      foreach (in_data[k]) in_data[k] = 16'(int'($urandom_range(4000)) - 2000);
      @(posedge clk); #1;
      in_valid = 0;
      @(posedge clk); #1;
      // two cycles after the beat was sampled
      checks++;
      if (!out_valid || out_mask != in_mask) begin failures++; $display("FAIL valid/mask"); end
      for (int k = 0; k < P; k++) begin
        real xr, r, e;
        xr = real'(in_data[k]) / 256.0;
        r = xr + 3.0; if (r < 0) r = 0; if (r > 6) r = 6;
        e = xr * r / 6.0 * 256.0;
        checks++;
        if (real'(out_data[k]) > e + 1.01 || real'(out_data[k]) < e - 1.01) begin
          failures++; if (failures < 10) $display("FAIL x=%0d got %0d exp %f", in_data[k], out_data[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
