// tb_dequant_unit: random sums, scales and shifts, plain and pair mode,
// against a direct evaluation of round-shift-saturate (and hi*16+lo joining).
module tb_dequant_unit;
  import sda_pkg::*;
  localparam int N = 20;
  logic pair;
  logic signed [ACC_W-1:0] acc [N];
  logic signed [15:0] scale;
  logic [4:0] shift;
  logic signed [D_W-1:0] y [N];
  int checks = 0, failures = 0;

  dequant_unit #(.N(N)) dut (.*);

  function automatic longint model(input longint v, input longint sc, input int sh);
    longint p;
    p = v * sc + (sh == 0 ? 0 : (longint'(1) << (sh - 1)));
    p = p >>> sh;
    if (p > 32767) p = 32767;
    if (p < -32768) p = -32768;
    return p;
  endfunction

  initial begin
    for (int it = 0; it < 3000; it++) begin
      pair = 1'($urandom_range(1));
      scale = 16'($urandom);
      shift = 5'($urandom_range(31));
      foreach (acc[k]) acc[k] = (it % 3 == 0) ? $urandom : ACC_W'(int'($urandom_range(8000)) - 4000);
      #1;
      for (int k = 0; k < N; k++) begin
        longint v, e;
        if (!pair) v = acc[k];
        else if (2*k+1 < N) v = longint'(acc[2*k+1]) * 16 + acc[2*k];
        else v = 0;
        e = model(v, scale, shift);
        checks++;
        if (y[k] != 16'(e)) begin failures++; if (failures < 10) $display("FAIL k%0d got %0d exp %0d", k, y[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
