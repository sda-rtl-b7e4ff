// tb_packed_dsp: checks the packed multiply and its bit-width correction.
// Random 4-bit operands (signed and unsigned nibbles) in both layouts; the
// four fields must equal the individual products (MM-OS layout) and the two
// middle fields the two-tap sums (CONV-WS layout).
module tb_packed_dsp;
  import sda_pkg::*;
  logic signed [4:0] a [3];
  logic signed [4:0] w [2];
  logic signed [FIELD-1:0] f [4];
  int checks = 0, failures = 0;

  packed_dsp dut (.a, .w, .f);

  function automatic logic signed [4:0] rnd_nib(input bit sgn);
    int v;
    v = sgn ? (int'($urandom_range(15)) - 8) : int'($urandom_range(15));
    return 5'(v);
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int it = 0; it < 4000; it++) begin
      logic sa, sw;
      sa = 1'($urandom_range(1)); sw = 1'($urandom_range(1));
      // MM-OS layout
      a[0] = rnd_nib(sa); a[1] = '0; a[2] = rnd_nib(sa);
      w[0] = rnd_nib(sw); w[1] = rnd_nib(sw);
      #1;
      check(int'(f[0]), int'(a[0]) * int'(w[0]), "mm a0w0");
      check(int'(f[1]), int'(a[0]) * int'(w[1]), "mm a0w1");
      check(int'(f[2]), int'(a[2]) * int'(w[0]), "mm a1w0");
      check(int'(f[3]), int'(a[2]) * int'(w[1]), "mm a1w1");
      // CONV-WS layout: w = {w0 at slot 1, w1 at slot 0}
      a[1] = rnd_nib(sa);
      #1;
      check(int'(f[1]), int'(a[0]) * int'(w[1]) + int'(a[1]) * int'(w[0]), "conv y0");
      check(int'(f[2]), int'(a[1]) * int'(w[1]) + int'(a[2]) * int'(w[0]), "conv y1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
