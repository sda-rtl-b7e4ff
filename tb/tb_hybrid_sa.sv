// tb_hybrid_sa: hybrid systolic array at a reduced size (4 x 3).
// MM-OS: random 8-bit A and 4-bit W (signed and unsigned weights), with input
// bubbles; the drained tile must equal A x W, and the tile must be complete
// exactly X+Y-1 cycles after the last beat. A second tile follows straight
// away to check that accumulation restarts on the first beat.
// CONV-WS: random stationary taps loaded with gaps, random pixel triples; the
// de-skewed outputs must equal the column sums of the two-tap products and
// arrive X+Y-1 cycles after their beat.
module tb_hybrid_sa;
  import sda_pkg::*;
  localparam int X = 4, Y = 3, K = 7, NB = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sa_mode_e mode;
  logic [1:0] w_signed;
  logic in_valid, in_first, in_last, wload_shift, wload_latch, drain_shift;
  logic signed [A_W-1:0] a_in [X][3];
  logic [W_W-1:0] w_in [Y][2];
  logic signed [ACC_W-1:0] dr_out [Y][4];
  logic cv_valid;
  logic signed [ACC_W-1:0] cv_out [Y][2];
  int checks = 0, failures = 0, cycle = 0;

  hybrid_sa #(.X(X), .Y(Y)) dut (.*);

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  int A [2*X][K];
  int W [K][2*Y];
  int WC [X][Y][2];
  int XC [NB][X][3];
  int pres_cycle [NB];
  int nout;

  function automatic int wval(input logic [3:0] w, input logic s);
    return s ? int'($signed(w)) : int'(w);
  endfunction

  task automatic idle_inputs();
    in_valid = 0; in_first = 0; in_last = 0; wload_shift = 0; wload_latch = 0; drain_shift = 0;
    for (int i = 0; i < X; i++) for (int k = 0; k < 3; k++) a_in[i][k] = 8'($urandom);
    for (int j = 0; j < Y; j++) for (int k = 0; k < 2; k++) w_in[j][k] = 4'($urandom);
  endtask

  task automatic run_mm(input logic sgn);
    int last_cycle;
    w_signed = {2{sgn}}; mode = SA_MM_OS;
    for (int r = 0; r < 2*X; r++) for (int k = 0; k < K; k++) A[r][k] = int'($urandom_range(255)) - 128;
    for (int k = 0; k < K; k++) for (int c = 0; c < 2*Y; c++) W[k][c] = int'($urandom_range(15));
    for (int k = 0; k < K; k++) begin
      @(negedge clk);
      idle_inputs();
      if ($urandom_range(3) == 0) begin @(negedge clk); idle_inputs(); end   // bubble
      in_valid = 1; in_first = (k == 0); in_last = (k == K-1);
      for (int i = 0; i < X; i++) begin a_in[i][0] = 8'(A[2*i][k]); a_in[i][2] = 8'(A[2*i+1][k]); end
      for (int j = 0; j < Y; j++) begin w_in[j][0] = 4'(W[k][2*j]); w_in[j][1] = 4'(W[k][2*j+1]); end
    end
    @(negedge clk); idle_inputs();
    last_cycle = cycle;                      // last beat was sampled at this edge
    // the tile must be complete X+Y-1 cycles after the last beat was presented
    repeat (X + Y - 2) @(negedge clk);
    for (int pr = X - 1; pr >= 0; pr--) begin
      for (int j = 0; j < Y; j++)
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++) begin
            longint e;
            e = 0;
            for (int k = 0; k < K; k++) e += longint'(A[2*pr+r][k]) * wval(4'(W[k][2*j+c]), sgn);
            check(dr_out[j][2*r+c], e, $sformatf("mm pr%0d j%0d r%0d c%0d", pr, j, r, c));
          end
      drain_shift = 1; @(negedge clk); drain_shift = 0;
    end
    check(cycle - last_cycle, X + Y - 2 + X, "mm drain timing");
  endtask

  task automatic run_conv();
    mode = SA_CONV_WS; w_signed = 2'b11;
    for (int i = 0; i < X; i++) for (int j = 0; j < Y; j++) for (int t = 0; t < 2; t++)
      WC[i][j][t] = int'($urandom_range(15)) - 8;
    for (int b = 0; b < X; b++) begin
      @(negedge clk); idle_inputs();
      if ($urandom_range(2) == 0) begin @(negedge clk); idle_inputs(); end  // gap
      wload_shift = 1; wload_latch = (b == X - 1);
      for (int j = 0; j < Y; j++) begin w_in[j][0] = 4'(WC[X-1-b][j][0]); w_in[j][1] = 4'(WC[X-1-b][j][1]); end
    end
    for (int n = 0; n < NB; n++) begin
      @(negedge clk); idle_inputs();
      in_valid = 1;
      pres_cycle[n] = cycle;
      for (int i = 0; i < X; i++) for (int k = 0; k < 3; k++) begin
        XC[n][i][k] = int'($urandom_range(255)) - 128;
        a_in[i][k] = 8'(XC[n][i][k]);
      end
    end
    @(negedge clk); idle_inputs();
    repeat (X + Y + 4) @(negedge clk);
    check(nout, NB, "conv output count");
  endtask

  // CONV output monitor
  always @(posedge clk) if (rst_n && mode == SA_CONV_WS && cv_valid) begin
    for (int j = 0; j < Y; j++) begin
      longint y0, y1;
      y0 = 0; y1 = 0;
      for (int i = 0; i < X; i++) begin
        y0 += WC[i][j][0] * XC[nout][i][0] + WC[i][j][1] * XC[nout][i][1];
        y1 += WC[i][j][0] * XC[nout][i][1] + WC[i][j][1] * XC[nout][i][2];
      end
      check(cv_out[j][0], y0, $sformatf("conv n%0d j%0d y0", nout, j));
      check(cv_out[j][1], y1, $sformatf("conv n%0d j%0d y1", nout, j));
    end
    check(cycle - pres_cycle[nout], X + Y - 1, "conv latency");
    nout <= nout + 1;
  end

  initial begin
    nout = 0; mode = SA_MM_OS; w_signed = 2'b11;
    idle_inputs();
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_mm(1'b1);
    run_mm(1'b0);
    run_mm(1'b1);
    run_conv();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
