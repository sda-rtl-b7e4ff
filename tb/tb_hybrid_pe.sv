// tb_hybrid_pe: one processing element.
// MM-OS: random tiles of 1..8 beats with signed or unsigned weights, chosen
// per weight column (as in pair mode); the drain
// register must hold the 2x2 block of sums one cycle after the last beat, and
// activations and weights must be forwarded with one cycle of delay.
// CONV-WS: random latched taps, pixels and incoming partial sums; ps_out must
// be ps_in plus the two two-tap results one cycle later. Drain shifting must
// copy dr_in.
module tb_hybrid_pe;
  import sda_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  sa_mode_e mode;
  logic [1:0] w_signed;
  logic v_in, first_in, last_in, v_out, first_out, last_out, wshift, wlatch, drain_shift;
  logic signed [A_W-1:0] a_in [3], a_out [3];
  logic [W_W-1:0] w_in [2], w_out [2];
  logic signed [ACC_W-1:0] ps_in [2], ps_out [2], dr_in [4], dr_out [4];
  int checks = 0, failures = 0;

  hybrid_pe dut (.*);

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  function automatic longint wv(input logic [3:0] w, input logic s);
    return s ? longint'($signed(w)) : longint'(w);
  endfunction

  task automatic clear_in();
    v_in = 0; first_in = 0; last_in = 0; wshift = 0; wlatch = 0; drain_shift = 0;
    foreach (a_in[k]) a_in[k] = 8'($urandom);
    foreach (w_in[k]) w_in[k] = 4'($urandom);
    foreach (ps_in[k]) ps_in[k] = $urandom;
    foreach (dr_in[k]) dr_in[k] = $urandom;
  endtask

  initial begin
    mode = SA_MM_OS; w_signed = 2'b11; clear_in();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int nk;
      longint e [4];
      nk = $urandom_range(1, 8);
      mode = SA_MM_OS; w_signed = 2'($urandom);  // includes the pair-mode setting 2'b10
      foreach (e[k]) e[k] = 0;
      for (int k = 0; k < nk; k++) begin
        @(negedge clk); clear_in();
        v_in = 1; first_in = (k == 0); last_in = (k == nk - 1);
        e[0] += longint'(a_in[0]) * wv(w_in[0], w_signed[0]);
        e[1] += longint'(a_in[0]) * wv(w_in[1], w_signed[1]);
        e[2] += longint'(a_in[2]) * wv(w_in[0], w_signed[0]);
        e[3] += longint'(a_in[2]) * wv(w_in[1], w_signed[1]);
        @(posedge clk); #1;
        check(a_out[0], a_in[0], "a fwd"); check(w_out[1], w_in[1], "w fwd");
        check(last_out, last_in, "last fwd");
      end
      for (int k = 0; k < 4; k++) check(dr_out[k], e[k], $sformatf("mm t%0d k%0d", t, k));
      @(negedge clk); clear_in(); drain_shift = 1;
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) check(dr_out[k], dr_in[k], "drain shift");
    end
    // CONV-WS
    for (int t = 0; t < 200; t++) begin
      logic [3:0] w0, w1;
      mode = SA_CONV_WS; w_signed = {2{1'($urandom_range(1))}};
      @(negedge clk); clear_in(); wshift = 1; wlatch = 1; w0 = w_in[0]; w1 = w_in[1];
      for (int n = 0; n < 4; n++) begin
        longint y0, y1;
        @(negedge clk); clear_in(); v_in = 1;
        y0 = wv(w0, w_signed[0]) * a_in[0] + wv(w1, w_signed[1]) * a_in[1];
        y1 = wv(w0, w_signed[0]) * a_in[1] + wv(w1, w_signed[1]) * a_in[2];
        @(posedge clk); #1;
        check(ps_out[0], ACC_W'(longint'(ps_in[0]) + y0), "conv y0");
        check(ps_out[1], ACC_W'(longint'(ps_in[1]) + y1), "conv y1");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
