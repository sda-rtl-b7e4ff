// tb_sda_top: end-to-end run of the core at a reduced size (4 x 3 array,
// SFU parallelism 5, 64-element rows).
// Four rounds of nine instructions cover every SFU operator and both array
// modes: MM-OS 4-bit x 8-bit (signed and unsigned weights) and 8 x 8 pair
// mode for attention, CONV-WS with stationary taps, followed by SoftMax,
// LayerNorm, GroupNorm+SiLU, SiLU, GeGLU, shortcut add, transpose and a plain
// copy. For each instruction the testbench builds random operands, computes
// the exact matrix / convolution result, the dequantized tile, and then the
// expected SFU output beats (exact for copy / add / transpose, real-valued
// with the unit tolerances for the nonlinear operators) and the 8-bit
// quantized outputs. The operand stream and the residual stream have random
// gaps. Output beats must match in order.
// Rate: a copy job must stream one output beat per cycle.
// Mechanisms that must each be seen at least once: drain stall (a short
// MM tile waits for the previous drain), overlap of array and SFU work on the
// two buffer halves, an MM-OS <-> CONV-WS mode switch and 8 x 8 pair mode.
module tb_sda_top;
  import sda_pkg::*;
  localparam int X = 4, Y = 3, P = 5, MAXLEN = 64, NGB = 64, ROUNDS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic instr_valid, instr_ready, in_valid, in_ready, res_valid, res_ready, gb_we;
  sda_instr_t instr;
  logic signed [A_W-1:0] a_in [X][3];
  logic [W_W-1:0] w_in [Y][2];
  logic signed [D_W-1:0] res_data [P], gb_gamma, gb_beta, out_fx [P];
  logic [LEN_W-1:0] gb_addr;
  logic out_valid, sa_busy, sfu_busy, drain_stall;
  logic signed [A_W-1:0] out_q [P];
  logic [P-1:0] out_mask;

  sda_top #(.X(X), .Y(Y), .P(P), .MAXLEN(MAXLEN), .MAXROW(MAXLEN)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_stall = 0, n_overlap = 0, n_switch = 0, n_pair = 0, n_gap = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  // ---------------- reference data ----------------
  typedef struct {
    logic [P-1:0] m;
    real e [P];
    real tol [P];
    int qs, qsh;
    bit consec;
    int job, unit;
  } beat_t;
  typedef struct {
    logic signed [A_W-1:0] a [X][3];
    logic [W_W-1:0] w [Y][2];
  } op_t;
  beat_t eq [$];
  op_t oq [$];
  sda_instr_t iq [$];
  int M [4096];
  int gam [NGB], bet [NGB];
  int n_res_ref = 0;

  function automatic int rv(input int h, input int l);
    return ((h * 37 + l * 11) % 1001) - 500;
  endfunction
  function automatic int sat16(input longint v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : int'(v));
  endfunction
  function automatic int dq(input longint r, input int sc, input int sh);
    longint rnd;
    rnd = (sh == 0) ? 0 : (longint'(1) <<< (sh - 1));
    return sat16((r * sc + rnd) >>> sh);
  endfunction
  function automatic int quant(input int x, input int sc, input int sh);
    longint p, rnd;
    rnd = (sh == 0) ? 0 : (longint'(1) <<< (sh - 1));
    p = (longint'(x) * sc + rnd) >>> sh;
    return p > 127 ? 127 : (p < -128 ? -128 : int'(p));
  endfunction
  function automatic real silu_r(input real x);
    real t;
    t = x + 3.0; if (t < 0) t = 0; if (t > 6) t = 6;
    return x * t / 6.0;
  endfunction
  function automatic real absr(input real x);
    return x < 0 ? -x : x;
  endfunction

  // element address and lane validity of SFU read beat (u, s, b)
  function automatic int raddr(input sda_instr_t c, input bit tp, input int u, input int s, input int b);
    return tp ? u * c.unit_stride + s * P + b * c.seg_stride
              : u * c.unit_stride + s * c.seg_stride + b * P;
  endfunction

  // build operands, buffer image and expected outputs of one instruction
  task automatic make_instr(input sda_instr_t c);
    op_t o;
    int width;
    bit tp;
    int nb, np;
    tp = (c.sfu_op == SFU_TRANSPOSE);
    if (c.mode == SA_MM_OS) begin
      int A [2*X][64];
      int W [64][128];
      width = c.n_ctile * (c.pair ? Y : 2 * Y);
      for (int r = 0; r < 2 * X; r++) for (int k = 0; k < c.k_len; k++) A[r][k] = int'($urandom_range(255)) - 128;
      for (int k = 0; k < c.k_len; k++) for (int col = 0; col < width; col++)
        W[k][col] = c.pair ? int'($urandom_range(255)) - 128
                           : (c.w_signed ? int'($urandom_range(15)) - 8 : int'($urandom_range(15)));
      for (int t = 0; t < c.n_ctile; t++)
        for (int k = 0; k < c.k_len; k++) begin
          for (int i = 0; i < X; i++) begin
            o.a[i][0] = 8'(A[2*i][k]); o.a[i][1] = 8'($urandom); o.a[i][2] = 8'(A[2*i+1][k]);
          end
          for (int j = 0; j < Y; j++)
            if (c.pair) begin
              o.w[j][0] = 4'(W[k][t*Y + j]); o.w[j][1] = 4'(W[k][t*Y + j] >>> 4);
            end else begin
              o.w[j][0] = 4'(W[k][t*2*Y + 2*j]); o.w[j][1] = 4'(W[k][t*2*Y + 2*j + 1]);
            end
          oq.push_back(o);
        end
      for (int r = 0; r < 2 * X; r++)
        for (int col = 0; col < width; col++) begin
          longint acc;
          acc = 0;
          for (int k = 0; k < c.k_len; k++) acc += longint'(A[r][k]) * W[k][col];
          M[r * c.row_len + col] = dq(acc, c.dq_scale, c.dq_shift);
        end
    end else begin
      int WC [X][Y][2];
      int XC [64][X][3];
      for (int i = 0; i < X; i++) for (int j = 0; j < Y; j++) for (int t = 0; t < 2; t++)
        WC[i][j][t] = int'($urandom_range(15)) - 8;
      for (int b = 0; b < X; b++) begin
        for (int i = 0; i < X; i++) for (int k = 0; k < 3; k++) o.a[i][k] = 8'($urandom);
        for (int j = 0; j < Y; j++) begin o.w[j][0] = 4'(WC[X-1-b][j][0]); o.w[j][1] = 4'(WC[X-1-b][j][1]); end
        oq.push_back(o);
      end
      for (int n = 0; n < c.k_len; n++) begin
        for (int i = 0; i < X; i++) for (int k = 0; k < 3; k++) begin
          XC[n][i][k] = int'($urandom_range(255)) - 128;
          o.a[i][k] = 8'(XC[n][i][k]);
        end
        for (int j = 0; j < Y; j++) begin o.w[j][0] = 4'($urandom); o.w[j][1] = 4'($urandom); end
        oq.push_back(o);
        for (int j = 0; j < Y; j++) begin
          longint y0, y1;
          y0 = 0; y1 = 0;
          for (int i = 0; i < X; i++) begin
            y0 += WC[i][j][0] * XC[n][i][0] + WC[i][j][1] * XC[n][i][1];
            y1 += WC[i][j][0] * XC[n][i][1] + WC[i][j][1] * XC[n][i][2];
          end
          M[n * c.row_len + 2*j]     = dq(y0, c.dq_scale, c.dq_shift);
          M[n * c.row_len + 2*j + 1] = dq(y1, c.dq_scale, c.dq_shift);
        end
      end
    end
    // ---- expected SFU output ----
    np = (c.sfu_op inside {SFU_LNORM, SFU_GNORM, SFU_GNORM_SILU}) ? 2 : 1;
    nb = tp ? P : (c.seg_len + P - 1) / P;
    for (int u = 0; u < c.n_units; u++) begin
      real xs [$];
      real mu, sd, mx, sum;
      xs = {};
      for (int s = 0; s < c.seg_per_unit; s++)
        for (int b = 0; b < nb; b++)
          for (int l = 0; l < P; l++)
            if (!tp && b * P + l < c.seg_len) xs.push_back(M[raddr(c, tp, u, s, b) + l] / 256.0);
      mu = 0; sd = 0; mx = -1.0e9; sum = 0;
      foreach (xs[i]) begin mu += xs[i]; if (xs[i] > mx) mx = xs[i]; end
      if (xs.size() > 0) mu /= xs.size();
      foreach (xs[i]) begin sd += (xs[i] - mu) * (xs[i] - mu); sum += $exp(xs[i] - mx); end
      if (xs.size() > 0) sd = $sqrt(sd / xs.size());
      for (int p = np - 1; p < np; p++)
        for (int s = 0; s < c.seg_per_unit; s++)
          for (int b = 0; b < nb; b++) begin
            beat_t e;
            int a;
            a = raddr(c, tp, u, s, b);
            e.qs = c.q_scale; e.qsh = c.q_shift; e.consec = (c.sfu_op == SFU_NONE) && !(u == 0 && s == 0 && b == 0);
            e.job = iq.size(); e.unit = u;
            for (int l = 0; l < P; l++) begin
              real x;
              e.m[l] = tp ? (s * P + b < c.seg_len) : (b * P + l < c.seg_len);
              x = M[a + l] / 256.0;
              e.tol[l] = 0.0;
              case (c.sfu_op)
                SFU_SOFTMAX: begin
                  e.e[l] = 256.0 * $exp(x - mx) / sum; e.tol[l] = 2.0 + 0.01 * e.e[l];
                end
                SFU_LNORM, SFU_GNORM_SILU: begin
                  int g;
                  real nv;
                  g = u * c.gb_unit + ((b * P + l) >> c.gb_shift);
                  g = g % NGB;
                  nv = gam[g] / 256.0 * (x - mu) / sd + bet[g] / 256.0;
                  if (c.sfu_op == SFU_LNORM) begin
                    e.e[l] = 256.0 * nv; e.tol[l] = 4.0 + 0.02 * absr(256.0 * nv);
                  end else begin
                    e.e[l] = 256.0 * silu_r(nv); e.tol[l] = 8.0 + 0.04 * absr(256.0 * nv);
                  end
                end
                SFU_SILU: begin e.e[l] = 256.0 * silu_r(x); e.tol[l] = 2.0 + 0.01 * absr(256.0 * x); end
                SFU_GEGLU: begin
                  real xa;
                  xa = M[a + l - c.seg_len / 2] / 256.0;
                  e.e[l] = 256.0 * xa * silu_r(1.702 * x) / 1.702;
                  e.tol[l] = 2.0 + 1.5 * absr(xa) + 0.01 * absr(e.e[l]);
                end
                SFU_ADD: e.e[l] = sat16(M[a + l] + rv(n_res_ref, l));
                SFU_TRANSPOSE: e.e[l] = M[u * c.unit_stride + s * P + l * c.seg_stride + b];
                default: e.e[l] = M[a + l];
              endcase
            end
            if (c.sfu_op == SFU_ADD) n_res_ref++;
            if (c.sfu_op != SFU_GEGLU || b * P >= c.seg_len / 2) eq.push_back(e);
          end
    end
    iq.push_back(c);
  endtask

  // instruction templates; one round
  task automatic make_round();
    sda_instr_t c;
    // 1: MM 4x8 signed weights -> SoftMax
    c = '0; c.mode = SA_MM_OS; c.w_signed = 1; c.k_len = 6; c.n_ctile = 2; c.row_len = 4 * Y;
    c.dq_scale = 3; c.dq_shift = 4; c.q_scale = 1; c.q_shift = 1; c.sfu_op = SFU_SOFTMAX;
    c.n_units = 2 * X; c.seg_per_unit = 1; c.seg_len = 4 * Y; c.unit_stride = 4 * Y;
    make_instr(c);
    // 2: MM 8x8 pair mode (attention scores) -> SoftMax
    c = '0; c.mode = SA_MM_OS; c.pair = 1; c.k_len = 5; c.n_ctile = 3; c.row_len = 3 * Y;
    c.dq_scale = 3; c.dq_shift = 9; c.q_scale = 1; c.q_shift = 1; c.sfu_op = SFU_SOFTMAX;
    c.n_units = 2 * X; c.seg_per_unit = 1; c.seg_len = 3 * Y; c.unit_stride = 3 * Y;
    make_instr(c);
    // 3: MM unsigned weights -> LayerNorm (parameter per column)
    c = '0; c.mode = SA_MM_OS; c.w_signed = 0; c.k_len = 3; c.n_ctile = 2; c.row_len = 4 * Y;
    c.dq_scale = 1; c.dq_shift = 2; c.q_scale = 3; c.q_shift = 5; c.sfu_op = SFU_LNORM;
    c.n_units = 2 * X; c.seg_per_unit = 1; c.seg_len = 4 * Y; c.unit_stride = 4 * Y;
    make_instr(c);
    // 4: CONV -> GroupNorm + SiLU, 2 groups of Y channels over 6 pixels
    c = '0; c.mode = SA_CONV_WS; c.w_signed = 1; c.k_len = 6; c.row_len = 2 * Y;
    c.dq_scale = 1; c.dq_shift = 3; c.q_scale = 1; c.q_shift = 3; c.sfu_op = SFU_GNORM_SILU;
    c.n_units = 2; c.seg_per_unit = 6; c.seg_len = Y; c.seg_stride = 2 * Y; c.unit_stride = Y; c.gb_unit = Y;
    make_instr(c);
    // 5: MM -> GeGLU over rows of 2L, L a multiple of P
    c = '0; c.mode = SA_MM_OS; c.w_signed = 1; c.k_len = 4; c.n_ctile = 2; c.row_len = 4 * Y;
    c.dq_scale = 1; c.dq_shift = 2; c.q_scale = 1; c.q_shift = 4; c.sfu_op = SFU_GEGLU;
    c.n_units = 2 * X; c.seg_per_unit = 1; c.seg_len = 2 * P * (2 * Y / P); c.unit_stride = 4 * Y;
    make_instr(c);
    // 6: short MM tiles (drain stalls) -> shortcut add
    c = '0; c.mode = SA_MM_OS; c.w_signed = 1; c.k_len = 2; c.n_ctile = 4; c.row_len = 8 * Y;
    c.dq_scale = 5; c.dq_shift = 2; c.q_scale = 1; c.q_shift = 6; c.sfu_op = SFU_ADD;
    c.n_units = 2 * X; c.seg_per_unit = 1; c.seg_len = 8 * Y; c.unit_stride = 8 * Y;
    make_instr(c);
    // 7: MM pair mode -> transpose of the first 5 rows
    c = '0; c.mode = SA_MM_OS; c.pair = 1; c.k_len = 3; c.n_ctile = 2; c.row_len = 2 * Y;
    c.dq_scale = 1; c.dq_shift = 6; c.q_scale = 1; c.q_shift = 2; c.sfu_op = SFU_TRANSPOSE;
    c.n_units = 1; c.seg_per_unit = (2 * Y + P - 1) / P; c.seg_len = 2 * Y; c.seg_stride = 2 * Y;
    make_instr(c);
    // 8: CONV -> SiLU on 5 pixels
    c = '0; c.mode = SA_CONV_WS; c.w_signed = 1; c.k_len = 5; c.row_len = 2 * Y;
    c.dq_scale = 1; c.dq_shift = 3; c.q_scale = 1; c.q_shift = 4; c.sfu_op = SFU_SILU;
    c.n_units = 5; c.seg_per_unit = 1; c.seg_len = 2 * Y; c.unit_stride = 2 * Y;
    make_instr(c);
    // 9: MM -> plain copy
    c = '0; c.mode = SA_MM_OS; c.w_signed = 1; c.k_len = 8; c.n_ctile = 2; c.row_len = 4 * Y;
    c.dq_scale = 1; c.dq_shift = 3; c.q_scale = 1; c.q_shift = 3; c.sfu_op = SFU_NONE;
    c.n_units = 2 * X; c.seg_per_unit = 1; c.seg_len = 4 * Y; c.unit_stride = 4 * Y;
    make_instr(c);
  endtask

  // ---------------- stimulus drivers ----------------
  int hcnt = 0;
  always_comb for (int l = 0; l < P; l++) res_data[l] = 16'(rv(hcnt, l));
  always @(posedge clk) if (rst_n && res_valid && res_ready) hcnt <= hcnt + 1;

  // ---------------- monitors ----------------
  sa_mode_e last_mode = SA_MM_OS;
  bit any_mode = 0, prev_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (drain_stall) n_stall++;
    if (sa_busy && sfu_busy) n_overlap++;
    if (instr_valid && instr_ready) begin
      if (any_mode && instr.mode != last_mode) n_switch++;
      last_mode = instr.mode; any_mode = 1;
      if (instr.pair) n_pair++;
    end
    if (out_valid) begin
      beat_t e;
      checks++;
      if (eq.size() == 0) begin failures++; $display("FAIL unexpected output beat"); end
      else begin
        e = eq.pop_front();
        chk(out_mask == e.m, $sformatf("mask %b exp %b", out_mask, e.m));
        if (e.consec) chk(prev_out, "copy job is not one beat per cycle");
        for (int l = 0; l < P; l++) if (e.m[l]) begin
          chk(real'(out_fx[l]) <= e.e[l] + e.tol[l] && real'(out_fx[l]) >= e.e[l] - e.tol[l],
              $sformatf("job %0d unit %0d lane %0d got %0d exp %f", e.job, e.unit, l, out_fx[l], e.e[l]));
          chk(int'(out_q[l]) == quant(out_fx[l], e.qs, e.qsh), "quantized output");
        end
      end
    end
    prev_out = out_valid;
    cyc++;
  end

  initial begin
    instr_valid = 0; instr = '0; in_valid = 0; res_valid = 0; gb_we = 0; gb_addr = 0; gb_gamma = 0; gb_beta = 0;
    for (int i = 0; i < X; i++) for (int k = 0; k < 3; k++) a_in[i][k] = 0;
    for (int j = 0; j < Y; j++) for (int k = 0; k < 2; k++) w_in[j][k] = 0;
    for (int i = 0; i < NGB; i++) begin gam[i] = $urandom_range(128, 384); bet[i] = int'($urandom_range(512)) - 256; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < NGB; i++) begin
      gb_we = 1; gb_addr = LEN_W'(i); gb_gamma = 16'(gam[i]); gb_beta = 16'(bet[i]);
      @(negedge clk);
    end
    gb_we = 0;
    // the buffer image is reused per instruction, so expectations are built
    // instruction by instruction before the stimulus is released
    for (int r = 0; r < ROUNDS; r++) make_round();
    fork
      foreach (iq[i]) begin
        instr_valid = 1; instr = iq[i];
        @(posedge clk);
        while (!instr_ready) @(posedge clk);
        #1 instr_valid = 0;
        @(negedge clk);
      end
      begin
        while (oq.size() != 0) begin
          in_valid = ($urandom_range(6) != 0);
          a_in = oq[0].a; w_in = oq[0].w;
          @(posedge clk);
          if (in_valid && in_ready) void'(oq.pop_front());
          #1;
        end
        in_valid = 0;
      end
      forever begin
        res_valid = ($urandom_range(4) != 0);
        @(posedge clk); #1;
      end
    join_any
    while (eq.size() != 0 || sa_busy || sfu_busy) @(posedge clk);
    repeat (10) @(posedge clk);
    $display("drain stall cycles %0d, array/SFU overlap cycles %0d, mode switches %0d, pair-mode instructions %0d",
             n_stall, n_overlap, n_switch, n_pair);
    chk(n_stall > 0, "no drain stall");
    chk(n_overlap > 0, "no array/SFU overlap");
    chk(n_switch > 0, "no mode switch");
    chk(n_pair > 0, "no pair-mode instruction");
    chk(oq.size() == 0 && eq.size() == 0, "leftover operands or outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
