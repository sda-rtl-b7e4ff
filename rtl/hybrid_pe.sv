// hybrid_pe: processing element of the hybrid systolic array.
//
// Each PE has two packed DSPs. Every 8-bit activation is split into a low
// nibble (unsigned) and a high nibble (signed); the low nibbles go to one DSP,
// the high nibbles to the other, and each result is rebuilt as hi*16 + lo.
//   MM-OS  : activations a_in[0] (row 2i) and a_in[2] (row 2i+1) move right,
//            weights w_in[0] (col 2j) and w_in[1] (col 2j+1) move down; the PE
//            accumulates the 2x2 output block acc[2*r+c] in place. On the
//            beat marked last the finished block is copied to the drain
//            register dr, which shifts down the column on drain_shift while
//            acc already works on the next tile.
//   CONV-WS: the PE keeps two kernel taps (w0,w1) latched from the weight
//            chain on wlatch, receives three neighbouring pixels x0..x2 and
//            adds y0 = w0*x0 + w1*x1 and y1 = w0*x1 + w1*x2 to the two partial
//            sums arriving from above. In CONV-WS the weight chain only
//            advances on wshift, so weight loading may have gaps.
//            Only the two complete middle fields of each DSP product are
//            used (four multiplies, two additions); the outer single-
//            product fields are dropped, not passed to a neighbour.
// The split into nibbles, the two DSPs per PE, the MM-OS/CONV-WS dataflows and
// BitCR follow the document; the 2x2 output block, the drain register and the
// weight-signedness flag (for the unsigned low nibble of 8-bit operands) are
// this design's choices.
// Timing: every output (a_out, w_out, ps_out, flags) is registered: one cycle
// per hop. acc/dr update one cycle after the beat arrives.
module hybrid_pe
  import sda_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  sa_mode_e                 mode,
  input  logic [1:0]               w_signed,  // per weight column
  // activation path (rightwards) with its beat flags
  input  logic                     v_in, first_in, last_in,
  input  logic signed [A_W-1:0]    a_in  [3],
  output logic                     v_out, first_out, last_out,
  output logic signed [A_W-1:0]    a_out [3],
  // weight path (downwards); wlatch captures stationary weights (CONV-WS)
  input  logic        [W_W-1:0]    w_in  [2],
  output logic        [W_W-1:0]    w_out [2],
  input  logic                     wshift,   // CONV-WS: advance the weight chain
  input  logic                     wlatch,
  // partial sums (CONV-WS)
  input  logic signed [ACC_W-1:0]  ps_in  [2],
  output logic signed [ACC_W-1:0]  ps_out [2],
  // output drain (MM-OS)
  input  logic                     drain_shift,
  input  logic signed [ACC_W-1:0]  dr_in  [4],
  output logic signed [ACC_W-1:0]  dr_out [4]
);
  logic        [W_W-1:0]   wst [2];
  logic signed [ACC_W-1:0] acc [4];
  logic signed [4:0]       dlo_a [3], dhi_a [3], dsp_w [2];
  logic signed [FIELD-1:0] flo [4], fhi [4];
  logic signed [ACC_W-1:0] res [4];   // hi*16 + lo per field

  function automatic logic signed [4:0] wext(input logic [W_W-1:0] w, input logic s);
    return s ? {w[W_W-1], w} : {1'b0, w};
  endfunction

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      dlo_a[k] = {1'b0, a_in[k][3:0]};
      dhi_a[k] = {a_in[k][7], a_in[k][7:4]};
    end
    if (mode == SA_MM_OS) begin
      dlo_a[1] = '0;
      dhi_a[1] = '0;
      dsp_w[0] = wext(w_in[0], w_signed[0]);
      dsp_w[1] = wext(w_in[1], w_signed[1]);
    end else begin
      dsp_w[0] = wext(wst[1], w_signed[1]);   // reversed taps give a correlation
      dsp_w[1] = wext(wst[0], w_signed[0]);
    end
  end

  packed_dsp u_dsp_lo (.a(dlo_a), .w(dsp_w), .f(flo));
  packed_dsp u_dsp_hi (.a(dhi_a), .w(dsp_w), .f(fhi));

  always_comb
    for (int k = 0; k < 4; k++)
      res[k] = (ACC_W'(fhi[k]) <<< 4) + ACC_W'(flo[k]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_out <= 1'b0; first_out <= 1'b0; last_out <= 1'b0;
      for (int k = 0; k < 3; k++) a_out[k] <= '0;
      for (int k = 0; k < 2; k++) begin w_out[k] <= '0; wst[k] <= '0; ps_out[k] <= '0; end
      for (int k = 0; k < 4; k++) begin acc[k] <= '0; dr_out[k] <= '0; end
    end else begin
      v_out <= v_in; first_out <= first_in; last_out <= last_in;
      a_out <= a_in;
      if (mode == SA_MM_OS || wshift) w_out <= w_in;
      if (wlatch) wst <= w_in;
      if (mode == SA_CONV_WS) begin
        ps_out[0] <= ps_in[0] + (v_in ? res[1] : '0);
        ps_out[1] <= ps_in[1] + (v_in ? res[2] : '0);
      end else begin
        ps_out[0] <= ps_in[0];
        ps_out[1] <= ps_in[1];
      end
      if (mode == SA_MM_OS && v_in) begin
        for (int k = 0; k < 4; k++)
          acc[k] <= first_in ? res[k] : acc[k] + res[k];
      end
      if (mode == SA_MM_OS && v_in && last_in) begin
        for (int k = 0; k < 4; k++)
          dr_out[k] <= first_in ? res[k] : acc[k] + res[k];
      end else if (drain_shift) begin
        dr_out <= dr_in;
      end
    end
  end
endmodule
