// sda_pkg: types and constants shared by the low-bit stable diffusion core.
// Operand widths follow the W4A8 scheme (4-bit weights, 8-bit activations,
// 16-bit fixed point inside the special function unit). The field spacing of
// the DSP packing, the fixed-point format and the instruction layout are this
// design's own choices.
package sda_pkg;
  localparam int A_W    = 8;    // activation width
  localparam int W_W    = 4;    // weight width
  localparam int FIELD  = 11;   // spacing of packed fields in one DSP product
  localparam int ACC_W  = 32;   // hybridSA accumulator width
  localparam int D_W    = 16;   // SFU fixed-point width
  localparam int FRAC   = 8;    // SFU fraction bits (Q8.8)
  localparam int LEN_W  = 16;   // lengths and counts in instructions
  localparam int TB_AW  = 19;   // tile-buffer element address (one half)

  typedef enum logic {SA_MM_OS = 1'b0, SA_CONV_WS = 1'b1} sa_mode_e;

  typedef enum logic [3:0] {
    SFU_NONE      = 4'd0,  // copy (dequantized tile straight out)
    SFU_SOFTMAX   = 4'd1,
    SFU_LNORM     = 4'd2,
    SFU_GNORM     = 4'd3,
    SFU_GNORM_SILU= 4'd4,
    SFU_SILU      = 4'd5,
    SFU_GEGLU     = 4'd6,
    SFU_ADD       = 4'd7,  // shortcut add with the residual stream
    SFU_TRANSPOSE = 4'd8
  } sfu_op_e;

  // One scheduling instruction: a hybridSA job that fills one tile-buffer
  // half, followed by an SFU job that drains it.
  typedef struct packed {
    sa_mode_e          mode;       // MM-OS or CONV-WS
    logic              w_signed;   // weights are signed 4-bit (else unsigned); pair mode
                                   // always uses an unsigned low and a signed high nibble
    logic              pair;       // 8x8 mode: weight columns hold (lo,hi) nibbles
    sfu_op_e           sfu_op;
    logic [LEN_W-1:0]  k_len;      // MM: reduction length; CONV: pixel pairs streamed
    logic [7:0]        n_ctile;    // MM: column tiles per row tile
    logic [LEN_W-1:0]  row_len;    // tile-buffer row stride (elements)
    logic [15:0]       dq_scale;   // dequantization multiplier
    logic [4:0]        dq_shift;   // dequantization right shift
    logic [15:0]       q_scale;    // output quantization multiplier
    logic [4:0]        q_shift;    // output quantization right shift
    // SFU read pattern: n_units x (passes) x seg_per_unit x seg_len
    logic [LEN_W-1:0]  n_units;
    logic [LEN_W-1:0]  seg_per_unit;
    logic [LEN_W-1:0]  seg_len;
    logic [LEN_W-1:0]  seg_stride;
    logic [LEN_W-1:0]  unit_stride;
    logic [3:0]        gb_shift;   // norm parameter index = unit*gb_unit + (offset >> gb_shift)
    logic [LEN_W-1:0]  gb_unit;
  } sda_instr_t;

  // Beat of the SFU read stream produced by the buffer controller.
  typedef struct packed {
    logic              pass;       // 0: statistics pass, 1: output pass
    logic              seg_last;   // last beat of a segment
    logic              unit_last;  // last beat of a unit (row / group)
    logic [LEN_W-1:0]  unit;       // unit index (row number for SoftMax)
    logic [LEN_W-1:0]  gb_idx;     // parameter index of lane 0
  } sfu_tag_t;
endpackage
