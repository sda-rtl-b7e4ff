// transpose_unit: P x P block transpose for the SFU.
//
// The buffer controller reads a block as P beats, one per matrix row (P
// consecutive elements each). The unit collects them, then emits P beats, one
// per column of the block, so the stream leaves as rows of the transposed
// matrix. While it emits it holds in_ready low. The lane mask of output beat
// c, lane r, is the mask bit c of input row r. The document names the
// transpose operator and says it relies on the shared tile buffer; the block
// scheme is this design's choice.
// Timing: P input cycles, then P output cycles per block.
module transpose_unit
  import sda_pkg::*;
#(
  parameter int P = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [D_W-1:0]  in_data [P],
  input  logic        [P-1:0]    in_mask,
  output logic                   out_valid,
  output logic signed [D_W-1:0]  out_data [P],
  output logic        [P-1:0]    out_mask,
  output logic                   idle
);
  localparam int CW = $clog2(P + 1);
  logic signed [D_W-1:0] blk  [P][P];
  logic        [P-1:0]   bmsk [P];
  logic [CW-1:0]         cnt;
  logic                  emitting;

  assign in_ready = !emitting;
  assign idle     = !emitting && cnt == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; emitting <= 1'b0; out_valid <= 1'b0; out_mask <= '0;
      for (int r = 0; r < P; r++) begin
        bmsk[r] <= '0; out_data[r] <= '0;
        for (int c = 0; c < P; c++) blk[r][c] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (!emitting) begin
        if (in_valid) begin
          blk[cnt]  <= in_data;
          bmsk[cnt] <= in_mask;
          if (cnt == CW'(P - 1)) begin cnt <= '0; emitting <= 1'b1; end
          else cnt <= cnt + 1'b1;
        end
      end else begin
        out_valid <= 1'b1;
        for (int r = 0; r < P; r++) begin
          out_data[r] <= blk[r][cnt];
          out_mask[r] <= bmsk[r][cnt];
        end
        if (cnt == CW'(P - 1)) begin cnt <= '0; emitting <= 1'b0; end
        else cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
