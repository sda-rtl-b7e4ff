// tile_buffer: shared ping-pong tile buffer between hybridSA and the SFU.
//
// Two halves (selected by wh / rh), each holding NBANK*BANK_DEPTH 16-bit
// elements. Element e of a half lives in bank e % NBANK, row e / NBANK, so a
// write of WL consecutive elements and a read of RL consecutive elements
// starting at any element address each touch distinct banks and complete in
// one cycle. The hybridSA side writes one output row segment per cycle while
// the SFU side reads P-lane beats of the other half: the tile-level
// (coarse-grained) pipeline of the document. The banking and the sizes are
// this design's choices; the default half holds 40 rows of 10240 elements
// (a 20 x 10 array's output tile at the widest GeGLU row).
// Addresses beyond the half are the caller's error (the row index wraps
// into the other half).
// Timing: a write lands at the clock edge; rdata is valid one cycle after re.
module tile_buffer
  import sda_pkg::*;
#(
  parameter int NBANK      = 32,
  parameter int BANK_DEPTH = 12800,
  parameter int WL         = 20,
  parameter int RL         = 5
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     wh,
  input  logic [TB_AW-1:0]         waddr,
  input  logic signed [D_W-1:0]    wdata [WL],
  input  logic [WL-1:0]            wmask,
  input  logic                     re,
  input  logic                     rh,
  input  logic [TB_AW-1:0]         raddr,
  output logic signed [D_W-1:0]    rdata [RL]
);
  localparam int BW = $clog2(NBANK);
  localparam int RW = $clog2(2 * BANK_DEPTH);

  logic signed [D_W-1:0] bank_q [NBANK];
  logic [BW-1:0]         rsel_q;

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic signed [D_W-1:0] mem [2 * BANK_DEPTH];
    logic [BW-1:0]    wl, rl;
    logic [TB_AW-1:0] we_addr, re_addr;
    logic             wen;
    logic [RW-1:0]    widx, ridx;
    always_comb begin
      wl      = BW'(b) - waddr[BW-1:0];
      rl      = BW'(b) - raddr[BW-1:0];
      we_addr = waddr + TB_AW'(wl);
      re_addr = raddr + TB_AW'(rl);
      wen     = we && (32'(wl) < WL) && wmask[32'(wl) % WL];
      widx    = RW'(we_addr >> BW) + (wh ? RW'(BANK_DEPTH) : '0);
      ridx    = RW'(re_addr >> BW) + (rh ? RW'(BANK_DEPTH) : '0);
    end
    always_ff @(posedge clk) begin
      if (wen) mem[widx] <= wdata[32'(wl) % WL];
      if (re && 32'(rl) < RL) bank_q[b] <= mem[ridx];
    end
  end

  always_ff @(posedge clk)
    if (re) rsel_q <= raddr[BW-1:0];

  always_comb
    for (int l = 0; l < RL; l++)
      rdata[l] = bank_q[BW'(rsel_q + BW'(l))];
endmodule
