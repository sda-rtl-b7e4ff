// tb_tile_buffer: writes random WL-wide masked rows at random element
// addresses of both halves, keeps a reference copy, and reads random P-lane
// windows back (one cycle latency), including reads that cross bank
// boundaries and reads of one half while the other is written.
module tb_tile_buffer;
  import sda_pkg::*;
  localparam int NBANK = 8, BD = 64, WL = 6, RL = 5, NE = NBANK * BD;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, wh, re, rh;
  logic [TB_AW-1:0] waddr, raddr;
  logic signed [D_W-1:0] wdata [WL], rdata [RL];
  logic [WL-1:0] wmask;
  int checks = 0, failures = 0;
  logic signed [D_W-1:0] ref_m [2][NE];

  tile_buffer #(.NBANK(NBANK), .BANK_DEPTH(BD), .WL(WL), .RL(RL)) dut (.*);

  initial begin
    we = 0; re = 0; wh = 0; rh = 0; waddr = 0; raddr = 0; wmask = 0;
    foreach (wdata[k]) wdata[k] = 0;
    // fill everything once
    for (int h = 0; h < 2; h++)
      for (int a = 0; a + WL <= NE; a += WL) begin
        @(negedge clk); we = 1; wh = h[0]; waddr = TB_AW'(a); wmask = '1;
        foreach (wdata[k]) begin wdata[k] = 16'($urandom); ref_m[h][a+k] = wdata[k]; end
      end
    for (int h = 0; h < 2; h++)
      for (int a = NE - NE % WL; a < NE; a++) begin
        @(negedge clk); we = 1; wh = h[0]; waddr = TB_AW'(a); wmask = 1;
        wdata[0] = 16'($urandom); ref_m[h][a] = wdata[0];
      end
    for (int it = 0; it < 4000; it++) begin
      int ra, rhv;
      @(negedge clk);
      // random write to one half
      we = 1'($urandom_range(1)); wh = 1'($urandom_range(1));
      waddr = TB_AW'($urandom_range(NE - WL)); wmask = WL'($urandom);
      foreach (wdata[k]) wdata[k] = 16'($urandom);
      // read the other half (or same half at a different time)
      re = 1; rhv = $urandom_range(1); rh = 1'(rhv); ra = $urandom_range(NE - RL); raddr = TB_AW'(ra);
      @(posedge clk); #1;
      for (int l = 0; l < RL; l++) begin
        checks++;
        if (rdata[l] != ref_m[rhv][ra+l]) begin failures++; if (failures < 10) $display("FAIL h%0d a%0d", rhv, ra+l); end
      end
      if (we) for (int k = 0; k < WL; k++) if (wmask[k]) ref_m[wh][int'(waddr)+k] = wdata[k];
      re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
