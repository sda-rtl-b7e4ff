// seq_isqrt: unsigned integer square root, one result bit per cycle.
//
// Pulse start with x; done pulses W/2 cycles later with r = floor(sqrt(x)).
// Bit-by-bit method: try setting each result bit from the top and keep it if
// the square does not exceed x. Used for the standard deviation in the
// L/GNorm unit. Helper of this design.
module seq_isqrt #(
  parameter int W = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [W-1:0]    x,
  output logic            busy,
  output logic            done,
  output logic [W/2-1:0]  r
);
  logic [W-1:0]          xv;
  logic [W/2-1:0]        acc;
  logic [$clog2(W/2)-1:0] bitn;
  logic [W/2-1:0]        cand;
  logic [W-1:0]          sq;

  assign cand = acc | ((W/2)'(1) << bitn);
  assign sq   = W'(cand) * W'(cand);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xv <= '0; acc <= '0; bitn <= '0; busy <= 1'b0; done <= 1'b0; r <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        xv <= x; acc <= '0; bitn <= ($clog2(W/2))'(W/2 - 1); busy <= 1'b1;
      end else if (busy) begin
        if (sq <= xv) acc <= cand;
        if (bitn == '0) begin
          busy <= 1'b0; done <= 1'b1;
          r <= (sq <= xv) ? cand : acc;
        end else bitn <= bitn - 1'b1;
      end
    end
  end
endmodule
