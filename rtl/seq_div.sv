// seq_div: unsigned restoring divider, one quotient bit per cycle.
//
// Pulse start with num/den; done pulses NW cycles later with quo = num / den
// (den = 0 gives all ones). Used for the SoftMax reciprocal and the norm
// statistics, where one division per row or group is enough because the
// per-element work is a multiply. Helper of this design.
module seq_div #(
  parameter int NW = 40,
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quo
);
  logic [NW-1:0] q;
  logic [DW:0]   rem;
  logic [DW-1:0] d;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]   trial;

  assign trial = {rem[DW-1:0], q[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; rem <= '0; d <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0; quo <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q <= num; rem <= '0; d <= den; cnt <= '0; busy <= 1'b1;
      end else if (busy) begin
        if (trial >= {1'b0, d}) begin
          rem <= trial - {1'b0, d};
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= trial;
          q   <= {q[NW-2:0], 1'b0};
        end
        if (cnt == ($clog2(NW+1))'(NW - 1)) begin
          busy <= 1'b0; done <= 1'b1;
          quo  <= (trial >= {1'b0, d}) ? {q[NW-2:0], 1'b1} : {q[NW-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
