// bcoc_out_sr: output register of the BCOC, the doubling shift and the
// parallel result bits outbit0..outbit(RW-1).
//
// The adder delivers sum = Ya1 - Yb0 - 1. Shifting it left by one place and
// filling the freed least significant bit with a 1 gives 2*sum + 1, which is
// the convolution result C = 2*(Ya1 - Yb0) - 1 = 2*Y1 - N*N as an RW-bit two's
// complement number (5 bits for the 3x3 kernel). The register captures on an
// advance pulse that carries a valid sum and then holds the result, so that a
// slow reader can sample it; out_valid marks the pulse on which a new result
// arrived, and held is high once any result has been stored.
//
// The doubling shift register and the 5 parallel result bits follow the
// published circuit; filling the low bit with 1 (which, with the complemented
// part-b count, yields the odd result of an odd-sized kernel) is this design's
// reading of it.
module bcoc_out_sr #(
  parameter int unsigned SW = 4,
  localparam int unsigned RW = SW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adv,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] sum,
  output logic signed [RW-1:0] result,
  output logic                 out_valid,
  output logic                 held
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result    <= '0;
      out_valid <= 1'b0;
      held      <= 1'b0;
    end else if (adv) begin
      out_valid <= in_valid;
      if (in_valid) begin
        result <= {sum, 1'b1};
        held   <= 1'b1;
      end
    end else begin
      out_valid <= 1'b0;
    end
  end

endmodule
