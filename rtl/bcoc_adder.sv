// bcoc_adder: gate-level pipeline adder that merges the two half counts.
//
// It forms  sum = Ya1 + ~Yb0  in SW-bit two's complement, where ~ is the
// bitwise complement of the zero-extended part-b count. Since ~Yb0 = -Yb0 - 1,
// the sum equals Ya1 - Yb0 - 1; the output stage turns it into the convolution
// result C = 2*sum + 1 = 2*(Ya1 - Yb0) - 1. The adder is a bit-level pipelined
// ripple-carry adder: stage s produces sum bit s and the carry into bit s+1, so
// its latency is SW advance pulses, 4 for the 3x3 kernel. Operand bits not yet
// used and sum bits already made ride along in delay registers.
//
// Taking the complement of the part-b count before the addition, and the 4-stage
// depth for the 3x3 kernel, follow the published circuit; the ripple-carry
// structure and the absent carry-in are this design's choices.
module bcoc_adder #(
  parameter int unsigned WA = 3,      // width of Ya1
  parameter int unsigned WB = 3,      // width of Yb0
  parameter int unsigned SW = WA + 1  // width of the signed sum, and stage count
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adv,
  input  logic                 in_valid,
  input  logic [WA-1:0]        ya1,
  input  logic [WB-1:0]        yb0,
  output logic signed [SW-1:0] sum,
  output logic                 out_valid
);

  // Pipeline state in front of stage s (index s) and after the last stage (SW).
  logic [SW-1:0] op_a  [SW+1];
  logic [SW-1:0] op_b  [SW+1];
  logic [SW-1:0] acc   [SW+1];
  logic          carry [SW+1];
  logic          vld   [SW+1];

  always_comb begin
    op_a[0]  = SW'(ya1);
    op_b[0]  = ~SW'(yb0);
    acc[0]   = '0;
    carry[0] = 1'b0;
    vld[0]   = in_valid;
  end

  for (genvar s = 0; s < SW; s++) begin : g_stage
    logic a_bit, b_bit;
    assign a_bit = op_a[s][s];
    assign b_bit = op_b[s][s];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        op_a[s+1]  <= '0;
        op_b[s+1]  <= '0;
        acc[s+1]   <= '0;
        carry[s+1] <= 1'b0;
        vld[s+1]   <= 1'b0;
      end else if (adv) begin
        op_a[s+1]     <= op_a[s];
        op_b[s+1]     <= op_b[s];
        acc[s+1]      <= acc[s];
        acc[s+1][s]   <= a_bit ^ b_bit ^ carry[s];
        carry[s+1]    <= (a_bit & b_bit) | (carry[s] & (a_bit ^ b_bit));
        vld[s+1]      <= vld[s];
      end
    end
  end

  assign sum       = signed'(acc[SW]);
  assign out_valid = vld[SW];

endmodule
