// bcoc_xnor_xor: first pipeline stage of the BCOC, the bitwise binary products.
//
// With -1 coded as 0 and +1 as 1, the product of two binarised values is their
// XNOR. The N*N products are split in two parts: part a (elements
// 0..(N*N+1)/2-1) uses XNOR, so a 1 marks a +1 product; part b (the remaining
// (N*N-1)/2 elements) uses XOR, so a 1 there marks a -1 product. Counting ones
// in both parts then gives Ya1 and Yb0 directly. Both results are registered
// when adv is high, as every clocked gate of the pipeline is; in_valid travels
// along as out_valid.
//
// The XNOR/XOR split follows the published circuit; which elements form part a
// is this design's choice (the first half in row order).
module bcoc_xnor_xor #(
  parameter int unsigned N = bcoc_pkg::KERNEL_N
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    adv,
  input  logic                                    in_valid,
  input  logic [N*N-1:0]                          k_bits,
  input  logic [N*N-1:0]                          f_bits,
  output logic [bcoc_pkg::part_a_len(N)-1:0]      part_a,  // 1 = product +1
  output logic [bcoc_pkg::part_b_len(N)-1:0]      part_b,  // 1 = product -1
  output logic                                    out_valid
);

  localparam int unsigned NA = bcoc_pkg::part_a_len(N);
  localparam int unsigned NB = bcoc_pkg::part_b_len(N);

  logic [N*N-1:0] prod_xor;
  assign prod_xor = k_bits ^ f_bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      part_a    <= '0;
      part_b    <= '0;
      out_valid <= 1'b0;
    end else if (adv) begin
      part_a    <= ~prod_xor[NA-1:0];
      part_b    <=  prod_xor[N*N-1:NA];
      out_valid <= in_valid;
    end
  end

  if (NA + NB != N * N) begin : g_bad_split
    $error("bcoc_xnor_xor: parts do not cover the kernel");
  end

endmodule
