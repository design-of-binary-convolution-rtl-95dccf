// bcoc: binary convolution operation circuit for an N x N binary kernel
// (3x3 by default), the convolution unit of a binarised neural network.
//
// Kernel and feature bits are binarised values with -1 coded as 0 and +1 as 1.
// The result of one window is C = sum(F*K) = 2*Y1 - N*N, where Y1 is the number
// of agreeing bit pairs. Instead of one N*N-input counter the circuit splits the
// products in two halves (bisection): part a, (N*N+1)/2 XNOR products, is
// counted for ones (Ya1); part b, the other (N*N-1)/2 products taken as XOR, is
// counted for ones too, which are the disagreeing pairs (Yb0). Then
// C = 2*(Ya1 - Yb0) - 1, formed by adding Ya1 to the complement of Yb0 and
// doubling the sum with a 1 shifted in at the bottom.
//
// Datapath, every stage moving on an advance pulse (bcoc_clk):
//   SR memory -> XNOR/XOR (1) -> 5-input counter (6) / 4-input counter (4) +
//   2 delay stages -> adder (4) -> output shift register (1)
// so a window loaded by sr_to_main leaves as result 12 advance pulses after the
// pulse that takes it into the XNOR/XOR stage, and a new window can enter on
// every pulse.
//
// Interface: data_in0 / data_in1 are the serial feature and kernel bits written
// by insr_clk pulses (element [0][0] first); sr_to_main copies the written window
// towards the datapath; bcoc_clk advances the whole pipeline. result is the
// signed convolution value (outbit0 is bit 0), valid for one cycle with
// out_valid and held afterwards. The three clocks of the superconducting original
// are enables here on one clock clk; rst_n is an asynchronous active-low reset.
// The structure, the counter sizes and depths, the adder depth and the 5-bit
// result follow the published circuit; the single-clock form, the valid flags
// and the bit order are this design's own.
module bcoc #(
  parameter int unsigned N = bcoc_pkg::KERNEL_N
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  input  logic                                         data_in0,    // serial feature bit
  input  logic                                         data_in1,    // serial kernel bit
  input  logic                                         insr_clk,    // input-SR write pulse
  input  logic                                         sr_to_main,  // SR-to-datapath transfer pulse
  input  logic                                         bcoc_clk,    // pipeline advance pulse
  output logic signed [bcoc_pkg::result_width(N)-1:0]  result,      // outbit[RW-1:0]
  output logic                                         out_valid,
  output logic                                         result_held
);

  import bcoc_pkg::*;

  localparam int unsigned NA  = part_a_len(N);
  localparam int unsigned NB  = part_b_len(N);
  localparam int unsigned WA  = count_width(NA);
  localparam int unsigned WB  = count_width(NB);
  localparam int unsigned SA  = counter_stages(NA);
  localparam int unsigned SB  = counter_stages(NB);
  localparam int unsigned SW  = sum_width(N);

  // SR memory
  logic [N*N-1:0] k_bits, f_bits;
  logic           win_valid;

  bcoc_sr_memory #(.N(N)) u_sr (
    .clk, .rst_n,
    .shift_en (insr_clk),
    .din_k    (data_in1),
    .din_f    (data_in0),
    .load     (sr_to_main),
    .adv      (bcoc_clk),
    .k_bits, .f_bits,
    .out_valid(win_valid)
  );

  // XNOR (part a) and XOR (part b)
  logic [NA-1:0] part_a;
  logic [NB-1:0] part_b;
  logic          prod_valid;

  bcoc_xnor_xor #(.N(N)) u_prod (
    .clk, .rst_n,
    .adv      (bcoc_clk),
    .in_valid (win_valid),
    .k_bits, .f_bits,
    .part_a, .part_b,
    .out_valid(prod_valid)
  );

  // Counters
  logic [WA-1:0] ya1;
  logic [WB-1:0] yb0_raw, yb0;
  logic          ya_valid, yb_valid_raw, yb_valid;

  bcoc_pipe_counter #(.INPUTS(NA), .STAGES(SA)) u_cnt_a (
    .clk, .rst_n,
    .adv      (bcoc_clk),
    .in_valid (prod_valid),
    .din      (part_a),
    .count    (ya1),
    .out_valid(ya_valid)
  );

  bcoc_pipe_counter #(.INPUTS(NB), .STAGES(SB)) u_cnt_b (
    .clk, .rst_n,
    .adv      (bcoc_clk),
    .in_valid (prod_valid),
    .din      (part_b),
    .count    (yb0_raw),
    .out_valid(yb_valid_raw)
  );

  bcoc_delay #(.W(WB), .DEPTH(SA - SB)) u_align_b (
    .clk, .rst_n,
    .adv      (bcoc_clk),
    .in_valid (yb_valid_raw),
    .din      (yb0_raw),
    .dout     (yb0),
    .out_valid(yb_valid)
  );

  // Adder
  logic signed [SW-1:0] sum;
  logic                 sum_valid;

  bcoc_adder #(.WA(WA), .WB(WB), .SW(SW)) u_add (
    .clk, .rst_n,
    .adv      (bcoc_clk),
    .in_valid (ya_valid & yb_valid),
    .ya1, .yb0,
    .sum,
    .out_valid(sum_valid)
  );

  // Output SR (doubling)
  bcoc_out_sr #(.SW(SW)) u_out (
    .clk, .rst_n,
    .adv      (bcoc_clk),
    .in_valid (sum_valid),
    .sum,
    .result,
    .out_valid,
    .held     (result_held)
  );

  // Both halves of a window always reach the adder on the same pulse.
  a_halves_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    ya_valid == yb_valid);

endmodule
