// bcoc_pkg: sizes shared by the binary convolution operation circuit (BCOC).
//
// An n x n binary convolution is split in two halves ("bisection"): part a holds
// (n*n+1)/2 element products, part b the remaining (n*n-1)/2. The functions below
// derive every width and pipeline depth of the datapath from the kernel size n.
// The 3x3 numbers (5-input counter with 6 stages, 4-input counter with 4 stages,
// 4-stage adder, 5-bit result) are the published ones; the depth rule for other
// counter sizes is this design's own, chosen so that it reproduces those two points.
package bcoc_pkg;

  // Kernel side length of the main configuration (3x3 kernel).
  localparam int unsigned KERNEL_N = 3;

  // Number of element products in part a and part b.
  function automatic int unsigned part_a_len(int unsigned n);
    return (n * n + 1) / 2;
  endfunction

  function automatic int unsigned part_b_len(int unsigned n);
    return (n * n - 1) / 2;
  endfunction

  // Bits needed for a count of 0..inputs.
  function automatic int unsigned count_width(int unsigned inputs);
    return (inputs < 2) ? 1 : $clog2(inputs + 1);
  endfunction

  // Pipeline depth of a gate-level counter: 4 stages for 4 inputs and 6 for 5
  // inputs as published, 2*ceil(log2(inputs)) in general.
  function automatic int unsigned counter_stages(int unsigned inputs);
    return (inputs < 2) ? 1 : 2 * $clog2(inputs);
  endfunction

  // Width of the signed adder result (Ya1 + ~Yb0): one bit over the part-a count.
  function automatic int unsigned sum_width(int unsigned n);
    return count_width(part_a_len(n)) + 1;
  endfunction

  // Width of the signed convolution result C = 2*(Ya1 - Yb0) - 1, range -n*n..n*n.
  function automatic int unsigned result_width(int unsigned n);
    return sum_width(n) + 1;
  endfunction

endpackage
