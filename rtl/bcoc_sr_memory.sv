// bcoc_sr_memory: shift-register (SR) memory that stages one kernel and one
// feature-map window for the convolution datapath.
//
// Two serial shift registers of N*N bits are written one bit per shift_en pulse
// (the input-SR clock), kernel bits on din_k and feature bits on din_f, element
// [0][0] first and then row by row. A load pulse (the SR-to-main clock) copies
// both registers into a parallel output register and raises out_valid. The held
// window is consumed by the next advance pulse of the main pipeline (adv), which
// drops out_valid unless a new load arrives in the same cycle. Shifting may go
// on while a window is held, and a load in the same cycle as a shift copies the
// contents from before that shift, so a new window can be issued every cycle.
//
// The serial write and the separate transfer clock follow the measured set-up
// of the published circuit; the bit order, the valid flag and the
// single-clock-with-enables form are this design's own.
module bcoc_sr_memory #(
  parameter int unsigned N = bcoc_pkg::KERNEL_N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,   // input-SR clock pulse
  input  logic             din_k,      // serial kernel bit
  input  logic             din_f,      // serial feature-map bit
  input  logic             load,       // SR-to-main transfer pulse
  input  logic             adv,        // main pipeline advance pulse
  output logic [N*N-1:0]   k_bits,     // kernel window, bit i = element i
  output logic [N*N-1:0]   f_bits,     // feature window, bit i = element i
  output logic             out_valid   // a loaded window is waiting
);

  localparam int unsigned NN = N * N;

  logic [NN-1:0] sr_k, sr_f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_k <= '0;
      sr_f <= '0;
    end else if (shift_en) begin
      // The first bit written travels down to index 0 after NN shifts.
      sr_k <= {din_k, sr_k[NN-1:1]};
      sr_f <= {din_f, sr_f[NN-1:1]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_bits    <= '0;
      f_bits    <= '0;
      out_valid <= 1'b0;
    end else if (load) begin
      k_bits    <= sr_k;
      f_bits    <= sr_f;
      out_valid <= 1'b1;
    end else if (adv) begin
      out_valid <= 1'b0;
    end
  end

endmodule
