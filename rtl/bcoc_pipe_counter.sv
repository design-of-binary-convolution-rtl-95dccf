// bcoc_pipe_counter: gate-level pipeline counter, the number of ones among
// INPUTS parallel bits, with a latency of exactly STAGES advance pulses.
//
// The count is formed in a tree of adders, one tree level per pipeline stage;
// stages beyond the tree depth are plain delay registers that keep every result
// bit aligned, the role the delay flip-flops play in a gate-level pipeline. All
// registers move only when adv is high, and in_valid travels with the data.
//
// The input counts and depths of the main configuration (5 inputs in 6 stages,
// 4 inputs in 4 stages) are the published ones; the adder-tree inside is this
// design's own and not the published gate netlist.
module bcoc_pipe_counter #(
  parameter int unsigned INPUTS = 5,
  parameter int unsigned STAGES = bcoc_pkg::counter_stages(INPUTS),
  localparam int unsigned W     = bcoc_pkg::count_width(INPUTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adv,
  input  logic              in_valid,
  input  logic [INPUTS-1:0] din,
  output logic [W-1:0]      count,
  output logic              out_valid
);

  // Tree depth and the leaf count padded to a power of two.
  localparam int unsigned LEVELS = (INPUTS < 2) ? 1 : $clog2(INPUTS);
  localparam int unsigned LEAVES = 1 << LEVELS;

  if (STAGES < LEVELS) begin : g_bad_depth
    $error("bcoc_pipe_counter: STAGES is smaller than the adder-tree depth");
  end

  // level[l][j]: partial count after l tree levels; level 0 is the input bits.
  logic [W-1:0] level [LEVELS+1][LEAVES];
  logic         lvl_valid [LEVELS+1];

  always_comb begin
    for (int j = 0; j < LEAVES; j++) begin
      level[0][j] = (j < INPUTS) ? W'(din[j]) : '0;
    end
    lvl_valid[0] = in_valid;
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < LEAVES; j++) level[l][j] <= '0;
        lvl_valid[l] <= 1'b0;
      end else if (adv) begin
        for (int j = 0; j < LEAVES; j++) begin
          if (j < (LEAVES >> l)) level[l][j] <= level[l-1][2*j] + level[l-1][2*j+1];
          else                   level[l][j] <= '0;
        end
        lvl_valid[l] <= lvl_valid[l-1];
      end
    end
  end

  // Alignment delay after the tree.
  localparam int unsigned PAD = STAGES - LEVELS;

  if (PAD == 0) begin : g_no_pad
    assign count     = level[LEVELS][0];
    assign out_valid = lvl_valid[LEVELS];
  end else begin : g_pad
    logic [W-1:0] dly   [PAD];
    logic         dly_v [PAD];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < PAD; i++) begin
          dly[i]   <= '0;
          dly_v[i] <= 1'b0;
        end
      end else if (adv) begin
        dly[0]   <= level[LEVELS][0];
        dly_v[0] <= lvl_valid[LEVELS];
        for (int i = 1; i < PAD; i++) begin
          dly[i]   <= dly[i-1];
          dly_v[i] <= dly_v[i-1];
        end
      end
    end
    assign count     = dly[PAD-1];
    assign out_valid = dly_v[PAD-1];
  end

endmodule
