// bcoc_delay: DEPTH-stage delay line of W-bit words plus a valid bit, moving
// only on advance pulses. It models the chains of delay flip-flops that keep
// the shorter part-b counter in step with the deeper part-a counter of the
// BCOC. DEPTH = 0 is a plain wire.
module bcoc_delay #(
  parameter int unsigned W     = 3,
  parameter int unsigned DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         adv,
  input  logic         in_valid,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         out_valid
);

  if (DEPTH == 0) begin : g_wire
    assign dout      = din;
    assign out_valid = in_valid;
  end else begin : g_regs
    logic [W-1:0] q   [DEPTH];
    logic         q_v [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) begin
          q[i]   <= '0;
          q_v[i] <= 1'b0;
        end
      end else if (adv) begin
        q[0]   <= din;
        q_v[0] <= in_valid;
        for (int i = 1; i < DEPTH; i++) begin
          q[i]   <= q[i-1];
          q_v[i] <= q_v[i-1];
        end
      end
    end
    assign dout      = q[DEPTH-1];
    assign out_valid = q_v[DEPTH-1];
  end

endmodule
