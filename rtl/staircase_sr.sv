// Staircase shift-register array.
//
// LANES parallel lanes of W bits; lane k is delayed by k enabled steps
// (REVERSE = 0) or by LANES-1-k steps (REVERSE = 1). Lane 0 (or lane
// LANES-1) has no register at all and passes its input through.
//
// On the read side of the wavefront (REVERSE = 0) a coalesced row of LANES
// values enters together and lane k reaches the k-th processing element
// exactly when the diagonal wavefront arrives there. On the write side
// (REVERSE = 1) lane k, whose element of a row leaves PE k k steps after PE 0's,
// is held LANES-1-k steps so the whole row leaves aligned for one coalesced
// write. Only the triangle of registers that is actually needed is built:
// LANES*(LANES-1)/2 registers per side, not a full LANES x LANES square.
// All registers are cleared by reset.
// The staircase buffering follows the published kernel. Building only the
// used triangle, rather than a half-empty square array, is the refinement its
// authors proposed.
module staircase_sr #(
  parameter int unsigned LANES   = 32,
  parameter int unsigned W       = 32,
  parameter bit          REVERSE = 1'b0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic [LANES-1:0][W-1:0]   din,
  output logic [LANES-1:0][W-1:0]   dout
);

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    localparam int unsigned D = REVERSE ? (LANES - 1 - k) : k;
    if (D == 0) begin : g_pass
      assign dout[k] = din[k];
    end else begin : g_delay
      logic [W-1:0] sr [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < int'(D); i++) sr[i] <= '0;
        end else if (en) begin
          sr[0] <= din[k];
          for (int i = 1; i < int'(D); i++) sr[i] <= sr[i-1];
        end
      end
      assign dout[k] = sr[D-1];
    end
  end

endmodule
