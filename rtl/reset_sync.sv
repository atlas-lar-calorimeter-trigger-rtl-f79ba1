// Reset synchroniser of the reset/clock interface, one per clock domain.
//
// The FPGA is reset by the front-panel push button or by the MMC (both
// active low, asynchronous) and is also held in reset while the clock PLL
// is not locked. The reset output is asserted at once (asynchronously) and
// released synchronously, STAGES cycles after all sources are inactive, so
// that every state machine of the domain leaves reset in the same cycle.
// The two reset sources and the per-domain synchronous reset follow the
// spec; the PLL-lock gating and the number of stages are this design's
// choices.
module reset_sync #(
  parameter int unsigned STAGES = 4
) (
  input  logic clk,
  input  logic pb_rst_n,     // push button
  input  logic mmc_rst_n,    // MMC reset
  input  logic pll_locked,
  output logic rst
);
  logic [STAGES-1:0] sr;
  wire arst = !pb_rst_n || !mmc_rst_n || !pll_locked;
  always_ff @(posedge clk or posedge arst) begin
    if (arst) sr <= '1;
    else      sr <= {sr[STAGES-2:0], 1'b0};
  end
  assign rst = sr[STAGES-1];
endmodule
