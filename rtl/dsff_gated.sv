// dsff_gated: bank of W dual-state flip-flops in clustered gated-clock form.
//
// The two flip-flops of every DSFF are split into two clusters of plain
// flip-flops: the kernel cluster (q2) and the original cluster (q1). Each
// cluster has its own gated clock. The kernel cluster's clock is enabled by
// sel, the original cluster's by its complement, so exactly one cluster is
// clocked in each cycle and no recirculating multiplexer is needed. Clock
// load seen by the free-running clock is two clock gates instead of 2*W
// flip-flops.
//
// Function and timing are identical to dsff_mux: at a rising edge of clk,
// sel=1 loads q2 from d and keeps q1, sel=0 loads q1 and keeps q2. sel must
// be settled while clk is low. No reset. The clock-gate latch polarity is
// this design's choice.
module dsff_gated #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         sel,
  input  logic [W-1:0] d,
  output logic [W-1:0] q1,
  output logic [W-1:0] q2
);

  logic gclk_kernel, gclk_orig;

  clk_gate u_gate_kernel (.clk(clk), .en(sel),  .gclk(gclk_kernel));
  clk_gate u_gate_orig   (.clk(clk), .en(!sel), .gclk(gclk_orig));

  // Kernel flip-flops.
  always_ff @(posedge gclk_kernel) q2 <= d;

  // Original flip-flops.
  always_ff @(posedge gclk_orig) q1 <= d;

endmodule
