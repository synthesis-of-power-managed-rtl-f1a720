// dsff_mux: bank of W dual-state flip-flops in functional form.
//
// Each bit holds two flip-flops, F1 and F2, that share one data input. When
// sel is 1 at a rising clock edge, F2 takes d and F1 keeps its value; when
// sel is 0, F1 takes d and F2 keeps its value. The hold is done with a
// recirculating multiplexer in front of each flip-flop, exactly as in the
// functional DSFF model. In the kernel architecture q1 feeds the original
// logic CL and q2 feeds the kernel K, so the block that is not in use sees
// constant inputs.
//
// Timing: one rising-edge register stage, no reset (the architecture loads
// the copy it is about to use in the same edge it selects it). Packaging the
// cells as a W-bit bank is this design's choice.
module dsff_mux #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         sel,
  input  logic [W-1:0] d,
  output logic [W-1:0] q1,
  output logic [W-1:0] q2
);

  logic [W-1:0] f1_d, f2_d;

  // Recirculating multiplexers: F1 loads on sel=0, F2 on sel=1.
  always_comb begin
    f1_d = sel ? q1 : d;
    f2_d = sel ? d  : q2;
  end

  always_ff @(posedge clk) begin
    q1 <= f1_d;
    q2 <= f2_d;
  end

endmodule
