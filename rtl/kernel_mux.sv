// kernel_mux: output / next-state multiplexer of the kernel architecture.
//
// Selects the original logic's result (in0) when s is 0 and the kernel's
// result (in1) when s is 1. s is the registered selection bit, so the choice
// made by Sel at one clock edge applies to the whole following cycle. Used
// once for the primary outputs (p / r) and once for the next state (u / v).
// Purely combinational.
module kernel_mux #(
  parameter int unsigned W = 6
) (
  input  logic         s,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] y
);

  always_comb y = s ? in1 : in0;

endmodule
