// dsff_cell: behavioural model of the dual-state flip-flop library cell.
//
// This is a behavioural model, not synthesizable logic: the real part is a
// transistor-level cell derived from a sense-amplifier single-clock
// flip-flop. A clocked PMOS powers two sampling latches (the data latch on
// D/DN and the selection latch on S/SN) while the clock is low; a clocked
// NMOS activates two bistable slaves when the clock rises, and the two phases
// of the latched selection decide which slave is written. Only one slave is
// written per cycle, and the clock load equals that of one D flip-flop.
//
// Model: at each rising edge of CLK the differential data and selection are
// sampled; if S is high slave 2 (Q2/Q2N) takes D, if SN is high slave 1
// (Q1/Q1N) takes D; the other slave keeps its value. A sense amplifier with
// equal rails resolves nothing, so when D==DN or S==SN the slaves keep their
// values. TCQ is a clock-to-output delay. Which slave S=1 writes is chosen
// to match the functional model (S=1 loads the kernel copy). The cell has no
// reset, like the schematic.
module dsff_cell #(
  parameter int unsigned TCQ = 0
) (
  input  logic CLK,
  input  logic D,
  input  logic DN,
  input  logic S,
  input  logic SN,
  output logic Q1,
  output logic Q1N,
  output logic Q2,
  output logic Q2N
);

  logic slave1, slave2;

  always @(posedge CLK) begin
    if (D != DN) begin
      if (S && !SN) slave2 <= #(TCQ) D;
      if (SN && !S) slave1 <= #(TCQ) D;
    end
  end

  assign Q1  = slave1;
  assign Q1N = ~slave1;
  assign Q2  = slave2;
  assign Q2N = ~slave2;

endmodule
