// kernel_sel: selector function Sel of the kernel architecture.
//
// Sel looks only at the next-state value t (not at the primary inputs, which
// keeps it small) and returns 1 when t belongs to the kernel state set S_p,
// i.e. when the kernel K will be able to produce the outputs and next state
// in the following cycle. The set is given as a sum of N_CUBES cubes: state t
// is in cube i when (t & CUBE_MASK[i]) == (CUBE_VAL[i] & CUBE_MASK[i]);
// bits with mask 0 are free. The cube form of S_p is this design's choice;
// the kernel set itself comes from an offline extraction step.
//
// Purely combinational. Defaults: 14 state bits, one cube covering states
// 0..3.
module kernel_sel #(
  parameter int unsigned                      STATE_W   = 14,
  parameter int unsigned                      N_CUBES   = 1,
  parameter logic [N_CUBES-1:0][STATE_W-1:0] CUBE_VAL  = '0,
  parameter logic [N_CUBES-1:0][STATE_W-1:0] CUBE_MASK = {N_CUBES{{{(STATE_W-2){1'b1}}, 2'b00}}}
) (
  input  logic [STATE_W-1:0] t,
  output logic               sel
);

  logic [N_CUBES-1:0] hit;

  always_comb begin
    for (int unsigned i = 0; i < N_CUBES; i++) begin
      hit[i] = ((t ^ CUBE_VAL[i]) & CUBE_MASK[i]) == '0;
    end
    sel = |hit;
  end

endmodule
