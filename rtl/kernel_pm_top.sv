// kernel_pm_top: kernel-based power-managed sequential component.
//
// A sequential component is its combinational logic CL plus a state
// register and an input register. This block wraps such a component with a
// computational kernel K: a much smaller logic block that computes the same
// outputs and next state as CL whenever the present state lies in the kernel
// state set S_p (the few states where the component spends most of its time).
// Every cycle exactly one of CL and K does the work:
//
//   * Sel (kernel_sel) looks at the next state t and says whether K can
//     handle the next cycle (t in S_p).
//   * The input register and the state register are dual-state flip-flops
//     (DSFFs): sel=1 loads the copy that feeds K and freezes the copy that
//     feeds CL, sel=0 does the opposite. The idle block therefore sees
//     constant inputs and does not switch.
//   * Sel is also registered (kernel_active); that bit steers the output MUX
//     and the next-state MUX (input 0 = CL, input 1 = K) during the cycle.
//
// The copy that a cycle reads is always the one loaded at the edge that
// started the cycle, so the frozen copy never needs to be valid. The result
// is cycle-for-cycle equivalent to the plain component: same reset state,
// same one-cycle input register, same outputs.
//
// CL and K are specific to the component being optimised and are attached
// through ports: cl_x/cl_s drive CL, which returns cl_z (outputs) and cl_t
// (next state); k_x/k_s drive K, which returns k_z and k_t. Both are expected
// to be purely combinational. K only has to be correct for present states in
// S_p; its results for other states are never selected.
//
// Reset is synchronous and active high: while rst is 1 the value loaded into
// the state DSFF (and seen by Sel) is RESET_STATE. DSFF_STYLE picks the DSFF
// realisation: recirculating multiplexers, clustered gated clocks, or one
// DSFF cell per bit. The default sizes (3 inputs, 6 outputs, 14 state bits)
// are those of the s298 benchmark; RESET_STATE, the kernel set (states 0..3)
// and the synchronous reset are choices of this design.
module kernel_pm_top
  import kernel_pm_pkg::*;
#(
  parameter int unsigned                      IN_W        = DEF_IN_W,
  parameter int unsigned                      OUT_W       = DEF_OUT_W,
  parameter int unsigned                      STATE_W     = DEF_STATE_W,
  parameter logic [STATE_W-1:0]               RESET_STATE = '0,
  parameter int unsigned                      N_CUBES     = DEF_N_CUBES,
  parameter logic [N_CUBES-1:0][STATE_W-1:0] CUBE_VAL    = '0,
  parameter logic [N_CUBES-1:0][STATE_W-1:0] CUBE_MASK   = {N_CUBES{{{(STATE_W-2){1'b1}}, 2'b00}}},
  parameter dsff_style_e                      DSFF_STYLE  = DSFF_MUX
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [IN_W-1:0]    x,
  output logic [OUT_W-1:0]   z,
  output logic               kernel_active,
  // original combinational logic CL
  output logic [IN_W-1:0]    cl_x,
  output logic [STATE_W-1:0] cl_s,
  input  logic [OUT_W-1:0]   cl_z,
  input  logic [STATE_W-1:0] cl_t,
  // computational kernel K
  output logic [IN_W-1:0]    k_x,
  output logic [STATE_W-1:0] k_s,
  input  logic [OUT_W-1:0]   k_z,
  input  logic [STATE_W-1:0] k_t
);

  logic [STATE_W-1:0] t;       // next state from the MUX
  logic [STATE_W-1:0] t_load;  // value loaded into the state DSFF
  logic               sel;     // Sel(t_load), drives the DSFFs

  // Output and next-state multiplexers.
  kernel_mux #(.W(OUT_W))   u_zmux (.s(kernel_active), .in0(cl_z), .in1(k_z), .y(z));
  kernel_mux #(.W(STATE_W)) u_tmux (.s(kernel_active), .in0(cl_t), .in1(k_t), .y(t));

  assign t_load = rst ? RESET_STATE : t;

  // Selector function.
  kernel_sel #(
    .STATE_W  (STATE_W),
    .N_CUBES  (N_CUBES),
    .CUBE_VAL (CUBE_VAL),
    .CUBE_MASK(CUBE_MASK)
  ) u_sel (
    .t  (t_load),
    .sel(sel)
  );

  // Sel flip-flop.
  always_ff @(posedge clk) kernel_active <= sel;

  // DSFF banks on the primary inputs and on the state.
  localparam int unsigned DW = IN_W + STATE_W;
  logic [DW-1:0] dsff_d, dsff_q1, dsff_q2;

  assign dsff_d = {x, t_load};

  if (DSFF_STYLE == DSFF_GATED) begin : g_gated
    dsff_gated #(.W(DW)) u_dsff (.clk(clk), .sel(sel), .d(dsff_d), .q1(dsff_q1), .q2(dsff_q2));
  end else if (DSFF_STYLE == DSFF_CELL) begin : g_cell
    for (genvar i = 0; i < DW; i++) begin : g_bit
      logic q1n, q2n;
      dsff_cell u_cell (
        .CLK(clk), .D(dsff_d[i]), .DN(!dsff_d[i]), .S(sel), .SN(!sel),
        .Q1(dsff_q1[i]), .Q1N(q1n), .Q2(dsff_q2[i]), .Q2N(q2n)
      );
    end
  end else begin : g_mux
    dsff_mux #(.W(DW)) u_dsff (.clk(clk), .sel(sel), .d(dsff_d), .q1(dsff_q1), .q2(dsff_q2));
  end

  assign {cl_x, cl_s} = dsff_q1;
  assign {k_x,  k_s}  = dsff_q2;

  // Mutual exclusion: while K works, CL's inputs are frozen, and vice versa.
  a_cl_frozen: assert property (@(posedge clk) disable iff (rst)
    kernel_active |-> ($stable(cl_s) && $stable(cl_x)));
  a_k_frozen: assert property (@(posedge clk) disable iff (rst)
    !kernel_active |-> ($stable(k_s) && $stable(k_x)));

endmodule
