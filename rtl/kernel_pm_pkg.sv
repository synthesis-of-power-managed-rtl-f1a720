// kernel_pm_pkg: types and default sizes shared by the kernel-based
// power-managed sequential component.
//
// The architecture puts a small "computational kernel" K next to the full
// combinational logic CL of a sequential component. A selector decides, from
// the next state, which of the two computes the following cycle, and
// dual-state flip-flops (DSFFs) keep the idle block's inputs frozen.
//
// dsff_style_e names the three DSFF realisations: the functional form with
// recirculating multiplexers, the clustered gated-clock form, and the
// transistor-level cell (modelled behaviourally). The default widths are the
// sizes of the smallest benchmark the architecture was evaluated on
// (3 inputs, 6 outputs, 14 flip-flops); the kernel state set default is a
// choice of this design.
package kernel_pm_pkg;

  typedef enum logic [1:0] {
    DSFF_MUX   = 2'd0,  // two flip-flops with recirculating multiplexers
    DSFF_GATED = 2'd1,  // two flip-flop clusters on mutually exclusive gated clocks
    DSFF_CELL  = 2'd2   // one sense-amplifier DSFF cell per bit
  } dsff_style_e;

  // Default component size.
  localparam int unsigned DEF_IN_W    = 3;
  localparam int unsigned DEF_OUT_W   = 6;
  localparam int unsigned DEF_STATE_W = 14;

  // Default kernel state set: one cube covering states 0..3.
  localparam int unsigned DEF_N_CUBES = 1;

endpackage
