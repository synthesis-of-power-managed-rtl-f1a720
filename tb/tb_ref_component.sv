// tb_ref_component: the plain sequential component used as the reference in
// simulation: an input register on x, a state register with synchronous
// reset to state 0, and the full logic CL of tb_example_fsm in between. Its
// outputs and state (and the registered input xr) are what the kernel architecture must reproduce cycle
// for cycle.
module tb_ref_component #(
  parameter int unsigned IN_W    = 3,
  parameter int unsigned OUT_W   = 6,
  parameter int unsigned STATE_W = 14
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [IN_W-1:0]    x,
  output logic [OUT_W-1:0]   z,
  output logic [STATE_W-1:0] s,
  output logic [IN_W-1:0]    xr
);

  logic [STATE_W-1:0] t;
  logic [OUT_W-1:0]   unused_kz;
  logic [STATE_W-1:0] unused_kt;

  tb_example_fsm #(.IN_W(IN_W), .OUT_W(OUT_W), .STATE_W(STATE_W)) u_cl (
    .cl_x(xr), .cl_s(s), .cl_z(z), .cl_t(t),
    .k_x(xr), .k_s(s), .k_z(unused_kz), .k_t(unused_kt)
  );

  always_ff @(posedge clk) begin
    xr <= x;
    s  <= rst ? '0 : t;
  end

endmodule
