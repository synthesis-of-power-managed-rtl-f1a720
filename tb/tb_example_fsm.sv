// tb_example_fsm: example sequential component and its kernel, used as the
// external CL and K blocks of the kernel architecture in simulation.
//
// CL (the full combinational logic) of a small controller with 3 inputs,
// 6 outputs and STATE_W state bits:
//   * states 0..3 form a loop: next = (s + x[1:0] + 1) mod 4, except that the
//     rare input x = 7 leaves the loop to state 0x100 + s;
//   * any other state advances by 16 per cycle and returns to state s[1:0]
//     once bits 7:4 reach 3 or when x = 0;
//   * outputs z = {s[1:0]^x[1:0], s[8], ^s, x[2], s[4]}.
// K is that logic simplified for present states 0..3 only: it reads s[1:0]
// and treats the rest of the state as zero, so it is wrong for every state
// outside 0..3. The architecture must never select it there.
module tb_example_fsm #(
  parameter int unsigned IN_W    = 3,
  parameter int unsigned OUT_W   = 6,
  parameter int unsigned STATE_W = 14
) (
  input  logic [IN_W-1:0]    cl_x,
  input  logic [STATE_W-1:0] cl_s,
  output logic [OUT_W-1:0]   cl_z,
  output logic [STATE_W-1:0] cl_t,
  input  logic [IN_W-1:0]    k_x,
  input  logic [STATE_W-1:0] k_s,
  output logic [OUT_W-1:0]   k_z,
  output logic [STATE_W-1:0] k_t
);

  localparam logic [STATE_W-1:0] EXIT_BASE = STATE_W'(12'h100);

  logic [1:0] cl_loop, k_loop;  // next position in the 4-state loop

  // Full logic.
  always_comb begin
    cl_loop = cl_s[1:0] + cl_x[1:0] + 2'd1;
    if (cl_s < STATE_W'(4)) begin
      if (cl_x[2:0] == 3'b111) cl_t = EXIT_BASE + cl_s;
      else                     cl_t = STATE_W'(cl_loop);
    end else if (cl_s[7:4] >= 4'd3 || cl_x[2:0] == 3'b000) begin
      cl_t = STATE_W'(cl_s[1:0]);
    end else begin
      cl_t = cl_s + STATE_W'(16);
    end
    cl_z = OUT_W'({cl_s[1:0] ^ cl_x[1:0], cl_s[8], ^cl_s, cl_x[2], cl_s[4]});
  end

  // Kernel: valid for present states 0..3 only.
  always_comb begin
    k_loop = k_s[1:0] + k_x[1:0] + 2'd1;
    if (k_x[2:0] == 3'b111) k_t = EXIT_BASE | STATE_W'(k_s[1:0]);
    else                    k_t = STATE_W'(k_loop);
    k_z = OUT_W'({k_s[1:0] ^ k_x[1:0], 1'b0, ^k_s[1:0], k_x[2], 1'b0});
  end

endmodule
