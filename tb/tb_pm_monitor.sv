// tb_pm_monitor: checker for one kernel architecture instance.
//
// After every rising clock edge (once reset has been applied) it compares
//   * the architecture's outputs z with the reference component's outputs;
//   * kernel_active with whether the reference's present state is a kernel
//     state (0..3), i.e. the kernel is used exactly when it is allowed;
//   * mutual exclusion: while the kernel is active, the inputs of CL
//     (cl_x, cl_s) did not change at the edge, and while CL is active the
//     inputs of K (k_x, k_s) did not change.
// It also counts how often each mechanism occurred: kernel cycles, CL
// cycles, switches in both directions, frozen-input cycles on either side.
// As a proxy for the power saved it counts bit toggles at the inputs of CL
// (cl_x, cl_s) and at the registers of the plain component (xr_ref, s_ref),
// whose outputs drive the full logic on every cycle there; CL must see fewer.
module tb_pm_monitor #(
  parameter int unsigned IN_W    = 3,
  parameter int unsigned OUT_W   = 6,
  parameter int unsigned STATE_W = 14,
  parameter string       NAME    = "dut"
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [OUT_W-1:0]   z,
  input  logic [OUT_W-1:0]   z_ref,
  input  logic [STATE_W-1:0] s_ref,
  input  logic [IN_W-1:0]    xr_ref,
  input  logic               kernel_active,
  input  logic [IN_W-1:0]    cl_x,
  input  logic [STATE_W-1:0] cl_s,
  input  logic [IN_W-1:0]    k_x,
  input  logic [STATE_W-1:0] k_s,
  output int unsigned        checks,
  output int unsigned        failures,
  output int unsigned        n_kernel,
  output int unsigned        n_cl,
  output int unsigned        n_to_k,
  output int unsigned        n_to_cl,
  output int unsigned        n_frozen_cl,
  output int unsigned        n_frozen_k,
  output int unsigned        n_reset,
  output int unsigned        tog_cl,
  output int unsigned        tog_ref
);

  logic [IN_W-1:0]    p_cl_x, p_k_x;
  logic [STATE_W-1:0] p_cl_s, p_k_s;
  logic [IN_W-1:0]    p_xr;
  logic [STATE_W-1:0] p_sr;
  logic               p_ka;
  logic               p_rst = 1'b0;
  int unsigned        armed = 0;

  initial begin
    checks = 0; failures = 0; n_kernel = 0; n_cl = 0; n_to_k = 0; n_to_cl = 0;
    n_frozen_cl = 0; n_frozen_k = 0; n_reset = 0;
    tog_cl = 0; tog_ref = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %s at %0t (z=%h z_ref=%h s_ref=%h ka=%b)",
                                  NAME, what, $time, z, z_ref, s_ref, kernel_active);
    end
  endtask

  always @(posedge clk) begin
    logic was_rst;
    was_rst = rst;
    #1;
    if (was_rst) begin
      if (!p_rst) n_reset++;
      armed = 1;
    end else if (armed > 0) begin
      check(z == z_ref, "outputs equal the reference");
      check(kernel_active == (s_ref < STATE_W'(4)), "kernel selected exactly in kernel states");
      if (armed > 1) begin
        if (kernel_active) begin
          check(cl_s == p_cl_s && cl_x == p_cl_x, "CL inputs frozen while K is active");
          n_frozen_cl++;
        end else begin
          check(k_s == p_k_s && k_x == p_k_x, "K inputs frozen while CL is active");
          n_frozen_k++;
        end
        tog_cl  += $countones({cl_x ^ p_cl_x, cl_s ^ p_cl_s});
        tog_ref += $countones({xr_ref ^ p_xr, s_ref ^ p_sr});
        if (kernel_active && !p_ka) n_to_k++;
        if (!kernel_active && p_ka) n_to_cl++;
      end
      if (kernel_active) n_kernel++; else n_cl++;
      armed = 2;
    end
    p_rst  = was_rst;
    p_ka   = kernel_active;
    p_cl_x = cl_x; p_cl_s = cl_s;
    p_k_x  = k_x;  p_k_s  = k_s;
    p_xr   = xr_ref; p_sr = s_ref;
  end

endmodule
