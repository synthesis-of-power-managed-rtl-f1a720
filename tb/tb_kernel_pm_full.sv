// tb_kernel_pm_full: kernel_pm_top at its default parameters (3 inputs,
// 6 outputs, 14 state bits, kernel states 0..3, multiplexer DSFFs), wired to
// the example component's CL and kernel and run for 20000 random cycles next
// to the plain reference component. tb_pm_monitor checks outputs, kernel
// selection and frozen inputs every cycle; each mechanism must occur, and
// CL's inputs must toggle less often than the plain component's registers.
module tb_kernel_pm_full;
  localparam int unsigned IN_W    = 3;
  localparam int unsigned OUT_W   = 6;
  localparam int unsigned STATE_W = 14;
  localparam int unsigned NCYC    = 20000;

  logic               clk = 1'b0;
  logic               rst = 1'b1;
  logic [IN_W-1:0]    x   = '0;
  logic [OUT_W-1:0]   z, z_ref, cl_z, k_z;
  logic [STATE_W-1:0] s_ref, cl_s, cl_t, k_s, k_t;
  logic [IN_W-1:0]    cl_x, k_x;
  logic               kernel_active;

  always #5 clk = ~clk;

  kernel_pm_top dut (
    .clk(clk), .rst(rst), .x(x), .z(z), .kernel_active(kernel_active),
    .cl_x(cl_x), .cl_s(cl_s), .cl_z(cl_z), .cl_t(cl_t),
    .k_x(k_x), .k_s(k_s), .k_z(k_z), .k_t(k_t)
  );

  tb_example_fsm #(.IN_W(IN_W), .OUT_W(OUT_W), .STATE_W(STATE_W)) u_fsm (
    .cl_x(cl_x), .cl_s(cl_s), .cl_z(cl_z), .cl_t(cl_t),
    .k_x(k_x), .k_s(k_s), .k_z(k_z), .k_t(k_t)
  );

  tb_ref_component #(.IN_W(IN_W), .OUT_W(OUT_W), .STATE_W(STATE_W)) u_ref (
    .clk(clk), .rst(rst), .x(x), .z(z_ref), .s(s_ref), .xr(xr_ref)
  );

  int unsigned m_checks, m_fail, n_kernel, n_cl, n_to_k, n_to_cl, n_fr_cl, n_fr_k, n_reset;
  int unsigned tog_cl, tog_ref;

  tb_pm_monitor #(.IN_W(IN_W), .OUT_W(OUT_W), .STATE_W(STATE_W), .NAME("default")) u_mon (
    .clk(clk), .rst(rst), .z(z), .z_ref(z_ref), .s_ref(s_ref), .xr_ref(xr_ref),
    .kernel_active(kernel_active), .cl_x(cl_x), .cl_s(cl_s), .k_x(k_x), .k_s(k_s),
    .checks(m_checks), .failures(m_fail), .n_kernel(n_kernel), .n_cl(n_cl),
    .n_to_k(n_to_k), .n_to_cl(n_to_cl), .n_frozen_cl(n_fr_cl), .n_frozen_k(n_fr_k),
    .n_reset(n_reset), .tog_cl(tog_cl), .tog_ref(tog_ref)
  );

  int unsigned checks, failures;

  task automatic finish_report();
    $display("kernel=%0d cl=%0d cl->k=%0d k->cl=%0d frozenCL=%0d frozenK=%0d resets=%0d",
             n_kernel, n_cl, n_to_k, n_to_cl, n_fr_cl, n_fr_k, n_reset);
    $display("toggles at CL inputs=%0d, at plain component registers=%0d, kernel use %0d%%",
             tog_cl, tog_ref, 100 * n_kernel / (n_kernel + n_cl));
    checks   = m_checks + 8;
    failures = m_fail;
    if (tog_cl >= tog_ref) failures++;
    if (n_kernel == 0) failures++;
    if (n_cl     == 0) failures++;
    if (n_to_k   == 0) failures++;
    if (n_to_cl  == 0) failures++;
    if (n_fr_cl  == 0) failures++;
    if (n_fr_k   == 0) failures++;
    if (n_reset  == 0) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int unsigned n = 0; n < NCYC; n++) begin
      @(negedge clk);
      x = IN_W'($urandom);
    end
    @(negedge clk);
    finish_report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    finish_report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
