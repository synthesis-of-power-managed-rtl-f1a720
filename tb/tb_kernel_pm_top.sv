// tb_kernel_pm_top: end-to-end test of the kernel architecture.
//
// Three instances of kernel_pm_top, one per DSFF realisation (recirculating
// multiplexers, clustered gated clocks, DSFF cells), each wired to the
// example component's full logic CL and its kernel K, run on the same random
// input stream next to the plain reference component. tb_pm_monitor checks
// every cycle that each instance produces the reference outputs, uses the
// kernel exactly in kernel states, and keeps the idle block's inputs frozen.
// The stimulus favours the kernel loop but leaves it with probability 1/8
// per cycle, and a reset is applied again halfway through. Every mechanism
// (kernel use, CL use, both switch directions, frozen inputs on both sides,
// reset) must occur at least once per instance, and CL's inputs must toggle
// less often than the plain component's registers.
module tb_kernel_pm_top;
  import kernel_pm_pkg::*;

  localparam int unsigned IN_W    = 3;
  localparam int unsigned OUT_W   = 6;
  localparam int unsigned STATE_W = 14;
  localparam int unsigned NCYC    = 5000;
  localparam int unsigned NSTY    = 3;

  logic               clk = 1'b0;
  logic               rst = 1'b1;
  logic [IN_W-1:0]    x   = '0;
  logic [OUT_W-1:0]   z_ref;
  logic [STATE_W-1:0] s_ref;
  logic [IN_W-1:0]    xr_ref;

  always #5 clk = ~clk;

  tb_ref_component #(.IN_W(IN_W), .OUT_W(OUT_W), .STATE_W(STATE_W)) u_ref (
    .clk(clk), .rst(rst), .x(x), .z(z_ref), .s(s_ref), .xr(xr_ref)
  );

  int unsigned c_checks[NSTY], c_fail[NSTY], c_kernel[NSTY], c_cl[NSTY], c_to_k[NSTY],
               c_to_cl[NSTY], c_fr_cl[NSTY], c_fr_k[NSTY], c_reset[NSTY],
               c_tog_cl[NSTY], c_tog_ref[NSTY];

  for (genvar g = 0; g < NSTY; g++) begin : g_dut
    logic [OUT_W-1:0]   z, cl_z, k_z;
    logic [STATE_W-1:0] cl_s, cl_t, k_s, k_t;
    logic [IN_W-1:0]    cl_x, k_x;
    logic               kernel_active;

    kernel_pm_top #(
      .IN_W(IN_W), .OUT_W(OUT_W), .STATE_W(STATE_W),
      .DSFF_STYLE(dsff_style_e'(g))
    ) dut (
      .clk(clk), .rst(rst), .x(x), .z(z), .kernel_active(kernel_active),
      .cl_x(cl_x), .cl_s(cl_s), .cl_z(cl_z), .cl_t(cl_t),
      .k_x(k_x), .k_s(k_s), .k_z(k_z), .k_t(k_t)
    );

    tb_example_fsm #(.IN_W(IN_W), .OUT_W(OUT_W), .STATE_W(STATE_W)) u_fsm (
      .cl_x(cl_x), .cl_s(cl_s), .cl_z(cl_z), .cl_t(cl_t),
      .k_x(k_x), .k_s(k_s), .k_z(k_z), .k_t(k_t)
    );

    tb_pm_monitor #(.IN_W(IN_W), .OUT_W(OUT_W), .STATE_W(STATE_W),
                    .NAME($sformatf("style%0d", g))) u_mon (
      .clk(clk), .rst(rst), .z(z), .z_ref(z_ref), .s_ref(s_ref), .xr_ref(xr_ref),
      .kernel_active(kernel_active), .cl_x(cl_x), .cl_s(cl_s), .k_x(k_x), .k_s(k_s),
      .checks(c_checks[g]), .failures(c_fail[g]), .n_kernel(c_kernel[g]), .n_cl(c_cl[g]),
      .n_to_k(c_to_k[g]), .n_to_cl(c_to_cl[g]), .n_frozen_cl(c_fr_cl[g]),
      .n_frozen_k(c_fr_k[g]), .n_reset(c_reset[g]),
      .tog_cl(c_tog_cl[g]), .tog_ref(c_tog_ref[g])
    );
  end

  int unsigned checks, failures;

  task automatic finish_report();
    checks = 0; failures = 0;
    for (int g = 0; g < NSTY; g++) begin
      $display("style %0d: kernel=%0d cl=%0d cl->k=%0d k->cl=%0d frozenCL=%0d frozenK=%0d resets=%0d checks=%0d failures=%0d",
               g, c_kernel[g], c_cl[g], c_to_k[g], c_to_cl[g], c_fr_cl[g], c_fr_k[g], c_reset[g],
               c_checks[g], c_fail[g]);
      $display("style %0d: toggles at CL inputs=%0d, at plain component registers=%0d, kernel use %0d%%",
               g, c_tog_cl[g], c_tog_ref[g], 100 * c_kernel[g] / (c_kernel[g] + c_cl[g]));
      checks   += c_checks[g] + 8;
      if (c_tog_cl[g] >= c_tog_ref[g]) failures++;
      failures += c_fail[g];
      if (c_kernel[g] == 0) failures++;
      if (c_cl[g]     == 0) failures++;
      if (c_to_k[g]   == 0) failures++;
      if (c_to_cl[g]  == 0) failures++;
      if (c_fr_cl[g]  == 0) failures++;
      if (c_fr_k[g]   == 0) failures++;
      if (c_reset[g]  <  2) failures++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int unsigned n = 0; n < NCYC; n++) begin
      @(negedge clk);
      x = IN_W'($urandom);
      rst = (n == NCYC / 2) || (n == NCYC / 2 + 1);
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
