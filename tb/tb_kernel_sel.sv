// tb_kernel_sel: exhaustive test of the selector function.
//
// Sweeps every 14-bit next-state value through two instances: the default
// (kernel states 0..3) and one with three cubes (the single state 0x0100,
// all states 0x2000..0x2FFF, and every state whose low nibble is 5). The
// expected result of each is written directly as a comparison on the state
// bits, independent of the cube encoding.
module tb_kernel_sel;
  localparam int unsigned STATE_W = 14;
  localparam int unsigned NC      = 3;
  localparam logic [NC-1:0][STATE_W-1:0] VAL  = {14'h0005, 14'h2000, 14'h0100};
  localparam logic [NC-1:0][STATE_W-1:0] MASK = {14'h000F, 14'h3000, 14'h3FFF};

  logic [STATE_W-1:0] t;
  logic               sel_def, sel_3;
  int unsigned        checks = 0, failures = 0, hits_def = 0, hits_3 = 0;

  kernel_sel dut_def (.t(t), .sel(sel_def));
  kernel_sel #(.STATE_W(STATE_W), .N_CUBES(NC), .CUBE_VAL(VAL), .CUBE_MASK(MASK)) dut_3 (
    .t(t), .sel(sel_3)
  );

  initial begin
    for (int unsigned v = 0; v < (1 << STATE_W); v++) begin
      logic exp_def, exp_3;
      t = STATE_W'(v);
      #1;
      exp_def = v < 4;
      exp_3   = (v == 'h100) || (v[13:12] == 2'b10) || (v[3:0] == 4'h5);
      checks += 2;
      if (sel_def != exp_def) begin failures++; if (failures < 10) $display("FAIL default t=%h", t); end
      if (sel_3   != exp_3)   begin failures++; if (failures < 10) $display("FAIL 3-cube t=%h", t); end
      hits_def += sel_def;
      hits_3   += sel_3;
    end
    // Set sizes: 4, and 1 + 4096 + 1024 - 256 (overlap of the last two cubes).
    checks += 2;
    if (hits_def != 4)    failures++;
    if (hits_3   != 4865) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
