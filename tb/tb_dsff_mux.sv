// tb_dsff_mux: self-checking testbench for dsff_mux (functional DSFF bank with recirculating multiplexers).
//
// Drives random data and random selection on the falling clock edge and, after
// every rising edge, compares both register copies with a reference model:
// sel=1 loads copy 2 and keeps copy 1, sel=0 loads copy 1 and keeps copy 2.
// A copy is checked once it has been loaded at least once. Also checks that
// at most one copy changes per cycle and that each copy holds over runs of
// the opposite selection. Ends with a TB_RESULT line; a watchdog stops a hung
// run.
module tb_dsff_mux;
  localparam int unsigned W = 8;
  localparam int unsigned N = 2000;

  logic         clk = 1'b0;
  logic         sel = 1'b0;
  logic [W-1:0] d   = '0;
  logic [W-1:0] q1, q2;
  logic [W-1:0] ref1, ref2;
  logic         v1 = 1'b0, v2 = 1'b0;
  int unsigned  checks = 0, failures = 0;
  int unsigned  loads1 = 0, loads2 = 0;

  always #5 clk = ~clk;

  dsff_mux #(.W(W)) dut (.clk(clk), .sel(sel), .d(d), .q1(q1), .q2(q2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: q1=%h q2=%h ref1=%h ref2=%h", what, $time, q1, q2, ref1, ref2);
    end
  endtask

  initial begin
    for (int unsigned n = 0; n < N; n++) begin
      @(negedge clk);
      // Runs of equal selection exercise the hold path.
      if (n % 16 < 8) sel = (n / 16) % 2 == 1;
      else            sel = 1'($urandom_range(0, 1));
      d = W'($urandom);
      @(posedge clk);
      if (sel) begin ref2 = d; v2 = 1'b1; loads2++; end
      else     begin ref1 = d; v1 = 1'b1; loads1++; end
      #1;
      if (v1) check(q1 == ref1, "copy 1");
      if (v2) check(q2 == ref2, "copy 2");
    end
    check(loads1 > 100 && loads2 > 100, "both selections exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
