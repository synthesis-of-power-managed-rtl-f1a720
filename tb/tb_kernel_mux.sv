// tb_kernel_mux: random test of the output / next-state multiplexer at its
// default width (6) and at 14 bits: select 0 must give the CL input, select
// 1 the kernel input.
module tb_kernel_mux;
  logic        s;
  logic [5:0]  a6, b6, y6;
  logic [13:0] a14, b14, y14;
  int unsigned checks = 0, failures = 0;

  kernel_mux              dut6  (.s(s), .in0(a6),  .in1(b6),  .y(y6));
  kernel_mux #(.W(14))    dut14 (.s(s), .in0(a14), .in1(b14), .y(y14));

  initial begin
    for (int n = 0; n < 1000; n++) begin
      s = 1'($urandom); a6 = 6'($urandom); b6 = 6'($urandom);
      a14 = 14'($urandom); b14 = 14'($urandom);
      #1;
      checks += 2;
      if (y6  != (s ? b6  : a6))  begin failures++; $display("FAIL w6 s=%b", s); end
      if (y14 != (s ? b14 : a14)) begin failures++; $display("FAIL w14 s=%b", s); end
    end
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
