// tb_fixed_to_float: checks converter 1 (18-bit) and converter 2 (24-bit) on
// the extreme values and on random integers. Every integer of those widths is
// exactly representable in single precision, so the result must equal the
// integer exactly.
module tb_fixed_to_float;
  import tb_fp_pkg::*;
  logic signed [17:0] in18;
  logic signed [23:0] in24;
  logic [31:0] out18, out24;
  int checks = 0, failures = 0;

  fixed_to_float #(.W(18)) dut18 (.fixed_in(in18), .float_out(out18));
  fixed_to_float #(.W(24)) dut24 (.fixed_in(in24), .float_out(out24));

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input int v18, input int v24);
    in18 = 18'(v18); in24 = 24'(v24);
    #1;
    checks += 2;
    if (f2r(out18) != real'(in18)) begin failures++; $display("18: %0d -> %h", in18, out18); end
    if (f2r(out24) != real'(in24)) begin failures++; $display("24: %0d -> %h", in24, out24); end
  endtask

  initial begin
    check(0, 0); check(1, 1); check(-1, -1);
    check(131071, 8388607); check(-131072, -8388608);
    for (int n = 0; n < 5000; n++) check(int'($urandom), int'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
