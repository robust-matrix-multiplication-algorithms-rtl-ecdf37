// tb_ips_pe: the inner-product step O_A = I_A, O_B = I_B, O_C = I_C + I_A*I_B
// on random signed operands and on the extreme values, against a product
// formed here in 64-bit integers and reduced to the accumulator width.
module tb_ips_pe;
  localparam int DW = 16;
  localparam int AW = 32;

  logic signed [DW-1:0] i_a, i_b, o_a, o_b;
  logic signed [AW-1:0] i_c, o_c;
  int checks = 0, failures = 0;

  ips_pe #(.DATA_W(DW), .ACC_W(AW)) dut (.i_a, .i_b, .i_c, .o_a, .o_b, .o_c);

  task automatic apply(input longint a, b, c);
    longint expect_c;
    i_a = DW'(a); i_b = DW'(b); i_c = AW'(c);
    #1;
    expect_c = longint'(i_c) + longint'(i_a) * longint'(i_b);
    checks += 3;
    if (o_a != i_a) failures++;
    if (o_b != i_b) failures++;
    if (o_c != AW'(expect_c)) begin
      failures++;
      $display("FAIL %0d + %0d * %0d gave %0d", i_c, i_a, i_b, o_c);
    end
  endtask

  initial begin
    apply(0, 0, 0);
    apply(3, 4, 5);
    apply(-3, 4, 100);
    apply(-32768, -32768, 0);
    apply(32767, -32768, -1);
    for (int k = 0; k < 500; k++)
      apply(longint'($urandom), longint'($urandom), longint'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
