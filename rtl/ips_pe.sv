// ips_pe: the inner-product-step processing element of one processor.
//
// It passes its A and B operands through unchanged and adds their product to
// the C operand:  O_A = I_A,  O_B = I_B,  O_C = I_C + I_A * I_B.
// The unit is purely combinational; the registers around it (the processor's
// buffers) give the one-cycle step from input ports to output buffers that
// the algorithm assumes. Operands are signed two's complement; the product is
// sign-extended to the accumulator width and the sum wraps modulo 2^ACC_W.
// The operation follows the published algorithm; the number format is this design's own
// choice.
module ips_pe #(
  parameter int unsigned DATA_W = rmm_pkg::DEF_DATA_W,
  parameter int unsigned ACC_W  = rmm_pkg::DEF_ACC_W
) (
  input  logic signed [DATA_W-1:0] i_a,
  input  logic signed [DATA_W-1:0] i_b,
  input  logic signed [ACC_W-1:0]  i_c,
  output logic signed [DATA_W-1:0] o_a,
  output logic signed [DATA_W-1:0] o_b,
  output logic signed [ACC_W-1:0]  o_c
);

  logic signed [ACC_W-1:0] a_ext, b_ext;

  always_comb begin
    a_ext = ACC_W'(i_a);
    b_ext = ACC_W'(i_b);
    o_a   = i_a;
    o_b   = i_b;
    o_c   = i_c + a_ext * b_ext;
  end

endmodule
