// tree_processor: one processor P_j of the tree.
//
// It holds five buffers around an inner-product-step PE:
//   a, c    forward buffers: A and C elements travelling away from the port
//   b       forward buffer whose output is the PE's B input (and B output)
//   A       one-stage reverse buffer loaded from the PE's A output
//   C[1..K] K-stage reverse shift register (K = 2n+1) loaded from the PE's
//           C output; it is both delay line and store for partial sums.
// Every buffer is a register that advances on every clock; nothing stalls.
// Which neighbour feeds each input is decided by the tree wiring
// (systolic_tree), not here. The PE's A and C inputs come from outside because
// a leaf takes them from its own a and c buffers while an inner node takes
// them from the reverse buffers of its last son.
//
// clear (synchronous) zeroes every buffer. It implements the self-initialising
// start; in the explicit-initialisation start it is never raised and the
// buffers may hold anything when the schedule begins.
// The buffer set and PE placement follow the published processor model;
// widths and the clear input are this design's choice.
module tree_processor #(
  parameter int unsigned DATA_W = rmm_pkg::DEF_DATA_W,
  parameter int unsigned ACC_W  = rmm_pkg::DEF_ACC_W,
  parameter int unsigned CDEPTH = rmm_pkg::cbuf_depth(rmm_pkg::DEF_N)
) (
  input  logic                     clk,
  input  logic                     clear,
  // forward inputs (from the father, or from the previous son's reverse path)
  input  logic signed [DATA_W-1:0] a_in,
  input  logic signed [DATA_W-1:0] b_in,
  input  logic signed [ACC_W-1:0]  c_in,
  // forward buffer outputs
  output logic signed [DATA_W-1:0] a_q,
  output logic signed [DATA_W-1:0] ob,    // PE output O_B, copied to every son
  output logic signed [ACC_W-1:0]  c_q,
  // PE inputs I_A and I_C, chosen by the tree wiring
  input  logic signed [DATA_W-1:0] pe_a,
  input  logic signed [ACC_W-1:0]  pe_c,
  // reverse buffer outputs: A_j and C_j[K]
  output logic signed [DATA_W-1:0] ra_q,
  output logic signed [ACC_W-1:0]  rc_q
);

  logic signed [DATA_W-1:0] b_q, o_a;
  logic signed [ACC_W-1:0]  o_c;
  logic signed [ACC_W-1:0]  cbuf [CDEPTH];

  ips_pe #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_pe (
    .i_a(pe_a), .i_b(b_q), .i_c(pe_c),
    .o_a(o_a),  .o_b(ob),  .o_c(o_c)
  );

  always_ff @(posedge clk) begin
    if (clear) begin
      a_q  <= '0;
      b_q  <= '0;
      c_q  <= '0;
      ra_q <= '0;
      for (int k = 0; k < CDEPTH; k++) cbuf[k] <= '0;
    end else begin
      a_q     <= a_in;
      b_q     <= b_in;
      c_q     <= c_in;
      ra_q    <= o_a;
      cbuf[0] <= o_c;
      for (int k = 1; k < CDEPTH; k++) cbuf[k] <= cbuf[k-1];
    end
  end

  assign rc_q = cbuf[CDEPTH-1];

endmodule
