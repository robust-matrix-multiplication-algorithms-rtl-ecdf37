// robust_mm_top: fault-tolerant systolic multiplier of two n x n matrices.
//
// A tree of 3n-2 identical processors, reached only through the root P_1,
// computes C = A x B in O(n^2) cycles with a constant port bandwidth: one A
// element, one B element and one C element per cycle at most. The tree may be
// any spanning tree that a wafer's fault pattern leaves (FATHER, preorder
// numbering); the port schedule and the results do not depend on its shape.
//
// The port sequencer names, cycle by cycle, the element the host must
// present: when a_tag.valid is high the host drives a_data with
// A[a_tag.row][a_tag.col] in the same cycle (likewise b_tag / b_data). When
// c_tag.valid is high, c_data carries C[c_tag.row][c_tag.col]. Zeros enter
// the array in every other cycle, and the C input of the port is always zero.
// start (while idle) begins one multiplication; zero_init selects the
// self-initialising start (all buffers cleared in one cycle, schedule
// shortened by 4n(n-1) cycles) instead of flushing the array with zeros.
// busy covers the operation, done marks the cycle of the last result.
// Latency from start to done: 2(3n-2)(n+1) + 2(n-1)(2n+1) + 1 cycles, or
// 4n(n-1) fewer plus one clear cycle with zero_init.
// The architecture and schedule follow the published algorithm; the host handshake and
// number formats are this design's own.
module robust_mm_top #(
  parameter int unsigned N      = rmm_pkg::DEF_N,
  parameter int unsigned DATA_W = rmm_pkg::DEF_DATA_W,
  parameter int unsigned ACC_W  = rmm_pkg::DEF_ACC_W,
  localparam int unsigned P     = 3 * N - 2,
  parameter rmm_pkg::node_t [P-1:0] FATHER = {16'd1, 16'd5, 16'd3, 16'd3, 16'd2, 16'd1, 16'd0}
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic                     zero_init,
  output logic                     busy,
  output logic                     done,
  output rmm_pkg::elem_tag_t       a_tag,
  input  logic signed [DATA_W-1:0] a_data,
  output rmm_pkg::elem_tag_t       b_tag,
  input  logic signed [DATA_W-1:0] b_data,
  output rmm_pkg::elem_tag_t       c_tag,
  output logic signed [ACC_W-1:0]  c_data,
  output logic signed [DATA_W-1:0] a_exit    // A elements leaving A_1
);

  logic                     clear;
  logic signed [DATA_W-1:0] a_in, b_in;
  logic signed [ACC_W-1:0]  c_in;

  port_sequencer #(.N(N)) u_seq (
    .clk      (clk),
    .rst      (rst),
    .start    (start),
    .zero_init(zero_init),
    .busy     (busy),
    .done     (done),
    .clear    (clear),
    .a_tag    (a_tag),
    .b_tag    (b_tag),
    .c_tag    (c_tag)
  );

  always_comb begin
    a_in = a_tag.valid ? a_data : '0;
    b_in = b_tag.valid ? b_data : '0;
    c_in = '0;
  end

  systolic_tree #(
    .N(N), .DATA_W(DATA_W), .ACC_W(ACC_W), .FATHER(FATHER)
  ) u_tree (
    .clk  (clk),
    .clear(clear),
    .a_in (a_in),
    .b_in (b_in),
    .c_in (c_in),
    .a_out(a_exit),
    .c_out(c_data)
  );

endmodule
