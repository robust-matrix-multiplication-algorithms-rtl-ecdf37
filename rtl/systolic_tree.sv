// systolic_tree: 3n-2 processors wired along a spanning tree of the host mesh.
//
// The tree is given as FATHER, a packed array written from its highest
// element down (FATHER = {father of P_P, ..., father of P_2, 0}): element j-1
// is the father of processor P_j, with
// the processors numbered 1..P in depth-first (preorder) order from the root
// P_1, which is the I/O port (its own entry is 0). In preorder the sons of
// P_j, taken in decreasing index j_1 > j_2 > ... > j_r, end with j_r = j+1.
// The buffers are connected as follows (r = number of sons of P_j):
//   a_j, c_j          feed a_{j1}, c_{j1} (the highest-numbered son)
//   A_{js}, C_{js}[K] feed a_{j(s+1)}, c_{j(s+1)}   for s = 1..r-1
//   I_A, I_C of P_j   come from A_{jr}, C_{jr}[K]   if r >= 1
//                     come from a_j, c_j            if P_j is a leaf
//   O_B of P_j        feeds b of every son
// So an A or C element walks the whole tree depth-first, entering every
// subtree on its forward buffers and leaving it on the reverse buffers, and
// meets the PEs in decreasing processor order P_P ... P_1; a B element moves
// one edge per cycle towards the leaves. The delay from the port to P_k at
// distance r from the root is 2(P-k)+r for A and 2(n+1)(P-k)+r for C, the
// same for every tree shape, which is why the port schedule never changes.
//
// Ports: a_in, b_in, c_in are the port inputs into a_1, b_1, c_1; c_out is
// C_1[K] and a_out is A_1 (elements of A leaving the array). clear zeroes
// every buffer in one cycle. All outputs are registers.
// The wiring rules are those of the published algorithm; the FATHER encoding of the tree and
// the elaboration check of preorder numbering are this design's choice.
module systolic_tree #(
  parameter int unsigned N      = rmm_pkg::DEF_N,
  parameter int unsigned DATA_W = rmm_pkg::DEF_DATA_W,
  parameter int unsigned ACC_W  = rmm_pkg::DEF_ACC_W,
  localparam int unsigned P     = 3 * N - 2,
  // Default: the seven-node tree (P_1 sons P_7, P_2; P_2 son P_3;
  // P_3 sons P_5, P_4; P_5 son P_6).
  parameter rmm_pkg::node_t [P-1:0] FATHER = {16'd1, 16'd5, 16'd3, 16'd3, 16'd2, 16'd1, 16'd0}
) (
  input  logic                     clk,
  input  logic                     clear,
  input  logic signed [DATA_W-1:0] a_in,
  input  logic signed [DATA_W-1:0] b_in,
  input  logic signed [ACC_W-1:0]  c_in,
  output logic signed [DATA_W-1:0] a_out,
  output logic signed [ACC_W-1:0]  c_out
);

  localparam int unsigned CDEPTH = 2 * N + 1;

  // Father of processor j (1-based).
  function automatic int unsigned father_of(input int unsigned j);
    return int'(FATHER[j-1]);
  endfunction

  // The son of father(j) with the next higher index than j, or 0 when j is
  // the father's highest-numbered son.
  function automatic int unsigned prev_son(input int unsigned j);
    int unsigned best = 0;
    for (int unsigned m = P; m > j; m--)
      if (FATHER[m-1] == FATHER[j-1]) best = m;
    return best;
  endfunction

  // P_j is a leaf unless P_{j+1} is its son.
  function automatic bit is_leaf(input int unsigned j);
    if (j >= P) return 1'b1;
    return int'(FATHER[j]) != j;
  endfunction

  // Preorder check: the root has no father, and the father of P_j is P_{j-1}
  // or one of its ancestors.
  function automatic bit tree_ok();
    int unsigned w;
    bit found;
    if (FATHER[0] != 0) return 1'b0;
    for (int unsigned j = 2; j <= P; j++) begin
      if (FATHER[j-1] == 0 || int'(FATHER[j-1]) >= j) return 1'b0;
      w = j - 1;
      found = 1'b0;
      while (w != 0) begin
        if (w == int'(FATHER[j-1])) found = 1'b1;
        w = int'(FATHER[w-1]);
      end
      if (!found) return 1'b0;
    end
    return 1'b1;
  endfunction

  if (!tree_ok()) begin : g_bad_tree
    $error("systolic_tree: FATHER is not a preorder-numbered tree");
  end

  logic signed [DATA_W-1:0] a_d  [1:P];
  logic signed [DATA_W-1:0] b_d  [1:P];
  logic signed [ACC_W-1:0]  c_d  [1:P];
  logic signed [DATA_W-1:0] a_q  [1:P];
  logic signed [DATA_W-1:0] ob   [1:P];
  logic signed [ACC_W-1:0]  c_q  [1:P];
  logic signed [DATA_W-1:0] pe_a [1:P];
  logic signed [ACC_W-1:0]  pe_c [1:P];
  logic signed [DATA_W-1:0] ra_q [1:P];
  logic signed [ACC_W-1:0]  rc_q [1:P];

  for (genvar j = 1; j <= P; j++) begin : g_proc
    localparam int unsigned F  = father_of(j);
    localparam int unsigned PS = prev_son(j);

    // forward inputs
    if (j == 1) begin : g_root
      assign a_d[j] = a_in;
      assign b_d[j] = b_in;
      assign c_d[j] = c_in;
    end else if (PS == 0) begin : g_first_son
      assign a_d[j] = a_q[F];
      assign b_d[j] = ob[F];
      assign c_d[j] = c_q[F];
    end else begin : g_later_son
      assign a_d[j] = ra_q[PS];
      assign b_d[j] = ob[F];
      assign c_d[j] = rc_q[PS];
    end

    // PE inputs
    if (is_leaf(j)) begin : g_leaf
      assign pe_a[j] = a_q[j];
      assign pe_c[j] = c_q[j];
    end else begin : g_inner
      assign pe_a[j] = ra_q[j+1];
      assign pe_c[j] = rc_q[j+1];
    end

    tree_processor #(
      .DATA_W(DATA_W), .ACC_W(ACC_W), .CDEPTH(CDEPTH)
    ) u_proc (
      .clk  (clk),
      .clear(clear),
      .a_in (a_d[j]),
      .b_in (b_d[j]),
      .c_in (c_d[j]),
      .a_q  (a_q[j]),
      .ob   (ob[j]),
      .c_q  (c_q[j]),
      .pe_a (pe_a[j]),
      .pe_c (pe_c[j]),
      .ra_q (ra_q[j]),
      .rc_q (rc_q[j])
    );
  end

  assign a_out = ra_q[1];
  assign c_out = rc_q[1];

endmodule
