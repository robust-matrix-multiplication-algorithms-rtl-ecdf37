// tb_systolic_tree: the processor tree alone, fed from the closed-form port
// schedule, on several tree shapes and sizes.
//
// The point of the architecture is that the port sees the same schedule and
// the same results whatever shape of spanning tree the fault pattern leaves.
// Each instance below uses a different tree, all driven by the same rules:
//   n=3  the seven-node example tree (sons of P_1: P_7, P_2; of P_3: P_5, P_4)
//   n=3  a chain, and a star (every node a son of the root)
//   n=2  a four-node tree; n=4 and n=5 with branching at several depths.
// For the example tree the passage of c_22 is also traced inside the array:
// it must meet a_21/b_12 at P_5, a_22/b_22 at P_4 and a_23/b_32 at P_3, one
// cycle after the times of the worked example (whose times count a value as
// present in a buffer from the cycle it was pumped).
module tb_systolic_tree;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int K = 6;
  logic fin [K];
  int   chk [K];
  int   fail [K];

  tree_harness #(.N(3), .SEED(11), .FATHER({16'd1, 16'd5, 16'd3, 16'd3, 16'd2, 16'd1, 16'd0}))
    h0 (.clk, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  tree_harness #(.N(3), .SEED(12), .FATHER({16'd6, 16'd5, 16'd4, 16'd3, 16'd2, 16'd1, 16'd0}))
    h1 (.clk, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  tree_harness #(.N(3), .SEED(13), .FATHER({16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd0}))
    h2 (.clk, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]));
  tree_harness #(.N(2), .SEED(14), .FATHER({16'd3, 16'd1, 16'd1, 16'd0}))
    h3 (.clk, .finished(fin[3]), .checks(chk[3]), .failures(fail[3]));
  tree_harness #(.N(4), .SEED(15), .FATHER({16'd6, 16'd7, 16'd7, 16'd6, 16'd1, 16'd4, 16'd2, 16'd2, 16'd1, 16'd0}))
    h4 (.clk, .finished(fin[4]), .checks(chk[4]), .failures(fail[4]));
  tree_harness #(.N(5), .SEED(16),
                 .FATHER({16'd9, 16'd10, 16'd10, 16'd9, 16'd1, 16'd7, 16'd6, 16'd3, 16'd3, 16'd3, 16'd1, 16'd1, 16'd0}))
    h5 (.clk, .finished(fin[5]), .checks(chk[5]), .failures(fail[5]));

  // Trace of c_22 through the example tree during its first run: the A and
  // B elements at the PE of P_p, and the partial sum arriving there.
  int tr_checks = 0, tr_fail = 0;
  task automatic trace(input int p, input int ai, aj, bi, bj,
                       input logic signed [31:0] part);
    tr_checks += 3;
    if (h0.u_tree.pe_a[p] != h0.A[ai][aj]) begin tr_fail++; $display("FAIL trace P%0d a", p); end
    if (h0.u_tree.ob[p] != h0.B[bi][bj]) begin tr_fail++; $display("FAIL trace P%0d b", p); end
    if (h0.u_tree.pe_c[p] != part) begin tr_fail++; $display("FAIL trace P%0d c", p); end
  endtask

  always @(negedge clk) begin
    if (!h0.self_init && h0.t == 34) trace(5, 2, 1, 1, 2, h0.C0[2][2]);
    if (!h0.self_init && h0.t == 42)
      trace(4, 2, 2, 2, 2, h0.C0[2][2] + 32'(h0.A[2][1]) * 32'(h0.B[1][2]));
    if (!h0.self_init && h0.t == 49)
      trace(3, 2, 3, 3, 2, h0.C0[2][2] + 32'(h0.A[2][1]) * 32'(h0.B[1][2])
                                       + 32'(h0.A[2][2]) * 32'(h0.B[2][2]));
  end

  initial begin
    int c, f;
    #1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    c = tr_checks; f = tr_fail;
    for (int k = 0; k < K; k++) begin
      c += chk[k]; f += fail[k];
    end
    if (tr_checks != 9) begin c++; f++; $display("FAIL trace not taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end
endmodule
