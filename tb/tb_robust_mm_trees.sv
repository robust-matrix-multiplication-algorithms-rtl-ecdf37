// tb_robust_mm_trees: the complete multiplier on trees of different shapes
// and sizes, each run through both start modes by its own host model.
//   n=3  a chain of seven processors (the same port behaviour as the default
//        tree is what makes the array tolerate any fault pattern)
//   n=4  a ten-node tree branching at the root and below
//   n=8  a 22-node tree of two long branches with side spurs
//   n=16 a 46-node comb: a spine P_1, P_2, P_4, P_6, ... with one leaf
//        P_(2m+1) hanging off each spine node P_(2m)
// Every result, every pump and extraction cycle and the latency are checked.
module tb_robust_mm_trees;
  import rmm_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int K = 4;
  logic rst [K], start [K], zero_init [K], busy [K], done [K], fin [K];
  elem_tag_t a_tag [K], b_tag [K], c_tag [K];
  logic signed [DEF_DATA_W-1:0] a_data [K], b_data [K], a_exit [K];
  logic signed [DEF_ACC_W-1:0]  c_data [K];
  int chk [K], fail [K], nx [K], ns [K], ng [K], nr [K];

  localparam node_t [6:0]  T3 = {16'd6, 16'd5, 16'd4, 16'd3, 16'd2, 16'd1, 16'd0};
  localparam node_t [9:0]  T4 = {16'd8, 16'd8, 16'd7, 16'd1, 16'd4, 16'd4, 16'd2,
                                  16'd2, 16'd1, 16'd0};
  // First branch P_2 .. P_11 from the root with side sons P_5 (of P_3) and
  // P_9 (of P_7); second branch P_12 .. P_22 from the root, forking at P_17.
  localparam node_t [21:0] T8 = {16'd21, 16'd20, 16'd19, 16'd17, 16'd17, 16'd16,
                                  16'd15, 16'd14, 16'd13, 16'd12, 16'd1,
                                  16'd10, 16'd9, 16'd7, 16'd7, 16'd6, 16'd5,
                                  16'd3, 16'd3, 16'd2, 16'd1, 16'd0};

  function automatic node_t [45:0] comb_tree();
    node_t [45:0] f;
    f[0] = 16'd0;
    f[1] = 16'd1;
    for (int j = 3; j <= 46; j++)
      f[j-1] = (j % 2 == 1) ? 16'(j - 1) : 16'(j - 2);
    return f;
  endfunction
  localparam node_t [45:0] T16 = comb_tree();

  robust_mm_top #(.N(3), .FATHER(T3)) d0 (
    .clk, .rst(rst[0]), .start(start[0]), .zero_init(zero_init[0]), .busy(busy[0]),
    .done(done[0]), .a_tag(a_tag[0]), .a_data(a_data[0]), .b_tag(b_tag[0]),
    .b_data(b_data[0]), .c_tag(c_tag[0]), .c_data(c_data[0]), .a_exit(a_exit[0]));
  mm_host_model #(.N(3), .NOPS(2), .SEED(21)) m0 (
    .clk, .rst(rst[0]), .start(start[0]), .zero_init(zero_init[0]), .busy(busy[0]),
    .done(done[0]), .a_tag(a_tag[0]), .a_data(a_data[0]), .b_tag(b_tag[0]),
    .b_data(b_data[0]), .c_tag(c_tag[0]), .c_data(c_data[0]), .finished(fin[0]),
    .checks(chk[0]), .failures(fail[0]), .n_explicit(nx[0]), .n_selfinit(ns[0]),
    .n_b_gaps(ng[0]), .n_results(nr[0]));

  robust_mm_top #(.N(4), .FATHER(T4)) d1 (
    .clk, .rst(rst[1]), .start(start[1]), .zero_init(zero_init[1]), .busy(busy[1]),
    .done(done[1]), .a_tag(a_tag[1]), .a_data(a_data[1]), .b_tag(b_tag[1]),
    .b_data(b_data[1]), .c_tag(c_tag[1]), .c_data(c_data[1]), .a_exit(a_exit[1]));
  mm_host_model #(.N(4), .NOPS(2), .SEED(22)) m1 (
    .clk, .rst(rst[1]), .start(start[1]), .zero_init(zero_init[1]), .busy(busy[1]),
    .done(done[1]), .a_tag(a_tag[1]), .a_data(a_data[1]), .b_tag(b_tag[1]),
    .b_data(b_data[1]), .c_tag(c_tag[1]), .c_data(c_data[1]), .finished(fin[1]),
    .checks(chk[1]), .failures(fail[1]), .n_explicit(nx[1]), .n_selfinit(ns[1]),
    .n_b_gaps(ng[1]), .n_results(nr[1]));

  robust_mm_top #(.N(8), .FATHER(T8)) d2 (
    .clk, .rst(rst[2]), .start(start[2]), .zero_init(zero_init[2]), .busy(busy[2]),
    .done(done[2]), .a_tag(a_tag[2]), .a_data(a_data[2]), .b_tag(b_tag[2]),
    .b_data(b_data[2]), .c_tag(c_tag[2]), .c_data(c_data[2]), .a_exit(a_exit[2]));
  mm_host_model #(.N(8), .NOPS(2), .SEED(23)) m2 (
    .clk, .rst(rst[2]), .start(start[2]), .zero_init(zero_init[2]), .busy(busy[2]),
    .done(done[2]), .a_tag(a_tag[2]), .a_data(a_data[2]), .b_tag(b_tag[2]),
    .b_data(b_data[2]), .c_tag(c_tag[2]), .c_data(c_data[2]), .finished(fin[2]),
    .checks(chk[2]), .failures(fail[2]), .n_explicit(nx[2]), .n_selfinit(ns[2]),
    .n_b_gaps(ng[2]), .n_results(nr[2]));

  robust_mm_top #(.N(16), .FATHER(T16)) d3 (
    .clk, .rst(rst[3]), .start(start[3]), .zero_init(zero_init[3]), .busy(busy[3]),
    .done(done[3]), .a_tag(a_tag[3]), .a_data(a_data[3]), .b_tag(b_tag[3]),
    .b_data(b_data[3]), .c_tag(c_tag[3]), .c_data(c_data[3]), .a_exit(a_exit[3]));
  mm_host_model #(.N(16), .NOPS(2), .SEED(24)) m3 (
    .clk, .rst(rst[3]), .start(start[3]), .zero_init(zero_init[3]), .busy(busy[3]),
    .done(done[3]), .a_tag(a_tag[3]), .a_data(a_data[3]), .b_tag(b_tag[3]),
    .b_data(b_data[3]), .c_tag(c_tag[3]), .c_data(c_data[3]), .finished(fin[3]),
    .checks(chk[3]), .failures(fail[3]), .n_explicit(nx[3]), .n_selfinit(ns[3]),
    .n_b_gaps(ng[3]), .n_results(nr[3]));

  initial begin
    int c, f;
    #1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    c = 0; f = 0;
    for (int k = 0; k < K; k++) begin
      c += chk[k] + 2; f += fail[k];
      if (nx[k] == 0 || ns[k] == 0) begin f++; $display("FAIL tree %0d: a start mode never ran", k); end
      if (ng[k] == 0) begin f++; $display("FAIL tree %0d: no b row gap", k); end
    end
    c++;
    if (nr[0] != 2 * 9 || nr[1] != 2 * 16 || nr[2] != 2 * 64 || nr[3] != 2 * 256) begin
      f++; $display("FAIL result counts %0d %0d %0d %0d", nr[0], nr[1], nr[2], nr[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end
endmodule
