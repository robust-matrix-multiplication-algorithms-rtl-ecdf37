// tree_harness: drives one systolic_tree straight from the closed-form port
// schedule and checks what comes out, for testbenches.
//
// Each cycle it finds by brute force which a_ij, b_ij and c_ij belong on the
// port (pump a_ij at 2n(2n-3)+2(nj+i-1), b_ij at 4(n^2-1)+2(n+1)(i-1)-2(j-1),
// c_ij at 2n(i+j-2)+2(i-1)) and checks the port output at
// 2(3n-2)(n+1)+2n(i+j-2)+2(i-1) against C0 + A x B computed here. Two runs:
//   1. explicit initialisation: the buffers start with whatever they hold,
//      zeros are pumped into a_1 until a_11 is due, and C starts from a
//      random C0 (which the schedule carries through unchanged);
//   2. self-initialisation: one clear cycle, then the same schedule with
//      4n(n-1) subtracted from every time and zeros into c_1.
// Slots that carry no element are filled with random values on b (A is zero
// there) and zeros on a and c.
module tree_harness #(
  parameter int unsigned N    = 3,
  parameter int unsigned SEED = 1,
  localparam int unsigned P   = 3 * N - 2,
  parameter rmm_pkg::node_t [P-1:0] FATHER = {16'd1, 16'd5, 16'd3, 16'd3, 16'd2, 16'd1, 16'd0}
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  import rmm_pkg::*;

  localparam int unsigned DW = DEF_DATA_W;
  localparam int unsigned AW = DEF_ACC_W;
  localparam int T0    = int'(4 * N * (N - 1));
  localparam int TLAST = int'(t_extract_c(N, N, N));

  logic clear;
  logic signed [DW-1:0] a_in, b_in, a_out;
  logic signed [AW-1:0] c_in, c_out;

  systolic_tree #(.N(N), .FATHER(FATHER)) u_tree (
    .clk, .clear, .a_in, .b_in, .c_in, .a_out, .c_out
  );

  logic signed [DW-1:0] A [1:N][1:N];
  logic signed [DW-1:0] B [1:N][1:N];
  logic signed [AW-1:0] C0 [1:N][1:N];
  logic signed [AW-1:0] C [1:N][1:N];
  int  t, got;
  logic self_init;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL tree n=%0d t=%0d: %s", N, t, what);
    end
  endtask

  // Port inputs for schedule time t (explicit-form time); checks the output.
  task automatic drive_cycle();
    @(negedge clk);
    a_in = (t < 0) ? DW'($urandom) : '0;
    b_in = DW'($urandom);
    c_in = '0;
    for (int i = 1; i <= int'(N); i++)
      for (int j = 1; j <= int'(N); j++) begin
        if (int'(t_pump_a(N, i, j)) == t) a_in = A[i][j];
        if (int'(t_pump_b(N, i, j)) == t) b_in = B[i][j];
        if (int'(t_pump_c(N, i, j)) == t && !self_init) c_in = C0[i][j];
        if (int'(t_extract_c(N, i, j)) == t) begin
          check(c_out == C[i][j], $sformatf("c%0d%0d = %0d, expected %0d",
                                              i, j, c_out, C[i][j]));
          got++;
        end
      end
    @(posedge clk);
    t++;
  endtask

  task automatic new_operands(input bit with_c0);
    for (int i = 1; i <= int'(N); i++)
      for (int j = 1; j <= int'(N); j++) begin
        A[i][j]  = DW'($urandom);
        B[i][j]  = DW'($urandom);
        C0[i][j] = with_c0 ? AW'($urandom) : '0;
      end
    for (int i = 1; i <= int'(N); i++)
      for (int j = 1; j <= int'(N); j++) begin
        C[i][j] = C0[i][j];
        for (int k = 1; k <= int'(N); k++)
          C[i][j] = C[i][j] + AW'(A[i][k]) * AW'(B[k][j]);
      end
  endtask

  initial begin
    finished = 1'b0; checks = 0; failures = 0; clear = 1'b0;
    void'($urandom(SEED));
    // run 1: explicit initialisation, buffers start unknown
    self_init = 1'b0; got = 0; t = 0;
    new_operands(1'b1);
    while (t <= TLAST) drive_cycle();
    check(got == int'(N * N), $sformatf("%0d results in run 1", got));
    // leave garbage behind: random A and B for a few cycles
    self_init = 1'b1; t = -1000;
    repeat (7) drive_cycle();
    // run 2: one clear cycle, then the shortened schedule
    clear = 1'b1;
    drive_cycle();
    clear = 1'b0;
    got = 0; t = T0;
    new_operands(1'b0);
    while (t <= TLAST) drive_cycle();
    check(got == int'(N * N), $sformatf("%0d results in run 2", got));
    finished = 1'b1;
  end

endmodule
