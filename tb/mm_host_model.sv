// mm_host_model: host side of the multiplier's I/O port, for testbenches.
//
// It runs NOPS multiplications, alternating the explicit-initialisation start
// (zero_init = 0) and the self-initialising start (zero_init = 1). For each it
// fills A and B with fresh random signed values, answers every a_tag / b_tag
// in the same cycle, and checks every c_tag / c_data pair against a product
// computed here by three nested loops. It also checks, independently of the
// design, the cycle of every pumped and extracted element against the closed
// form schedule (pump a_ij at 2n(2n-3)+2(nj+i-1), b_ij at
// 4(n^2-1)+2(n+1)(i-1)-2(j-1), extract c_ij at 2(3n-2)(n+1)+2n(i+j-2)+2(i-1),
// with time counted as in the explicit form in both start modes), that every element is requested and every
// result delivered exactly once, and the start-to-done latency.
// finished rises when all operations are over; the counters are then final.
module mm_host_model #(
  parameter int unsigned N      = rmm_pkg::DEF_N,
  parameter int unsigned DATA_W = rmm_pkg::DEF_DATA_W,
  parameter int unsigned ACC_W  = rmm_pkg::DEF_ACC_W,
  parameter int unsigned NOPS   = 4,
  parameter int unsigned SEED   = 1
) (
  input  logic                      clk,
  output logic                      rst,
  output logic                      start,
  output logic                      zero_init,
  input  logic                      busy,
  input  logic                      done,
  input  rmm_pkg::elem_tag_t        a_tag,
  output logic signed [DATA_W-1:0]  a_data,
  input  rmm_pkg::elem_tag_t        b_tag,
  output logic signed [DATA_W-1:0]  b_data,
  input  rmm_pkg::elem_tag_t        c_tag,
  input  logic signed [ACC_W-1:0]   c_data,
  output logic                      finished,
  output int                        checks,
  output int                        failures,
  output int                        n_explicit,   // explicit-init operations
  output int                        n_selfinit,   // self-initialising operations
  output int                        n_b_gaps,     // idle b slots between rows
  output int                        n_results     // C elements checked
);
  import rmm_pkg::*;

  localparam int unsigned T0    = 4 * N * (N - 1);
  localparam int unsigned TLAST = 2 * (3 * N - 2) * (N + 1) + 2 * (N - 1) * (2 * N + 1);

  logic signed [DATA_W-1:0] A [1:N][1:N];
  logic signed [DATA_W-1:0] B [1:N][1:N];
  logic signed [ACC_W-1:0]  C [1:N][1:N];
  int a_seen [1:N][1:N];
  int b_seen [1:N][1:N];
  int c_seen [1:N][1:N];

  logic running, mode;
  int   t;            // schedule time of the current cycle
  int   cyc, start_cyc;
  logic b_prev_valid; // b_tag in the previous schedule slot

  // Idle cycles carry fresh random values, which the port must not let in.
  logic signed [DATA_W-1:0] idle_a, idle_b;
  always @(posedge clk) begin
    idle_a <= DATA_W'($urandom);
    idle_b <= DATA_W'($urandom);
  end

  always_comb begin
    a_data = a_tag.valid ? A[a_tag.row][a_tag.col] : idle_a;
    b_data = b_tag.valid ? B[b_tag.row][b_tag.col] : idle_b;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d: %s", t, what);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // Monitor, sampled just before each rising edge.
  always @(negedge clk) begin
    if (running && busy) begin
      if (a_tag.valid) begin
        check(int'(t_pump_a(N, 32'(a_tag.row), 32'(a_tag.col))) == t,
              $sformatf("a%0d%0d pumped at wrong time", a_tag.row, a_tag.col));
        a_seen[a_tag.row][a_tag.col]++;
      end
      if (b_tag.valid) begin
        check(int'(t_pump_b(N, 32'(b_tag.row), 32'(b_tag.col))) == t,
              $sformatf("b%0d%0d pumped at wrong time", b_tag.row, b_tag.col));
        b_seen[b_tag.row][b_tag.col]++;
      end
      // an even slot inside the b window with no b element is a row gap
      if (!b_tag.valid && (t % 2 == 0) && b_prev_valid) n_b_gaps++;
      if (t % 2 == 0) b_prev_valid = b_tag.valid;
      if (c_tag.valid) begin
        check(int'(t_extract_c(N, 32'(c_tag.row), 32'(c_tag.col))) == t,
              $sformatf("c%0d%0d extracted at wrong time", c_tag.row, c_tag.col));
        check(c_data == C[c_tag.row][c_tag.col],
              $sformatf("c%0d%0d = %0d, expected %0d", c_tag.row, c_tag.col,
                        c_data, C[c_tag.row][c_tag.col]));
        c_seen[c_tag.row][c_tag.col]++;
        n_results++;
      end
      t++;
    end
  end

  initial begin
    rst = 1'b1; start = 1'b0; zero_init = 1'b0; finished = 1'b0; running = 1'b0;
    checks = 0; failures = 0; n_explicit = 0; n_selfinit = 0; n_b_gaps = 0;
    n_results = 0; cyc = 0; mode = 1'b0; t = 0; b_prev_valid = 1'b0;
    void'($urandom(SEED));
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int op = 0; op < int'(NOPS); op++) begin
      // fresh operands and the reference product
      for (int i = 1; i <= int'(N); i++)
        for (int j = 1; j <= int'(N); j++) begin
          A[i][j] = DATA_W'($urandom);
          B[i][j] = DATA_W'($urandom);
          a_seen[i][j] = 0; b_seen[i][j] = 0; c_seen[i][j] = 0;
        end
      if (op == 0) begin   // extreme values once
        A[1][1] = {1'b1, {(DATA_W-1){1'b0}}};
        B[1][1] = {1'b1, {(DATA_W-1){1'b0}}};
      end
      for (int i = 1; i <= int'(N); i++)
        for (int j = 1; j <= int'(N); j++) begin
          C[i][j] = '0;
          for (int k = 1; k <= int'(N); k++)
            C[i][j] = C[i][j] + ACC_W'(A[i][k]) * ACC_W'(B[k][j]);
        end
      @(posedge clk);
      mode      = op[0];
      zero_init <= mode;
      start     <= 1'b1;
      @(posedge clk);
      start_cyc = cyc;
      start     <= 1'b0;
      if (mode) @(posedge clk);   // the clear cycle
      t = mode ? int'(T0) : 0;
      b_prev_valid = 1'b0;
      running = 1'b1;
      @(posedge done);
      @(negedge clk);
      @(posedge clk);
      running = 1'b0;
      check(cyc - start_cyc == int'(TLAST) + 1 - (mode ? int'(T0) - 1 : 0),
            $sformatf("latency %0d cycles", cyc - start_cyc));
      for (int i = 1; i <= int'(N); i++)
        for (int j = 1; j <= int'(N); j++) begin
          check(a_seen[i][j] == 1, $sformatf("a%0d%0d pumped %0d times", i, j, a_seen[i][j]));
          check(b_seen[i][j] == 1, $sformatf("b%0d%0d pumped %0d times", i, j, b_seen[i][j]));
          check(c_seen[i][j] == 1, $sformatf("c%0d%0d seen %0d times", i, j, c_seen[i][j]));
        end
      if (mode) n_selfinit++; else n_explicit++;
      repeat (2) @(posedge clk);
      check(!busy, "busy after done");
    end
    finished = 1'b1;
  end

endmodule
