// seq_harness: runs one port_sequencer through an operation in each start
// mode and checks its tags against the closed-form schedule: every a_ij,
// b_ij and c_ij tagged exactly once, each in the cycle the formula gives,
// clear raised only in the cycle after a self-initialising start, busy from
// start to done and done in the cycle of the last result.
module seq_harness #(
  parameter int unsigned N = 3
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_gaps        // idle slots between b rows seen
);
  import rmm_pkg::*;

  localparam int T0    = int'(4 * N * (N - 1));
  localparam int TLAST = int'(t_extract_c(N, N, N));

  logic rst, start, zero_init, busy, done, clear;
  elem_tag_t a_tag, b_tag, c_tag;

  port_sequencer #(.N(N)) dut (
    .clk, .rst, .start, .zero_init, .busy, .done, .clear, .a_tag, .b_tag, .c_tag
  );

  int a_seen [1:N][1:N];
  int b_seen [1:N][1:N];
  int c_seen [1:N][1:N];
  int t, n_clear, n_done;
  logic prev_b;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL seq n=%0d t=%0d: %s", N, t, what);
    end
  endtask

  task automatic run(input bit mode);
    for (int i = 1; i <= int'(N); i++)
      for (int j = 1; j <= int'(N); j++) begin
        a_seen[i][j] = 0; b_seen[i][j] = 0; c_seen[i][j] = 0;
      end
    n_clear = 0; n_done = 0; prev_b = 1'b0;
    @(negedge clk);
    check(!busy && !a_tag.valid && !b_tag.valid && !c_tag.valid, "idle");
    start = 1'b1; zero_init = mode;
    @(negedge clk);
    start = 1'b0; zero_init = 1'b0;
    if (mode) begin
      check(clear && busy, "clear cycle");
      check(!a_tag.valid && !b_tag.valid && !c_tag.valid, "no tag while clearing");
      @(negedge clk);
    end
    t = mode ? T0 : 0;
    while (t <= TLAST) begin
      check(busy && !clear, "busy");
      check(done == (t == TLAST), "done");
      if (a_tag.valid) begin
        check(int'(t_pump_a(N, 32'(a_tag.row), 32'(a_tag.col))) == t, "a time");
        a_seen[a_tag.row][a_tag.col]++;
      end
      if (b_tag.valid) begin
        check(int'(t_pump_b(N, 32'(b_tag.row), 32'(b_tag.col))) == t, "b time");
        b_seen[b_tag.row][b_tag.col]++;
      end
      if (t % 2 == 0) begin
        if (prev_b && !b_tag.valid && t < int'(6 * N * N - 6)) n_gaps++;
        prev_b = b_tag.valid;
      end
      if (c_tag.valid) begin
        check(int'(t_extract_c(N, 32'(c_tag.row), 32'(c_tag.col))) == t, "c time");
        c_seen[c_tag.row][c_tag.col]++;
      end
      @(negedge clk);
      t++;
    end
    check(!busy && !done && !clear, "back to idle");
    for (int i = 1; i <= int'(N); i++)
      for (int j = 1; j <= int'(N); j++)
        check(a_seen[i][j] == 1 && b_seen[i][j] == 1 && c_seen[i][j] == 1,
              $sformatf("element %0d,%0d tagged %0d/%0d/%0d times", i, j,
                        a_seen[i][j], b_seen[i][j], c_seen[i][j]));
  endtask

  initial begin
    finished = 1'b0; checks = 0; failures = 0; n_gaps = 0;
    rst = 1'b1; start = 1'b0; zero_init = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(1'b0);
    run(1'b1);
    run(1'b0);
    finished = 1'b1;
  end

endmodule
