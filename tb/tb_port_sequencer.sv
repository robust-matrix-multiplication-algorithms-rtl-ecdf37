// tb_port_sequencer: the port schedule for n = 3 (the worked example, whose
// printed cycle numbers are also checked here) and n = 5, in both start modes.
module tb_port_sequencer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic f3, f5;
  int c3, c5, x3, x5, g3, g5;
  int checks = 0, failures = 0;

  seq_harness #(.N(3)) h3 (.clk, .finished(f3), .checks(c3), .failures(x3), .n_gaps(g3));
  seq_harness #(.N(5)) h5 (.clk, .finished(f5), .checks(c5), .failures(x5), .n_gaps(g5));

  // Worked example (n = 3): a_ij, b_ij pump times and c_ij extraction times,
  // counted in the explicit-start form in every run.
  int ta [3][3] = '{'{24, 30, 36}, '{26, 32, 38}, '{28, 34, 40}};
  int tb [3][3] = '{'{32, 30, 28}, '{40, 38, 36}, '{48, 46, 44}};
  int tc [3][3] = '{'{56, 62, 68}, '{64, 70, 76}, '{72, 78, 84}};
  int ex_hits = 0;

  always @(negedge clk) begin
    if (h3.dut.busy && !h3.dut.clear && h3.t <= 84) begin
      if (h3.a_tag.valid) begin
        checks++; ex_hits++;
        if (ta[h3.a_tag.row-1][h3.a_tag.col-1] != h3.t) failures++;
      end
      if (h3.b_tag.valid) begin
        checks++; ex_hits++;
        if (tb[h3.b_tag.row-1][h3.b_tag.col-1] != h3.t) failures++;
      end
      if (h3.c_tag.valid) begin
        checks++; ex_hits++;
        if (tc[h3.c_tag.row-1][h3.c_tag.col-1] != h3.t) failures++;
      end
    end
  end

  initial begin
    #1;
    wait (f3 && f5);
    checks += c3 + c5 + 2;
    failures += x3 + x5;
    if (ex_hits != 3 * 27) begin failures++; $display("FAIL example hits %0d", ex_hits); end
    // one idle slot after each of the first n-1 rows, three runs
    if (g3 != 3 * 2 || g5 != 3 * 4) begin
      failures++; $display("FAIL row gaps %0d %0d", g3, g5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
