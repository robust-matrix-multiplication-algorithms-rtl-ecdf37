// tb_robust_mm_top: end-to-end test of the multiplier at its default size
// (3 x 3 matrices on the seven-node tree).
//
// A host model runs four multiplications, two with each start mode, and
// checks every result, every pump and extraction cycle and the latency. The
// cycle numbers of the worked 3 x 3 example (a_11 pumped at 24, b_11 at 32,
// c_22 extracted at 70, last result c_33 at 84, A stream over after 40) are
// checked directly as well. Each mechanism must occur: explicit-initialisation
// start, self-initialising start (with its clear cycle), the idle b slot
// between rows, and result extraction.
module tb_robust_mm_top;
  import rmm_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, start, zero_init, busy, done, finished, clear_seen;
  elem_tag_t a_tag, b_tag, c_tag;
  logic signed [DEF_DATA_W-1:0] a_data, b_data, a_exit;
  logic signed [DEF_ACC_W-1:0]  c_data;
  int checks, failures, n_explicit, n_selfinit, n_b_gaps, n_results;
  int fchecks, ffailures, n_clear;

  robust_mm_top dut (
    .clk, .rst, .start, .zero_init, .busy, .done,
    .a_tag, .a_data, .b_tag, .b_data, .c_tag, .c_data, .a_exit
  );

  mm_host_model #(.NOPS(4), .SEED(7)) host (
    .clk, .rst, .start, .zero_init, .busy, .done,
    .a_tag, .a_data, .b_tag, .b_data, .c_tag, .c_data,
    .finished, .checks, .failures, .n_explicit, .n_selfinit, .n_b_gaps,
    .n_results
  );

  // Worked-example cycle numbers, first (explicit-initialisation) operation.
  int t0 = -1;
  int t_a11 = -1, t_b11 = -1, t_c22 = -1, t_c33 = -1, t_alast = -1;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    if (dut.clear) n_clear++;
    if (host.n_explicit == 0 && busy && !zero_init) begin
      if (t0 < 0) t0 = cyc;
      if (a_tag.valid && a_tag.row == 1 && a_tag.col == 1) t_a11 = cyc - t0;
      if (a_tag.valid) t_alast = cyc - t0;
      if (b_tag.valid && b_tag.row == 1 && b_tag.col == 1) t_b11 = cyc - t0;
      if (c_tag.valid && c_tag.row == 2 && c_tag.col == 2) t_c22 = cyc - t0;
      if (c_tag.valid && c_tag.row == 3 && c_tag.col == 3) t_c33 = cyc - t0;
    end
  end

  initial begin
    fchecks = 0; ffailures = 0; n_clear = 0;
    @(posedge finished);
    fchecks += 6;
    if (t_a11 != 24)  begin ffailures++; $display("FAIL a11 at %0d", t_a11); end
    if (t_alast != 40) begin ffailures++; $display("FAIL last a at %0d", t_alast); end
    if (t_b11 != 32)  begin ffailures++; $display("FAIL b11 at %0d", t_b11); end
    if (t_c22 != 70)  begin ffailures++; $display("FAIL c22 at %0d", t_c22); end
    if (t_c33 != 84)  begin ffailures++; $display("FAIL c33 at %0d", t_c33); end
    if (n_results != 4 * 9) begin ffailures++; $display("FAIL %0d results", n_results); end
    // every mechanism must have happened
    fchecks += 4;
    if (n_explicit == 0) begin ffailures++; $display("FAIL no explicit-init run"); end
    if (n_selfinit == 0) begin ffailures++; $display("FAIL no self-init run"); end
    if (n_clear == 0)    begin ffailures++; $display("FAIL no clear cycle"); end
    if (n_b_gaps == 0)   begin ffailures++; $display("FAIL no b row gap"); end
    $display("mechanisms: explicit=%0d selfinit=%0d clear=%0d b_gaps=%0d results=%0d",
             n_explicit, n_selfinit, n_clear, n_b_gaps, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks + fchecks, failures + ffailures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + fchecks, failures + ffailures + 1);
    $finish;
  end

endmodule
