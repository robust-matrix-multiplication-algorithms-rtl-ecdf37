// tb_tree_processor: one processor on its own, against a cycle model kept
// here: a, b, c and A are one-cycle delays, C is a CDEPTH-cycle delay of
// pe_c + pe_a * b (b taken one cycle after it entered), and clear zeroes
// everything in one cycle. Checks latency of each path and the clear.
module tb_tree_processor;
  localparam int DW = 16;
  localparam int AW = 32;
  localparam int KD = 5;   // C buffer depth for n = 2

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic clear;
  logic signed [DW-1:0] a_in, b_in, a_q, ob, pe_a, ra_q;
  logic signed [AW-1:0] c_in, c_q, pe_c, rc_q;
  int checks = 0, failures = 0;

  tree_processor #(.DATA_W(DW), .ACC_W(AW), .CDEPTH(KD)) dut (
    .clk, .clear, .a_in, .b_in, .c_in, .a_q, .ob, .c_q, .pe_a, .pe_c, .ra_q, .rc_q
  );

  // reference model
  logic signed [DW-1:0] m_a, m_b, m_ra;
  logic signed [AW-1:0] m_c, m_cb [KD];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    clear = 1'b1;
    a_in = '0; b_in = '0; c_in = '0; pe_a = '0; pe_c = '0;
    @(negedge clk);
    clear = 1'b0;
    m_a = '0; m_b = '0; m_c = '0; m_ra = '0;
    for (int k = 0; k < KD; k++) m_cb[k] = '0;
    check(a_q == 0 && ob == 0 && c_q == 0 && ra_q == 0 && rc_q == 0, "clear");
    for (int cyc = 0; cyc < 300; cyc++) begin
      // a clear in the middle, once
      clear = (cyc == 150);
      a_in = DW'($urandom); b_in = DW'($urandom); c_in = AW'($urandom);
      pe_a = DW'($urandom); pe_c = AW'($urandom);
      @(posedge clk);
      if (clear) begin
        m_a = '0; m_b = '0; m_c = '0; m_ra = '0;
        for (int k = 0; k < KD; k++) m_cb[k] = '0;
      end else begin
        for (int k = KD - 1; k > 0; k--) m_cb[k] = m_cb[k-1];
        m_cb[0] = pe_c + AW'(pe_a) * AW'(m_b);
        m_ra = pe_a;
        m_a = a_in; m_b = b_in; m_c = c_in;
      end
      @(negedge clk);
      check(a_q == m_a, "a buffer");
      check(ob == m_b, "b buffer / O_B");
      check(c_q == m_c, "c buffer");
      check(ra_q == m_ra, "A buffer");
      check(rc_q == m_cb[KD-1], $sformatf("C buffer cycle %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
