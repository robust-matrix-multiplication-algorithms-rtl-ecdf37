// port_sequencer: the I/O-port schedule of one n x n multiplication.
//
// A single cycle counter t runs through the schedule of the port and three
// small index counters turn it into stream tags:
//   a_tag  which a_ij to pump into a_1 this cycle (column by column, one
//          element every 2 cycles from t = 4n(n-1) to 2(n-1)(3n+1));
//   b_tag  which b_ij to pump into b_1 (row by row, j from n down to 1,
//          one element every 2 cycles with one idle slot between rows, from
//          t = 4n^2-2n-2 to 6n^2-6);
//   c_tag  which c_ij leaves C_1[K] this cycle (by anti-diagonal i+j,
//          i rising within one, from t = 2(3n-2)(n+1) to
//          2(3n-2)(n+1)+2(n-1)(2n+1)).
// Zeros are pumped into c_1 throughout (every c_ij starts at 0), and into
// a_1 and b_1 whenever their tag is not valid. These cycle numbers are the
// ones of the published algorithm, re-derived as counters so that no
// division or multiplication is needed per cycle.
//
// start (one cycle, while idle) begins an operation. With zero_init = 0 the
// schedule starts at t = 0 and the 4n(n-1) leading cycles of zero A elements
// flush whatever the array holds (explicit initialisation). With
// zero_init = 1 the sequencer raises clear for one cycle, so every buffer of
// the array is zeroed, and then starts at t = 4n(n-1), which skips those
// cycles (self-initialisation). busy is high from the cycle after start to
// the last extraction; done pulses in the cycle of the last extraction.
// The handshake (start/busy/done), the tag encoding and the clear cycle are
// this design's choice.
module port_sequencer #(
  parameter int unsigned N = rmm_pkg::DEF_N
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic                zero_init,
  output logic                busy,
  output logic                done,
  output logic                clear,
  output rmm_pkg::elem_tag_t  a_tag,
  output rmm_pkg::elem_tag_t  b_tag,
  output rmm_pkg::elem_tag_t  c_tag
);
  import rmm_pkg::*;

  localparam int unsigned TA0   = 4 * N * (N - 1);
  localparam int unsigned TA1   = 2 * (N - 1) * (3 * N + 1);
  localparam int unsigned TB0   = 4 * N * N - 2 * N - 2;
  localparam int unsigned TB1   = 6 * N * N - 6;
  localparam int unsigned TC0   = 2 * (3 * N - 2) * (N + 1);
  localparam int unsigned TLAST = TC0 + 2 * (N - 1) * (2 * N + 1);
  localparam int unsigned TW    = $clog2(TLAST + 1);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN} state_t;

  state_t         state;
  logic [TW-1:0]  t;
  idx_t           a_i, a_j, b_i, b_j, c_q, c_d;
  logic           b_gap;
  logic           slot, a_win, b_win, c_win, c_hit, last;

  always_comb begin
    slot  = (state == S_RUN) && !t[0];
    a_win = slot && (t >= TW'(TA0)) && (t <= TW'(TA1));
    b_win = slot && (t >= TW'(TB0)) && (t <= TW'(TB1));
    c_win = slot && (t >= TW'(TC0));
    // slot (d, q) of the output stream holds c_ij with i = q+1, j = d-q+1
    c_hit = c_win && (c_q <= c_d) && (32'(c_q) + N - 1 >= 32'(c_d));
    last  = (state == S_RUN) && (t == TW'(TLAST));

    a_tag = '{valid: a_win,         row: a_i,          col: a_j};
    b_tag = '{valid: b_win && !b_gap, row: b_i,        col: b_j};
    c_tag = '{valid: c_hit,         row: c_q + idx_t'(1),
              col: c_d - c_q + idx_t'(1)};
    busy  = (state != S_IDLE);
    done  = last;
    clear = (state == S_CLEAR);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      t     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= zero_init ? S_CLEAR : S_RUN;
          t     <= zero_init ? TW'(TA0) : '0;
        end
        S_CLEAR: state <= S_RUN;
        S_RUN: begin
          t <= t + 1'b1;
          if (last) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Stream index counters; restarted at every start.
  always_ff @(posedge clk) begin
    if (rst || (state == S_IDLE)) begin
      a_i   <= idx_t'(1);
      a_j   <= idx_t'(1);
      b_i   <= idx_t'(1);
      b_j   <= idx_t'(N);
      b_gap <= 1'b0;
      c_q   <= '0;
      c_d   <= '0;
    end else begin
      if (a_win) begin
        if (a_i == idx_t'(N)) begin
          a_i <= idx_t'(1);
          a_j <= a_j + 1'b1;
        end else begin
          a_i <= a_i + 1'b1;
        end
      end
      if (b_win) begin
        if (b_gap) begin
          b_gap <= 1'b0;
          b_i   <= b_i + 1'b1;
        end else if (b_j == idx_t'(1)) begin
          b_j   <= idx_t'(N);
          b_gap <= 1'b1;
        end else begin
          b_j <= b_j - 1'b1;
        end
      end
      if (c_win) begin
        if (c_q == idx_t'(N - 1)) begin
          c_q <= '0;
          c_d <= c_d + 1'b1;
        end else begin
          c_q <= c_q + 1'b1;
        end
      end
    end
  end

  // Every tagged element lies inside the n x n matrix.
  always_ff @(posedge clk) begin
    if (!rst) begin
      if (a_tag.valid) assert (a_tag.row inside {[1:N]} && a_tag.col inside {[1:N]})
        else $error("a tag out of range");
      if (b_tag.valid) assert (b_tag.row inside {[1:N]} && b_tag.col inside {[1:N]})
        else $error("b tag out of range");
      if (c_tag.valid) assert (c_tag.row inside {[1:N]} && c_tag.col inside {[1:N]})
        else $error("c tag out of range");
    end
  end

endmodule
