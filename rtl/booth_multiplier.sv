// booth_multiplier: 32 x 32 -> 64-bit signed/unsigned multiply-accumulate,
// modified radix-4 Booth, 8 multiplier bits per cycle.
//
// How it works.  Both operands are extended to 33 bits (sign extension for a
// signed multiply, a zero top bit for an unsigned one) so that one datapath
// serves both.  Each cycle four Booth encoders look at overlapping bit
// triples B[2j+1], B[2j], B[2j-1] of the multiplier and pick 0, +A, +2A, -A
// or -2A for four partial-product rows; the rows and the running sum and
// carry words are reduced by a tree of carry-save adders (6 -> 2).  The sum
// and carry are kept in two registers and are not added up every cycle: a
// single carry-propagate "final adder" runs once, in its own cycle, after
// the last Booth cycle (the put-off final adder).
//
// Early termination: after a cycle that has consumed bits [8k-1:0], the
// multiply stops if bits [32:8k] of the extended multiplier are all zero or
// all one, so a multiply takes 1 to 4 Booth cycles.  The Booth digit that
// straddles the stop point contributes (B[8k-1] - B[32]) * A * 2^(8k); it is
// folded into the final addition.
//
// Timing.  In the cycle `start` is high the first Booth cycle is done
// straight from the `a`, `b` and `acc` inputs (the operands come from the
// pipeline register).  After n Booth cycles (n = 1..4) one final-adder cycle
// follows, in which `done` is high and `result` carries the product plus
// accumulator.  `result` then holds until the next start.  So a multiply
// occupies n + 1 cycles from `start` to `done`, inclusive.
//
// The widths (33-bit operands, 4 rows of 8 bits per cycle) follow the core's
// multiplier description.  The rows here are kept at the full 64-bit width
// of the product instead of narrower rows joined by append logic, and a
// negative row is formed as a two's complement directly: both are this
// design's own choices.
module booth_multiplier #(
  parameter int unsigned BITS_PER_CYCLE = 8   // 4 Booth digits per cycle
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,          // multiplicand
  input  logic [31:0] b,          // multiplier
  input  logic [63:0] acc,        // accumulate value (0 when none)
  input  logic        is_signed,
  output logic        busy,       // a multiply is in progress (after start)
  output logic        done,       // final-adder cycle: result valid
  output logic [63:0] result,
  output logic [2:0]  booth_cycles // Booth cycles the last multiply used
);
  localparam int DIGITS = BITS_PER_CYCLE / 2;
  localparam int GROUPS = 32 / BITS_PER_CYCLE;

  typedef enum logic [1:0] {S_IDLE, S_BOOTH, S_FINAL} state_e;
  state_e state;

  logic [32:0] a_q, b_q, cur_a, cur_b;
  logic [63:0] sum_q, car_q, cur_s, cur_c;
  logic [2:0]  k_q, cur_k;
  logic [63:0] res_q, final_sum, corr, a64;
  logic [63:0] s_nxt, c_nxt;
  logic        stop;

  function automatic logic [63:0] csa_s(input logic [63:0] x, y, z);
    return x ^ y ^ z;
  endfunction
  function automatic logic [63:0] csa_c(input logic [63:0] x, y, z);
    return ((x & y) | (x & z) | (y & z)) << 1;
  endfunction

  // one Booth-encoded row: digit from bits {b2j+1, b2j, b2j-1}
  function automatic logic [63:0] booth_row(input logic [2:0] trip, input logic [63:0] m,
                                            input int sh);
    logic [63:0] r;
    unique case (trip)
      3'b001, 3'b010: r = m;
      3'b011:         r = m << 1;
      3'b100:         r = -(m << 1);
      3'b101, 3'b110: r = -m;
      default:        r = '0;
    endcase
    return r << sh;
  endfunction

  always_comb begin
    logic [63:0] pp [DIGITS];
    logic [63:0] s1, c1, s2, c2, s3, c3;
    logic [34:0] bx;
    logic [32:0] rest;
    int          j;

    cur_a = start ? {is_signed & a[31], a} : a_q;
    cur_b = start ? {is_signed & b[31], b} : b_q;
    cur_s = start ? acc : sum_q;
    cur_c = start ? '0  : car_q;
    cur_k = start ? '0  : k_q;
    a64   = {{31{cur_a[32]}}, cur_a};
    bx    = {cur_b[32], cur_b, 1'b0};          // bx[i+1] = B[i], bx[0] = B[-1]

    for (int i = 0; i < DIGITS; i++) begin
      j = int'(cur_k) * DIGITS + i;
      pp[i] = booth_row(bx[2*j +: 3], a64, 2 * j);
    end
    // carry-save reduction, 6 operands to 2
    s1 = csa_s(pp[0], pp[1], pp[2]);  c1 = csa_c(pp[0], pp[1], pp[2]);
    s2 = csa_s(pp[3], cur_s, cur_c);  c2 = csa_c(pp[3], cur_s, cur_c);
    s3 = csa_s(s1, c1, s2);           c3 = csa_c(s1, c1, s2);
    s_nxt = csa_s(s3, c3, c2);        c_nxt = csa_c(s3, c3, c2);

    // stop when the unconsumed multiplier bits are all sign
    rest = 33'($signed(cur_b) >>> (BITS_PER_CYCLE * (int'(cur_k) + 1)));
    stop = (rest == {33{cur_b[32]}});
  end

  // final adder with the straddling Booth digit folded in
  always_comb begin
    logic        hi, sg;
    int          sh;
    sh = BITS_PER_CYCLE * int'(k_q);            // bits consumed
    hi = (sh > 0) ? b_q[sh - 1] : 1'b0;
    sg = b_q[32];
    unique case ({hi, sg})
      2'b10:   corr = {{31{a_q[32]}}, a_q} << sh;
      2'b01:   corr = -({{31{a_q[32]}}, a_q} << sh);
      default: corr = '0;
    endcase
    final_sum = csa_s(sum_q, car_q, corr) + csa_c(sum_q, car_q, corr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_q <= '0; b_q <= '0; sum_q <= '0; car_q <= '0; k_q <= '0; res_q <= '0;
      booth_cycles <= '0;
    end else begin
      if (start || state == S_BOOTH) begin
        a_q   <= cur_a;
        b_q   <= cur_b;
        sum_q <= s_nxt;
        car_q <= c_nxt;
        k_q   <= cur_k + 3'd1;
        state <= (stop || int'(cur_k) == GROUPS - 1) ? S_FINAL : S_BOOTH;
      end else if (state == S_FINAL) begin
        res_q        <= final_sum;
        booth_cycles <= k_q;
        state        <= S_IDLE;
      end
    end
  end

  assign busy   = (state != S_IDLE);
  assign done   = (state == S_FINAL);
  assign result = (state == S_FINAL) ? final_sum : res_q;
endmodule
