// Iterative N x N signed radix-16 Booth multiplier (one digit per cycle).
//
// The same algorithm as radix16_booth_mult, spread over time with one
// encoder, one partial-product generator and one ripple carry adder. The
// product register is {hi, lo, lo_m1}: hi is the upper part (N+5 bits,
// enough that the running sum never overflows), lo starts as the multiplier
// and lo_m1 is the implied bit below it (0 at start). Each cycle:
//   1. the group {lo[3:0], lo_m1} is encoded into a digit -8..+8,
//   2. digit*multiplicand is added to hi (the negation bit as carry-in),
//   3. {hi, lo, lo_m1} is shifted right arithmetically by four bits.
// After N/4 cycles {hi, lo} holds the product, of which the low 2N bits
// are output.
//
// Interface: `start` samples both operands when the unit is idle and is
// ignored while `busy`. `busy` is high for the N/4 working cycles; `done`
// pulses for one cycle after the last, when `product` becomes valid. The
// product holds until the next start. Reset is asynchronous, active low.
// Latency from start to done: N/4 clock cycles (4 for N = 16). The
// add-then-shift-by-four step follows the worked example of the algorithm;
// the handshake and the reset are this design's own. The two assertions at
// the end use rst_n in `disable iff`, so lint reports rst_n as used both
// synchronously and asynchronously; that is expected and harmless.
module radix16_booth_seq
  import booth16_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product
);

  localparam int unsigned NG = num_groups(N);
  localparam int unsigned HW = N + 5;   // upper accumulator width
  localparam int unsigned PW = N + 4;   // partial product width
  localparam int unsigned CW = $clog2(NG + 1);

  if (N % 4 != 0 || N < 8) begin : g_bad_n
    $error("radix16_booth_seq: N must be a multiple of 4 and at least 8");
  end

  logic [N-1:0]  y_q;     // latched multiplicand
  logic [HW-1:0] hi_q;
  logic [N-1:0]  lo_q;
  logic          lo_m1_q;
  logic [CW-1:0] cnt_q;   // cycles left
  logic          busy_q, done_q;

  booth_digit_t  digit;
  logic [PW-1:0] pp;
  logic          neg;
  logic [HW-1:0] sum;
  logic          unused_cout;
  logic [HW-N-1:0] unused_hi;

  booth16_encoder u_enc (
    .grp  ({lo_q[3:0], lo_m1_q}),
    .digit(digit)
  );

  booth16_ppgen #(.N(N)) u_pp (
    .y    (y_q),
    .digit(digit),
    .pp   (pp),
    .neg  (neg)
  );

  ripple_carry_adder #(.W(HW)) u_add (
    .a   (hi_q),
    .b   (HW'(signed'(pp))),
    .cin (neg),
    .sum (sum),
    .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q     <= '0;
      hi_q    <= '0;
      lo_q    <= '0;
      lo_m1_q <= 1'b0;
      cnt_q   <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (start) begin
          y_q     <= multiplicand;
          hi_q    <= '0;
          lo_q    <= multiplier;
          lo_m1_q <= 1'b0;
          cnt_q   <= CW'(NG);
          busy_q  <= 1'b1;
        end
      end else begin
        // Add, then arithmetic shift right by four of {sum, lo, lo_m1}.
        hi_q    <= {{4{sum[HW-1]}}, sum[HW-1:4]};
        lo_q    <= {sum[3:0], lo_q[N-1:4]};
        lo_m1_q <= lo_q[3];
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  assign busy    = busy_q;
  assign done    = done_q;
  assign product   = {hi_q[N-1:0], lo_q};
  assign unused_hi = hi_q[HW-1:N];    // sign guard bits, not part of the product

  // The counter only runs while busy, and done never overlaps busy.
  a_cnt_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               !busy_q |-> cnt_q == '0);
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                done_q |-> !busy_q);

endmodule
