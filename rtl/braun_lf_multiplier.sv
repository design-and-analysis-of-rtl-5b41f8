// braun_lf_multiplier: unsigned N x N Braun array multiplier whose final
// carry-propagate adder is a Ladner-Fischer parallel prefix adder.
//
// A Braun multiplier adds its partial products in a regular array of
// carry-save adders. Stage k (k = 0..N-1) takes multiplier bit y[k], forms
// the partial products x & y[k] and adds them to the sum and carry vectors
// handed down from stage k-1 without propagating any carry sideways; each
// stage emits one finished product bit, p[k]. After the last stage, two
// (N-1)-bit vectors of weight 2^N..2^(2N-2) remain. A conventional Braun
// array adds them with a ripple-carry adder, whose delay grows linearly with
// N; here they go to a Ladner-Fischer prefix adder, whose carry delay grows
// with log2(N), and its sum and carry-out give p[2N-2:N] and p[2N-1].
//
// Interface: x, y (N bits, unsigned) in; p (2N bits) out. Purely
// combinational: the product is valid one array delay after the operands.
//
// Following the published design: unsigned operands, four stages for the
// default N = 4 with one multiplier bit in and one product bit out per stage, and a
// 3-bit Ladner-Fischer adder in the last stage. This design's own choices:
// the product port is 2N = 8 bits wide (the block diagram names P0..P7), the
// final adder's carry-in is tied to 0, the first stage is a carry-save stage
// fed with zero vectors, and there are no registers.
module braun_lf_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  // Carry-save vectors between stages; index k is the input of stage k.
  logic [N-2:0] s_vec [N+1];
  logic [N-2:0] c_vec [N+1];

  assign s_vec[0] = '0;
  assign c_vec[0] = '0;

  for (genvar k = 0; k < N; k++) begin : g_stage
    csa_stage #(.N(N)) u_stage (
      .x    (x),
      .y_bit(y[k]),
      .s_in (s_vec[k]),
      .c_in (c_vec[k]),
      .p_bit(p[k]),
      .s_out(s_vec[k+1]),
      .c_out(c_vec[k+1])
    );
  end

  // Final stage: Ladner-Fischer prefix adder instead of a ripple-carry adder.
  ladner_fischer_adder #(.WIDTH(N - 1)) u_lf (
    .a   (s_vec[N]),
    .b   (c_vec[N]),
    .cin (1'b0),
    .sum (p[2*N-2:N]),
    .cout(p[2*N-1])
  );
endmodule
