// csa_stage: one stage of the Braun array multiplier.
//
// The stage forms the N partial products x[i] & y_bit with AND gates and adds
// them, column by column, to the carry-save vectors (s_in, c_in) that the
// previous stage produced. Partial product bits 0..N-2 each go through a full
// adder together with s_in[i] and c_in[i]; the top partial product x[N-1] &
// y_bit needs no adder, because nothing of its weight has arrived yet, and is
// handed on as the top bit of the new sum vector. The lowest sum bit is final
// and leaves as p_bit. The remaining sum bits move down one place (their
// weight now matches the next stage's column 0); the carries keep their
// index, since a carry out of column i has the weight of column i+1.
//
// Interface: x (N bits), y_bit, s_in / c_in (N-1 bits each) in; p_bit and
// s_out / c_out (N-1 bits each) out. Purely combinational; the critical path
// through one stage is one full adder.
//
// The published design draws the multiplier as four such stages, each taking
// one multiplier bit and producing one product bit. The cell arrangement
// inside the stage is the classic Braun array; the published description
// only says it is made of AND gates and carry-save adders. The first stage of the array is
// fed all-zero vectors, so its adders reduce to wires after synthesis.
module csa_stage #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  input  logic         y_bit,
  input  logic [N-2:0] s_in,
  input  logic [N-2:0] c_in,
  output logic         p_bit,
  output logic [N-2:0] s_out,
  output logic [N-2:0] c_out
);
  logic [N-1:0] pp;       // partial products x[i] & y_bit
  logic [N-2:0] fa_sum;   // full-adder sums, weight of column i

  assign pp = x & {N{y_bit}};

  for (genvar i = 0; i < N - 1; i++) begin : g_col
    full_adder u_fa (
      .a (pp[i]),
      .b (s_in[i]),
      .c (c_in[i]),
      .s (fa_sum[i]),
      .co(c_out[i])
    );
  end

  assign p_bit = fa_sum[0];

  for (genvar i = 0; i < N - 1; i++) begin : g_shift
    if (i == N - 2) begin : g_top
      assign s_out[i] = pp[N-1];
    end else begin : g_mid
      assign s_out[i] = fa_sum[i+1];
    end
  end
endmodule
