// tb_csa_stage: self-checking testbench for one Braun carry-save stage.
//
// A stage must conserve the weighted sum of its inputs:
//     p_bit + 2*(s_out + c_out) == x*y_bit + s_in + c_in
// and its product bit must be the low bit of column 0, its carries must be
// the carries of each column, and its top sum bit must be x[N-1] & y_bit.
// The default N = 4 stage is driven with all 2048 input combinations and an
// N = 7 stage with 20000 random vectors; one vector per clock cycle, sampled
// on the falling edge. A watchdog ends the run with a failure if it hangs.
module tb_csa_stage;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  localparam int unsigned NA = 4;
  localparam int unsigned NB = 7;

  logic [NA-1:0] xa;  logic ya;  logic [NA-2:0] sia, cia, soa, coa;  logic pa;
  logic [NB-1:0] xb;  logic yb;  logic [NB-2:0] sib, cib, sob, cob;  logic pb;

  csa_stage dut_a (.x(xa), .y_bit(ya), .s_in(sia), .c_in(cia),
                   .p_bit(pa), .s_out(soa), .c_out(coa));
  csa_stage #(.N(NB)) dut_b (.x(xb), .y_bit(yb), .s_in(sib), .c_in(cib),
                             .p_bit(pb), .s_out(sob), .c_out(cob));

  function automatic int unsigned col_total(input int unsigned n, input longint unsigned x,
                                            input bit y, input longint unsigned s,
                                            input longint unsigned c, input int unsigned i);
    return int'((x >> i) & 64'(y)) + int'((s >> i) & 1) + int'((c >> i) & 1);
  endfunction

  task automatic check_stage(input int unsigned n, input longint unsigned x, input bit y,
                             input longint unsigned s, input longint unsigned c,
                             input bit p, input longint unsigned so, input longint unsigned co);
    longint unsigned lhs, rhs;
    longint unsigned exp_co, exp_so;
    lhs = longint'(p) + 2 * (so + co);
    rhs = (y ? x : 0) + s + c;
    exp_co = 0;
    exp_so = 0;
    for (int unsigned i = 0; i < n - 1; i++)
      exp_co |= 64'(col_total(n, x, y, s, c, i) >> 1) << i;
    for (int unsigned i = 0; i < n - 2; i++)
      exp_so |= 64'(col_total(n, x, y, s, c, i + 1) & 1) << i;
    exp_so |= longint'(((x >> (n - 1)) & 1) & longint'(y)) << (n - 2);
    checks += 4;
    if (lhs != rhs) begin
      failures++;
      if (failures <= 10) $display("FAIL n=%0d weighted sum %0d != %0d", n, lhs, rhs);
    end
    if (32'(p) != (col_total(n, x, y, s, c, 0) & 1)) begin
      failures++;
      if (failures <= 10) $display("FAIL n=%0d product bit", n);
    end
    if (co != exp_co) begin
      failures++;
      if (failures <= 10) $display("FAIL n=%0d carries %0h != %0h", n, co, exp_co);
    end
    if (so != exp_so) begin
      failures++;
      if (failures <= 10) $display("FAIL n=%0d sums %0h != %0h", n, so, exp_so);
    end
  endtask

  initial begin
    xa = '0; ya = 1'b0; sia = '0; cia = '0;
    xb = '0; yb = 1'b0; sib = '0; cib = '0;
    for (int v = 0; v < (1 << (NA + 1 + 2 * (NA - 1))); v++) begin
      {xa, ya, sia, cia} = 11'(v);
      @(negedge clk);
      check_stage(NA, 64'(xa), ya, 64'(sia), 64'(cia), pa, 64'(soa), 64'(coa));
    end
    for (int n = 0; n < 20000; n++) begin
      xb = NB'($urandom); yb = 1'($urandom); sib = (NB-1)'($urandom); cib = (NB-1)'($urandom);
      @(negedge clk);
      check_stage(NB, 64'(xb), yb, 64'(sib), 64'(cib), pb, 64'(sob), 64'(cob));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
