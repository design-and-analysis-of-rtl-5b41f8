// tb_ladner_fischer_adder: self-checking testbench for the Ladner-Fischer
// prefix adder.
//
// Four instances are checked against the integer sum a + b + cin:
//   WIDTH = 3  (default size)  all 128 input combinations
//   WIDTH = 1                  all 8 combinations (smallest tree)
//   WIDTH = 8                  all 131072 combinations
//   WIDTH = 16                 20000 random vectors plus corner cases
// One vector is applied per clock cycle; results are sampled on the falling
// edge. The test also counts full-width carry propagation (a + b = all ones
// with cin = 1) so that the longest carry path is known to be exercised. A
// watchdog ends the run with a failure if it does not finish in time.
module tb_ladner_fischer_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks   = 0;
  int unsigned failures = 0;
  int unsigned full_props = 0;

  logic [2:0]  a3, b3, s3;   logic c3, co3;
  logic [0:0]  a1, b1, s1;   logic c1, co1;
  logic [7:0]  a8, b8, s8;   logic c8, co8;
  logic [15:0] a16, b16, s16; logic c16, co16;

  ladner_fischer_adder dut3 (.a(a3), .b(b3), .cin(c3), .sum(s3), .cout(co3));
  ladner_fischer_adder #(.WIDTH(1))  dut1  (.a(a1),  .b(b1),  .cin(c1),  .sum(s1),  .cout(co1));
  ladner_fischer_adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  ladner_fischer_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  task automatic check(input int unsigned width, input longint unsigned got,
                       input longint unsigned exp, input longint unsigned a,
                       input longint unsigned b, input bit cin);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL width=%0d a=%0h b=%0h cin=%0d got=%0h exp=%0h",
                 width, a, b, cin, got, exp);
    end
  endtask

  task automatic drive16(input logic [15:0] a, input logic [15:0] b, input logic c);
    a16 = a; b16 = b; c16 = c;
    @(negedge clk);
    check(16, 64'({co16, s16}), longint'(a) + longint'(b) + longint'(c), 64'(a), 64'(b), c);
    if ((a ^ b) == 16'hffff && (a & b) == 16'h0 && c) full_props++;
  endtask

  initial begin
    a3 = '0; b3 = '0; c3 = 1'b0;
    a1 = '0; b1 = '0; c1 = 1'b0;
    a8 = '0; b8 = '0; c8 = 1'b0;
    a16 = '0; b16 = '0; c16 = 1'b0;

    for (int v = 0; v < 128; v++) begin
      {c3, a3, b3} = 7'(v);
      @(negedge clk);
      check(3, 64'({co3, s3}), longint'(a3) + longint'(b3) + longint'(c3), 64'(a3), 64'(b3), c3);
      if ((a3 ^ b3) == 3'b111 && c3) full_props++;
    end
    for (int v = 0; v < 8; v++) begin
      {c1, a1, b1} = 3'(v);
      @(negedge clk);
      check(1, 64'({co1, s1}), longint'(a1) + longint'(b1) + longint'(c1), 64'(a1), 64'(b1), c1);
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {c8, a8, b8} = 17'(v);
      @(negedge clk);
      check(8, 64'({co8, s8}), longint'(a8) + longint'(b8) + longint'(c8), 64'(a8), 64'(b8), c8);
      if ((a8 ^ b8) == 8'hff && c8) full_props++;
    end
    drive16(16'hffff, 16'h0000, 1'b1);
    drive16(16'h0000, 16'hffff, 1'b1);
    drive16(16'haaaa, 16'h5555, 1'b1);
    drive16(16'hffff, 16'hffff, 1'b1);
    drive16(16'h8000, 16'h8000, 1'b0);
    for (int n = 0; n < 20000; n++)
      drive16(16'($urandom), 16'($urandom), 1'($urandom));

    // Each size must have seen a carry rippling through every bit.
    checks++;
    if (full_props < 3) begin
      failures++;
      $display("FAIL full-width carry propagation seen only %0d times", full_props);
    end
    $display("full-width carry propagations: %0d", full_props);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
