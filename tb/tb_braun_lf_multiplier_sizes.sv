// tb_braun_lf_multiplier_sizes: the Braun / Ladner-Fischer multiplier at
// sizes other than the default 4 x 4.
//
// Checked against the integer product:
//   N = 2   all 16 operand pairs (final adder one bit wide)
//   N = 8   all 65536 operand pairs (final adder 7 bits, three prefix levels)
//   N = 16  20000 random pairs plus the corner cases 0, 1 and all ones
// One pair per clock cycle, sampled on the falling edge. A watchdog ends the
// run with a failure if it hangs.
module tb_braun_lf_multiplier_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic [1:0]  x2, y2;   logic [3:0]  p2;
  logic [7:0]  x8, y8;   logic [15:0] p8;
  logic [15:0] x16, y16; logic [31:0] p16;

  braun_lf_multiplier #(.N(2))  dut2  (.x(x2),  .y(y2),  .p(p2));
  braun_lf_multiplier #(.N(8))  dut8  (.x(x8),  .y(y8),  .p(p8));
  braun_lf_multiplier #(.N(16)) dut16 (.x(x16), .y(y16), .p(p16));

  task automatic check(input int unsigned n, input longint unsigned x,
                       input longint unsigned y, input longint unsigned got);
    checks++;
    if (got != x * y) begin
      failures++;
      if (failures <= 10) $display("FAIL N=%0d %0d * %0d: got %0d", n, x, y, got);
    end
  endtask

  task automatic drive16(input logic [15:0] a, input logic [15:0] b);
    x16 = a; y16 = b;
    @(negedge clk);
    check(16, 64'(x16), 64'(y16), 64'(p16));
  endtask

  initial begin
    x2 = '0; y2 = '0; x8 = '0; y8 = '0; x16 = '0; y16 = '0;
    for (int v = 0; v < 16; v++) begin
      {x2, y2} = 4'(v);
      @(negedge clk);
      check(2, 64'(x2), 64'(y2), 64'(p2));
    end
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v);
      @(negedge clk);
      check(8, 64'(x8), 64'(y8), 64'(p8));
    end
    drive16(16'hffff, 16'hffff);
    drive16(16'h0000, 16'hffff);
    drive16(16'h0001, 16'hffff);
    drive16(16'hffff, 16'h0001);
    for (int n = 0; n < 20000; n++)
      drive16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
