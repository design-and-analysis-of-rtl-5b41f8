// tb_braun_lf_multiplier: end-to-end, full-size testbench of the 4 x 4
// Braun multiplier with its Ladner-Fischer final adder.
//
// The multiplier is instantiated with its default parameters and driven with
// all 256 operand pairs, one per clock cycle, each product compared with the
// integer product x * y on the falling edge. Besides the products, the test
// counts how often the mechanisms of the design are exercised and fails if
// one never is:
//   - a product bit leaves each of the four carry-save stages as a 1,
//   - the prefix adder produces a carry-out (product bit 7),
//   - a carry is generated in the prefix adder and propagated onward through
//     at least one further bit (the case a ripple adder would be slow on),
//   - the carry-save vectors reaching the prefix adder hold carries.
// The vectors that reach the prefix adder are not taken from inside the
// multiplier: the testbench works them out itself with a column-count model
// of the carry-save array (ref_array below).
// A watchdog ends the run with a failure if it hangs.
module tb_braun_lf_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic [3:0] x, y;
  logic [7:0] p;

  braun_lf_multiplier dut (.x(x), .y(y), .p(p));

  int unsigned stage_one [4];
  logic [2:0]  ref_s, ref_c;

  // Column-count model of four carry-save rows: row k adds x & y[k] to the
  // pending sum and carry bits column by column; returns the two 3-bit
  // vectors of weight 16..64 that are left for the final adder.
  task automatic ref_array(input logic [3:0] a, input logic [3:0] b,
                           output logic [2:0] s_left, output logic [2:0] c_left);
    int unsigned sum_w [8];
    int unsigned car_w [8];
    int unsigned t;
    foreach (sum_w[w]) begin sum_w[w] = 0; car_w[w] = 0; end
    for (int k = 0; k < 4; k++) begin
      int unsigned nsum [8];
      int unsigned ncar [8];
      foreach (nsum[w]) begin nsum[w] = sum_w[w]; ncar[w] = 0; end
      for (int i = 0; i < 4; i++) begin
        t = ((a[i] && b[k]) ? 1 : 0) + sum_w[k+i] + car_w[k+i];
        nsum[k+i] = t % 2;
        if (t > 1) ncar[k+i+1] = 1;
      end
      sum_w = nsum;
      car_w = ncar;
    end
    for (int i = 0; i < 3; i++) begin
      s_left[i] = sum_w[4+i][0];
      c_left[i] = car_w[4+i][0];
    end
  endtask
  int unsigned lf_cout      = 0;
  int unsigned lf_propagate = 0;
  int unsigned cs_carries   = 0;

  initial begin
    x = '0;
    y = '0;
    foreach (stage_one[k]) stage_one[k] = 0;
    for (int v = 0; v < 256; v++) begin
      {x, y} = 8'(v);
      @(negedge clk);
      checks++;
      if (p != 8'(int'(x) * int'(y))) begin
        failures++;
        if (failures <= 10) $display("FAIL %0d * %0d: got %0d", x, y, p);
      end
      for (int k = 0; k < 4; k++) if (p[k]) stage_one[k]++;
      ref_array(x, y, ref_s, ref_c);
      checks++;
      if (4'(ref_s) + 4'(ref_c) != p[7:4]) begin
        failures++;
        $display("FAIL upper product bits are not the sum of the carry-save vectors for %0d * %0d", x, y);
      end
      if (4'(ref_s) + 4'(ref_c) > 4'd7) lf_cout++;
      // generate at bit i followed by propagate at bit i+1
      for (int i = 0; i < 2; i++)
        if ((ref_s[i] & ref_c[i]) && (ref_s[i+1] ^ ref_c[i+1])) begin
          lf_propagate++;
          break;
        end
      if (ref_c != '0) cs_carries++;
    end

    for (int k = 0; k < 4; k++) begin
      checks++;
      if (stage_one[k] == 0) begin
        failures++;
        $display("FAIL stage %0d never produced a 1", k + 1);
      end
    end
    checks += 3;
    if (lf_cout == 0)      begin failures++; $display("FAIL no prefix-adder carry-out"); end
    if (lf_propagate == 0) begin failures++; $display("FAIL no propagated carry in the prefix adder"); end
    if (cs_carries == 0)   begin failures++; $display("FAIL no carries entered the prefix adder"); end
    $display("stage product-bit ones: %0d %0d %0d %0d", stage_one[0], stage_one[1],
             stage_one[2], stage_one[3]);
    $display("prefix adder: carry-out %0d, generate-then-propagate %0d, carry vector nonzero %0d",
             lf_cout, lf_propagate, cs_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
