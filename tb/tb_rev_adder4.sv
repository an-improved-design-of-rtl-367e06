// tb_rev_adder4: exhaustive self-check of the 4-bit HNG ripple adder.
// All 512 combinations of x, y and cin: {cout, sum} must equal the integer
// x + y + cin, and the garbage outputs must be the copies of x and y that the
// HNG gates return ({y[i], x[i]} in garbage[2i+1:2i]).
module tb_rev_adder4;
  logic [3:0] x, y, sum;
  logic       cin, cout;
  logic [7:0] garbage;
  logic [7:0] exp_garbage;
  int checks = 0, failures = 0;
  logic [4:0] total;

  rev_adder4 dut (.x, .y, .cin, .sum, .cout, .garbage);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (x=%0d y=%0d cin=%0b -> cout=%0b sum=%0d garbage=%b)",
               what, x, y, cin, cout, sum, garbage);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, x, y} = 9'(i);
      #1;
      total = 5'(x) + 5'(y) + 5'(cin);
      check({cout, sum} == total, "x + y + cin");
      for (int k = 0; k < 4; k++) begin
        exp_garbage[2*k]   = x[k];
        exp_garbage[2*k+1] = y[k];
      end
      check(garbage == exp_garbage, "garbage copies of x, y");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
