// tb_bcdh_gate: exhaustive self-check of the BCDH gate.
// For A = 0 and b6b5b4 = 000..101 the output must be the tens part of
// 16*b6b5b4, computed here with integer arithmetic (80 is split as 7 tens
// and 10 units). All 16 inputs are compared with the gate's full
// sum-of-minterms truth table, the worked example 0100 is checked, and the
// 16 output codes must all be different (the gate is reversible).
module tb_bcdh_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;
  int unsigned v;

  // Truth table, output code {P,Q,R,S} for minterm {A,B,C,D} = 0..15.
  localparam logic [3:0] TABLE [16] = '{4'd0, 4'd1, 4'd3, 4'd4, 4'd6, 4'd7, 4'd9, 4'd10, 4'd2, 4'd5, 4'd8, 4'd11, 4'd12, 4'd13, 4'd14, 4'd15};

  bcdh_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (in=%b out=%b)", what, {a, b, c, d}, {p, q, r, s});
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      if (i < 6) begin
        v = 16 * unsigned'(i);
        check({p, q, r, s} == 4'((v == 80) ? 7 : v / 10), "tens of 16*b6b5b4");
      end
      check({p, q, r, s} == TABLE[i], "truth table");
      check(!seen[{p, q, r, s}], "output code unique");
      seen[{p, q, r, s}] = 1'b1;
    end
    {a, b, c, d} = 4'b0100;
    #1;
    check({p, q, r, s} == 4'b0110, "example 0100");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
