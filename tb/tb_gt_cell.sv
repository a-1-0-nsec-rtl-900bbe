// tb_gt_cell: exhaustive check of the generate / transmit / propagate cell
// against the full adder truth table (g = a&b, t = a|b, p = a^b).
module tb_gt_cell;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic a, b, g, t, p;

  // Expected {g, t, p} for (a, b) = 00, 01, 10, 11.
  localparam logic [2:0] EXPECT_GTP [4] = '{3'b000, 3'b011, 3'b011, 3'b110};

  gt_cell dut (.a(a), .b(b), .g(g), .t(t), .p(p));

  initial begin : watchdog
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1ns;
      checks++;
      if ({g, t, p} !== EXPECT_GTP[i]) begin
        failures++;
        $display("a=%b b=%b: got gtp=%b want %b", a, b, {g, t, p}, EXPECT_GTP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
