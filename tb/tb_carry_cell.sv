// tb_carry_cell: exhaustive check of the carry resolution cell c = G | T&c_lo.
module tb_carry_cell
  import prefix_pkg::*;
;
  int unsigned checks = 0;
  int unsigned failures = 0;
  gt_t  grp;
  logic c_lo, c;

  // Expected c for {G, T, c_lo} = 000 .. 111 (bit i for value i).
  localparam logic [7:0] EXPECT_C = 8'b1111_1000;

  carry_cell dut (.grp(grp), .c_lo(c_lo), .c(c));

  initial begin : watchdog
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {grp.g, grp.t, c_lo} = 3'(i);
      #1ns;
      checks++;
      if (c !== EXPECT_C[i]) begin
        failures++;
        $display("G=%b T=%b c_lo=%b: got %b", grp.g, grp.t, c_lo, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
