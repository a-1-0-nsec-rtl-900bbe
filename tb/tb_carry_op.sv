// tb_carry_op: exhaustive check of the fundamental carry operator, and of its
// associativity on random 3-operand chains, against independently written
// equations: G = Gh | Th&Gl, T = Th&Tl.
module tb_carry_op
  import prefix_pkg::*;
;
  int unsigned checks = 0;
  int unsigned failures = 0;
  gt_t hi, lo, y;
  gt_t x2, x1, x0, l01, r01, left, right;

  carry_op dut (.hi(hi), .lo(lo), .y(y));
  // (x2 o x1) o x0 against x2 o (x1 o x0)
  carry_op u_l01 (.hi(x2), .lo(x1), .y(l01));
  carry_op u_l   (.hi(l01), .lo(x0), .y(left));
  carry_op u_r01 (.hi(x1), .lo(x0), .y(r01));
  carry_op u_r   (.hi(x2), .lo(r01), .y(right));

  initial begin : watchdog
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic gh, th, gl, tl;
      {gh, th, gl, tl} = 4'(i);
      hi = '{g: gh, t: th};
      lo = '{g: gl, t: tl};
      #1ns;
      checks++;
      if (y.g !== (gh | (th & gl)) || y.t !== (th & tl)) begin
        failures++;
        $display("hi=%b lo=%b: got %b", hi, lo, y);
      end
    end
    for (int i = 0; i < 64; i++) begin
      {x2, x1, x0} = 6'(i);
      #1ns;
      checks++;
      if (left !== right) begin
        failures++;
        $display("not associative for %b %b %b", x2, x1, x0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
