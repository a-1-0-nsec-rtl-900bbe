// tb_freq_divider: checks the divide-by-4 (default) and divide-by-1024
// configurations of freq_divider against an edge count kept by the testbench:
// after reset, clk_out must rise exactly on input edges 2**(S-1), 2**S + 2**(S-1),
// ... and fall on edges 2**S, 2*2**S, ...
module tb_freq_divider;
  timeunit 1ns;
  timeprecision 1ps;

  int unsigned checks = 0;
  int unsigned failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic out4, out1024;
  int unsigned edges = 0;

  freq_divider               dut4    (.clk_in(clk), .rst_n(rst_n), .clk_out(out4));
  freq_divider #(.STAGES(10)) dut1024 (.clk_in(clk), .rst_n(rst_n), .clk_out(out1024));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected output after the given number of input rising edges.
  function automatic logic expect_out(input int unsigned n, input int unsigned stages);
    return 1'((n >> (stages - 1)) & 1);
  endfunction

  initial begin
    #1ns rst_n = 1'b0;  // a falling edge, so the asynchronous reset acts
    #2ns;
    checks++;
    if (out4 !== 1'b0 || out1024 !== 1'b0) begin
      failures++;
      $display("outputs not cleared by reset");
    end
    rst_n = 1'b1;
    repeat (3000) begin
      #1ns clk = 1'b1;
      edges++;
      #1ns clk = 1'b0;
      checks++;
      if (out4 !== expect_out(edges, 2) || out1024 !== expect_out(edges, 10)) begin
        failures++;
        if (failures < 10)
          $display("after %0d edges: out4=%b out1024=%b", edges, out4, out1024);
      end
    end
    // Asynchronous reset in the middle of a count.
    rst_n = 1'b0;
    #1ns;
    checks++;
    if (out4 !== 1'b0 || out1024 !== 1'b0) begin
      failures++;
      $display("asynchronous reset did not clear the outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
