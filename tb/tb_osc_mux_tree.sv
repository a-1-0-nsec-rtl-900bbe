// tb_osc_mux_tree: drives random data on all 16 inputs and, for each one-hot
// enable (and for no enable), checks that the output follows the enabled input.
module tb_osc_mux_tree;
  localparam int NOSC = 16;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic [NOSC-1:0] in, en;
  logic            out;

  osc_mux_tree dut (.in(in), .en(en), .out(out));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int sel = -1; sel < NOSC; sel++) begin
      en = (sel < 0) ? '0 : (NOSC'(1) << sel);
      for (int r = 0; r < 50; r++) begin
        in = NOSC'($urandom);
        #1ns;
        checks++;
        if (out !== in[(sel < 0) ? 0 : sel]) begin
          failures++;
          if (failures < 10) $display("sel=%0d in=%b: out=%b", sel, in, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
