// tb_divide_network: 16 free-running clocks with distinct periods stand in for
// the ring oscillators. Each is enabled in turn and the period of div_out is
// measured; it must be exactly 4096 times the selected clock's period
// (divide-by-4 before the mux tree, divide-by-1024 after it).
module tb_divide_network;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NOSC = 16;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic            rst_n = 1'b1;
  logic [NOSC-1:0] osc = '0;
  logic [NOSC-1:0] osc_en = '0;
  logic            div_out;

  divide_network dut (.rst_n(rst_n), .osc(osc), .osc_en(osc_en), .div_out(div_out));

  // Half period of clock i in ps: 500, 530, 560, ...
  function automatic int half_ps(input int i);
    return 500 + 30 * i;
  endfunction

  for (genvar i = 0; i < NOSC; i++) begin : g_osc
    localparam realtime HALF = half_ps(i) * 1ps;
    initial begin
      forever #(HALF) osc[i] = ~osc[i];
    end
  end

  initial begin : watchdog
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Waits for a rising edge of div_out; gives up after 20 us (over twice the
  // slowest expected period).
  bit rise_seen;
  task automatic wait_rise();
    rise_seen = 1'b0;
    fork
      begin @(posedge div_out); rise_seen = 1'b1; end
      #20us;
    join_any
    disable fork;
  endtask

  initial begin
    realtime t0, t1;
    bit      seen0, seen1, seen2;
    real     want;
    #1ns rst_n = 1'b0;
    #10ns rst_n = 1'b1;
    for (int i = 0; i < NOSC; i++) begin
      osc_en = NOSC'(1) << i;
      want = 4096.0 * 2.0 * half_ps(i) * 1e-3;  // ns
      wait_rise();
      seen0 = rise_seen;  // let the counters settle after the switch
      wait_rise();
      seen1 = rise_seen;
      t0 = $realtime;
      wait_rise();
      seen2 = rise_seen;
      t1 = $realtime;
      checks++;
      if (!(seen0 && seen1 && seen2) || (t1 - t0) - want > 0.001 || want - (t1 - t0) > 0.001) begin
        failures++;
        $display("osc %0d: div_out period %0.3f ns, want %0.3f ns", i, t1 - t0, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
