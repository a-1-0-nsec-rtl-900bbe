// tb_prefix_adder_chip: end-to-end test of the adder test chip at its default
// size (N = 32, 16 oscillator slots).
//
// Phase 1, addition: random and corner-case operands on both adders, checked
// against a + b + cin, including carry out and two's complement overflow.
// Phase 2, speed measurement as done on silicon: each adder is closed into a
// ring oscillator (adder_ring_osc_model, modelled adder delay 1.0 ns, AND gate
// 0.38 ns) and five reference rings of 7, 11, 15, 19 and 23 inverters are
// added (inv_ring_osc_model, 50 ps per inverter). The rings occupy oscillator
// slots 0..6; the others are tied low. Each ring is enabled alone, div_out's
// period is measured and divided by 4096 to get the ring period. A straight
// line through the five inverter rings' half periods, extrapolated to zero
// inverters, gives the AND gate delay; subtracting it from each adder ring's
// half period gives the adder delay. Both must come back as the modelled values.
// Disabled rings must stay quiet. Every mechanism (carry out, overflow, each
// ring, the extrapolation) is counted and must occur.
module tb_prefix_adder_chip;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int      N     = 32;
  localparam int      NOSC  = 16;
  localparam realtime T_ADD = 1.0ns;
  localparam realtime T_AND = 0.38ns;
  localparam realtime T_INV = 0.05ns;
  localparam int      NRING = 7;  // 2 adder rings + 5 inverter rings

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned n_cout_ci = 0, n_cout_lp = 0, n_ovf_ci = 0, n_ovf_lp = 0;
  int unsigned n_ring_measured [NRING];
  int unsigned n_and_extracted = 0;

  // Chip ports
  logic [N-1:0]    a_ci, b_ci, sum_ci, a_lp, b_lp, sum_lp;
  logic            cin_ci, cout_ci, ovf_ci, cin_lp, cout_lp, ovf_lp;
  logic            rst_n = 1'b1;
  logic [NOSC-1:0] osc, osc_en = '0;
  logic            div_out;

  prefix_adder_chip dut (
    .a_ci(a_ci), .b_ci(b_ci), .cin_ci(cin_ci), .sum_ci(sum_ci), .cout_ci(cout_ci), .ovf_ci(ovf_ci),
    .a_lp(a_lp), .b_lp(b_lp), .cin_lp(cin_lp), .sum_lp(sum_lp), .cout_lp(cout_lp), .ovf_lp(ovf_lp),
    .rst_n(rst_n), .osc(osc), .osc_en(osc_en), .div_out(div_out)
  );

  // Operands: from the testbench in phase 1, from the ring models in phase 2.
  logic            ring_mode = 1'b0;
  logic [N-1:0]    ta_ci, tb_ci, ta_lp, tb_lp;
  logic            tc_ci, tc_lp;
  logic [N-1:0]    ra_ci, rb_ci, ra_lp, rb_lp;
  logic            rc_ci, rc_lp;

  assign a_ci   = ring_mode ? ra_ci : ta_ci;
  assign b_ci   = ring_mode ? rb_ci : tb_ci;
  assign cin_ci = ring_mode ? rc_ci : tc_ci;
  assign a_lp   = ring_mode ? ra_lp : ta_lp;
  assign b_lp   = ring_mode ? rb_lp : tb_lp;
  assign cin_lp = ring_mode ? rc_lp : tc_lp;

  adder_ring_osc_model #(.N(N), .T_ADD(T_ADD), .T_AND(T_AND)) u_ring_ci (
    .en(osc_en[0] & ring_mode), .s_msb(sum_ci[N-1]),
    .a(ra_ci), .b(rb_ci), .cin(rc_ci), .osc(osc[0])
  );
  adder_ring_osc_model #(.N(N), .T_ADD(T_ADD), .T_AND(T_AND)) u_ring_lp (
    .en(osc_en[1] & ring_mode), .s_msb(sum_lp[N-1]),
    .a(ra_lp), .b(rb_lp), .cin(rc_lp), .osc(osc[1])
  );
  localparam int NINV [5] = '{7, 11, 15, 19, 23};
  for (genvar r = 0; r < 5; r++) begin : g_inv
    inv_ring_osc_model #(.NINV(NINV[r]), .T_INV(T_INV), .T_AND(T_AND)) u_ring (
      .en(osc_en[2+r]), .osc(osc[2+r])
    );
  end
  assign osc[NOSC-1:NRING] = '0;

  initial begin : watchdog
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference check of one adder's outputs.
  task automatic ref_check(input string name, input logic [N-1:0] a, input logic [N-1:0] b,
                           input logic c, input logic [N-1:0] s, input logic co, input logic ov);
    logic [N:0] ref_full;
    logic       ref_ovf;
    ref_full = {1'b0, a} + {1'b0, b} + (N+1)'(c);
    ref_ovf  = (a[N-1] == b[N-1]) && (ref_full[N-1] != a[N-1]);
    checks++;
    if ({co, s} !== ref_full || ov !== ref_ovf) begin
      failures++;
      if (failures < 10) $display("%s adder: %h + %h + %b = %b_%h, want %h", name, a, b, c, co, s, ref_full);
    end
  endtask

  // Independent operands on the two adders, then both results checked.
  task automatic add_check(input logic [N-1:0] a, input logic [N-1:0] b, input logic c,
                           input logic [N-1:0] a2, input logic [N-1:0] b2, input logic c2);
    ta_ci = a;  tb_ci = b;  tc_ci = c;
    ta_lp = a2; tb_lp = b2; tc_lp = c2;
    #1ns;
    ref_check("ci", a, b, c, sum_ci, cout_ci, ovf_ci);
    ref_check("lp", a2, b2, c2, sum_lp, cout_lp, ovf_lp);
    n_cout_ci += cout_ci; n_cout_lp += cout_lp;
    n_ovf_ci  += ovf_ci;  n_ovf_lp  += ovf_lp;
  endtask

  // Period of div_out with the given ring enabled; 0 if it does not run.
  bit      rise_seen;
  realtime rise_time;
  task automatic wait_rise();
    rise_seen = 1'b0;
    fork
      begin @(posedge div_out); rise_seen = 1'b1; rise_time = $realtime; end
      #40us;
    join_any
    disable fork;
  endtask

  task automatic measure(input int slot, output realtime half_period);
    realtime t0;
    bit      ok;
    osc_en = NOSC'(1) << slot;
    ok = 1'b1;
    wait_rise(); ok &= rise_seen;   // first edge after the switch: discard
    wait_rise(); ok &= rise_seen; t0 = rise_time;
    wait_rise(); ok &= rise_seen;
    // Only the enabled ring may run.
    for (int k = 0; k < NRING; k++) begin
      if (k != slot) begin
        checks++;
        if (osc[k] !== 1'b0) begin
          failures++;
          $display("ring %0d not quiet while ring %0d is selected", k, slot);
        end
      end
    end
    half_period = ok ? (rise_time - t0) / 4096.0 / 2.0 : 0.0;
    checks++;
    if (!ok) begin
      failures++;
      $display("ring %0d: no output on div_out", slot);
    end else begin
      n_ring_measured[slot]++;
    end
    osc_en = '0;
    #5ns;
  endtask

  function automatic bit near(input realtime x, input realtime y);
    return (x - y < 0.001) && (y - x < 0.001);  // within 1 ps
  endfunction

  initial begin
    realtime half [NRING];
    real     sx, sy, sxx, sxy, slope, t_and_meas, t_add_ci, t_add_lp;

    // ---- Phase 1: addition ----
    add_check('1, '0, 1'b1, '1, '0, 1'b0);
    add_check('1, '0, 1'b0, '1, '0, 1'b1);
    add_check('1, '1, 1'b1, '0, '0, 1'b0);
    add_check(32'h7FFF_FFFF, 32'h0, 1'b1, 32'h8000_0000, 32'h8000_0000, 1'b0);
    add_check(32'h8000_0000, 32'h8000_0000, 1'b0, 32'h7FFF_FFFF, 32'h0, 1'b1);
    for (int i = 0; i < 5000; i++) begin
      logic [N-1:0] ra, rb, ra2, rb2;
      ra  = $urandom;
      rb  = (i % 4 == 0) ? ~ra : N'($urandom);
      ra2 = $urandom;
      rb2 = (i % 4 == 1) ? ~ra2 : N'($urandom);
      add_check(ra, rb, 1'($urandom), ra2, rb2, 1'($urandom));
    end

    // ---- Phase 2: ring oscillator measurement ----
    ring_mode = 1'b1;
    #1ns rst_n = 1'b0;
    #10ns rst_n = 1'b1;
    for (int k = 0; k < NRING; k++) measure(k, half[k]);

    // AND gate delay: least-squares line through (NINV, half period).
    sx = 0; sy = 0; sxx = 0; sxy = 0;
    for (int r = 0; r < 5; r++) begin
      sx  += NINV[r];
      sy  += half[2+r];
      sxx += NINV[r] * NINV[r];
      sxy += NINV[r] * half[2+r];
    end
    slope      = (5.0 * sxy - sx * sy) / (5.0 * sxx - sx * sx);
    t_and_meas = (sy - slope * sx) / 5.0;
    t_add_ci   = half[0] - t_and_meas;
    t_add_lp   = half[1] - t_and_meas;
    n_and_extracted++;
    $display("measured: AND gate %0.3f ns, inverter %0.3f ns, ci adder %0.3f ns, lp adder %0.3f ns",
             t_and_meas, slope, t_add_ci, t_add_lp);
    checks += 4;
    if (!near(t_and_meas, T_AND)) begin failures++; $display("AND delay wrong"); end
    if (!near(slope, T_INV))      begin failures++; $display("inverter delay wrong"); end
    if (!near(t_add_ci, T_ADD))   begin failures++; $display("ci adder delay wrong"); end
    if (!near(t_add_lp, T_ADD))   begin failures++; $display("lp adder delay wrong"); end

    // ---- Every mechanism must have happened ----
    checks++;
    if (n_cout_ci == 0 || n_cout_lp == 0 || n_ovf_ci == 0 || n_ovf_lp == 0 || n_and_extracted == 0) begin
      failures++;
      $display("mechanism not exercised: cout %0d/%0d ovf %0d/%0d", n_cout_ci, n_cout_lp, n_ovf_ci, n_ovf_lp);
    end
    for (int k = 0; k < NRING; k++) begin
      checks++;
      if (n_ring_measured[k] == 0) begin
        failures++;
        $display("ring %0d never measured", k);
      end
    end
    $display("counts: cout ci=%0d lp=%0d, overflow ci=%0d lp=%0d, rings measured=%0d",
             n_cout_ci, n_cout_lp, n_ovf_ci, n_ovf_lp, NRING);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
