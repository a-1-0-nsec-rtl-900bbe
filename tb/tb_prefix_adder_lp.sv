// tb_prefix_adder_lp: self-checking testbench for prefix_adder_lp (low-power tree (carry out from c_(N-2), reused first carries)).
//
// Three instances are checked against the behavioural sum a + b + cin:
//   N = 32 (default): directed corner cases (full carry ripple from cin, all
//                     transmit, alternating patterns, overflow both ways) and
//                     random operands,
//   N = 16:           random operands (the first-carry reuse rows exist from 16 up),
//   N = 64:           random operands,
//   N = 8:            every input combination.
// sum, cout and the two's complement overflow flag are compared. The adder is
// combinational; operands are applied every 1 ns and sampled after 1 ns.
module tb_prefix_adder_lp;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned n_ovf = 0;
  int unsigned n_cout = 0;

  logic [31:0] a32, b32, s32;
  logic        ci32, co32, ov32;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16, ov16;
  logic [7:0]  a8, b8, s8;
  logic        ci8, co8, ov8;
  logic [63:0] a64, b64, s64;
  logic        ci64, co64, ov64;

  prefix_adder_lp                dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32), .ovf(ov32));
  prefix_adder_lp #(.N(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16), .ovf(ov16));
  prefix_adder_lp #(.N(64)) dut64 (.a(a64), .b(b64), .cin(ci64), .sum(s64), .cout(co64), .ovf(ov64));
  prefix_adder_lp #(.N(8))  dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8),  .ovf(ov8));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Structure of the tree as placed by prefix_pkg::cell_kind(): fanout of the
  // carry input and logic depth in gate levels (bit cell, tree rows, carry-out
  // cell or sum XOR), worked out by walking the rows.
  function automatic void tree_stats(input int n, output int cin_fanout, output int depth,
                                     output int n_cells);
    int L;
    int arr [];
    int nxt [];
    bit lp;
    lp = 1'b1;
    L = $clog2(n);
    arr = new[n + 1];
    cin_fanout = 0;
    n_cells = 0;
    arr[0] = 0;                                   // carry input
    for (int j = 0; j < n; j++) arr[j+1] = 1;      // after the bit cells
    for (int k = 1; k <= L; k++) begin
      nxt = arr;
      for (int j = 0; j < n; j++) begin
        prefix_pkg::cell_kind_e kind;
        int lo;
        kind = prefix_pkg::cell_kind(n, k, j, lp);
        lo = j + 1 - prefix_pkg::cell_dist(k, j, lp);
        if (kind != prefix_pkg::CELL_BUF) begin
          n_cells++;
          nxt[j+1] = ((arr[j+1] > arr[lo]) ? arr[j+1] : arr[lo]) + 1;
          if (lo == 0) cin_fanout++;
        end
      end
      arr = nxt;
    end
    // carry out cell
    n_cells++;
    if (lp) depth = ((arr[n] > arr[n-1]) ? arr[n] : arr[n-1]) + 1;
    else begin
      depth = arr[n] + 1;
      cin_fanout++;
    end
    // sum XORs: s_j = p_j ^ c_(j-1)
    for (int j = 0; j < n; j++)
      if (((arr[j] > 1) ? arr[j] : 1) + 1 > depth) depth = ((arr[j] > 1) ? arr[j] : 1) + 1;
  endfunction

  task automatic check_structure(input int n);
    int fanout, depth, cells;
    tree_stats(n, fanout, depth, cells);
    $display("N=%0d: carry-input fanout %0d, logic depth %0d, tree cells %0d", n, fanout, depth, cells);
    checks++;
    if (fanout != 3 || depth != 2 + $clog2(n)) begin
      failures++;
      $display("N=%0d: structure differs: fanout %0d depth %0d", n, fanout, depth);
    end
  endtask

  task automatic check32(input logic [31:0] a, input logic [31:0] b, input logic c);
    logic [32:0] ref_full;
    logic        ref_ovf;
    a32 = a; b32 = b; ci32 = c;
    #1ns;
    ref_full = {1'b0, a} + {1'b0, b} + 33'(c);
    ref_ovf  = (a[31] == b[31]) && (ref_full[31] != a[31]);
    checks++;
    if ({co32, s32} !== ref_full || ov32 !== ref_ovf) begin
      failures++;
      if (failures < 10)
        $display("N=32 mismatch a=%h b=%h cin=%b: got %b_%h ovf=%b, want %b_%h ovf=%b",
                 a, b, c, co32, s32, ov32, ref_full[32], ref_full[31:0], ref_ovf);
    end
    if (ref_ovf) n_ovf++;
    if (ref_full[32]) n_cout++;
  endtask

  task automatic check16(input logic [15:0] a, input logic [15:0] b, input logic c);
    logic [16:0] ref_full;
    logic        ref_ovf;
    a16 = a; b16 = b; ci16 = c;
    #1ns;
    ref_full = {1'b0, a} + {1'b0, b} + 17'(c);
    ref_ovf  = (a[15] == b[15]) && (ref_full[15] != a[15]);
    checks++;
    if ({co16, s16} !== ref_full || ov16 !== ref_ovf) begin
      failures++;
      if (failures < 10)
        $display("N=16 mismatch a=%h b=%h cin=%b: got %b_%h, want %h", a, b, c, co16, s16, ref_full);
    end
  endtask

  initial begin
    logic [31:0] ra, rb;
    // Carry-input fanout and logic depth of the tree.
    check_structure(32);
    check_structure(16);
    check_structure(64);
    // Directed cases at N = 32.
    for (int c = 0; c < 2; c++) begin
      check32(32'hFFFF_FFFF, 32'h0000_0000, c[0]);   // cin ripples through all bits
      check32(32'h0000_0000, 32'hFFFF_FFFF, c[0]);
      check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, c[0]);
      check32(32'h0000_0000, 32'h0000_0000, c[0]);
      check32(32'h5555_5555, 32'hAAAA_AAAA, c[0]);
      check32(32'h7FFF_FFFF, 32'h0000_0000, c[0]);   // positive overflow with cin
      check32(32'h7FFF_FFFF, 32'h0000_0001, c[0]);
      check32(32'h8000_0000, 32'h8000_0000, c[0]);   // negative overflow
      check32(32'h0000_00FF, 32'h0000_FF00, c[0]);   // transmit chain ending at c_7/c_15
      check32(32'h0000_7FFF, 32'h0000_0000, c[0]);
      check32(32'h7FFF_7FFF, 32'h0000_8000, c[0]);
      for (int i = 0; i < 32; i++) begin
        check32(32'hFFFF_FFFF >> i, 32'h0, c[0]);
        check32(32'h1 << i, 32'hFFFF_FFFF << i, c[0]);
      end
    end
    // Random operands at N = 32, with long transmit runs mixed in.
    for (int i = 0; i < 20000; i++) begin
      ra = $urandom;
      rb = $urandom;
      if (i % 3 == 1) rb = ~ra ^ (32'h1 << ($urandom % 32));
      if (i % 3 == 2) rb = ~ra;
      check32(ra, rb, 1'($urandom));
    end
    // Random operands at N = 16.
    for (int i = 0; i < 20000; i++) begin
      ra = $urandom;
      rb = (i % 2 == 0) ? $urandom : ~ra;
      check16(ra[15:0], rb[15:0], 1'($urandom));
    end
    // Random operands at N = 64 (the word size suggested as the next step up).
    for (int i = 0; i < 10000; i++) begin
      logic [64:0] ref_full;
      logic        ref_ovf;
      a64  = {$urandom, $urandom};
      b64  = (i % 2 == 0) ? {$urandom, $urandom} : ~a64 ^ (64'h1 << ($urandom % 64));
      ci64 = 1'($urandom);
      #1ns;
      ref_full = {1'b0, a64} + {1'b0, b64} + 65'(ci64);
      ref_ovf  = (a64[63] == b64[63]) && (ref_full[63] != a64[63]);
      checks++;
      if ({co64, s64} !== ref_full || ov64 !== ref_ovf) begin
        failures++;
        if (failures < 10) $display("N=64 mismatch a=%h b=%h cin=%b: got %b_%h", a64, b64, ci64, co64, s64);
      end
    end
    // Exhaustive at N = 8.
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        for (int c = 0; c < 2; c++) begin
          logic [8:0] ref_full;
          logic       ref_ovf;
          a8 = 8'(ia); b8 = 8'(ib); ci8 = c[0];
          #1ns;
          ref_full = 9'(ia) + 9'(ib) + 9'(c);
          ref_ovf  = (a8[7] == b8[7]) && (ref_full[7] != a8[7]);
          checks++;
          if ({co8, s8} !== ref_full || ov8 !== ref_ovf) begin
            failures++;
            if (failures < 10)
              $display("N=8 mismatch a=%h b=%h cin=%b: got %b_%h, want %h", a8, b8, c, co8, s8, ref_full);
          end
        end
      end
    end
    if (n_ovf == 0 || n_cout == 0) begin
      failures++;
      $display("overflow (%0d) or carry out (%0d) never exercised", n_ovf, n_cout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
