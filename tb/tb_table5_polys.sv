// tb_table5_polys: both generators for each of the seven polynomials of the
// power comparison (the 1 + x^2 + x^5 example, 1 + x^3 + x^16,
// 1 + x^14 + x^15 and the four E0 keystream-generator polynomials of
// lengths 25, 31, 33 and 39).
//
// For each polynomial the bench checks, from an independently written table
// of N and k1: the number of control signals (2*ceil(N/k1) for Katti,
// 2*N for Lowy), that every valid output bit of both generators follows the
// LFSR recurrence from the seed, and the number of bits delivered in a fixed
// run (N per 2*ceil(N/k1) clocks with a short last group for Katti, k1
// every two clocks for Lowy).
module tb_table5_polys;
  import mo_lfsr_pkg::*;

  localparam int NP = 7;
  localparam poly_t POLYS[NP] = '{
    (64'd1 << 5)  | (64'd1 << 2)  | 64'd1,
    (64'd1 << 16) | (64'd1 << 3)  | 64'd1,
    (64'd1 << 15) | (64'd1 << 14) | 64'd1,
    (64'd1 << 25) | (64'd1 << 20) | (64'd1 << 12) | (64'd1 << 8) | 64'd1,
    (64'd1 << 31) | (64'd1 << 24) | (64'd1 << 16) | (64'd1 << 12) | 64'd1,
    (64'd1 << 33) | (64'd1 << 28) | (64'd1 << 24) | (64'd1 << 4) | 64'd1,
    (64'd1 << 39) | (64'd1 << 36) | (64'd1 << 28) | (64'd1 << 4) | 64'd1
  };
  localparam int NS[NP]  = '{5, 16, 15, 25, 31, 33, 39};
  localparam int KS[NP]  = '{2, 3, 14, 8, 12, 4, 4};
  localparam int CTK[NP] = '{6, 12, 4, 8, 6, 18, 20};
  localparam int CTL[NP] = '{10, 32, 30, 50, 62, 66, 78};
  localparam int CYCLES = 2000;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic load = 1'b0;

  int rck[NP], rfk[NP], rcl[NP], rfl[NP], bk[NP], bl[NP];
  int ctk[NP], ctl[NP], nw[NP], kw[NP];

  for (genvar i = 0; i < NP; i++) begin : g_poly
    localparam int unsigned N  = poly_degree(POLYS[i]);
    localparam int unsigned K1 = poly_k1(POLYS[i]);
    localparam int unsigned NK = 2 * katti_groups(POLYS[i]);
    localparam int unsigned NL = 2 * lowy_period(POLYS[i]);
    logic [N:1] seed;
    logic [K1-1:0] ko, kv, lo, lv;
    logic [NK-1:0] kt;
    logic [NL-1:0] lt;
    logic [N:1] ks, ls;

    assign seed = N'(64'h9E37_79B9_7F4A_7C15 >> i);

    mo_lfsr_top #(.POLY(POLYS[i])) dut (
      .clk, .rst_n, .load, .seed,
      .katti_out(ko), .katti_valid(kv), .katti_t(kt), .katti_state(ks),
      .lowy_out(lo), .lowy_valid(lv), .lowy_t(lt), .lowy_state(ls)
    );
    lfsr_stream_ref #(.POLY(POLYS[i]), .NAME($sformatf("katti poly %0d", i))) rk (
      .clk, .restart(load), .seed, .out(ko), .out_valid(kv),
      .checks(rck[i]), .failures(rfk[i]), .bits(bk[i]));
    lfsr_stream_ref #(.POLY(POLYS[i]), .NAME($sformatf("lowy poly %0d", i))) rl (
      .clk, .restart(load), .seed, .out(lo), .out_valid(lv),
      .checks(rcl[i]), .failures(rfl[i]), .bits(bl[i]));

    assign ctk[i] = NK;
    assign ctl[i] = NL;
    assign nw[i]  = N;
    assign kw[i]  = K1;
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Katti bits in c clocks after a load: clock k samples control signal
  // T(k mod 2G + 1); even signals are XOR phases of group (k mod 2G - 1)/2.
  function automatic int katti_bits(int n, int k1, int c);
    int g, p, s;
    g = (n + k1 - 1) / k1;
    s = 0;
    for (int k = 0; k < c; k++) begin
      p = k % (2 * g);
      if (p % 2 == 1) s += (n - (p / 2) * k1 < k1) ? n - (p / 2) * k1 : k1;
    end
    return s;
  endfunction

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    @(negedge clk);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    repeat (CYCLES) @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      check($sformatf("poly %0d length", i), nw[i] == NS[i] && kw[i] == KS[i]);
      check($sformatf("poly %0d Katti control signals", i), ctk[i] == CTK[i]);
      check($sformatf("poly %0d Lowy control signals", i), ctl[i] == CTL[i]);
      check($sformatf("poly %0d Katti bits %0d", i, bk[i]), bk[i] == katti_bits(NS[i], KS[i], CYCLES));
      check($sformatf("poly %0d Lowy bits %0d", i, bl[i]), bl[i] == KS[i] * CYCLES / 2);
      check($sformatf("poly %0d references ran", i), rck[i] > 0 && rcl[i] > 0);
      $display("poly %0d: N=%0d k1=%0d Katti %0d bits, Lowy %0d bits in %0d clocks",
               i, NS[i], KS[i], bk[i], bl[i], CYCLES);
      checks   += rck[i] + rcl[i];
      failures += rfk[i] + rfl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
