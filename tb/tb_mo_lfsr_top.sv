// tb_mo_lfsr_top: end-to-end bench of both generators at the default
// polynomial 1 + x^2 + x^5, with the top's parameters untouched.
//
// After reset and a seed load it runs both generators side by side; an
// independent reference checks every valid bit of each against the LFSR
// recurrence, and the two bit streams must agree with each other. The bench
// also reloads a seed in mid-round and applies an asynchronous reset in
// mid-run. It counts each mechanism of the design and fails if one never
// occurred: seed load, asynchronous reset, Katti XOR phase, Katti
// flip-flop update, Katti invalid lane in the last group, Katti round
// wrap (T6 to T1), Lowy XOR phase, Lowy flip-flop update, Lowy period wrap
// (T10 to T1). Bit rates are checked: 5 bits per 6 clocks (Katti) and
// 2 bits per 2 clocks (Lowy).
module tb_mo_lfsr_top;
  import mo_lfsr_pkg::*;

  localparam int unsigned N = 5, K1 = 2, NPH_K = 6, NPH_L = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic load = 1'b0;
  logic [N:1] seed = '0;

  logic [K1-1:0]    katti_out, katti_valid, lowy_out, lowy_valid;
  logic [NPH_K-1:0] katti_t;
  logic [NPH_L-1:0] lowy_t;
  logic [N:1]       katti_state, lowy_state;

  mo_lfsr_top dut (
    .clk, .rst_n, .load, .seed,
    .katti_out, .katti_valid, .katti_t, .katti_state,
    .lowy_out, .lowy_valid, .lowy_t, .lowy_state
  );

  int checks = 0, failures = 0;
  int rck, rfk, rcl, rfl, bk, bl;
  // restart references on a load, and on the load that follows a reset
  lfsr_stream_ref #(.NAME("katti")) ref_k (.clk, .restart(load), .seed,
    .out(katti_out), .out_valid(katti_valid), .checks(rck), .failures(rfk), .bits(bk));
  lfsr_stream_ref #(.NAME("lowy")) ref_l (.clk, .restart(load), .seed,
    .out(lowy_out), .out_valid(lowy_valid), .checks(rcl), .failures(rfl), .bits(bl));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // mechanism counters
  int n_load = 0, n_areset = 0;
  int n_k_xor = 0, n_k_upd = 0, n_k_invalid = 0, n_k_wrap = 0;
  int n_l_xor = 0, n_l_upd = 0, n_l_wrap = 0;
  logic [N:1] prev_k, prev_l;
  logic [NPH_K-1:0] prev_kt;
  logic [NPH_L-1:0] prev_lt;
  bit ks[$], ls[$];

  always @(posedge clk) begin
    if (rst_n && !load) begin
      if (katti_valid != '0) n_k_xor++;
      if (katti_valid == 2'b01) n_k_invalid++;
      if (lowy_valid != '0) n_l_xor++;
      if (katti_state != prev_k) n_k_upd++;
      if (lowy_state != prev_l) n_l_upd++;
      if (katti_t[0] && prev_kt[NPH_K-1]) n_k_wrap++;
      if (lowy_t[0] && prev_lt[NPH_L-1]) n_l_wrap++;
      for (int j = 0; j < K1; j++) begin
        if (katti_valid[j]) ks.push_back(katti_out[j]);
        if (lowy_valid[j]) ls.push_back(lowy_out[j]);
      end
    end
    prev_k  = katti_state;
    prev_l  = lowy_state;
    prev_kt = katti_t;
    prev_lt = lowy_t;
  end

  always @(negedge rst_n) n_areset++;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_load(logic [N:1] s);
    @(negedge clk);
    seed = s;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    n_load++;
    ks.delete();
    ls.delete();
    check("seed in both generators", katti_state == s && lowy_state == s);
    check("both restart at T1", katti_t == 6'b1 && lowy_t == 10'b1);
  endtask

  task automatic compare_streams(string what);
    int n;
    n = ks.size() < ls.size() ? ks.size() : ls.size();
    check({what, ": streams not empty"}, n > 0);
    for (int k = 0; k < n; k++)
      check({what, ": Katti and Lowy streams agree"}, ks[k] == ls[k]);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1 check("reset value", katti_state == '1 && lowy_state == '1);
    #20 rst_n = 1'b1;
    do_load(5'b01101);
    // 30 Katti rounds = 180 clocks = 150 Katti bits, 180 Lowy bits
    repeat (180) @(negedge clk);
    check("Katti rate", bk == 150);
    check("Lowy rate", bl == 180);
    compare_streams("run 1");
    // reload in the middle of a round
    repeat (4) @(negedge clk);
    do_load(5'b10000);
    repeat (60) @(negedge clk);
    check("Katti rate after reload", bk == 50);
    check("Lowy rate after reload", bl == 60);
    compare_streams("run 2");
    // asynchronous reset in mid-run, then restart from the reset value
    repeat (3) @(negedge clk);
    #2 rst_n = 1'b0;
    #1 check("async reset value", katti_state == '1 && lowy_state == '1 &&
                                  katti_t == 6'b1 && lowy_t == 10'b1);
    @(negedge clk);
    rst_n = 1'b1;
    do_load(5'b11111);
    repeat (120) @(negedge clk);
    compare_streams("run 3");
    check("seed load happened", n_load > 0);
    check("async reset happened", n_areset > 0);
    check("Katti XOR phase happened", n_k_xor > 0);
    check("Katti flip-flop update happened", n_k_upd > 0);
    check("Katti invalid lane happened", n_k_invalid > 0);
    check("Katti round wrap happened", n_k_wrap > 0);
    check("Lowy XOR phase happened", n_l_xor > 0);
    check("Lowy flip-flop update happened", n_l_upd > 0);
    check("Lowy period wrap happened", n_l_wrap > 0);
    $display("mechanisms: load=%0d areset=%0d k_xor=%0d k_upd=%0d k_invalid=%0d k_wrap=%0d l_xor=%0d l_upd=%0d l_wrap=%0d",
             n_load, n_areset, n_k_xor, n_k_upd, n_k_invalid, n_k_wrap, n_l_xor, n_l_upd, n_l_wrap);
    checks   += rck + rcl;
    failures += rfk + rfl;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
