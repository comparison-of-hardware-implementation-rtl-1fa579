// tb_lowy_mo_lfsr: self-checking bench for the improved Lowy-style
// generator.
//
// Instance u0 uses 1 + x^2 + x^5 and is held cycle by cycle against the
// published ten-signal schedule: which flip-flops each XOR phase combines,
// which flip-flops each trigger phase writes (and that no other flip-flop
// changes), and that both taps are valid on every XOR phase. Its output
// stream must be the maximal-length sequence: 31 distinct 5-bit windows,
// period 31. Instance u1 uses 1 + x^3 + x^16 (32 control signals). For both,
// an independent reference recomputes every bit from the seed, and the number
// of bits delivered is checked against k1 bits every two clocks.
module tb_lowy_mo_lfsr;
  import mo_lfsr_pkg::*;

  localparam poly_t P0 = POLY_X5_X2;
  localparam poly_t P1 = (64'd1 << 16) | (64'd1 << 3) | 64'd1;
  localparam int unsigned N0 = 5, K0 = 2, NPH0 = 10;
  localparam int unsigned N1 = 16, K1 = 3, NPH1 = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic load = 1'b0;
  logic [N0:1] seed0 = '0;
  logic [N1:1] seed1 = '0;

  logic [K0-1:0] out0, v0;
  logic [NPH0-1:0] t0;
  logic [N0:1] st0;
  logic [K1-1:0] out1, v1;
  logic [NPH1-1:0] t1;
  logic [N1:1] st1;

  int checks = 0, failures = 0;
  int rc0, rf0, rc1, rf1;
  int rb0, rb1;

  lowy_mo_lfsr #(.POLY(P0)) u0 (.clk, .rst_n, .load, .seed(seed0),
    .out(out0), .out_valid(v0), .t(t0), .state(st0));
  lowy_mo_lfsr #(.POLY(P1)) u1 (.clk, .rst_n, .load, .seed(seed1),
    .out(out1), .out_valid(v1), .t(t1), .state(st1));

  lfsr_stream_ref #(.POLY(P0), .NAME("lowy x5")) r0 (.clk, .restart(load),
    .seed(seed0), .out(out0), .out_valid(v0), .checks(rc0), .failures(rf0), .bits(rb0));
  lfsr_stream_ref #(.POLY(P1), .NAME("lowy x16")) r1 (.clk, .restart(load),
    .seed(seed1), .out(out1), .out_valid(v1), .checks(rc1), .failures(rf1), .bits(rb1));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Published schedule for 1 + x^2 + x^5, indexed by control signal T1..T10.
  // xa/xb: flip-flop pairs on taps A and B (0 = tap idle); wa/wb: flip-flop
  // written from tap A/B of the previous XOR phase (0 = none).
  int xa1[1:10] = '{0, 5, 0, 5, 0, 3, 0, 4, 0, 4};
  int xa2[1:10] = '{0, 2, 0, 3, 0, 1, 0, 1, 0, 2};
  int xb1[1:10] = '{0, 4, 0, 4, 0, 5, 0, 5, 0, 3};
  int xb2[1:10] = '{0, 1, 0, 2, 0, 2, 0, 3, 0, 1};
  int wa[1:10]  = '{2, 0, 5, 0, 3, 0, 1, 0, 4, 0};
  int wb[1:10]  = '{1, 0, 4, 0, 2, 0, 5, 0, 3, 0};

  bit running = 0;
  bit primed  = 0;
  logic [N0:1] prev_st, exp_st;
  logic prev_a, prev_b;
  int tn;
  int cyc = 0;
  int exp_bits0 = 0, exp_bits1 = 0;
  bit stream[$];

  function automatic int lanes_valid(int unsigned p, int unsigned k);
    // p: 0-based control-signal index; every odd p is an XOR phase
    return (p % 2 == 1) ? k : 0;
  endfunction

  always @(posedge clk) begin
    if (load) begin
      running <= 1'b1;
      primed  = 0;
      cyc     = 0;
      exp_bits0 = 0;
      exp_bits1 = 0;
    end else if (running) begin
      tn = 0;
      for (int i = 0; i < NPH0; i++) if (t0[i]) tn = i + 1;
      check("u0 control signal one-hot", $onehot(t0));
      // XOR phases
      if (xa1[tn] != 0) begin
        check("u0 tap A switch pair", out0[0] == (st0[xa1[tn]] ^ st0[xa2[tn]]));
        check("u0 tap A valid", v0[0]);
        if (xb1[tn] != 0) begin
          check("u0 tap B switch pair", out0[1] == (st0[xb1[tn]] ^ st0[xb2[tn]]));
          check("u0 tap B valid", v0[1]);
        end else begin
          check("u0 tap B idle", 1'b0);
        end
      end else begin
        check("u0 no valid output on trigger phase", v0 == '0);
      end
      // trigger phases
      if (primed) begin
        exp_st = prev_st;
        if (wa[tn] != 0) exp_st[wa[tn]] = prev_a;
        if (wb[tn] != 0) exp_st[wb[tn]] = prev_b;
        check($sformatf("u0 flip-flops after T%0d", tn), st0 == exp_st);
      end
      if (tn == 2) primed = 1;
      prev_st = st0;
      prev_a  = out0[0];
      prev_b  = out0[1];
      for (int j = 0; j < K0; j++) if (v0[j]) stream.push_back(out0[j]);
      check("u1 lane count", $countones(v1) == lanes_valid(int'(cyc % NPH1), K1));
      exp_bits0 += lanes_valid(int'(cyc % NPH0), K0);
      exp_bits1 += lanes_valid(int'(cyc % NPH1), K1);
      cyc++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int distinct;
  bit [31:0] seen;
  bit [4:0] w;

  initial begin
    #1 rst_n = 1'b0;
    #1;
    check("u0 reset value", st0 == '1 && t0 == 10'b1);
    check("u1 reset value", st1 == '1 && t1 == 32'b1);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    seed0 = 5'b10110;
    seed1 = 16'hACE1;
    load  = 1'b1;
    @(posedge clk);
    #1 load = 1'b0;
    check("u0 seed loaded", st0 == seed0 && t0 == 10'b1);
    check("u1 seed loaded", st1 == seed1 && t1 == 32'b1);
    // 40 periods of the x^5 generator = 400 bits, 400 clocks
    repeat (40 * NPH0) @(posedge clk);
    #1;
    check("u0 rate: 2 bits per 2 clocks", rb0 == 40 * 2 * N0 && exp_bits0 == 40 * 2 * N0);
    check("u0 reference bits", rb0 == exp_bits0);
    check("u1 bit count", rb1 == exp_bits1);
    // maximal length: 31 distinct windows and period 31
    seen = '0;
    distinct = 0;
    for (int k = 0; k < 31; k++) begin
      w = {stream[k], stream[k+1], stream[k+2], stream[k+3], stream[k+4]};
      if (!seen[w]) distinct++;
      seen[w] = 1'b1;
    end
    check("u0 31 distinct patterns", distinct == 31 && !seen[0]);
    for (int k = 0; k + 31 < stream.size(); k++)
      check("u0 period 31", stream[k] == stream[k+31]);
    // reload in the middle of a round
    repeat (3) @(posedge clk);
    #1;
    seed0 = 5'b00001;
    seed1 = 16'h0001;
    load  = 1'b1;
    @(posedge clk);
    #1 load = 1'b0;
    repeat (30 * NPH1) @(posedge clk);
    #1;
    check("u1 rate: 3 bits per 2 clocks", rb1 == 30 * 3 * N1 && exp_bits1 == 30 * 3 * N1);
    checks   += rc0 + rc1;
    failures += rf0 + rf1;
    check("reference saw bits", rc0 > 0 && rc1 > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
