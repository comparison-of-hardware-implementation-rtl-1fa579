// katti_mo_lfsr: improved Katti-style low-power multiple-output LFSR.
//
// For a polynomial 1 + x^k1 + ... + x^N the next k1 bits of the sequence
// depend only on bits already produced, so k1 bits can be formed at once.
// The N flip-flops hold the last N sequence bits in place: a new bit
// s[m+N] = s[m] ^ (inner taps) is written back over s[m] in flip-flop
// N - (m mod N), and nothing ever shifts. A round of N new bits is split into
// G = ceil(N/k1) groups of k1 consecutive bits; each flip-flop is written once
// per round, which is what keeps the clocked load small.
//
// Race-free operation follows the improved scheme: 2*G control signals
// T1..T(2G) from phase_ring. During T(2g+2) the switches of group g route the
// flip-flops into the k1 XOR gates and the results appear on out[]; the
// flip-flops of group g take those results on the clock edge that starts
// T(2g+3) (wrapping to T1 for the last group), i.e. at the end of the XOR
// phase while the switches are still closed. For 1 + x^2 + x^5 this gives the
// schedule: T2 A=(5,2) B=(4,1); T3 A->5 B->4; T4 A=(5,3) B=(4,2); T5 A->3 B->2;
// T6 A=(3,1); T1 A->1.
//
// Interface: lane 0 of out is tap A, lane 1 tap B, and so on. out_valid[j]
// is high when lane j carries a new bit: on XOR phases only, and in the last
// group only for the lanes that fall inside the N bits of the round (tap B at
// T6 in the example is not valid). Reading the valid lanes in lane order gives
// the sequence s[N], s[N+1], ... . state exposes the flip-flops, numbered
// 1..N as in the architecture's figure. load (synchronous) writes seed into
// the flip-flops and restarts the control signals at T1; the asynchronous
// active-low reset does the same with the parameter SEED. Each control
// signal lasts one clock, so a round of N bits takes 2*G clocks.
//
// The schedule and switch map follow the architecture as published; the
// one-clock control signals, the single clock with per-group enables in
// place of control signals used as flip-flop clocks, the lane valid flags,
// the seed load and the reset value are this design's own choices.
module katti_mo_lfsr
  import mo_lfsr_pkg::*;
#(
  parameter poly_t       POLY = POLY_X5_X2,
  parameter logic [63:0] SEED = '1,
  localparam int unsigned N   = poly_degree(POLY),
  localparam int unsigned K1  = poly_k1(POLY),
  localparam int unsigned G   = katti_groups(POLY),
  localparam int unsigned NPH = 2 * G
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [N:1]     seed,
  output logic [K1-1:0]  out,
  output logic [K1-1:0]  out_valid,
  output logic [NPH-1:0] t,
  output logic [N:1]     state
);

  initial assert (POLY[0] && K1 >= 1 && K1 < N && N < 64)
    else $fatal(1, "katti_mo_lfsr: POLY must be 1 + x^k1 + ... + x^N with 0 < k1 < N < 64");

  logic [N:1] ff;

  phase_ring #(.NPHASE(NPH)) u_ctl (
    .clk     (clk),
    .rst_n   (rst_n),
    .restart (load),
    .t       (t)
  );

  // Switching network and XOR gates: group g is routed during T(2g+2).
  always_comb begin
    out       = '0;
    out_valid = '0;
    for (int unsigned g = 0; g < G; g++) begin
      if (t[2*g+1]) begin
        for (int unsigned j = 0; j < K1; j++) begin
          if (g*K1 + j < N) begin
            out[j]       = ff[ff_of(g*K1 + j, N)];
            out_valid[j] = 1'b1;
            for (int unsigned e = 1; e < N; e++)
              if (POLY[e]) out[j] ^= ff[ff_of(g*K1 + j + N - e, N)];
          end
        end
      end
    end
  end

  // Flip-flops of group g load at the edge that starts T(2g+3).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff <= SEED[N:1];
    end else if (load) begin
      ff <= seed;
    end else begin
      for (int unsigned g = 0; g < G; g++)
        if (t[2*g+1])
          for (int unsigned j = 0; j < K1; j++)
            if (g*K1 + j < N) ff[ff_of(g*K1 + j, N)] <= out[j];
    end
  end

  assign state = ff;

endmodule
