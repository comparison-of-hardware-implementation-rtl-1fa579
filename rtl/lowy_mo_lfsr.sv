// lowy_mo_lfsr: improved Lowy-style low-power multiple-output LFSR.
//
// Like the Katti-style generator, the N flip-flops keep the last N sequence
// bits in place (s[m] in flip-flop N - (m mod N)) and k1 bits
// s[m+N] = s[m] ^ (inner taps) are formed at once. Here, however, every XOR
// phase produces k1 valid bits: the window of k1 bits simply continues past
// the end of a round into the next one. The switch map therefore only repeats
// after P = N/gcd(N,k1) XOR phases (N for every polynomial of interest), every
// flip-flop is written k1/gcd times per period from different XOR phases, and
// the switching network is correspondingly larger.
//
// Race-free operation follows the improved scheme with 2*P control signals
// T1..T(2P) from phase_ring: during T(2c+2) the switches route the flip-flops
// of XOR phase c into the k1 XOR gates, and the destination flip-flops load the
// results on the clock edge that starts T(2c+3) (T1 after the last phase).
// For 1 + x^2 + x^5: T2 A=(5,2) B=(4,1); T3 A->5 B->4; T4 A=(5,3) B=(4,2);
// T5 A->3 B->2; T6 A=(3,1) B=(5,2); T7 A->1 B->5; T8 A=(4,1) B=(5,3);
// T9 A->4 B->3; T10 A=(4,2) B=(3,1); T1 A->2 B->1.
//
// Interface: lane 0 of out is tap A, lane 1 tap B, and so on; out_valid[j]
// is high on every XOR phase for every lane. Reading the valid lanes in lane
// order gives s[N], s[N+1], ... . state exposes flip-flops 1..N. load
// (synchronous) writes seed and restarts the control signals at T1; the
// asynchronous active-low reset does the same with the parameter SEED. Each
// control signal lasts one clock: k1 bits every two clocks.
//
// The schedule and switch map follow the architecture as published; the
// one-clock control signals, the single clock with per-phase enables, the
// seed load and the reset value are this design's own choices.
module lowy_mo_lfsr
  import mo_lfsr_pkg::*;
#(
  parameter poly_t       POLY = POLY_X5_X2,
  parameter logic [63:0] SEED = '1,
  localparam int unsigned N   = poly_degree(POLY),
  localparam int unsigned K1  = poly_k1(POLY),
  localparam int unsigned P   = lowy_period(POLY),
  localparam int unsigned NPH = 2 * P
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
    else $fatal(1, "lowy_mo_lfsr: POLY must be 1 + x^k1 + ... + x^N with 0 < k1 < N < 64");

  logic [N:1] ff;

  phase_ring #(.NPHASE(NPH)) u_ctl (
    .clk     (clk),
    .rst_n   (rst_n),
    .restart (load),
    .t       (t)
  );

  // Switching network and XOR gates: XOR phase c is routed during T(2c+2).
  always_comb begin
    out       = '0;
    out_valid = '0;
    for (int unsigned c = 0; c < P; c++) begin
      if (t[2*c+1]) begin
        out_valid = '1;
        for (int unsigned j = 0; j < K1; j++) begin
          out[j] = ff[ff_of(c*K1 + j, N)];
          for (int unsigned e = 1; e < N; e++)
            if (POLY[e]) out[j] ^= ff[ff_of(c*K1 + j + N - e, N)];
        end
      end
    end
  end

  // Destination flip-flops of XOR phase c load at the edge that starts T(2c+3).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff <= SEED[N:1];
    end else if (load) begin
      ff <= seed;
    end else begin
      for (int unsigned c = 0; c < P; c++)
        if (t[2*c+1])
          for (int unsigned j = 0; j < K1; j++)
            ff[ff_of(c*K1 + j, N)] <= out[j];
    end
  end

  assign state = ff;

endmodule
