// lfsr_stream_ref: testbench reference for a multiple-output LFSR stream.
//
// On a clock edge where restart is high it takes seed as the first N
// sequence bits (s[m] = seed[N-m], flip-flop N holding s[0]). On every later
// edge it walks the lanes of out in order and, for each lane whose valid bit
// is set, computes the next bit of the recurrence
// s[L] = s[L-N] ^ XOR over inner taps e of s[L-e] from its own history and
// compares. It never looks inside the generator. checks, failures and bits
// (new bits seen since the last restart) are outputs for the enclosing bench.
module lfsr_stream_ref
  import mo_lfsr_pkg::*;
#(
  parameter poly_t POLY = POLY_X5_X2,
  parameter string NAME = "dut",
  localparam int unsigned N  = poly_degree(POLY),
  localparam int unsigned K1 = poly_k1(POLY)
) (
  input  logic          clk,
  input  logic          restart,
  input  logic [N:1]    seed,
  input  logic [K1-1:0] out,
  input  logic [K1-1:0] out_valid,
  output int            checks,
  output int            failures,
  output int            bits
);

  bit hist[$];
  bit exp_bit;
  int unsigned len;

  initial begin
    checks   = 0;
    failures = 0;
    bits     = 0;
  end

  always @(posedge clk) begin
    if (restart) begin
      hist.delete();
      for (int unsigned m = 0; m < N; m++) hist.push_back(seed[N-m]);
      bits = 0;
    end else if (hist.size() >= N) begin
      for (int unsigned j = 0; j < K1; j++) begin
        if (out_valid[j]) begin
          len = hist.size();
          exp_bit = hist[len-N];
          for (int unsigned e = 1; e < N; e++)
            if (POLY[e]) exp_bit ^= hist[len-e];
          checks++;
          if (out[j] != exp_bit) begin
            failures++;
            if (failures <= 5)
              $display("%s: bit %0d lane %0d got %0b expected %0b", NAME, bits, j, out[j], exp_bit);
          end
          hist.push_back(exp_bit);
          bits++;
          if (hist.size() > 2*N) void'(hist.pop_front());
        end
      end
    end
  end

endmodule
