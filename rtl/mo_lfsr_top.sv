// mo_lfsr_top: the two improved low-power multiple-output LFSRs side by side.
//
// Both generators implement the same polynomial POLY (default 1 + x^2 + x^5)
// and share clock, reset and seed load, so their outputs can be compared bit
// for bit: the Katti-style generator delivers N bits every 2*ceil(N/k1)
// clocks, some lanes idle in its last group, while the Lowy-style generator
// delivers k1 bits every two clocks on all lanes. Both produce the same
// sequence from the same seed. Each generator's outputs, control signals and
// flip-flops are brought out under its own prefix (katti_, lowy_). Sharing
// the seed and control inputs is this design's own choice.
module mo_lfsr_top
  import mo_lfsr_pkg::*;
#(
  parameter poly_t       POLY = POLY_X5_X2,
  parameter logic [63:0] SEED = '1,
  localparam int unsigned N      = poly_degree(POLY),
  localparam int unsigned K1     = poly_k1(POLY),
  localparam int unsigned NPH_K  = 2 * katti_groups(POLY),
  localparam int unsigned NPH_L  = 2 * lowy_period(POLY)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [N:1]       seed,
  output logic [K1-1:0]    katti_out,
  output logic [K1-1:0]    katti_valid,
  output logic [NPH_K-1:0] katti_t,
  output logic [N:1]       katti_state,
  output logic [K1-1:0]    lowy_out,
  output logic [K1-1:0]    lowy_valid,
  output logic [NPH_L-1:0] lowy_t,
  output logic [N:1]       lowy_state
);

  katti_mo_lfsr #(.POLY(POLY), .SEED(SEED)) u_katti (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (load),
    .seed      (seed),
    .out       (katti_out),
    .out_valid (katti_valid),
    .t         (katti_t),
    .state     (katti_state)
  );

  lowy_mo_lfsr #(.POLY(POLY), .SEED(SEED)) u_lowy (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (load),
    .seed      (seed),
    .out       (lowy_out),
    .out_valid (lowy_valid),
    .t         (lowy_t),
    .state     (lowy_state)
  );

endmodule
