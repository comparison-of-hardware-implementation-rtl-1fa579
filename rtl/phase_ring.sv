// phase_ring: generator of the sequential control signals T1..T(NPHASE).
//
// The improved multiple-output LFSRs use twice as many control signals as
// the original ones: odd-numbered signals (T1, T3, ...) mark the flip-flop
// update of a group and even-numbered signals (T2, T4, ...) close the switches
// that route flip-flop values into the XOR gates. Here every control signal is
// one clock cycle long, so the generator is a one-hot ring counter:
// t[0] is T1, t[NPHASE-1] is T(NPHASE), and exactly one bit is high in every
// cycle.
//
// Interface and timing: an asynchronous active-low reset and a synchronous
// restart both put the ring on T1; otherwise it advances by one signal on
// every rising clock edge and wraps from T(NPHASE) back to T1. The ring-counter
// form and the restart input are this design's own choices; the document
// specifies only the sequence of the signals.
module phase_ring #(
  parameter int unsigned NPHASE = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  output logic [NPHASE-1:0] t
);

  localparam logic [NPHASE-1:0] T1 = NPHASE'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       t <= T1;
    else if (restart) t <= T1;
    else              t <= {t[NPHASE-2:0], t[NPHASE-1]};
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(t))
    else $error("phase_ring: control signals are not one-hot");

endmodule
