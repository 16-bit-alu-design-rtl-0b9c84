// not_gate: 1x1 reversible NOT gate.
// The single output is the complement of the single input, P = ~A. It is the
// only 1x1 reversible function besides the wire and has quantum cost 0.
// Interface: a (in), p (out). Purely combinational, no clock.
module not_gate (
  input  logic a,
  output logic p
);
  assign p = ~a;
endmodule
