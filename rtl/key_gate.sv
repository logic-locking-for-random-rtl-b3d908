// key_gate: one key-gate of the random-logic-locking scheme.
//
// A key-gate sits on a single decision bit (the comparator output of a tree
// node, or a vote of the majority voter) and combines it with one key bit.
// Its kind is fixed when the design is locked: XOR where the correct key bit
// is 1, XNOR where it is 0, or a plain buffer for a node left unlocked.  With
// the correct key both XOR and XNOR invert the decision bit, so the locked
// design stores the complemented decision; with a wrong key bit the gate
// passes the decision through uninverted and the circuit misbehaves.
//
// The kind is an input so that one gate can serve the node currently
// selected by an FSM; it is a constant wherever the gate belongs to a single
// node.  Purely combinational, no clock.
module key_gate
  import rf_pkg::*;
(
  input  gate_kind_t kind,     // BUF / XOR / XNOR
  input  logic       din,      // decision bit to protect
  input  logic       key_bit,  // key bit applied at this gate
  output logic       dout      // gated decision bit
);

  always_comb begin
    unique case (kind)
      GATE_XOR:  dout = din ^ key_bit;
      GATE_XNOR: dout = din ~^ key_bit;
      default:   dout = din;
    endcase
  end

endmodule
