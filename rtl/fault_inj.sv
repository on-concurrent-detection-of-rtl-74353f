// Fault injection multiplexer.
//
// For every bit, a control bit en selects between the fault-free value
// (en = 0) and a stuck-at value val (en = 1, val = 0: stuck-at-0, val = 1:
// stuck-at-1). Several enabled bits model a multiple-bit stuck-at fault. With
// en = 0 the module is transparent. It sits at the outputs of the
// multiplier's modules for fault injection experiments; in normal use en is
// tied low. Purely combinational.
module fault_inj #(
  parameter int unsigned W = 171
) (
  input  logic [W-1:0] d,
  input  logic [W-1:0] en,
  input  logic [W-1:0] val,
  output logic [W-1:0] q
);

  assign q = (d & ~en) | (val & en);

endmodule
