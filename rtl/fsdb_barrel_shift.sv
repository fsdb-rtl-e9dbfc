// fsdb_barrel_shift: logarithmic left barrel shifter.
//
// Each bank has two: the magnitude shifter (shift 0 or 3 in the documented
// modes, 2-bit control) and the sign shifter (shift 2, 3 or 6, 3-bit
// control). Stage k shifts by 2**k when bit k of the shift amount is set.
// The output is OW bits wide and zero-extended; OW must hold the largest
// shifted value.
//
// Interface: din, sh -> dout, combinational.
module fsdb_barrel_shift #(
  parameter int unsigned IW = 10,
  parameter int unsigned SW = 2,
  parameter int unsigned OW = 16
) (
  input  logic [IW-1:0] din,
  input  logic [SW-1:0] sh,
  output logic [OW-1:0] dout
);

  logic [SW:0][OW-1:0] stage;

  assign stage[0] = OW'(din);
  for (genvar k = 0; k < SW; k++) begin : g_stage
    assign stage[k+1] = sh[k] ? (stage[k] << (2**k)) : stage[k];
  end
  assign dout = stage[SW];

endmodule
