// fsdb_act_masker: activation masker (weight shift controller) of one bank.
//
// Holds the 144 trainable shift bits of the bank's current weights (a
// 16 x 3 x 3 array of SRAM cells, modelled as flip-flops) and gates the
// incoming activation bit plane. Per operand a multiplexer, steered by the
// stored shift bit, picks Mask Ctrl or its inverse, and a NOR with the
// inverted activation bit passes the activation only when the selected value
// is high:
//   masked_act[i] = act[i] & (shift[i] ? mask : ~mask).
// With Mask Ctrl high only activations of shifted weights pass (the shifted
// partial sum); with it low only those of non-shifted weights pass. In W4A8
// mode the shift cells hold zeros and Mask Ctrl stays low, so every
// activation passes.
//
// Interface: reload copies sf_row into the cells at the clock edge (reset to
// zero); act, mask -> masked_act is combinational.
module fsdb_act_masker
  import fsdb_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               reload,
  input  logic [NUM_OPS-1:0] sf_row,
  input  logic               mask,
  input  logic [NUM_OPS-1:0] act,
  output logic [NUM_OPS-1:0] masked_act
);

  logic [NUM_OPS-1:0] shift_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      shift_q <= '0;
    else if (reload) shift_q <= sf_row;

  for (genvar i = 0; i < NUM_OPS; i++) begin : g_op
    logic sel;
    assign sel           = shift_q[i] ? mask : ~mask;
    assign masked_act[i] = ~(~act[i] | ~sel);
  end

endmodule
