// fsdb_bank: one hybrid ROM/SRAM CiM bank.
//
// Combines the ROM CiM macro (fixed 3-bit magnitudes, 144 slices x 256
// words), the SRAM CiM macro (144 trainable sign bits), the magnitude and sign
// barrel shifters and the near-memory shift-and-accumulator. Each cycle the
// bank takes one masked activation bit per operand and forms
//   psum = (sum act*mag) << mag_shift  -  (sum act*sign) << sign_shift,
// which the shift-accumulator folds into the running MAC. The activation
// masker that feeds this bank sits outside it, as in the published floorplan.
//
// Interface: reload copies sg_row into the sign cells; rom_addr selects the
// ROM word; step carries the per-cycle control; masked_act is the gated bit
// plane. psum appears one clock, the finished mac two clocks after the last
// activation bit of a vector.
module fsdb_bank
  import fsdb_pkg::*;
#(
  parameter int unsigned SEED       = 1,
  parameter int unsigned BANK       = 0,
  parameter int unsigned SIGN_SUM_W = SIGN_SUM_W_PRUNED
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               reload,
  input  logic [NUM_OPS-1:0] sg_row,
  input  logic [ROM_AW-1:0]  rom_addr,
  input  step_t              step,
  input  logic [NUM_OPS-1:0] masked_act,
  output psum_t              psum,
  output mac_t               mac
);

  logic [MAG_PSUM_W-1:0] mag_psum;
  logic [SIGN_SUM_W-1:0] sign_psum;
  logic [SH_W-1:0]       mag_sh, sign_sh;

  fsdb_rom_macro #(.SEED(SEED), .BANK(BANK)) u_rom (
    .rom_addr(rom_addr), .act(masked_act), .mag_psum(mag_psum));

  fsdb_sram_macro #(.SIGN_SUM_W(SIGN_SUM_W)) u_sram (
    .clk(clk), .rst_n(rst_n), .reload(reload), .sg_row(sg_row),
    .act(masked_act), .sign_psum(sign_psum));

  fsdb_barrel_shift #(.IW(MAG_PSUM_W), .SW(2), .OW(SH_W)) u_mag_shift (
    .din(mag_psum), .sh(step.mag_shift), .dout(mag_sh));

  fsdb_barrel_shift #(.IW(SIGN_SUM_W), .SW(3), .OW(SH_W)) u_sign_shift (
    .din(sign_psum), .sh(step.sign_shift), .dout(sign_sh));

  fsdb_shift_acc u_acc (
    .clk(clk), .rst_n(rst_n), .step(step), .mag_sh(mag_sh), .sign_sh(sign_sh),
    .psum(psum), .mac(mac));

endmodule
