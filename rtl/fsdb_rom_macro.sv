// fsdb_rom_macro: ROM CiM macro of one hybrid bank.
//
// NUM_OPS (144) LUT ROM slices each deliver the 3-bit magnitude of one weight
// at the shared ROM address. The magnitude is split into its three bit planes;
// each plane is ANDed with the masked activation bits and reduced by its own
// 144-operand 1-bit adder tree. The plane sums are merged by shifting (MSB
// plane << 2, middle plane << 1) and adding, giving
//   mag_psum = sum_i act_i * mag_i        (0 .. 144*7).
// The trees are exact; the plane merge is a combinational adder, and the
// accumulation over activation bits happens in the bank's shift-accumulator.
//
// Interface: rom_addr (held during a job), act (one masked activation bit per
// operand) -> mag_psum, combinational.
module fsdb_rom_macro
  import fsdb_pkg::*;
#(
  parameter int unsigned SEED = 1,
  parameter int unsigned BANK = 0
) (
  input  logic [ROM_AW-1:0]     rom_addr,
  input  logic [NUM_OPS-1:0]    act,
  output logic [MAG_PSUM_W-1:0] mag_psum
);

  logic [NUM_OPS-1:0][MAG_W-1:0] mag;
  logic [MAG_W-1:0][NUM_OPS-1:0] plane;   // plane[b][i] = act[i] & mag[i][b]
  logic [MAG_W-1:0][CNT_W-1:0]   cnt;

  for (genvar i = 0; i < NUM_OPS; i++) begin : g_slice
    fsdb_rom_slice #(.SEED(SEED), .BANK(BANK), .SLICE(i)) u_slice (
      .addr(rom_addr), .mag(mag[i]));
    for (genvar b = 0; b < MAG_W; b++) begin : g_bit
      assign plane[b][i] = act[i] & mag[i][b];
    end
  end

  for (genvar b = 0; b < MAG_W; b++) begin : g_tree
    fsdb_adder_tree #(.N(NUM_OPS), .IW(1), .OW(CNT_W)) u_tree (
      .in(plane[b]), .sum(cnt[b]));
  end

  always_comb
    mag_psum = (MAG_PSUM_W'(cnt[2]) << 2) + (MAG_PSUM_W'(cnt[1]) << 1) + MAG_PSUM_W'(cnt[0]);

endmodule
