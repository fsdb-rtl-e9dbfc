// fsdb_rom_slice: one LUT-based ROM slice of the ROM CiM macro.
//
// A slice stores ROM_DEPTH (256) folded 3-bit magnitudes of one weight
// position and reads the word selected by the shared ROM address. The store
// is written as a constant look-up function of the address (the contents come
// from fsdb_pkg::rom_mag, a fixed pattern standing in for a trained network),
// so synthesis turns it into static combinational logic, as the compressed
// LUT ROM is meant to be. The address is held for the whole bit-serial
// computation, so the read value stays static while activation bits stream.
//
// Interface: addr -> mag, combinational. BANK and SLICE select the contents.
module fsdb_rom_slice
  import fsdb_pkg::*;
#(
  parameter int unsigned SEED  = 1,
  parameter int unsigned BANK  = 0,
  parameter int unsigned SLICE = 0
) (
  input  logic [ROM_AW-1:0] addr,
  output logic [MAG_W-1:0]  mag
);

  always_comb mag = rom_mag(SEED, BANK, SLICE, addr);

endmodule
