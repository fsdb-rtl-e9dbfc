// tb_fsdb_rom_macro: checks the ROM CiM macro of bank 3 against a sum
// computed here from the ROM contents: mag_psum = sum_i act_i * mag_i, for
// random addresses and activation bit planes, plus the all-ones and all-zero
// planes. Also checks that the contents are not constant (some words differ).
module tb_fsdb_rom_macro;
  import fsdb_pkg::*;
  logic [ROM_AW-1:0]     rom_addr;
  logic [NUM_OPS-1:0]    act;
  logic [MAG_PSUM_W-1:0] mag_psum;
  int checks = 0, failures = 0;

  fsdb_rom_macro #(.SEED(1), .BANK(3)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp, nz;
    nz = 0;
    for (int t = 0; t < 300; t++) begin
      rom_addr = ROM_AW'($urandom);
      for (int i = 0; i < NUM_OPS; i++) act[i] = (t % 50 == 0) ? 1'b1 : (t % 50 == 1) ? 1'b0 : 1'($urandom);
      #1;
      exp = 0;
      for (int i = 0; i < NUM_OPS; i++) if (act[i]) exp += int'(rom_mag(1, 3, i, rom_addr));
      if (exp != 0) nz++;
      checks++;
      if (int'(mag_psum) != exp) begin
        failures++;
        $display("FAIL addr %0d: got %0d expected %0d", rom_addr, mag_psum, exp);
      end
    end
    checks++;
    if (nz < 200) begin failures++; $display("FAIL too few non-zero sums"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
