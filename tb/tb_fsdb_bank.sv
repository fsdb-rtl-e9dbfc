// tb_fsdb_bank: checks one hybrid CiM bank (bank 5, default ROM contents,
// default 5-bit pruned sign tree) on whole activation vectors. The testbench
// plays the masker and controller: it reloads a sign row, applies the bit
// planes MSB first with the documented per-cycle controls (W4A8: shifts 0/3,
// W8A8: Mask high with 3/6, then Mask low with 0/2, masking by its own shift
// bits) and expects the exact dot product sum_i A_i * W_i of the folded-store
// weights two clocks after the last bit. Signs are sparse so the pruned tree
// stays exact.
module tb_fsdb_bank;
  import fsdb_pkg::*;
  localparam int unsigned BANKNO = 5;
  logic clk = 1'b0, rst_n = 1'b0, reload = 1'b0;
  logic [NUM_OPS-1:0] sg_row = '0, masked_act = '0;
  logic [ROM_AW-1:0]  rom_addr = '0;
  step_t step = '0;
  psum_t psum;
  mac_t  mac;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fsdb_bank #(.SEED(1), .BANK(BANKNO)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NUM_OPS-1:0] sf, sg;
    logic [7:0] a [NUM_OPS];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 24; v++) begin
      automatic mode_e mode = v[0] ? MODE_W8A8 : MODE_W4A8;
      automatic longint exp = 0;
      for (int i = 0; i < NUM_OPS; i++) begin
        sg[i] = 1'(($urandom % 14) == 0);
        sf[i] = (mode == MODE_W8A8) ? 1'($urandom) : 1'b0;
        begin automatic int unsigned r = $urandom; a[i] = (r % 3 == 0) ? 8'd0 : r[15:8]; end
      end
      @(negedge clk);
      rom_addr = ROM_AW'($urandom);
      sg_row = sg; reload = 1'b1;
      @(negedge clk);
      reload = 1'b0; sg_row = ~sg;
      for (int i = 0; i < NUM_OPS; i++)
        exp += longint'(a[i]) * fold_weight(rom_mag(1, BANKNO, i, rom_addr), sg[i], sf[i], mode);
      for (int b = 7; b >= 0; b--)
        for (int ph = 0; ph < ((mode == MODE_W8A8) ? 2 : 1); ph++) begin
          step = '0;
          step.valid = 1'b1;
          step.msb   = (b == 7);
          step.first = (b == 7) && ph == 0;
          step.dbl   = (ph == 0);
          step.mask  = (mode == MODE_W8A8) && ph == 0;
          step.mag_shift  = step.mask ? 2'd3 : 2'd0;
          step.sign_shift = (mode == MODE_W4A8) ? 3'd3 : (ph == 0 ? 3'd6 : 3'd2);
          for (int i = 0; i < NUM_OPS; i++)
            masked_act[i] = a[i][b] && ((mode == MODE_W4A8) || (ph == 0 ? sf[i] : !sf[i]));
          @(negedge clk);
        end
      step = '0;
      // psum stage holds the last partial sum now; one more clock for MAC.
      @(posedge clk); #1;
      checks++;
      if (longint'(mac) != exp) begin
        failures++; $display("FAIL vector %0d mode %0d: got %0d expected %0d", v, mode, mac, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
