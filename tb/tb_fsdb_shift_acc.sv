// tb_fsdb_shift_acc: checks the two pipeline stages of the shift-and-
// accumulator. Random shifted ROM and sign sums are fed for whole vectors,
// back to back, in W4A8 form (one cycle per bit, MAC doubles every cycle)
// and W8A8 form (two cycles per bit, doubling on the first). Each cycle's
// partial sum must appear one clock later, and the finished MAC
//   sum_b 2^b * (sum of the bit's partial sums)
// two clocks after the vector's last cycle.
module tb_fsdb_shift_acc;
  import fsdb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  step_t step = '0;
  logic [SH_W-1:0] mag_sh = '0, sign_sh = '0;
  psum_t psum;
  mac_t  mac;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fsdb_shift_acc dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 40; v++) begin
      automatic bit w8 = v[0];
      automatic int nb = 1 + ($urandom % 8);
      automatic longint acc = 0;
      for (int b = nb - 1; b >= 0; b--) begin
        automatic longint bitsum = 0;
        for (int ph = 0; ph < (w8 ? 2 : 1); ph++) begin
          automatic longint p;
          @(negedge clk);
          mag_sh  = SH_W'($urandom % 8065);
          sign_sh = SH_W'($urandom % 9217);
          step = '0;
          step.valid = 1'b1;
          step.first = (b == nb - 1) && ph == 0;
          step.dbl   = (ph == 0);
          p = longint'(mag_sh) - longint'(sign_sh);
          bitsum += p;
          @(posedge clk); #1;
          checks++;
          if (longint'(psum) != p) begin
            failures++; $display("FAIL psum got %0d expected %0d", psum, p);
          end
        end
        acc = 2 * acc + bitsum;
      end
      // Idle cycle: the MAC stage finishes the vector at its end.
      @(negedge clk);
      step = '0;
      @(posedge clk); #1;
      checks++;
      if (longint'(mac) != acc) begin failures++; $display("FAIL mac got %0d expected %0d", mac, acc); end
      // and holds it while no step is valid
      @(posedge clk); #1;
      checks++;
      if (longint'(mac) != acc) begin failures++; $display("FAIL mac not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
