// tb_fsdb_act_masker: checks the activation masker. After a reload of random
// shift bits, with Mask Ctrl high only activations of shifted weights pass and
// with it low only those of non-shifted weights; the two outputs are
// disjoint and together give back the plane. Shift bits change only on
// reload.
module tb_fsdb_act_masker;
  import fsdb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, reload = 1'b0, mask = 1'b0;
  logic [NUM_OPS-1:0] sf_row = '0, act = '0, masked_act;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fsdb_act_masker dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NUM_OPS-1:0] sf, hi, lo;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 30; r++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_OPS; i++) sf_row[i] = 1'($urandom);
      sf = sf_row;
      reload = 1'b1;
      @(negedge clk);
      reload = 1'b0;
      sf_row = ~sf;
      for (int t = 0; t < 10; t++) begin
        for (int i = 0; i < NUM_OPS; i++) act[i] = 1'($urandom);
        mask = 1'b1; #1; hi = masked_act;
        mask = 1'b0; #1; lo = masked_act;
        checks += 3;
        if (hi != (act & sf))  begin failures++; $display("FAIL mask high"); end
        if (lo != (act & ~sf)) begin failures++; $display("FAIL mask low"); end
        if ((hi | lo) != act || (hi & lo) != '0) begin failures++; $display("FAIL not complementary"); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
