// tb_fsdb_sram_macro: checks the SRAM CiM macro. Two instances share inputs:
// one with the default 5-bit pruned adder tree, one with an exact 8-bit tree.
// For random sign rows (loaded with reload) and activation planes the exact
// instance must give sum_i act_i * sign_i and the pruned one that sum modulo
// 32. Also checks that signs are only taken on reload, and that dense planes
// do wrap the pruned tree.
module tb_fsdb_sram_macro;
  import fsdb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, reload = 1'b0;
  logic [NUM_OPS-1:0] sg_row = '0, act = '0;
  logic [4:0] psum5;
  logic [7:0] psum8;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fsdb_sram_macro dut (.clk, .rst_n, .reload, .sg_row, .act, .sign_psum(psum5));
  fsdb_sram_macro #(.SIGN_SUM_W(8)) dut8 (.clk, .rst_n, .reload, .sg_row, .act, .sign_psum(psum8));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NUM_OPS-1:0] held;
    int exp, wraps;
    wraps = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_OPS; i++) sg_row[i] = (r % 4 == 0) ? 1'b1 : 1'(($urandom % (1 + r % 7)) == 0);
      held = sg_row;
      reload = 1'b1;
      @(negedge clk);
      reload = 1'b0;
      sg_row = ~held;  // must not be taken without reload
      for (int t = 0; t < 20; t++) begin
        for (int i = 0; i < NUM_OPS; i++) act[i] = 1'($urandom);
        #1;
        exp = 0;
        for (int i = 0; i < NUM_OPS; i++) exp += int'(act[i] & held[i]);
        if (exp > 31) wraps++;
        checks += 2;
        if (int'(psum8) != exp) begin
          failures++; $display("FAIL exact: got %0d expected %0d", psum8, exp);
        end
        if (int'(psum5) != exp % 32) begin
          failures++; $display("FAIL pruned: got %0d expected %0d", psum5, exp % 32);
        end
        @(negedge clk);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL pruned tree never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
