// tb_fsdb_wt_buf: fills every shift and sign row of every bank of the weight
// buffer with random bits, then reads all rows back through both read ports
// with different sf and sg addresses, and checks that a sign write does not
// disturb the shift store.
module tb_fsdb_wt_buf;
  import fsdb_pkg::*;
  logic clk = 1'b0, we = 1'b0, wsel = 1'b0;
  logic [WB_AW-1:0] waddr = '0, sf_addr = '0, sg_addr = '0;
  logic [3:0] wbank = '0;
  logic [NUM_OPS-1:0] wdata = '0;
  logic [NUM_BANKS-1:0][NUM_OPS-1:0] sf_rows, sg_rows;
  logic [NUM_BANKS-1:0][NUM_OPS-1:0] sf_sh [WB_DEPTH];
  logic [NUM_BANKS-1:0][NUM_OPS-1:0] sg_sh [WB_DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fsdb_wt_buf dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < WB_DEPTH; r++)
        for (int b = 0; b < NUM_BANKS; b++) begin
          @(negedge clk);
          for (int i = 0; i < NUM_OPS; i++) wdata[i] = 1'($urandom);
          wsel = 1'(s); waddr = WB_AW'(r); wbank = 4'(b); we = 1'b1;
          if (s == 1) sg_sh[r][b] = wdata; else sf_sh[r][b] = wdata;
          @(negedge clk);
          we = 1'b0;
        end
    for (int r = 0; r < WB_DEPTH; r++) begin
      sf_addr = WB_AW'(r);
      sg_addr = WB_AW'(WB_DEPTH - 1 - r);
      #1;
      checks += 2;
      if (sf_rows != sf_sh[r]) begin failures++; $display("FAIL sf row %0d", r); end
      if (sg_rows != sg_sh[WB_DEPTH - 1 - r]) begin failures++; $display("FAIL sg row %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
