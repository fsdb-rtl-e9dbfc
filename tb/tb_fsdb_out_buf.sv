// tb_fsdb_out_buf: writes random rows of sixteen signed MAC results to every
// entry of the output buffer, overwrites some, and reads all back.
module tb_fsdb_out_buf;
  import fsdb_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [OUT_AW-1:0] waddr = '0, raddr = '0;
  mac_t [NUM_BANKS-1:0] wdata = '0, rdata;
  mac_t [NUM_BANKS-1:0] shadow [OUT_DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fsdb_out_buf dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3 * OUT_DEPTH; k++) begin
      automatic int r = (k < OUT_DEPTH) ? k : int'($urandom % OUT_DEPTH);
      @(negedge clk);
      for (int b = 0; b < NUM_BANKS; b++) wdata[b] = mac_t'($urandom);
      waddr = OUT_AW'(r); we = 1'b1; shadow[r] = wdata;
      @(negedge clk);
      we = 1'b0;
    end
    for (int r = 0; r < OUT_DEPTH; r++) begin
      raddr = OUT_AW'(r); #1;
      for (int b = 0; b < NUM_BANKS; b++) begin
        checks++;
        if (rdata[b] != shadow[r][b]) begin failures++; $display("FAIL row %0d bank %0d", r, b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
