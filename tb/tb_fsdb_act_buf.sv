// tb_fsdb_act_buf: writes random activation vectors to every entry of the
// activation buffer and reads back every bit plane of every vector, comparing
// with the bits of the written values.
module tb_fsdb_act_buf;
  import fsdb_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [ACT_AW-1:0] waddr = '0, raddr = '0;
  logic [NUM_OPS-1:0][ACT_W-1:0] wdata = '0;
  logic [2:0] rbit = '0;
  logic [NUM_OPS-1:0] plane;
  logic [NUM_OPS-1:0][ACT_W-1:0] shadow [ACT_DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fsdb_act_buf dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < ACT_DEPTH; a++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_OPS; i++) wdata[i] = 8'($urandom);
      waddr = ACT_AW'(a); we = 1'b1; shadow[a] = wdata;
      @(negedge clk);
      we = 1'b0;
    end
    for (int a = ACT_DEPTH - 1; a >= 0; a--)
      for (int b = 0; b < ACT_W; b++) begin
        raddr = ACT_AW'(a); rbit = 3'(b); #1;
        for (int i = 0; i < NUM_OPS; i++) begin
          checks++;
          if (plane[i] != shadow[a][i][b]) begin
            failures++; $display("FAIL vec %0d bit %0d op %0d", a, b, i);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
