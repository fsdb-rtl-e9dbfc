// tb_fsdb_barrel_shift: exhaustive check of the magnitude shifter (10-bit
// input, shift 0..3) and of the sign shifter (5-bit input, shift 0..7)
// against the shift operator.
module tb_fsdb_barrel_shift;
  logic [9:0]  mdin;
  logic [1:0]  msh;
  logic [15:0] mdout;
  logic [4:0]  sdin;
  logic [2:0]  ssh;
  logic [15:0] sdout;
  int checks = 0, failures = 0;

  fsdb_barrel_shift #(.IW(10), .SW(2), .OW(16)) u_mag  (.din(mdin), .sh(msh), .dout(mdout));
  fsdb_barrel_shift #(.IW(5),  .SW(3), .OW(16)) u_sign (.din(sdin), .sh(ssh), .dout(sdout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++)
      for (int s = 0; s < 4; s++) begin
        mdin = 10'(v); msh = 2'(s); #1;
        checks++;
        if (int'(mdout) != (v << s)) begin failures++; $display("FAIL mag %0d<<%0d = %0d", v, s, mdout); end
      end
    for (int v = 0; v < 32; v++)
      for (int s = 0; s < 8; s++) begin
        sdin = 5'(v); ssh = 3'(s); #1;
        checks++;
        if (int'(sdout) != (v << s)) begin failures++; $display("FAIL sign %0d<<%0d = %0d", v, s, sdout); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
