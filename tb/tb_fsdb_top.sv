// tb_fsdb_top: end-to-end test of the FSDB core at its default size
// (16 banks x 144 operands, 256-word ROM, 5-bit pruned sign tree).
//
// The testbench loads shift/sign rows and activation vectors, issues a series
// of jobs and compares every result row with a reference computed here from
// the folded-store weight definition:
//   job 0  W4A8, 8-bit activations, 4 vectors (shift row all zero)
//   job 1  W8A8, 8-bit activations, 3 vectors, accepted back-to-back in the
//          last streaming cycle of job 0 (one reload cycle in between)
//   job 2  W8A8, 4-bit activations, 2 vectors
//   job 3  W4A8, 8-bit activations, dense signs: the pruned sign adder tree
//          wraps, and the result must follow the modulo-32 sign sum
// It also checks the latency of the first result of a job (reload + bits +
// two pipeline stages), the spacing of later results, and counts how often
// each mechanism occurred (both modes, reloads, Mask Ctrl high, reduced
// precision, MSB Ctrl, tree wrap); one that never occurred is a failure.
module tb_fsdb_top;
  import fsdb_pkg::*;

  localparam int unsigned SEED = 1;   // the top's default ROM seed
  localparam int unsigned SSW  = SIGN_SUM_W_PRUNED;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                          act_we = 1'b0;
  logic [ACT_AW-1:0]             act_waddr = '0;
  logic [NUM_OPS-1:0][ACT_W-1:0] act_wdata = '0;
  logic                          wt_we = 1'b0, wt_sel = 1'b0;
  logic [WB_AW-1:0]              wt_waddr = '0;
  logic [$clog2(NUM_BANKS)-1:0]  wt_wbank = '0;
  logic [NUM_OPS-1:0]            wt_wdata = '0;
  logic                          job_valid = 1'b0;
  logic                          job_ready;
  job_t                          job = '0;
  logic                          busy;
  logic                          out_we;
  logic [OUT_AW-1:0]             out_waddr;
  logic [OUT_AW-1:0]             out_raddr = '0;
  mac_t [NUM_BANKS-1:0]          out_rdata;

  fsdb_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Shadow copies of what was loaded.
  logic [NUM_OPS-1:0][ACT_W-1:0]     act_mem [ACT_DEPTH];
  logic [NUM_BANKS-1:0][NUM_OPS-1:0] sf_mem  [WB_DEPTH];
  logic [NUM_BANKS-1:0][NUM_OPS-1:0] sg_mem  [WB_DEPTH];

  // Expected rows, filled when a job is issued.
  longint exp_row   [OUT_DEPTH][NUM_BANKS];
  longint exact_row [OUT_DEPTH][NUM_BANKS];

  // Mechanism counters.
  int n_w4 = 0, n_w8 = 0, n_reload = 0, n_mask = 0, n_lowbits = 0, n_msb = 0;
  int n_wrap = 0, n_b2b = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.reload) n_reload++;
    if (dut.u_ctrl.step.valid && dut.u_ctrl.step.mask) n_mask++;
    if (dut.u_ctrl.step.valid && dut.u_ctrl.step.msb) n_msb++;
  end

  task automatic write_act(int a, logic [NUM_OPS-1:0][ACT_W-1:0] d);
    @(negedge clk);
    act_we = 1'b1; act_waddr = ACT_AW'(a); act_wdata = d;
    @(negedge clk);
    act_we = 1'b0;
    act_mem[a] = d;
  endtask

  task automatic write_wt(bit sel, int row, int bank, logic [NUM_OPS-1:0] d);
    @(negedge clk);
    wt_we = 1'b1; wt_sel = sel; wt_waddr = WB_AW'(row); wt_wbank = 4'(bank); wt_wdata = d;
    @(negedge clk);
    wt_we = 1'b0;
    if (sel) sg_mem[row][bank] = d; else sf_mem[row][bank] = d;
  endtask

  // Random bit row with about one bit in `den` set (den = 1: all set,
  // den = 0: none).
  function automatic logic [NUM_OPS-1:0] rand_row(int den);
    logic [NUM_OPS-1:0] r;
    for (int i = 0; i < NUM_OPS; i++)
      r[i] = (den == 0) ? 1'b0 : (($urandom % den) == 0);
    return r;
  endfunction

  // Reference for one job: exact dot products, and the value the pruned
  // sign tree produces (sign sums taken modulo 2**SSW per cycle).
  task automatic compute_expected(job_t j);
    for (int v = 0; v < int'(j.num_vec); v++) begin
      int a_idx = (int'(j.act_addr) + v) % ACT_DEPTH;
      int row   = (int'(j.out_addr) + v) % OUT_DEPTH;
      for (int b = 0; b < NUM_BANKS; b++) begin
        longint exact = 0, pruned = 0;
        int unsigned amask = (1 << j.abits) - 1;
        for (int i = 0; i < NUM_OPS; i++) begin
          int unsigned a = int'(act_mem[a_idx][i]) & amask;
          exact += longint'(a) * fold_weight(rom_mag(SEED, b, i, j.rom_addr),
                                             sg_mem[j.sg_addr][b][i],
                                             sf_mem[j.sf_addr][b][i], j.mode);
        end
        for (int bit_i = int'(j.abits) - 1; bit_i >= 0; bit_i--) begin
          for (int ph = 0; ph < ((j.mode == MODE_W8A8) ? 2 : 1); ph++) begin
            // ph 0 in W8A8: shifted weights; ph 1: the others; W4A8: all.
            longint msum = 0, ssum = 0;
            int ms, ss;
            for (int i = 0; i < NUM_OPS; i++) begin
              bit sfb = sf_mem[j.sf_addr][b][i];
              bit pass = (j.mode == MODE_W4A8) ? 1'b1 : ((ph == 0) ? sfb : !sfb);
              bit ab = act_mem[a_idx][i][bit_i] && pass;
              if (ab) begin
                msum += rom_mag(SEED, b, i, j.rom_addr);
                ssum += sg_mem[j.sg_addr][b][i];
              end
            end
            if (ssum >= (1 << SSW)) n_wrap++;
            ssum = ssum % (1 << SSW);
            if (j.mode == MODE_W4A8) begin ms = 0; ss = 3; end
            else if (ph == 0)        begin ms = 3; ss = 6; end
            else                     begin ms = 0; ss = 2; end
            pruned += ((msum << ms) - (ssum << ss)) << bit_i;
          end
        end
        exp_row[row][b]   = pruned;
        exact_row[row][b] = exact;
      end
    end
  endtask

  // Issue a job: wait for ready, hold valid for the accepting edge.
  int accept_cycle [4];
  task automatic issue(int k, job_t j);
    compute_expected(j);
    if (j.mode == MODE_W8A8) n_w8++; else n_w4++;
    if (j.abits < 8) n_lowbits++;
    @(negedge clk);
    job_valid = 1'b1; job = j;
    do @(posedge clk); while (!job_ready);
    accept_cycle[k] = cycle;
    if (busy && k > 0) n_b2b++;
    @(negedge clk);
    job_valid = 1'b0;
  endtask

  // Result monitor: compare each written row, and the timing of writes.
  int writes [$];
  always @(posedge clk) if (rst_n && out_we) writes.push_back(cycle);

  task automatic check_rows(int first_row, int n, bit want_exact);
    for (int r = first_row; r < first_row + n; r++) begin
      @(negedge clk);
      out_raddr = OUT_AW'(r);
      #1;
      for (int b = 0; b < NUM_BANKS; b++) begin
        checks++;
        if (longint'(out_rdata[b]) != exp_row[r][b]) begin
          failures++;
          $display("FAIL row %0d bank %0d: got %0d expected %0d", r, b, out_rdata[b], exp_row[r][b]);
        end
        if (want_exact) begin
          checks++;
          if (exp_row[r][b] != exact_row[r][b]) begin
            failures++;
            $display("FAIL row %0d bank %0d: pruned %0d differs from exact %0d", r, b,
                     exp_row[r][b], exact_row[r][b]);
          end
        end
      end
    end
  endtask

  task automatic check_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    job_t j0, j1, j2, j3;
    logic [NUM_OPS-1:0][ACT_W-1:0] av;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Weight rows: row 0 shift bits all zero (W4A8), row 5 random shift bits;
    // sparse signs in rows 1 and 2, dense signs in row 3.
    for (int b = 0; b < NUM_BANKS; b++) begin
      write_wt(1'b0, 0, b, rand_row(0));
      write_wt(1'b0, 5, b, rand_row(2));
      write_wt(1'b1, 1, b, rand_row(12));
      write_wt(1'b1, 2, b, rand_row(12));
      write_wt(1'b1, 3, b, rand_row(1));
    end
    // Activation vectors 0..9 random; vector 10 all ones (255).
    for (int a = 0; a < 10; a++) begin
      for (int i = 0; i < NUM_OPS; i++)
        begin automatic int unsigned r = $urandom; av[i] = (r % 3 == 0) ? 8'd0 : r[15:8]; end
      write_act(a, av);
    end
    for (int i = 0; i < NUM_OPS; i++) av[i] = 8'hFF;
    write_act(10, av);

    j0 = '{mode: MODE_W4A8, abits: 4'd8, rom_addr: 8'd17, sf_addr: 6'd0, sg_addr: 6'd1,
           act_addr: 4'd0, num_vec: 5'd4, out_addr: 4'd0};
    j1 = '{mode: MODE_W8A8, abits: 4'd8, rom_addr: 8'd200, sf_addr: 6'd5, sg_addr: 6'd2,
           act_addr: 4'd4, num_vec: 5'd3, out_addr: 4'd4};
    j2 = '{mode: MODE_W8A8, abits: 4'd4, rom_addr: 8'd3, sf_addr: 6'd5, sg_addr: 6'd1,
           act_addr: 4'd7, num_vec: 5'd2, out_addr: 4'd7};
    j3 = '{mode: MODE_W4A8, abits: 4'd8, rom_addr: 8'd99, sf_addr: 6'd0, sg_addr: 6'd3,
           act_addr: 4'd10, num_vec: 5'd1, out_addr: 4'd9};

    // Jobs 0 and 1 back to back.
    n_wrap = 0;
    issue(0, j0);
    issue(1, j1);
    wait (!busy);
    check_eq("wrap-free sparse jobs", n_wrap, 0);
    check_rows(0, 4, 1'b1);
    check_rows(4, 3, 1'b1);
    // Timing: first result of job 0 after reload + 8 bits + 2 stages,
    // then one result every 8 cycles; job 1 follows after one reload cycle.
    check_eq("job0 first result latency", writes[0] - accept_cycle[0], 1 + 8 + 2);
    for (int k = 1; k < 4; k++) check_eq("job0 result spacing", writes[k] - writes[k-1], 8);
    check_eq("job1 accepted in last streaming cycle", accept_cycle[1] - accept_cycle[0], 1 + 4 * 8);
    check_eq("job1 first result after reload", writes[4] - writes[3], 1 + 16);
    for (int k = 5; k < 7; k++) check_eq("job1 result spacing", writes[k] - writes[k-1], 16);

    // Job 2: reduced precision.
    issue(2, j2);
    wait (!busy);
    check_rows(7, 2, 1'b1);
    check_eq("job2 first result latency", writes[7] - accept_cycle[2], 1 + 2 * 4 + 2);

    // Job 3: dense signs wrap the pruned tree.
    n_wrap = 0;
    issue(3, j3);
    wait (!busy);
    check_rows(9, 1, 1'b0);
    checks++;
    if (n_wrap == 0) begin
      failures++;
      $display("FAIL job3 did not exercise the tree wrap");
    end

    check_eq("rows written", writes.size(), 10);

    // Mechanism coverage.
    $display("mechanisms: W4A8 jobs=%0d W8A8 jobs=%0d reloads=%0d back-to-back=%0d mask-high=%0d low-precision jobs=%0d MSB=%0d wrap cycles=%0d",
             n_w4, n_w8, n_reload, n_b2b, n_mask, n_lowbits, n_msb, n_wrap);
    checks++; if (n_w4 == 0)      begin failures++; $display("FAIL no W4A8 job"); end
    checks++; if (n_w8 == 0)      begin failures++; $display("FAIL no W8A8 job"); end
    checks++; if (n_reload != 4)  begin failures++; $display("FAIL reload count %0d", n_reload); end
    checks++; if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back job"); end
    checks++; if (n_mask == 0)    begin failures++; $display("FAIL Mask Ctrl never high"); end
    checks++; if (n_lowbits == 0) begin failures++; $display("FAIL no reduced-precision job"); end
    checks++; if (n_msb == 0)     begin failures++; $display("FAIL MSB Ctrl never high"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
