// tb_fsdb_ctrl: checks the global controller's sequence. For a W4A8 job
// followed back to back by a W8A8 job, and a reduced-precision job, it
// records every cycle's outputs and checks: one reload cycle per job with
// the job's sf/sg addresses; the ROM address held from the first streaming
// cycle; the bit order (MSB first) and vector addresses; the per-cycle Mask
// Ctrl / Mag Shift / Sign Shift / MSB Ctrl values of the documented timing;
// the second job accepted in the first job's last streaming cycle; and one
// output write per vector, two cycles after its last bit, to the right row.
module tb_fsdb_ctrl;
  import fsdb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic job_valid = 1'b0, job_ready;
  job_t job = '0;
  logic reload;
  logic [WB_AW-1:0] sf_addr, sg_addr;
  logic [ROM_AW-1:0] rom_addr;
  logic [ACT_AW-1:0] act_addr;
  logic [2:0] act_bit;
  step_t step;
  logic out_we;
  logic [OUT_AW-1:0] out_addr;
  logic busy;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fsdb_ctrl dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected event stream: for each job a reload, then per vector per bit
  // per phase one step, with writes two cycles after each vector's end.
  job_t jobs [3];
  int cyc = 0;
  int ji = 0, vi = 0, bi = 0, ph = 0;
  bit in_job = 0;
  int wr_due [$];
  int wr_row [$];
  int n_reload = 0, n_writes = 0, n_steps = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (out_we) begin
      n_writes++;
      chk("write due", (wr_due.size() > 0) ? wr_due[0] : -1, cyc);
      chk("write row", (wr_row.size() > 0) ? wr_row[0] : -1, int'(out_addr));
      if (wr_due.size() > 0) begin void'(wr_due.pop_front()); void'(wr_row.pop_front()); end
    end
    if (reload) begin
      n_reload++;
      chk("reload sf", int'(sf_addr), int'(jobs[ji].sf_addr));
      chk("reload sg", int'(sg_addr), int'(jobs[ji].sg_addr));
      chk("no step in reload", int'(step.valid), 0);
      in_job = 1; vi = 0; bi = int'(jobs[ji].abits) - 1; ph = 0;
    end else if (step.valid) begin
      automatic job_t j = jobs[ji];
      automatic bit w8 = (j.mode == MODE_W8A8);
      n_steps++;
      chk("in job", int'(in_job), 1);
      chk("rom addr", int'(rom_addr), int'(j.rom_addr));
      chk("act addr", int'(act_addr), (int'(j.act_addr) + vi) % ACT_DEPTH);
      chk("act bit", int'(act_bit), bi);
      chk("msb", int'(step.msb), int'(bi == int'(j.abits) - 1));
      chk("first", int'(step.first), int'(bi == int'(j.abits) - 1 && ph == 0));
      chk("dbl", int'(step.dbl), int'(ph == 0));
      chk("mask", int'(step.mask), int'(w8 && ph == 0));
      chk("mag shift", int'(step.mag_shift), (w8 && ph == 0) ? 3 : 0);
      chk("sign shift", int'(step.sign_shift), !w8 ? 3 : (ph == 0 ? 6 : 2));
      if (w8 && ph == 0) ph = 1;
      else begin
        ph = 0;
        if (bi > 0) bi--;
        else begin
          wr_due.push_back(cyc + 2);
          wr_row.push_back((int'(j.out_addr) + vi) % OUT_DEPTH);
          vi++;
          bi = int'(j.abits) - 1;
          if (vi == int'(j.num_vec)) begin
            chk("ready in last cycle", int'(job_ready), 1);
            in_job = 0; ji++;
          end else chk("not ready mid-job", int'(job_ready), 0);
        end
      end
    end
  end

  initial begin
    int acc_cyc [3];
    jobs[0] = '{mode: MODE_W4A8, abits: 4'd8, rom_addr: 8'd21, sf_addr: 6'd3, sg_addr: 6'd9,
                act_addr: 4'd14, num_vec: 5'd3, out_addr: 4'd15};
    jobs[1] = '{mode: MODE_W8A8, abits: 4'd8, rom_addr: 8'd250, sf_addr: 6'd63, sg_addr: 6'd1,
                act_addr: 4'd2, num_vec: 5'd2, out_addr: 4'd4};
    jobs[2] = '{mode: MODE_W8A8, abits: 4'd3, rom_addr: 8'd7, sf_addr: 6'd0, sg_addr: 6'd33,
                act_addr: 4'd0, num_vec: 5'd4, out_addr: 4'd0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      job_valid = 1'b1; job = jobs[k];
      do @(posedge clk); while (!job_ready);
      acc_cyc[k] = cyc;
      @(negedge clk);
      job_valid = 1'b0;
      if (k == 0) begin
        // offer the next job right away: it must wait for the last cycle
        continue;
      end
      if (k == 1) wait (!busy);
    end
    wait (!busy);
    repeat (2) @(posedge clk);
    chk("job1 accepted after job0 streamed", acc_cyc[1] - acc_cyc[0], 1 + 3 * 8);
    chk("reloads", n_reload, 3);
    chk("steps", n_steps, 3 * 8 + 2 * 16 + 4 * 6);
    chk("writes", n_writes, 9);
    chk("all writes seen", wr_due.size(), 0);
    chk("idle ready", int'(job_ready), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
