// fsdb_ctrl: global controller of the FSDB core.
//
// Accepts jobs (fsdb_pkg::job_t) on a valid/ready handshake. A job names a
// ROM word, a shift row and a sign row (separate addresses, as the N:M
// mapping allows), a mode, an activation precision and a run of activation
// vectors. For each job the controller
//   1. spends one cycle reloading the sf/sg cells of all banks from the
//      weight buffer and latching the new ROM address (no activation is fed
//      in that cycle), then
//   2. streams every vector bit-serially, MSB first, issuing per cycle the
//      step controls: MSB Ctrl on the first bit, and
//        W4A8: one cycle per bit, Mask Ctrl low, Mag Shift 0, Sign Shift 3;
//        W8A8: two cycles per bit, first Mask Ctrl high with Mag/Sign Shift
//              3/6 (shifted weights), then Mask Ctrl low with 0/2.
//   3. writes the sixteen finished MACs of a vector to the output buffer two
//      cycles after the vector's last bit (the PSUM and MAC pipeline stages).
// The next job is accepted in the last streaming cycle of the current one, so
// consecutive jobs are separated by exactly the one reload cycle; the MACs of
// the last vector still drain through the pipeline during that cycle.
// The shift amounts, the one-cycle reload and the two-stage pipeline follow
// the documented timing; the job format and the handshake are this design's.
//
// Interface: job_valid/job_ready/job; reload, sf_addr, sg_addr (weight buffer
// and cells), rom_addr (held ROM wordline address), act_addr/act_bit (bit
// plane read), step (per-cycle bank control), out_we/out_addr; busy is high
// until the last result is written.
module fsdb_ctrl
  import fsdb_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       job_valid,
  output logic                       job_ready,
  input  job_t                       job,
  output logic                       reload,
  output logic [WB_AW-1:0]           sf_addr,
  output logic [WB_AW-1:0]           sg_addr,
  output logic [ROM_AW-1:0]          rom_addr,
  output logic [ACT_AW-1:0]          act_addr,
  output logic [$clog2(ACT_W)-1:0]   act_bit,
  output step_t                      step,
  output logic                       out_we,
  output logic [OUT_AW-1:0]          out_addr,
  output logic                       busy
);

  typedef enum logic [1:0] {S_IDLE, S_RELOAD, S_RUN} state_e;

  state_e            state_q;
  job_t              job_q;
  logic [ACT_AW:0]   vec_q;
  logic [3:0]        bit_q;
  logic              phase_q;    // W8A8: 0 = shifted cycle, 1 = non-shifted
  logic [ROM_AW-1:0] rom_addr_q;
  logic              wr_d1, wr_d2;
  logic [OUT_AW-1:0] row_d1, row_d2;

  logic w8, last_cycle_of_bit, last_bit, last_vec, accept;

  assign w8                = (job_q.mode == MODE_W8A8);
  assign last_cycle_of_bit = !w8 || phase_q;
  assign last_bit          = (bit_q == 4'd0) && last_cycle_of_bit;
  assign last_vec          = (vec_q == job_q.num_vec - 1'b1);

  assign job_ready = (state_q == S_IDLE) || (state_q == S_RUN && last_bit && last_vec);
  assign accept    = job_valid && job_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state_q    <= S_IDLE;
      job_q      <= '0;
      vec_q      <= '0;
      bit_q      <= '0;
      phase_q    <= 1'b0;
      rom_addr_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (accept) begin
          job_q   <= job;
          state_q <= S_RELOAD;
        end
        S_RELOAD: begin
          rom_addr_q <= job_q.rom_addr;
          vec_q      <= '0;
          bit_q      <= job_q.abits - 1'b1;
          phase_q    <= 1'b0;
          state_q    <= S_RUN;
        end
        S_RUN: begin
          if (w8 && !phase_q) phase_q <= 1'b1;
          else begin
            phase_q <= 1'b0;
            if (bit_q != 4'd0) bit_q <= bit_q - 1'b1;
            else begin
              bit_q <= job_q.abits - 1'b1;
              if (!last_vec) vec_q <= vec_q + 1'b1;
              else if (accept) begin
                job_q   <= job;
                state_q <= S_RELOAD;
              end else state_q <= S_IDLE;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end

  // Result write-back, delayed by the PSUM and MAC stages.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_d1  <= 1'b0;
      wr_d2  <= 1'b0;
      row_d1 <= '0;
      row_d2 <= '0;
    end else begin
      wr_d1  <= (state_q == S_RUN) && last_bit;
      row_d1 <= job_q.out_addr + OUT_AW'(vec_q);
      wr_d2  <= wr_d1;
      row_d2 <= row_d1;
    end

  always_comb begin
    step = '0;
    if (state_q == S_RUN) begin
      step.valid      = 1'b1;
      step.msb        = (bit_q == job_q.abits - 1'b1);
      step.first      = step.msb && !phase_q;
      step.dbl        = !phase_q;
      step.mask       = w8 && !phase_q;
      step.mag_shift  = (w8 && !phase_q) ? 2'd3 : 2'd0;
      step.sign_shift = !w8 ? 3'd3 : (!phase_q ? 3'd6 : 3'd2);
    end
  end

  assign reload   = (state_q == S_RELOAD);
  assign sf_addr  = job_q.sf_addr;
  assign sg_addr  = job_q.sg_addr;
  assign rom_addr = rom_addr_q;
  assign act_addr = job_q.act_addr + ACT_AW'(vec_q);
  assign act_bit  = bit_q[$clog2(ACT_W)-1:0];
  assign out_we   = wr_d2;
  assign out_addr = row_d2;
  assign busy     = (state_q != S_IDLE) || wr_d1 || wr_d2;

  // Handshake and job rules.
  a_job_abits: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> (job.abits >= 4'd1 && job.abits <= 4'(ACT_W)));
  a_job_nvec: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> (job.num_vec >= 1 && job.num_vec <= (ACT_AW+1)'(ACT_DEPTH)));
  a_job_stable: assert property (@(posedge clk) disable iff (!rst_n)
    job_valid && !job_ready |=> job_valid && $stable(job));

endmodule
