// fsdb_top: the FSDB hybrid compute-in-ROM/SRAM core.
//
// Sixteen hybrid CiM banks each compute one 144-term dot product between an
// activation vector (16 channels x 3 x 3, unsigned, fed bit-serially) and a
// kernel whose 3-bit magnitudes sit in ROM and whose sign and shift bits sit
// in trainable SRAM. Retraining only the sign/shift bits turns one stored
// magnitude M into M, M-4, 8M or 8(M-8), which is what lets fixed ROM weights
// serve new kernels and new networks.
//
// Data path per cycle: the controller selects one activation bit plane from
// the activation buffer; it is broadcast to the sixteen activation maskers,
// each of which gates it with its bank's shift bits and Mask Ctrl; each bank's
// ROM and SRAM macros sum the masked bits against the magnitudes and signs,
// the two sums are shifted and subtracted into a partial sum (PSUM stage) and
// accumulated (MAC stage). A vector takes `abits` cycles in W4A8 mode and
// 2*`abits` cycles in W8A8 mode; results reach the output buffer two cycles
// after its last bit. Switching to another weight set costs one reload cycle.
//
// The wordline drivers, I/O pads and the BF16 floating-point macro of the
// full chip are not part of this RTL; the buffers' write and read ports are
// brought out instead.
//
// Interface: activation-buffer write port (act_*), weight-buffer write port
// (wt_*), job handshake (job_valid/job_ready/job), busy, output-buffer read
// port (out_raddr/out_rdata) and a pulse out_we marking each written row
// (out_waddr). Synchronous to clk, active-low asynchronous reset rst_n.
module fsdb_top
  import fsdb_pkg::*;
#(
  parameter int unsigned ROM_SEED   = 1,
  parameter int unsigned SIGN_SUM_W = SIGN_SUM_W_PRUNED
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // activation buffer write
  input  logic                           act_we,
  input  logic [ACT_AW-1:0]              act_waddr,
  input  logic [NUM_OPS-1:0][ACT_W-1:0]  act_wdata,
  // weight buffer write (wt_sel: 0 = shift bits, 1 = sign bits)
  input  logic                           wt_we,
  input  logic                           wt_sel,
  input  logic [WB_AW-1:0]               wt_waddr,
  input  logic [$clog2(NUM_BANKS)-1:0]   wt_wbank,
  input  logic [NUM_OPS-1:0]             wt_wdata,
  // jobs
  input  logic                           job_valid,
  output logic                           job_ready,
  input  job_t                           job,
  output logic                           busy,
  // results
  output logic                           out_we,
  output logic [OUT_AW-1:0]              out_waddr,
  input  logic [OUT_AW-1:0]              out_raddr,
  output mac_t [NUM_BANKS-1:0]           out_rdata
);

  logic                              reload;
  logic [WB_AW-1:0]                  sf_addr, sg_addr;
  logic [ROM_AW-1:0]                 rom_addr;
  logic [ACT_AW-1:0]                 act_addr;
  logic [$clog2(ACT_W)-1:0]          act_bit;
  step_t                             step;
  logic [NUM_OPS-1:0]                plane;
  logic [NUM_BANKS-1:0][NUM_OPS-1:0] sf_rows, sg_rows;
  logic [NUM_BANKS-1:0][NUM_OPS-1:0] masked;
  mac_t [NUM_BANKS-1:0]              mac;
  psum_t [NUM_BANKS-1:0]             psum;

  fsdb_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .job_valid(job_valid), .job_ready(job_ready),
    .job(job), .reload(reload), .sf_addr(sf_addr), .sg_addr(sg_addr),
    .rom_addr(rom_addr), .act_addr(act_addr), .act_bit(act_bit), .step(step),
    .out_we(out_we), .out_addr(out_waddr), .busy(busy));

  fsdb_act_buf u_act_buf (
    .clk(clk), .we(act_we), .waddr(act_waddr), .wdata(act_wdata),
    .raddr(act_addr), .rbit(act_bit), .plane(plane));

  fsdb_wt_buf u_wt_buf (
    .clk(clk), .we(wt_we), .wsel(wt_sel), .waddr(wt_waddr), .wbank(wt_wbank),
    .wdata(wt_wdata), .sf_addr(sf_addr), .sg_addr(sg_addr),
    .sf_rows(sf_rows), .sg_rows(sg_rows));

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    fsdb_act_masker u_masker (
      .clk(clk), .rst_n(rst_n), .reload(reload), .sf_row(sf_rows[b]),
      .mask(step.mask), .act(plane), .masked_act(masked[b]));

    fsdb_bank #(.SEED(ROM_SEED), .BANK(b), .SIGN_SUM_W(SIGN_SUM_W)) u_bank (
      .clk(clk), .rst_n(rst_n), .reload(reload), .sg_row(sg_rows[b]),
      .rom_addr(rom_addr), .step(step), .masked_act(masked[b]),
      .psum(psum[b]), .mac(mac[b]));
  end

  fsdb_out_buf u_out_buf (
    .clk(clk), .we(out_we), .waddr(out_waddr), .wdata(mac),
    .raddr(out_raddr), .rdata(out_rdata));

endmodule
