// fsdb_wt_buf: weight buffer holding the trainable shift (sf) and sign (sg)
// bits of every bank.
//
// In the N:M hybrid mapping N ROM words share M SRAM words; with the 4:1 ratio
// chosen here the 256-word ROM is paired with WB_DEPTH = 64 rows of sf and sg
// bits. A row holds 144 bits for each of the 16 banks. The sf and sg stores
// have separate read addresses, so a ROM word can be combined with any shift
// row and any sign row. During the one-cycle reload the addressed rows are
// copied into the activation maskers (sf) and the SRAM CiM macros (sg).
//
// Interface: write (we, wsel 0 = sf / 1 = sg, waddr, wbank, wdata) at the
// clock edge; reads (sf_addr -> sf_rows, sg_addr -> sg_rows) combinational.
module fsdb_wt_buf
  import fsdb_pkg::*;
(
  input  logic                                clk,
  input  logic                                we,
  input  logic                                wsel,
  input  logic [WB_AW-1:0]                    waddr,
  input  logic [$clog2(NUM_BANKS)-1:0]        wbank,
  input  logic [NUM_OPS-1:0]                  wdata,
  input  logic [WB_AW-1:0]                    sf_addr,
  input  logic [WB_AW-1:0]                    sg_addr,
  output logic [NUM_BANKS-1:0][NUM_OPS-1:0]   sf_rows,
  output logic [NUM_BANKS-1:0][NUM_OPS-1:0]   sg_rows
);

  logic [NUM_BANKS-1:0][NUM_OPS-1:0] sf_mem [WB_DEPTH];
  logic [NUM_BANKS-1:0][NUM_OPS-1:0] sg_mem [WB_DEPTH];

  always_ff @(posedge clk)
    if (we && !wsel) sf_mem[waddr][wbank] <= wdata;

  always_ff @(posedge clk)
    if (we && wsel) sg_mem[waddr][wbank] <= wdata;

  assign sf_rows = sf_mem[sf_addr];
  assign sg_rows = sg_mem[sg_addr];

endmodule
