// fsdb_out_buf: 16 x 16 output buffer.
//
// OUT_DEPTH (16) rows, each holding the MAC results of the 16 banks for one
// activation vector (one output pixel, 16 output channels). A whole row is
// written in the cycle the banks' MAC registers hold finished results. The
// entry width (MAC_W = 24 bits, enough for 144 products of 8-bit activations
// and weights down to -64) is this design's choice.
//
// Interface: write (we, waddr, wdata) at the clock edge; read (raddr ->
// rdata) combinational.
module fsdb_out_buf
  import fsdb_pkg::*;
(
  input  logic                      clk,
  input  logic                      we,
  input  logic [OUT_AW-1:0]         waddr,
  input  mac_t [NUM_BANKS-1:0]      wdata,
  input  logic [OUT_AW-1:0]         raddr,
  output mac_t [NUM_BANKS-1:0]      rdata
);

  mac_t [NUM_BANKS-1:0] mem [OUT_DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
