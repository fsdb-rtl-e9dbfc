// fsdb_act_buf: activation buffer.
//
// Holds ACT_DEPTH input activation vectors of NUM_OPS (144) unsigned 8-bit
// activations (16 channels x 3 x 3 window) and serves them bit-serially: the
// read port returns bit `rbit` of every activation of vector `raddr`, the bit
// plane that is broadcast to all sixteen activation maskers in one cycle.
// The depth and the one-vector-per-cycle write port are this design's
// choices; only the buffer's role is given by the architecture.
//
// Interface: write (we, waddr, wdata) takes effect at the clock edge; the
// bit-plane read (raddr, rbit -> plane) is combinational.
module fsdb_act_buf
  import fsdb_pkg::*;
(
  input  logic                            clk,
  input  logic                            we,
  input  logic [ACT_AW-1:0]               waddr,
  input  logic [NUM_OPS-1:0][ACT_W-1:0]   wdata,
  input  logic [ACT_AW-1:0]               raddr,
  input  logic [$clog2(ACT_W)-1:0]        rbit,
  output logic [NUM_OPS-1:0]              plane
);

  logic [NUM_OPS-1:0][ACT_W-1:0] mem [ACT_DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_comb
    for (int i = 0; i < NUM_OPS; i++) plane[i] = mem[raddr][i][rbit];

endmodule
