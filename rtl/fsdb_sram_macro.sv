// fsdb_sram_macro: SRAM CiM macro of one hybrid bank.
//
// Holds the 144 trainable sign bits of the weights currently in use (one
// 6T cell each, modelled as flip-flops) and computes
//   sign_psum = sum_i act_i * sign_i
// with a LUT-based MAC engine: every pair of adjacent sign bits is pre-added,
// and a 4:1 multiplexer driven by the pair's two activation bits picks
// 0, sign0, sign1 or their pre-added sum (2 bits). The 72 pair results are
// reduced by a pruned adder tree whose nodes are capped at SIGN_SUM_W bits and
// drop their MSBs beyond that; the default of 5 bits is the published pruned
// width, exact while at most 31 products are one. Set SIGN_SUM_W to 8 for an
// exact tree. The published tree also narrows some inner stages; this tree
// caps only at the output width (a design choice: the result is then exactly
// the sum modulo 2**SIGN_SUM_W).
//
// Interface: reload (1 cycle) copies sg_row into the sign cells at the clock
// edge; act -> sign_psum is combinational. The cells reset to zero.
module fsdb_sram_macro
  import fsdb_pkg::*;
#(
  parameter int unsigned SIGN_SUM_W = SIGN_SUM_W_PRUNED
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  reload,
  input  logic [NUM_OPS-1:0]    sg_row,
  input  logic [NUM_OPS-1:0]    act,
  output logic [SIGN_SUM_W-1:0] sign_psum
);

  localparam int unsigned NPAIR = NUM_OPS / 2;

  logic [NUM_OPS-1:0] sign_q;

  logic [NPAIR-1:0][1:0] pair_out;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      sign_q <= '0;
    else if (reload) sign_q <= sg_row;

  for (genvar j = 0; j < NPAIR; j++) begin : g_pair
    logic [1:0] pre;
    assign pre = {1'b0, sign_q[2*j]} + {1'b0, sign_q[2*j+1]};
    always_comb
      unique case ({act[2*j+1], act[2*j]})
        2'b00:   pair_out[j] = 2'd0;
        2'b01:   pair_out[j] = {1'b0, sign_q[2*j]};
        2'b10:   pair_out[j] = {1'b0, sign_q[2*j+1]};
        default: pair_out[j] = pre;
      endcase
  end

  localparam int unsigned NAT_W = 2 + $clog2(NPAIR);
  localparam int unsigned TREE_W = (SIGN_SUM_W < NAT_W) ? SIGN_SUM_W : NAT_W;
  logic [TREE_W-1:0] tree_sum;

  fsdb_adder_tree #(.N(NPAIR), .IW(2), .OW(TREE_W)) u_tree (
    .in(pair_out), .sum(tree_sum));

  assign sign_psum = SIGN_SUM_W'(tree_sum);

endmodule
