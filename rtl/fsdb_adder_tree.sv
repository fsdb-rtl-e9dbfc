// fsdb_adder_tree: combinational binary adder tree over N unsigned operands.
//
// The operands are padded with zeros to the next power of two and added
// pairwise, level by level, until one sum remains (ceil(log2 N) adder levels).
// Every node is OW bits wide and drops any carry beyond OW bits. With OW at
// least IW + clog2(N) the sum is exact; with a smaller OW the result is the
// exact sum modulo 2**OW. The smaller setting models the sparse pruning adder
// tree of the SRAM CiM macro, which discards MSBs and relies on sparse
// activations and signs to keep its sums in range. Synthesis trims the upper
// bits of the low levels, which can never be set.
//
// Interface: in[N] (IW bits each) -> sum (OW bits). Purely combinational.
module fsdb_adder_tree #(
  parameter int unsigned N  = 144,
  parameter int unsigned IW = 1,
  parameter int unsigned OW = 8
) (
  input  logic [N-1:0][IW-1:0] in,
  output logic [OW-1:0]        sum
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned P      = 1 << LEVELS;

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned CNT = P >> l;
    logic [CNT-1:0][OW-1:0] s;
    for (genvar i = 0; i < CNT; i++) begin : g_node
      if (l == 0) begin : g_leaf
        if (i < N) begin : g_op
          if (OW >= IW) begin : g_ext
            assign s[i] = {{(OW-IW){1'b0}}, in[i]};
          end else begin : g_cut
            assign s[i] = in[i][OW-1:0];
          end
        end else begin : g_pad
          assign s[i] = '0;
        end
      end else begin : g_add
        assign s[i] = g_lvl[l-1].s[2*i] + g_lvl[l-1].s[2*i+1];
      end
    end
  end

  assign sum = g_lvl[LEVELS].s[0];

endmodule
