// fsdb_pkg: geometry, shared types and the weight-encoding helpers of the FSDB
// hybrid compute-in-ROM/SRAM core.
//
// Geometry. The core has 16 CiM banks; each bank computes one 144-operand dot
// product (144 = 16 input channels x 3 x 3 kernel) per activation vector. Its
// ROM keeps 256 words of 144 three-bit magnitudes ("mag"); the shift ("sf")
// and sign ("sg") bits of each weight live in trainable SRAM.
//
// Weight encoding (folded store). With shift = 0 a weight is mag - 4*sign
// (values -4..7); with shift = 1 it is 8*(mag - 8*sign) (values -64..56).
// In W4A8 mode the shift bits are all zero and the sign carries weight 8, so
// the weight is the plain 4-bit two's complement value mag - 8*sign.
//
// Activations are unsigned 1..8-bit values, fed most significant bit first.
//
// The geometry and the pruned width below follow the published design; the
// widths of the job fields, the buffer depths and the ROM contents are this
// design's own choices.
package fsdb_pkg;

  // ---- geometry (published design) ----
  localparam int unsigned NUM_BANKS = 16;   // CiM banks / activation maskers
  localparam int unsigned NUM_OPS   = 144;  // operands per bank (16 x 3 x 3)
  localparam int unsigned ROM_DEPTH = 256;  // mags per ROM slice
  localparam int unsigned MAG_W     = 3;    // folded magnitude width
  localparam int unsigned ACT_W     = 8;    // activation precision (max)
  localparam int unsigned SIGN_SUM_W_PRUNED = 5; // pruned sign adder-tree output

  // ---- this design's choices ----
  localparam int unsigned NM_RATIO  = 4;    // ROM words per SRAM word (4:1)
  localparam int unsigned WB_DEPTH  = ROM_DEPTH / NM_RATIO; // sf/sg rows (M)
  localparam int unsigned ACT_DEPTH = 16;   // activation vectors buffered
  localparam int unsigned OUT_DEPTH = 16;   // output buffer rows ("16x16")

  localparam int unsigned ROM_AW = $clog2(ROM_DEPTH);
  localparam int unsigned WB_AW  = $clog2(WB_DEPTH);
  localparam int unsigned ACT_AW = $clog2(ACT_DEPTH);
  localparam int unsigned OUT_AW = $clog2(OUT_DEPTH);

  // Bit-plane sum of one mag bit over 144 operands: 0..144.
  localparam int unsigned CNT_W      = $clog2(NUM_OPS + 1);   // 8
  // ROM partial sum: sum of act_bit * mag, 0..144*7.
  localparam int unsigned MAG_PSUM_W = $clog2(NUM_OPS * 7 + 1); // 10
  // Shifted operands: mag psum << 3, sign sum << 7 at most.
  localparam int unsigned SH_W       = 16;
  // Signed partial sum of one cycle and the signed MAC result.
  localparam int unsigned PSUM_W     = 17;
  localparam int unsigned MAC_W      = 24;

  typedef logic signed [PSUM_W-1:0] psum_t;
  typedef logic signed [MAC_W-1:0]  mac_t;

  typedef enum logic {
    MODE_W4A8 = 1'b0,   // one cycle per activation bit
    MODE_W8A8 = 1'b1    // two cycles per activation bit (shifted, then not)
  } mode_e;

  // Per-cycle control broadcast to every masker and bank.
  typedef struct packed {
    logic       valid;      // an activation bit plane is being computed
    logic       msb;        // "MSB Ctrl": this is the first bit of a vector
    logic       first;      // first cycle of the vector: MAC restarts
    logic       dbl;        // first cycle of a bit: MAC doubles before adding
    logic       mask;       // "Mask Ctrl"
    logic [1:0] mag_shift;  // "Mag Shift"
    logic [2:0] sign_shift; // "Sign Shift"
  } step_t;

  // One job: a weight set (ROM word + sf/sg rows) applied to a run of
  // activation vectors, results written to consecutive output rows.
  typedef struct packed {
    mode_e             mode;
    logic [3:0]        abits;    // activation precision 1..8
    logic [ROM_AW-1:0] rom_addr;
    logic [WB_AW-1:0]  sf_addr;
    logic [WB_AW-1:0]  sg_addr;
    logic [ACT_AW-1:0] act_addr;
    logic [ACT_AW:0]   num_vec;  // 1..ACT_DEPTH
    logic [OUT_AW-1:0] out_addr;
  } job_t;

  // Decoded value of a folded-store weight (used by reference models).
  function automatic int signed fold_weight(logic [MAG_W-1:0] mag, logic sign,
                                            logic shift, mode_e mode);
    int signed m;
    m = int'(mag);
    if (mode == MODE_W4A8) return m - 8 * int'(sign);
    if (shift) return 8 * (m - 8 * int'(sign));
    return m - 4 * int'(sign);
  endfunction

  // ROM contents. The silicon ROM holds a trained network; this RTL fills it
  // with a fixed pseudo-random pattern (about half the mags zero) computed
  // from the bank, slice and word index by an xorshift mix, so that it
  // synthesizes to a look-up table of constant logic.
  function automatic logic [MAG_W-1:0] rom_mag(int unsigned seed, int unsigned bank,
                                               int unsigned slice, logic [ROM_AW-1:0] addr);
    logic [31:0] x;
    x = {8'h5A ^ addr, addr, 16'h0} ^ (seed * 32'h9E37_79B9) ^ (bank * 32'h85EB_CA6B)
        ^ (slice * 32'hC2B2_AE35) ^ {24'h0, addr};
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    x = x ^ (x >> 11);
    return x[3] ? x[2:0] : '0;
  endfunction

endpackage
