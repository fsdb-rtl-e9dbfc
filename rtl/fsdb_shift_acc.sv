// fsdb_shift_acc: near-memory shift-and-accumulator of one hybrid bank.
//
// Two pipeline stages, as in the documented timing:
//   PSUM stage: psum <= mag_sh - sign_sh, the signed partial sum of one
//               cycle (the shifted ROM sum minus the shifted sign sum).
//   MAC stage:  mac  <= psum                 on the first cycle of a vector,
//               mac  <= 2*mac + psum         on the first cycle of a bit,
//               mac  <= mac + psum           on the second cycle of a bit
//                                             (W8A8 only).
// Activations arrive most significant bit first, so doubling the running sum
// before each new bit builds sum_i A_i * W_i. The control bits travel with the
// partial sum so the MAC stage uses those of the same cycle. A partial sum
// leaves one clock after its activation bit; the finished MAC is in `mac` two
// clocks after the last activation bit.
//
// Interface: step (valid/first/dbl used), mag_sh, sign_sh -> psum, mac
// (registers, reset to zero).
module fsdb_shift_acc
  import fsdb_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  step_t           step,
  input  logic [SH_W-1:0] mag_sh,
  input  logic [SH_W-1:0] sign_sh,
  output psum_t           psum,
  output mac_t            mac
);

  logic psum_valid, psum_first, psum_dbl;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      psum       <= '0;
      psum_valid <= 1'b0;
      psum_first <= 1'b0;
      psum_dbl   <= 1'b0;
    end else begin
      psum_valid <= step.valid;
      psum_first <= step.first;
      psum_dbl   <= step.dbl;
      if (step.valid) psum <= psum_t'(mag_sh) - psum_t'(sign_sh);
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mac <= '0;
    else if (psum_valid) begin
      if (psum_first)    mac <= mac_t'(psum);
      else if (psum_dbl) mac <= (mac <<< 1) + mac_t'(psum);
      else               mac <= mac + mac_t'(psum);
    end

endmodule
