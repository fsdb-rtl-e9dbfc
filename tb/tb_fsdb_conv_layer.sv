// tb_fsdb_conv_layer: runs a whole 3x3 convolution layer on the default-size
// core and checks it against a direct convolution.
//
// Layer: 16 input channels, 16 output channels (one per bank), 7 x 7 feature
// map (the smallest map size of the ResNet layers the core targets), stride 1,
// zero padding 1, unsigned 8-bit activations with about a third zeros. Weight
// (o, c, ky, kx) is operand c*9 + ky*3 + kx of bank o; its magnitude comes
// from one ROM word, its sign and shift bits from the chosen SRAM rows.
//
// The layer is run three times with the same ROM word:
//   pass 0  W8A8 with sign/shift rows set A
//   pass 1  W8A8 with sign/shift rows set B - a "retrained" kernel built from
//           the same fixed magnitudes; its outputs must differ from pass 0
//   pass 2  W4A8 (shift row all zero)
// Each pass is cut into jobs of up to 16 output pixels (the activation buffer
// depth): 49 pixels = 4 jobs. The testbench im2col-packs each pixel's 3 x 3 x 16
// window into an activation vector; the reference is computed directly from
// the feature map with nested loops. Compute and reload cycles are counted.
module tb_fsdb_conv_layer;
  import fsdb_pkg::*;

  localparam int H = 7, W = 7, C = 16, K = 3;
  localparam int NPIX = H * W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                          act_we = 1'b0;
  logic [ACT_AW-1:0]             act_waddr = '0;
  logic [NUM_OPS-1:0][ACT_W-1:0] act_wdata = '0;
  logic                          wt_we = 1'b0, wt_sel = 1'b0;
  logic [WB_AW-1:0]              wt_waddr = '0;
  logic [$clog2(NUM_BANKS)-1:0]  wt_wbank = '0;
  logic [NUM_OPS-1:0]            wt_wdata = '0;
  logic                          job_valid = 1'b0;
  logic                          job_ready;
  job_t                          job = '0;
  logic                          busy;
  logic                          out_we;
  logic [OUT_AW-1:0]             out_waddr;
  logic [OUT_AW-1:0]             out_raddr = '0;
  mac_t [NUM_BANKS-1:0]          out_rdata;

  fsdb_top dut (.*);

  int checks = 0, failures = 0;

  logic [7:0] fmap [C][H][W];
  logic [NUM_BANKS-1:0][NUM_OPS-1:0] sf_rows [3];
  logic [NUM_BANKS-1:0][NUM_OPS-1:0] sg_rows [3];
  longint result [3][NUM_BANKS][NPIX];
  int n_valid = 0, n_reload = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.step.valid) n_valid++;
    if (dut.u_ctrl.reload) n_reload++;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [ROM_AW-1:0] ROM_WORD = 8'd42;
  // SRAM rows: set A at rows 10/11, set B at 20/21, zero shift row at 30.
  localparam int SF_ROW [3] = '{10, 20, 30};
  localparam int SG_ROW [3] = '{11, 21, 11};

  function automatic int weight(int pass, int o, int i);
    return fold_weight(rom_mag(1, o, i, ROM_WORD), sg_rows[pass][o][i], sf_rows[pass][o][i],
                       (pass == 2) ? MODE_W4A8 : MODE_W8A8);
  endfunction

  task automatic write_wt(bit sel, int row, int bank, logic [NUM_OPS-1:0] d);
    @(negedge clk);
    wt_we = 1'b1; wt_sel = sel; wt_waddr = WB_AW'(row); wt_wbank = 4'(bank); wt_wdata = d;
    @(negedge clk);
    wt_we = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int c = 0; c < C; c++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          begin automatic int unsigned r = $urandom; fmap[c][y][x] = (r % 3 == 0) ? 8'd0 : r[15:8]; end

    for (int b = 0; b < NUM_BANKS; b++) begin
      for (int i = 0; i < NUM_OPS; i++) begin
        sf_rows[0][b][i] = 1'(($urandom % 4) == 0);
        sg_rows[0][b][i] = 1'(($urandom % 16) == 0);
        sf_rows[1][b][i] = 1'(($urandom % 4) == 0);
        sg_rows[1][b][i] = 1'(($urandom % 16) == 0);
        sf_rows[2][b][i] = 1'b0;
      end
      sg_rows[2][b] = sg_rows[0][b];
      for (int p = 0; p < 3; p++) begin
        write_wt(1'b0, SF_ROW[p], b, sf_rows[p][b]);
        if (p < 2) write_wt(1'b1, SG_ROW[p], b, sg_rows[p][b]);
      end
    end

    for (int pass = 0; pass < 3; pass++) begin
      for (int p0 = 0; p0 < NPIX; p0 += ACT_DEPTH) begin
        automatic int n = (NPIX - p0 < ACT_DEPTH) ? NPIX - p0 : ACT_DEPTH;
        automatic job_t j;
        // im2col: one activation vector per output pixel
        for (int v = 0; v < n; v++) begin
          automatic int py = (p0 + v) / W, px = (p0 + v) % W;
          @(negedge clk);
          for (int c = 0; c < C; c++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++) begin
                automatic int yy = py + ky - 1, xx = px + kx - 1;
                act_wdata[c*9 + ky*3 + kx] =
                  (yy < 0 || yy >= H || xx < 0 || xx >= W) ? 8'd0 : fmap[c][yy][xx];
              end
          act_we = 1'b1; act_waddr = ACT_AW'(v);
          @(negedge clk);
          act_we = 1'b0;
        end
        j = '0;
        j.mode     = (pass == 2) ? MODE_W4A8 : MODE_W8A8;
        j.abits    = 4'd8;
        j.rom_addr = ROM_WORD;
        j.sf_addr  = WB_AW'(SF_ROW[pass]);
        j.sg_addr  = WB_AW'(SG_ROW[pass]);
        j.act_addr = '0;
        j.num_vec  = (ACT_AW+1)'(n);
        j.out_addr = '0;
        @(negedge clk);
        job_valid = 1'b1; job = j;
        do @(posedge clk); while (!job_ready);
        @(negedge clk);
        job_valid = 1'b0;
        wait (!busy);
        for (int v = 0; v < n; v++) begin
          @(negedge clk);
          out_raddr = OUT_AW'(v);
          #1;
          for (int o = 0; o < NUM_BANKS; o++) result[pass][o][p0 + v] = longint'(out_rdata[o]);
        end
      end
    end

    // Direct convolution reference.
    for (int pass = 0; pass < 3; pass++)
      for (int o = 0; o < NUM_BANKS; o++)
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            automatic longint ref_v = 0;
            for (int c = 0; c < C; c++)
              for (int ky = 0; ky < K; ky++)
                for (int kx = 0; kx < K; kx++) begin
                  automatic int yy = y + ky - 1, xx = x + kx - 1;
                  if (yy >= 0 && yy < H && xx >= 0 && xx < W)
                    ref_v += longint'(fmap[c][yy][xx]) * weight(pass, o, c*9 + ky*3 + kx);
                end
            checks++;
            if (result[pass][o][y*W + x] != ref_v) begin
              failures++;
              if (failures < 10)
                $display("FAIL pass %0d out-ch %0d pixel (%0d,%0d): got %0d expected %0d",
                         pass, o, y, x, result[pass][o][y*W + x], ref_v);
            end
          end

    // The retrained kernel must change the outputs of most pixels.
    begin
      automatic int differ = 0;
      for (int o = 0; o < NUM_BANKS; o++)
        for (int p = 0; p < NPIX; p++)
          if (result[0][o][p] != result[1][o][p]) differ++;
      checks++;
      if (differ < NPIX * NUM_BANKS / 2) begin
        failures++;
        $display("FAIL retrained kernel changed only %0d outputs", differ);
      end
    end

    // Cycle accounting: 49 pixels x 8 bits x (2, 2, 1) cycles, 4 reloads per pass.
    checks++;
    if (n_valid != NPIX * 8 * (2 + 2 + 1)) begin
      failures++; $display("FAIL compute cycles %0d", n_valid);
    end
    checks++;
    if (n_reload != 3 * 4) begin
      failures++; $display("FAIL reload cycles %0d", n_reload);
    end
    $display("conv 16->16, 7x7, 3 passes: %0d compute cycles, %0d reload cycles", n_valid, n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
