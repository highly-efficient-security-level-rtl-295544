// tb_lst_image_stream - encrypts a whole LST image through the top.
//
// The image is 316 x 695 pixels, the size of the encrypted LST scene whose
// statistics are reported for this design. The pixel format is not part of
// the design: here a pixel is a 16-bit temperature code (kelvin x 100) and
// eight pixels, row-major, fill one 128-bit block (the last block is
// padded with zeros). The image is synthetic and smooth, generated by
//   p(r, c) = 29315 + 3c + 5r + ((r * c) mod 29)
// so neighbouring plaintext pixels are strongly correlated.
// Blocks are written back to back with one key. The testbench checks:
//   * the whole image takes exactly 12 cycles per block;
//   * a sample of ciphertext blocks equals the reference AES;
//   * no Hamming error is flagged;
//   * the byte entropy of the ciphertext exceeds 7.99 bit while that of the
//     plaintext stays far lower, and the horizontal correlation of adjacent
//     ciphertext pixels is near zero (|r| < 0.05) while that of the
//     plaintext is above 0.9 - the statistics the design is evaluated with.
module tb_lst_image_stream;
  import aes_ham_pkg::*;
  import aes_ref_pkg::*;

  localparam int ROWS   = 316;
  localparam int COLS   = 695;
  localparam int NPIX   = ROWS * COLS;
  localparam int NBLK   = (NPIX + 7) / 8;
  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;

  int checks = 0, failures = 0;

  logic         clk = 0, reset_l = 0, write_en_l = 1, read_en_l = 1;
  logic [127:0] blk_in = '0;
  logic         ready, data_valid, err_block, uncorr_block, err_detect;
  logic [127:0] data_out;
  logic [15:0]  err_count;

  lst_aes_ham_top dut (
    .clk(clk), .reset_l(reset_l), .write_en_l(write_en_l), .read_en_l(read_en_l),
    .lst_block_i(blk_in), .key_i(KEY), .inj_sel_i(3'(INJ_NONE)), .inj_mask_i('0),
    .ready_o(ready), .data_o(data_out), .data_valid_o(data_valid),
    .err_block_o(err_block), .uncorr_block_o(uncorr_block),
    .err_detect_o(err_detect), .err_count_o(err_count)
  );

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [15:0] pix(input int idx);
    int r, c;
    if (idx >= NPIX) return 16'h0000;
    r = idx / COLS;
    c = idx % COLS;
    return 16'(29315 + 3*c + 5*r + ((r * c) % 29));
  endfunction

  function automatic logic [127:0] block_of(input int b);
    logic [127:0] v;
    for (int i = 0; i < 8; i++) v[127-16*i -: 16] = pix(8*b + i);
    return v;
  endfunction

  logic [15:0] ct_pix [NPIX + 8];
  int hist_ct [256], hist_pt [256];

  initial begin
    repeat (NBLK * 12 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real entropy(input int h [256], input int n);
    real e, p;
    e = 0.0;
    for (int i = 0; i < 256; i++)
      if (h[i] != 0) begin
        p = real'(h[i]) / real'(n);
        e -= p * $ln(p) / $ln(2.0);
      end
    return e;
  endfunction

  function automatic real corr_h(input bit use_ct);
    real sx, sy, sxx, syy, sxy, x, y, n, num, den;
    sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0; n = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c + 1 < COLS; c++) begin
        x = use_ct ? real'(ct_pix[r*COLS + c])     : real'(pix(r*COLS + c));
        y = use_ct ? real'(ct_pix[r*COLS + c + 1]) : real'(pix(r*COLS + c + 1));
        sx += x; sy += y; sxx += x*x; syy += y*y; sxy += x*y; n += 1;
      end
    num = n*sxy - sx*sy;
    den = $sqrt(n*sxx - sx*sx) * $sqrt(n*syy - sy*sy);
    return num / den;
  endfunction

  int wr_start, wr_end, cyc;
  always @(posedge clk) cyc++;

  initial begin
    int nres;
    real e_ct, e_pt, c_ct, c_pt;
    repeat (3) @(negedge clk);
    reset_l = 1;
    @(negedge clk);
    nres = 0;
    fork
      begin : writer
        for (int b = 0; b < NBLK; b++) begin
          while (!ready) @(negedge clk);
          if (b == 0) wr_start = cyc;
          blk_in = block_of(b);
          write_en_l = 0;
          @(negedge clk);
          write_en_l = 1;
        end
        while (!ready) @(negedge clk);
        wr_end = cyc;
      end
      begin : reader
        while (nres < NBLK) begin
          @(posedge clk);
          if (dut.done) begin
            #1;
            for (int i = 0; i < 8; i++) ct_pix[8*nres + i] = data_out[127-16*i -: 16];
            for (int i = 0; i < 16; i++) hist_ct[data_out[127-8*i -: 8]]++;
            if (nres % 97 == 0 || nres == NBLK - 1)
              expect_eq($sformatf("block %0d", nres), data_out == ref_aes128(block_of(nres), KEY));
            if (err_block) expect_eq("no error flagged", 1'b0);
            nres++;
          end
        end
      end
    join
    for (int b = 0; b < NBLK; b++) begin
      logic [127:0] v;
      v = block_of(b);
      for (int i = 0; i < 16; i++) hist_pt[v[127-8*i -: 8]]++;
    end
    expect_eq($sformatf("12 cycles per block (%0d cycles for %0d blocks)", wr_end - wr_start, NBLK),
              wr_end - wr_start == 12 * NBLK);
    e_ct = entropy(hist_ct, 16 * NBLK);
    e_pt = entropy(hist_pt, 16 * NBLK);
    c_ct = corr_h(1);
    c_pt = corr_h(0);
    $display("image %0dx%0d: %0d blocks in %0d cycles", ROWS, COLS, NBLK, wr_end - wr_start);
    $display("byte entropy plain %f cipher %f; horizontal correlation plain %f cipher %f",
             e_pt, e_ct, c_pt, c_ct);
    expect_eq("cipher entropy > 7.99", e_ct > 7.99);
    expect_eq("plain entropy lower", e_pt < 7.9);
    expect_eq("cipher correlation near 0", c_ct < 0.05 && c_ct > -0.05);
    expect_eq("plain correlation high", c_pt > 0.9);
    expect_eq("no errors counted", err_count == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
