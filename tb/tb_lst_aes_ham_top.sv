// tb_lst_aes_ham_top - end-to-end test of the protected AES-128 encryptor.
//
// Runs the top at its default (and only) configuration:
//  * FIPS-197 known-answer blocks and random blocks against the reference
//    AES model, with the write-to-result latency checked at 12 cycles;
//  * a stream of back-to-back blocks, checked at one block per 12 cycles;
//  * single-bit upsets injected, in a random round, at each of the six
//    Hamming check points (state register, key register, SubBytes,
//    ShiftRows, MixColumns, AddRoundKey): the ciphertext must still be
//    correct and the block flagged as having had a corrected error;
//  * a double upset in one byte, which must be flagged uncorrectable;
//  * a write while busy, which must be ignored, and read_en_l, which must
//    clear data_valid_o.
// Each mechanism is counted and one that never happened is a failure.
module tb_lst_aes_ham_top;
  import aes_ham_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;

  logic         clk = 0, reset_l = 0, write_en_l = 1, read_en_l = 1;
  logic [127:0] blk_in = '0, key_in = '0, inj_mask = '0;
  logic [2:0]   inj_sel = 3'(INJ_NONE);
  logic         ready, data_valid, err_block, uncorr_block, err_detect;
  logic [127:0] data_out;
  logic [15:0]  err_count;

  lst_aes_ham_top dut (
    .clk(clk), .reset_l(reset_l), .write_en_l(write_en_l), .read_en_l(read_en_l),
    .lst_block_i(blk_in), .key_i(key_in), .inj_sel_i(inj_sel), .inj_mask_i(inj_mask),
    .ready_o(ready), .data_o(data_out), .data_valid_o(data_valid),
    .err_block_o(err_block), .uncorr_block_o(uncorr_block),
    .err_detect_o(err_detect), .err_count_o(err_count)
  );

  always #5 clk = ~clk;

  // mechanism counters
  int n_blocks, n_corrected [7], n_uncorr, n_bypass, n_busy_ignored, n_read_clear, n_b2b;

  always @(posedge clk) if (reset_l && dut.last_round) n_bypass++;

  task automatic expect_eq(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write one block, optionally inject at round inj_round, wait for the
  // result and compare. Returns the number of cycles from write to valid.
  task automatic run_block(input logic [127:0] pt, input logic [127:0] key,
                           input inj_sel_e sel, input logic [127:0] mask,
                           input int inj_round, input bit expect_ok,
                           output int latency);
    logic [127:0] exp_ct;
    exp_ct = ref_aes128(pt, key);
    while (!ready) @(negedge clk);
    blk_in = pt; key_in = key; write_en_l = 0;
    @(negedge clk);
    write_en_l = 1;
    latency = 1;
    blk_in = rand128(); key_in = rand128();   // inputs are not held
    while (!(data_valid && dut.done === 1'b0 && latency > 1)) begin
      if (latency == inj_round) begin
        inj_sel = 3'(sel); inj_mask = mask;
      end else begin
        inj_sel = 3'(INJ_NONE); inj_mask = '0;
      end
      @(negedge clk);
      latency++;
    end
    inj_sel = 3'(INJ_NONE); inj_mask = '0;
    n_blocks++;
    if (expect_ok)
      expect_eq($sformatf("ciphertext %h exp %h", data_out, exp_ct), data_out == exp_ct);
    // read the result: data_valid must drop
    read_en_l = 0;
    @(negedge clk);
    read_en_l = 1;
    expect_eq("read clears valid", !data_valid);
    if (!data_valid) n_read_clear++;
  endtask

  initial begin
    int lat, t0, t1;
    logic [127:0] m;
    logic [15:0] cnt0;
    static inj_sel_e pts [6] = '{INJ_STATE_REG, INJ_KEY_REG, INJ_SUB_BYTES,
                          INJ_SHIFT_ROWS, INJ_MIX_COLS, INJ_ADD_RKEY};
    repeat (3) @(negedge clk);
    reset_l = 1;
    @(negedge clk);
    expect_eq("ready after reset", ready && !data_valid && err_count == 0);

    // FIPS-197 known answers
    run_block(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
              INJ_NONE, '0, 0, 1, lat);
    expect_eq("FIPS C.1", data_out == 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    expect_eq($sformatf("latency 12 (got %0d)", lat), lat == 12);
    run_block(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
              INJ_NONE, '0, 0, 1, lat);
    expect_eq("FIPS B", data_out == 128'h3925841d02dc09fbdc118597196a0b32);
    expect_eq("no error flagged on clean blocks", !err_block && !uncorr_block && err_count == 0);

    // random clean blocks
    for (int t = 0; t < 10; t++) begin
      run_block(rand128(), rand128(), INJ_NONE, '0, 0, 1, lat);
      expect_eq("clean block", !err_block && lat == 12);
    end

    // single upsets at every check point, in random rounds (1..10)
    for (int p = 0; p < 6; p++) begin
      for (int t = 0; t < 4; t++) begin
        int r;
        r = $urandom_range(1, 10);
        // MixColumns is not used in round 10
        if (pts[p] == INJ_MIX_COLS && r == 10) r = 9;
        m = '0;
        m[$urandom_range(0, 127)] = 1'b1;
        if (t == 3) m[$urandom_range(0, 127)] ^= 1'b1;  // possibly a second byte
        cnt0 = err_count;
        run_block(rand128(), rand128(), pts[p], m, r, 1, lat);
        expect_eq($sformatf("upset at point %0d round %0d corrected", p, r),
                  err_block && !uncorr_block && err_count > cnt0);
        if (err_block && !uncorr_block) n_corrected[int'(pts[p])]++;
      end
    end

    // double upset in one byte of the SubBytes output: not correctable
    m = '0;
    m[127-8*6] = 1'b1;
    m[127-8*6-7] = 1'b1;
    run_block(rand128(), rand128(), INJ_SUB_BYTES, m, 4, 0, lat);
    expect_eq("double upset flagged", uncorr_block && err_block);
    if (uncorr_block) n_uncorr++;

    // write while busy is ignored
    begin
      logic [127:0] pt, key;
      pt = rand128(); key = rand128();
      while (!ready) @(negedge clk);
      blk_in = pt; key_in = key; write_en_l = 0;
      @(negedge clk);
      blk_in = rand128(); key_in = rand128();   // second write, busy
      repeat (3) @(negedge clk);
      write_en_l = 1;
      while (!data_valid) @(negedge clk);
      expect_eq("busy write ignored", data_out == ref_aes128(pt, key));
      if (data_out == ref_aes128(pt, key)) n_busy_ignored++;
      read_en_l = 0; @(negedge clk); read_en_l = 1;
    end

    // back-to-back stream: one block per 12 cycles
    begin
      logic [127:0] pts_s [8], keys_s [8];
      int wr_cyc [8];
      int cyc, nres;
      for (int i = 0; i < 8; i++) begin pts_s[i] = rand128(); keys_s[i] = rand128(); end
      while (!ready) @(negedge clk);
      cyc = 0; nres = 0;
      fork
        begin
          for (int i = 0; i < 8; i++) begin
            while (!ready) begin @(negedge clk); cyc++; end
            blk_in = pts_s[i]; key_in = keys_s[i]; write_en_l = 0; wr_cyc[i] = cyc;
            @(negedge clk); cyc++;
            write_en_l = 1;
          end
        end
        begin
          while (nres < 8) begin
            @(posedge clk);
            if (dut.done) begin
              #1;
              expect_eq($sformatf("stream block %0d", nres),
                        data_out == ref_aes128(pts_s[nres], keys_s[nres]));
              nres++;
            end
          end
        end
      join
      for (int i = 1; i < 8; i++) begin
        expect_eq($sformatf("block period %0d", wr_cyc[i] - wr_cyc[i-1]),
                  wr_cyc[i] - wr_cyc[i-1] == CYCLES_PER_BLOCK);
        if (wr_cyc[i] - wr_cyc[i-1] == CYCLES_PER_BLOCK) n_b2b++;
      end
    end

    // every mechanism must have happened
    for (int p = 0; p < 6; p++) begin
      $display("corrected upsets at %s: %0d", pts[p].name(), n_corrected[int'(pts[p])]);
      expect_eq("correction at every point", n_corrected[int'(pts[p])] > 0);
    end
    $display("blocks %0d, uncorrectable %0d, last-round bypasses %0d, busy writes ignored %0d, reads %0d, back-to-back %0d",
             n_blocks, n_uncorr, n_bypass, n_busy_ignored, n_read_clear, n_b2b);
    expect_eq("uncorrectable seen", n_uncorr > 0);
    expect_eq("bypass every block", n_bypass >= n_blocks);
    expect_eq("busy write seen", n_busy_ignored > 0);
    expect_eq("read seen", n_read_clear > 0);
    expect_eq("back-to-back seen", n_b2b > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
