// tb_aes_ctrl - checks the sequencing FSM.
// After a start the controller must give one load cycle, ten round cycles
// numbered 1..10 with round constants 01,02,04,...,36 and last_round only
// in round 10, one done cycle, and be ready again 12 cycles after the
// start. A start while busy must be ignored. Back-to-back starts give one
// block every 12 cycles.
module tb_aes_ctrl;
  import aes_ham_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic ready, load, round_en, last_round, done;
  logic [7:0] rcon;
  logic [3:0] round_no;

  aes_ctrl dut (.clk(clk), .rst_n(rst_n), .start_i(start), .ready_o(ready), .load_o(load),
                .round_en_o(round_en), .last_round_o(last_round), .done_o(done),
                .rcon_o(rcon), .round_o(round_no));

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq("idle ready", ready && !round_en && !done && !load);
    for (int blk = 0; blk < 3; blk++) begin
      start = 1;
      #1;
      expect_eq("load with start", load && ready);
      @(negedge clk);
      start = (blk == 1);        // hold start while busy for block 1: must be ignored
      for (int r = 1; r <= 10; r++) begin
        expect_eq("round", round_en && !ready && round_no == 4'(r) && rcon == ref_rcon(r)
                           && last_round == (r == 10) && !load);
        @(negedge clk);
      end
      start = 0;
      expect_eq("done", done && !round_en && !ready);
      @(negedge clk);
      expect_eq("ready again after 12 cycles", ready && !done);
    end
    // ready stays while no start
    repeat (5) @(negedge clk);
    expect_eq("stays idle", ready && !round_en);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
