// tb_wpa2_core_counts: the larger published core counts, eight cores (the
// Artix-7 200T build) and sixteen (the Kintex-7 410T build), side by side
// with PBKDF2 reduced to 2 iterations. Each searches one full batch plus
// five passwords; the true password sits in the last core of the first
// batch. Checks the found password, the tested count and the run length
// of two batches, 2 * (NUM_CORES * 83 + 83 * (4 * 2 + 13)) cycles.
module tb_wpa2_core_counts;
  import sha1_pkg::*;
  import wpa2_ref_pkg::*;

  localparam int ITERS = 2;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start;

  int checks = 0, failures = 0;

  block_t       salt_blk [2], ptk_blk [2], mic_blk [2];
  logic [127:0] captured_mic;

  logic [63:0] sp8, sp16, fp8, fp16;
  logic [31:0] n8, n16, t8, t16;
  logic        busy8, busy16, bd8, bd16, done8, done16, found8, found16;

  localparam int HIT8 = 7 * 83 + 50, HIT16 = 15 * 83 + 3;

  wpa2_cracker_top #(.NUM_CORES(8), .ITERATIONS(ITERS)) dut8 (
    .clk(clk), .rst_n(rst_n), .start(start), .start_password(sp8), .n(n8),
    .salt_blk(salt_blk), .ptk_blk(ptk_blk), .mic_blk(mic_blk), .captured_mic(captured_mic),
    .busy(busy8), .batch_done(bd8), .done(done8), .tested(t8), .found(found8),
    .found_password(fp8));

  wpa2_cracker_top #(.NUM_CORES(16), .ITERATIONS(ITERS)) dut16 (
    .clk(clk), .rst_n(rst_n), .start(start), .start_password(sp16), .n(n16),
    .salt_blk(salt_blk), .ptk_blk(ptk_blk), .mic_blk(mic_blk), .captured_mic(captured_mic),
    .busy(busy16), .batch_done(bd16), .done(done16), .tested(t16), .found(found16),
    .found_password(fp16));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, c8, c16;
    salt_blk     = '{HS_SALT1, HS_SALT2};
    ptk_blk      = '{HS_PRF0, HS_PRF1};
    mic_blk      = '{HS_MIC0, HS_MIC1};
    captured_mic = HS_MIC_2;
    sp8  = pwd_add(HS_PWD, -longint'(HIT8));
    sp16 = pwd_add(HS_PWD, -longint'(HIT16));
    n8   = 8 * 83 + 5;
    n16  = 16 * 83 + 5;
    rst_n = 0;
    start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1 start = 1;
    @(posedge clk);
    #1 start = 0;
    cyc = 0; c8 = 0; c16 = 0;
    while (!(done8 && done16) && cyc < 15000) begin
      @(posedge clk);
      #1 cyc++;
      if (done8 && c8 == 0) c8 = cyc;
      if (done16 && c16 == 0) c16 = cyc;
    end
    checks++;
    if (c8 != 2 * (8 * 83 + 83 * (4 * ITERS + 13)) || c16 != 2 * (16 * 83 + 83 * (4 * ITERS + 13))) begin
      failures++;
      $display("run lengths %0d and %0d cycles", c8, c16);
    end
    checks++;
    if (!found8 || fp8 !== HS_PWD || t8 !== n8) begin
      failures++;
      $display("8 cores: found %0b %s tested %0d", found8, fp8, t8);
    end
    checks++;
    if (!found16 || fp16 !== HS_PWD || t16 !== n16) begin
      failures++;
      $display("16 cores: found %0b %s tested %0d", found16, fp16, t16);
    end
    $display("8 cores: %0d cycles, 16 cores: %0d cycles", c8, c16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
