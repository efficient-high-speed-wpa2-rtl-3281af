// tb_wpa2_full: one complete batch at the design's full size: two cores,
// 83 slots each, 4096 PBKDF2 iterations, 16,396 SHA-1 compressions per
// password. 166 passwords are searched; the handshake's true password is
// number 100 (core 1, slot 17). Checks the MIC of all 166 passwords
// against the reference model, the true password's MIC against the
// independently computed value, that no other slot matches,
// the tested count, done, and the batch length of
// 2 * 83 + 83 * 16,397 = 1,361,117 cycles.
module tb_wpa2_full;
  import sha1_pkg::*;
  import wpa2_pkg::*;
  import wpa2_ref_pkg::*;

  localparam int HIT = 100, N = 166;
  localparam int EXP_CYCLES = 2 * 83 + 83 * (2 + 4 * 4096 + 5 + 5 + 1);

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start;

  int checks = 0, failures = 0;

  logic [63:0]  start_password, found_password;
  logic [31:0]  n, tested;
  block_t       salt_blk [2], ptk_blk [2], mic_blk [2];
  logic [127:0] captured_mic;
  logic         busy, batch_done, done, found;

  wpa2_cracker_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .start_password(start_password), .n(n),
    .salt_blk(salt_blk), .ptk_blk(ptk_blk), .mic_blk(mic_blk), .captured_mic(captured_mic),
    .busy(busy), .batch_done(batch_done), .done(done), .tested(tested), .found(found),
    .found_password(found_password));

  int n_match = 0;

  initial begin
    repeat (EXP_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Every MIC that leaves a core is checked against the reference model.
  always @(negedge clk) begin
    if (rst_n && dut.ctl.phase == PH_COMPARE) begin
      logic [127:0] e0, e1;
      if (dut.match[0] || dut.match[1]) n_match++;
      e0 = ref_wpa2_mic(pwd_add(start_password, longint'(dut.ctl.slot)), 4096, HS_SALT1,
                        HS_SALT2, HS_PRF0, HS_PRF1, HS_MIC0, HS_MIC1);
      e1 = ref_wpa2_mic(pwd_add(start_password, 83 + longint'(dut.ctl.slot)), 4096, HS_SALT1,
                        HS_SALT2, HS_PRF0, HS_PRF1, HS_MIC0, HS_MIC1);
      checks++;
      if (dut.g_core[0].mic !== e0 || dut.g_core[1].mic !== e1) begin
        failures++;
        $display("slot %0d: mics %h %h, expected %h %h", dut.ctl.slot, dut.g_core[0].mic,
                 dut.g_core[1].mic, e0, e1);
      end
      if (dut.ctl.slot == 7'd17) begin
        checks++;
        if (dut.g_core[1].mic !== HS_MIC_4096 || !dut.match[1]) begin
          failures++;
          $display("core 1 slot 17: mic %h, expected %h", dut.g_core[1].mic, HS_MIC_4096);
        end
      end
    end
  end

  initial begin
    int cyc;
    salt_blk       = '{HS_SALT1, HS_SALT2};
    ptk_blk        = '{HS_PRF0, HS_PRF1};
    mic_blk        = '{HS_MIC0, HS_MIC1};
    captured_mic   = HS_MIC_4096;
    start_password = pwd_add(HS_PWD, -longint'(HIT));
    n              = N;
    rst_n = 0;
    start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1 start = 1;
    @(posedge clk);
    #1 start = 0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
    end
    checks++;
    if (cyc != EXP_CYCLES) begin
      failures++;
      $display("batch took %0d cycles, expected %0d", cyc, EXP_CYCLES);
    end
    checks++;
    if (!found || found_password !== HS_PWD || tested !== N || n_match != 1) begin
      failures++;
      $display("found %0b password %s tested %0d matches %0d", found, found_password, tested,
               n_match);
    end
    $display("found %s after %0d cycles", found_password, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
