// tb_wpa2_cracker_top: end-to-end search with two cores and PBKDF2 reduced
// to 2 iterations. 200 passwords are searched, i.e. one full batch_no of
// 2 x 83 and one partial batch_no of 34 (the rest of the slots run empty).
// The true password of the handshake is number 180, in the second batch_no.
// Every MIC that leaves a core is checked against the reference model for
// the password the tb expects in that slot, the found password, the
// tested count, done and the cycle count of the run. The mechanisms of
// the design are counted and each must occur: batch_no loading, empty slots
// in a partial batch_no, PBKDF2 Iterate phases, the second PBKDF2 block (T2),
// compares without and with a match, and the end of the run.
module tb_wpa2_cracker_top;
  import sha1_pkg::*;
  import wpa2_pkg::*;
  import wpa2_ref_pkg::*;

  localparam int CORES = 2, ITERS = 2, SLOTS = 83;
  localparam int N = 200, HIT = 180;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start;

  int checks = 0, failures = 0;

  logic [63:0]  start_password, found_password;
  logic [31:0]  n, tested;
  block_t       salt_blk [2], ptk_blk [2], mic_blk [2];
  logic [127:0] captured_mic;
  logic         busy, batch_done, done, found;

  wpa2_cracker_top #(.NUM_CORES(CORES), .ITERATIONS(ITERS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .start_password(start_password), .n(n),
    .salt_blk(salt_blk), .ptk_blk(ptk_blk), .mic_blk(mic_blk), .captured_mic(captured_mic),
    .busy(busy), .batch_done(batch_done), .done(done), .tested(tested), .found(found),
    .found_password(found_password));

  // Mechanism counters.
  int n_load_batches = 0, n_empty_slots = 0, n_iterate = 0, n_t2 = 0;
  int n_nomatch = 0, n_match = 0, n_done = 0, batch_no = 0;

  logic [127:0] mics   [CORES];
  logic         valids [CORES];
  logic         hits[CORES];
  assign mics[0]    = dut.g_core[0].mic;
  assign mics[1]    = dut.g_core[1].mic;
  assign valids[0]  = dut.g_core[0].slot_valid;
  assign valids[1]  = dut.g_core[1].slot_valid;
  assign hits[0] = dut.match[0];
  assign hits[1] = dut.match[1];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-cycle monitor.
  always @(negedge clk) begin
    if (rst_n) begin
      if (dut.ctl.phase == PH_LOAD && dut.ctl.slot == 0 && dut.u_fsm.load_core == 0)
        n_load_batches++;
      if (dut.ctl.phase == PH_PMK_ITERATE && dut.ctl.slot == 0) n_iterate++;
      if (dut.ctl.phase == PH_PMK_SALT && dut.ctl.t_sel && dut.ctl.slot == 0) n_t2++;
      if (dut.ctl.phase == PH_COMPARE) begin
        for (int c = 0; c < CORES; c++) begin
          int idx;
          logic [63:0] p;
          logic [127:0] e;
          idx = batch_no * CORES * SLOTS + c * SLOTS + int'(dut.ctl.slot);
          checks++;
          if (valids[c] !== (idx < N)) begin
            failures++;
            $display("password %0d: valid flag %0b", idx, valids[c]);
          end
          if (idx < N) begin
            p = pwd_add(start_password, longint'(idx));
            e = ref_wpa2_mic(p, ITERS, HS_SALT1, HS_SALT2, HS_PRF0, HS_PRF1, HS_MIC0, HS_MIC1);
            checks++;
            if (mics[c] !== e || hits[c] !== (idx == HIT)) begin
              failures++;
              $display("password %0d (%s): mic %h expected %h match %0b", idx, p, mics[c], e,
                       hits[c]);
            end
            if (hits[c]) n_match++;
            else n_nomatch++;
          end else begin
            n_empty_slots++;
            checks++;
            if (hits[c]) begin
              failures++;
              $display("empty slot matched");
            end
          end
        end
        if (dut.ctl.slot == 7'(SLOTS - 1)) batch_no++;
      end
    end
  end

  initial begin
    int cyc, exp_cycles, batches;
    salt_blk       = '{HS_SALT1, HS_SALT2};
    ptk_blk        = '{HS_PRF0, HS_PRF1};
    mic_blk        = '{HS_MIC0, HS_MIC1};
    captured_mic   = HS_MIC_2;
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
    cyc = 0;  // counts the busy cycles, from the first Load cycle
    while (!done && cyc < 15000) begin
      @(posedge clk);
      #1 cyc++;
    end
    if (done) n_done++;
    batches    = (N + CORES * SLOTS - 1) / (CORES * SLOTS);
    exp_cycles = batches * (CORES * SLOTS + SLOTS * (2 + 4 * ITERS + 5 + 5 + 1));
    checks++;
    if (cyc != exp_cycles) begin
      failures++;
      $display("run took %0d cycles, expected %0d", cyc, exp_cycles);
    end
    checks++;
    if (!found || found_password !== HS_PWD || tested !== N || busy) begin
      failures++;
      $display("found %0b password %s tested %0d", found, found_password, tested);
    end
    $display("cycles %0d: batches loaded %0d, empty slots %0d, iterate phases %0d, T2 blocks %0d, compares without match %0d, with match %0d, runs done %0d",
             cyc, n_load_batches, n_empty_slots, n_iterate, n_t2, n_nomatch, n_match, n_done);
    checks++;
    if (n_load_batches < 2 || n_empty_slots == 0 || n_iterate == 0 || n_t2 == 0 ||
        n_nomatch == 0 || n_match != 1 || n_done != 1) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
