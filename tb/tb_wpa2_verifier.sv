// tb_wpa2_verifier: drives one verifier core with a control sequence
// generated here (load, then every WPA2 phase for 83 slots, PBKDF2 reduced
// to 2 iterations) and checks the MIC of every slot against the reference
// model. Slot 40 holds the handshake's true password and must be the only
// match; slot 81 holds it too but is loaded invalid and must not match.
// The reference itself is checked against independently computed values
// (PMK, KCK and MIC at 4096 iterations, MIC at 2 iterations).
module tb_wpa2_verifier;
  import sha1_pkg::*;
  import wpa2_pkg::*;
  import wpa2_ref_pkg::*;

  localparam int SLOTS = 83, ITERS = 2;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  ctl_t         ctl;
  logic         load_we, load_valid;
  logic [63:0]  load_pwd, match_password;
  block_t       salt_blk [2], ptk_blk [2], mic_blk [2];
  logic [127:0] mic, captured_mic;
  logic         mic_valid, slot_valid, match;

  wpa2_verifier #(.SLOTS(SLOTS)) dut (
    .clk(clk), .rst_n(rst_n), .ctl(ctl), .load_we(load_we), .load_pwd(load_pwd),
    .load_valid(load_valid), .salt_blk(salt_blk), .ptk_blk(ptk_blk), .mic_blk(mic_blk),
    .captured_mic(captured_mic), .mic_valid(mic_valid), .mic(mic), .slot_valid(slot_valid),
    .match(match), .match_password(match_password));

  logic [63:0] pw [SLOTS];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic phase(input phase_t ph, input logic t = 0, input logic b = 0,
                       input logic uf = 0);
    for (int s = 0; s < SLOTS; s++) begin
      ctl = '{phase: ph, slot: 7'(s), t_sel: t, u_first: uf, blk_sel: b};
      load_we    = (ph == PH_LOAD);
      load_pwd   = pw[s];
      load_valid = (s < 80);
      #1;
      if (ph == PH_COMPARE) begin
        logic [127:0] e;
        e = ref_wpa2_mic(pw[s], ITERS, HS_SALT1, HS_SALT2, HS_PRF0, HS_PRF1, HS_MIC0, HS_MIC1);
        checks++;
        if (!mic_valid || mic !== e || slot_valid !== (s < 80) ||
            match !== (s == 40) || (match && match_password !== HS_PWD)) begin
          failures++;
          $display("slot %0d: mic %h expected %h match %0b", s, mic, e, match);
        end
      end else begin
        checks++;
        if (mic_valid || match) begin
          failures++;
          $display("result strobe outside the compare phase");
        end
      end
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    logic [255:0] pmk;
    logic [127:0] kck;
    // reference model against independent values
    pmk = ref_pmk(HS_PWD, 4096, HS_SALT1, HS_SALT2);
    kck = ref_kck(pmk, HS_PRF0, HS_PRF1);
    checks++;
    if (pmk !== HS_PMK_4096 || kck !== HS_KCK_4096 ||
        ref_mic(kck, HS_MIC0, HS_MIC1) !== HS_MIC_4096 ||
        ref_wpa2_mic(HS_PWD, 2, HS_SALT1, HS_SALT2, HS_PRF0, HS_PRF1, HS_MIC0, HS_MIC1)
          !== HS_MIC_2) begin
      failures++;
      $display("reference model disagrees with the known answers");
    end

    salt_blk     = '{HS_SALT1, HS_SALT2};
    ptk_blk      = '{HS_PRF0, HS_PRF1};
    mic_blk      = '{HS_MIC0, HS_MIC1};
    captured_mic = HS_MIC_2;
    for (int s = 0; s < SLOTS; s++) pw[s] = pwd_add(HS_PWD, longint'($urandom_range(100000, 1)));
    pw[40] = HS_PWD;
    pw[81] = HS_PWD;
    rst_n  = 0;
    ctl    = '{phase: PH_IDLE, slot: 0, t_sel: 0, u_first: 0, blk_sel: 0};
    load_we = 0; load_pwd = 0; load_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    phase(PH_LOAD);
    phase(PH_PMK_OSTATE);
    phase(PH_PMK_ISTATE);
    for (int t = 0; t < 2; t++) begin
      phase(PH_PMK_SALT, t[0], 0, (t == 1) && (ITERS == 1));
      phase(PH_PMK_FINALIZE, t[0]);
      for (int j = 2; j <= ITERS; j++) begin
        phase(PH_PMK_ITERATE, t[0], 0, j == 2);
        phase(PH_PMK_FINALIZE, t[0]);
      end
    end
    phase(PH_PTK_OSTATE, 1, 0, ITERS == 1);
    phase(PH_PTK_ISTATE);
    phase(PH_PTK_SALT, 0, 0);
    phase(PH_PTK_SALT, 0, 1);
    phase(PH_PTK_FINALIZE);
    phase(PH_MIC_OSTATE);
    phase(PH_MIC_ISTATE);
    phase(PH_MIC_SALT, 0, 0);
    phase(PH_MIC_SALT, 0, 1);
    phase(PH_MIC_FINALIZE);
    phase(PH_COMPARE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
