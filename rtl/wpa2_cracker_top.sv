// wpa2_cracker_top: WPA2-PSK password search on one FPGA.
//
// A captured 4-way handshake fixes the SSID, both MAC addresses, both
// nonces and the MIC of an EAPOL frame. For every candidate password the
// design derives PMK (PBKDF2-HMAC-SHA1, 4096 iterations), the KCK (first
// 128 bits of the PRF) and the frame's MIC, and reports the password whose
// MIC equals the captured one. The structure follows the design: a password
// generator (a fast counter), one key-derivation state machine shared by
// NUM_CORES verifier cores, each built around one 83-stage SHA-1 pipeline
// filled with 83 passwords. The default of two cores is the Spartan-6
// LX150T configuration; the Artix-7 200T holds eight and the Kintex-7 410T
// sixteen.
//
// Operation: the host sets the handshake-dependent message blocks
// (pre-padded), captured_mic, start_password and the number of passwords
// n, then pulses start. Passwords are processed in batches of
// NUM_CORES * 83; each batch takes NUM_CORES * 83 load cycles plus
// 83 * (4 * ITERATIONS + 2 + (3 + PTK_BLOCKS) + (3 + MIC_BLOCKS) + 1)
// cycles (1,360,951 cycles, i.e. 7.6 ms at 180 MHz, for the defaults).
// found rises with the first matching password (found_password) and stays
// high; done rises when all n passwords have been tried; batch_done
// pulses at the end of every batch. How the host
// reaches these ports (USB micro-controller) and the clock frequency
// scaling are outside this module.
module wpa2_cracker_top
  import sha1_pkg::*;
  import wpa2_pkg::*;
#(
  parameter int unsigned NUM_CORES  = 2,
  parameter int unsigned ITERATIONS = 4096,
  parameter logic [7:0]  CHAR_LO    = 8'h41,
  parameter logic [7:0]  CHAR_HI    = 8'h5A
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [63:0]   start_password,
  input  logic [31:0]   n,
  input  block_t        salt_blk [2],
  input  block_t        ptk_blk  [2],
  input  block_t        mic_blk  [2],
  input  logic [127:0]  captured_mic,
  output logic          busy,
  output logic          batch_done,
  output logic          done,
  output logic [31:0]   tested,
  output logic          found,
  output logic [63:0]   found_password
);

  localparam int unsigned SLOTS = ROUNDS + 3;   // pipeline latency

  ctl_t        ctl;
  logic        load_en;
  logic [7:0]  load_core;
  logic        gen_done;
  logic [63:0] cur_pwd;

  wire run = start && !busy;

  password_generator #(.CHAR_LO(CHAR_LO), .CHAR_HI(CHAR_HI)) u_gen (
    .clk             (clk),
    .reset           (!rst_n || run),
    .enable          (load_en),
    .start_password  (start_password),
    .n               (n),
    .count           (tested),
    .done            (gen_done),
    .current_password(cur_pwd)
  );

  wpa2_state_machine #(
    .SLOTS(SLOTS), .NUM_CORES(NUM_CORES), .ITERATIONS(ITERATIONS),
    .PTK_BLOCKS(2), .MIC_BLOCKS(2)
  ) u_fsm (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (run),
    .gen_done  (gen_done),
    .ctl       (ctl),
    .load_en   (load_en),
    .load_core (load_core),
    .batch_done(batch_done),
    .busy      (busy),
    .done      (done)
  );

  logic        match    [NUM_CORES];
  logic [63:0] match_pw [NUM_CORES];

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    logic          mic_valid, slot_valid;
    logic [127:0]  mic;

    wpa2_verifier #(.SLOTS(SLOTS), .PTK_BLOCKS(2), .MIC_BLOCKS(2)) u_core (
      .clk           (clk),
      .rst_n         (rst_n),
      .ctl           (ctl),
      .load_we       (load_en && (load_core == 8'(c))),
      .load_pwd      (cur_pwd),
      .load_valid    (!gen_done),
      .salt_blk      (salt_blk),
      .ptk_blk       (ptk_blk),
      .mic_blk       (mic_blk),
      .captured_mic  (captured_mic),
      .mic_valid     (mic_valid),
      .mic           (mic),
      .slot_valid    (slot_valid),
      .match         (match[c]),
      .match_password(match_pw[c])
    );
  end

  // First match wins; lower core number first within a cycle.
  always_ff @(posedge clk) begin
    if (!rst_n || run) begin
      found          <= 1'b0;
      found_password <= '0;
    end else if (!found) begin
      for (int c = NUM_CORES - 1; c >= 0; c--) begin
        if (match[c]) begin
          found          <= 1'b1;
          found_password <= match_pw[c];
        end
      end
    end
  end

endmodule
