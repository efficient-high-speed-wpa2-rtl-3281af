// wpa2_verifier: one WPA2 password verifier core.
//
// The core is one 83-stage SHA-1 pipeline (sha1_pipeline) kept full with
// SLOTS = 83 independent passwords, plus the per-slot state the HMAC
// phases need between two passes through the pipeline. That state lives
// in small memories indexed by the slot number (read and written at the
// same address in the same cycle, read-before-write): the password, a
// valid flag, the HMAC outer state (o-state, computed first), the inner
// state (i-state), the PBKDF2 accumulator U_1 ^ U_2 ^ ... (later reused
// for T2 and for the KCK) and T1. In every cycle the core takes the digest
// that slot ctl.slot issued one phase earlier from the pipeline output,
// updates that slot's memories and issues the slot's next compression:
//   OState    IV, key ^ opad        (key = password, PMK or KCK, zero padded)
//   IState    IV, key ^ ipad        (stores o-state)
//   Salt      i-state, message block (stores i-state; PBKDF2: T1 on the 2nd)
//   Finalize  o-state, inner digest with SHA-1 padding
//   Iterate   i-state, U_{j-1} with padding (accumulates U_{j-1})
//   Compare   nothing issued; the MIC (first 128 bits) is compared
// The phase sequence and the split into o-state / i-state / salt /
// finalize follow the design; the memory organisation is this
// implementation's own. Message blocks (SSID || INT(i), PRF data, EAPOL
// frame) are supplied already padded by the host, since they are the same
// for every password.
//
// Interface: ctl comes from wpa2_state_machine. load_we writes load_pwd
// and load_valid into slot ctl.slot during the Load phase. In the Compare
// phase, mic_valid marks each slot's result: mic (128 bits), slot_valid
// and match (slot_valid and mic == captured_mic), with match_password.
// Timing: SLOTS must equal the pipeline latency, 83.
module wpa2_verifier
  import sha1_pkg::*;
  import wpa2_pkg::*;
#(
  parameter int unsigned SLOTS      = 83,
  parameter int unsigned PTK_BLOCKS = 2,
  parameter int unsigned MIC_BLOCKS = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ctl_t          ctl,
  input  logic          load_we,
  input  logic [63:0]   load_pwd,
  input  logic          load_valid,
  input  block_t        salt_blk [2],           // SSID || INT(1), SSID || INT(2), padded
  input  block_t        ptk_blk  [PTK_BLOCKS],  // PRF message, padded
  input  block_t        mic_blk  [MIC_BLOCKS],  // EAPOL frame with MIC zeroed, padded
  input  logic [127:0]  captured_mic,
  output logic          mic_valid,
  output logic [127:0]  mic,
  output logic          slot_valid,
  output logic          match,
  output logic [63:0]   match_password
);

  initial begin
    assert (SLOTS == 83) else $error("SLOTS must equal the SHA-1 pipeline latency (83)");
  end

  // Per-slot state.
  logic [63:0] pwd_mem    [SLOTS];
  logic        valid_mem  [SLOTS];
  digest_t     ostate_mem [SLOTS];
  digest_t     istate_mem [SLOTS];
  digest_t     acc_mem    [SLOTS];
  digest_t     t1_mem     [SLOTS];

  digest_t out;          // pipeline output: this slot's result of the last phase
  digest_t in_chain;
  block_t  in_block;

  logic [6:0]  s;
  logic [63:0] pwd_r;
  digest_t     ostate_r, istate_r, acc_r, t1_r;
  digest_t     u_sum;    // accumulator including the arriving U

  assign s        = ctl.slot;
  assign pwd_r    = pwd_mem[s];
  assign ostate_r = ostate_mem[s];
  assign istate_r = istate_mem[s];
  assign acc_r    = acc_mem[s];
  assign t1_r     = t1_mem[s];
  assign u_sum    = ctl.u_first ? out : (acc_r ^ out);

  // Memory write enables and data.
  logic    we_ostate, we_istate, we_acc, we_t1;
  digest_t acc_d;

  always_comb begin
    in_chain  = SHA1_IV;
    in_block  = '0;
    we_ostate = 1'b0;
    we_istate = 1'b0;
    we_acc    = 1'b0;
    we_t1     = 1'b0;
    acc_d     = u_sum;
    unique case (ctl.phase)
      PH_PMK_OSTATE: in_block = {pwd_r, 448'd0} ^ OPAD;
      PH_PMK_ISTATE: begin
        we_ostate = 1'b1;
        in_block  = {pwd_r, 448'd0} ^ IPAD;
      end
      PH_PMK_SALT: begin
        in_block = salt_blk[ctl.t_sel];
        if (!ctl.t_sel) begin
          we_istate = 1'b1;
          in_chain  = out;
        end else begin
          we_t1    = 1'b1;     // U_ITERATIONS of T1 arrives now
          in_chain = istate_r;
        end
      end
      PH_PMK_FINALIZE: begin
        in_chain = ostate_r;
        in_block = pad_digest(out);
      end
      PH_PMK_ITERATE: begin
        we_acc   = 1'b1;
        in_chain = istate_r;
        in_block = pad_digest(out);
      end
      PH_PTK_OSTATE: begin
        we_acc   = 1'b1;       // T2
        in_block = {t1_r, u_sum[159:64], 256'd0} ^ OPAD;
      end
      PH_PTK_ISTATE: begin
        we_ostate = 1'b1;
        in_block  = {t1_r, acc_r[159:64], 256'd0} ^ IPAD;
      end
      PH_PTK_SALT: begin
        in_chain = out;
        in_block = ptk_blk[ctl.blk_sel];
      end
      PH_PTK_FINALIZE: begin
        in_chain = ostate_r;
        in_block = pad_digest(out);
      end
      PH_MIC_OSTATE: begin
        we_acc   = 1'b1;       // KCK = first 128 bits of the PTK block
        acc_d    = out;
        in_block = {out[159:32], 384'd0} ^ OPAD;
      end
      PH_MIC_ISTATE: begin
        we_ostate = 1'b1;
        in_block  = {acc_r[159:32], 384'd0} ^ IPAD;
      end
      PH_MIC_SALT: begin
        in_chain = out;
        in_block = mic_blk[ctl.blk_sel];
      end
      PH_MIC_FINALIZE: begin
        in_chain = ostate_r;
        in_block = pad_digest(out);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (load_we) begin
      pwd_mem[s]   <= load_pwd;
      valid_mem[s] <= load_valid;
    end
    if (we_ostate) ostate_mem[s] <= out;
    if (we_istate) istate_mem[s] <= out;
    if (we_acc)    acc_mem[s]    <= acc_d;
    if (we_t1)     t1_mem[s]     <= u_sum;
  end

  sha1_pipeline u_pipe (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_chain  (in_chain),
    .in_block  (in_block),
    .out_digest(out)
  );

  // Result of the Compare phase.
  assign mic_valid      = (ctl.phase == PH_COMPARE);
  assign mic            = out[159:32];
  assign slot_valid     = valid_mem[s];
  assign match          = mic_valid && slot_valid && (mic == captured_mic);
  assign match_password = pwd_r;

endmodule
