// wpa2_pkg: constants and control types of the WPA2 key-derivation engine.
//
// The engine derives, for every candidate password, PMK = PBKDF2-HMAC-SHA1
// (password, SSID, 4096 iterations, 256 bits), KCK = first 128 bits of the
// first PRF block HMAC-SHA1(PMK, "Pairwise key expansion" || 0 || addresses
// || nonces || 0), and MIC = HMAC-SHA1(KCK, EAPOL frame) truncated to 128
// bits. Every HMAC is split into the phases named by the key-derivation
// state machine: OState (hash of key ^ opad), IState (hash of key ^ ipad),
// Salt (message blocks), Finalize (outer hash) and, in PBKDF2, Iterate.
// The phase list and the names follow the key-derivation state machine of
// the design; the extra Load and Compare phases and the struct layout are
// this implementation's own.
package wpa2_pkg;

  import sha1_pkg::*;

  // Phase in which all pipeline slots of all cores currently are.
  typedef enum logic [3:0] {
    PH_IDLE,
    PH_LOAD,          // passwords are written into the slots
    PH_PMK_OSTATE,
    PH_PMK_ISTATE,
    PH_PMK_SALT,      // inner hash of SSID || INT(i), i = 1, 2
    PH_PMK_FINALIZE,  // outer hash of U_j
    PH_PMK_ITERATE,   // inner hash of U_{j-1}
    PH_PTK_OSTATE,
    PH_PTK_ISTATE,
    PH_PTK_SALT,      // inner hash of the PRF message blocks
    PH_PTK_FINALIZE,
    PH_MIC_OSTATE,
    PH_MIC_ISTATE,
    PH_MIC_SALT,      // inner hash of the EAPOL frame blocks
    PH_MIC_FINALIZE,
    PH_COMPARE        // the MICs leave the pipelines and are compared
  } phase_t;

  // Control word broadcast by the state machine to every verifier core.
  typedef struct packed {
    phase_t      phase;
    logic [6:0]  slot;      // pipeline slot served in this cycle
    logic        t_sel;     // PBKDF2 output block: 0 -> T1, 1 -> T2
    logic        u_first;   // the U arriving from the pipeline is U_1
    logic [0:0]  blk_sel;   // message block index in the Salt phases
  } ctl_t;

  localparam int unsigned MAX_SLOTS = 128;   // slot field is 7 bits wide

  localparam logic [7:0] IPAD_BYTE = 8'h36;
  localparam logic [7:0] OPAD_BYTE = 8'h5C;
  localparam block_t     IPAD      = {64{IPAD_BYTE}};
  localparam block_t     OPAD      = {64{OPAD_BYTE}};

  // A 20-byte digest as the only content of the second SHA-1 block of an
  // HMAC whose first block was the 64-byte key block: digest, 0x80 marker,
  // zeros, and the 64-bit message length (64 + 20) * 8 = 672 bits.
  function automatic block_t pad_digest(input digest_t d);
    return {d, 32'h8000_0000, 256'd0, 64'd672};
  endfunction

endpackage
