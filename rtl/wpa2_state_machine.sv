// wpa2_state_machine: key-derivation sequencer shared by all verifier cores.
//
// All pipeline slots of all cores move through the key derivation in lock
// step. A phase lasts SLOTS cycles, one per slot; because SLOTS equals the
// pipeline latency, the result a slot issued in one phase leaves the
// pipeline exactly when that slot is served in the next phase. The phases
// follow the design's key-derivation state machine:
//   PMK: OState, IState, then for T1 and for T2: Salt, Finalize and
//        (Iterate, Finalize) ITERATIONS-1 times;
//   PTK: OState, IState, Salt (PTK_BLOCKS times), Finalize;
//   MIC: OState, IState, Salt (MIC_BLOCKS times), Finalize.
// With ITERATIONS = 4096 and two message blocks each for PTK and MIC this
// is 16,386 + 5 + 5 = 16,396 SHA-1 compressions per password. Two phases
// are this implementation's own: Load, which writes NUM_CORES * SLOTS new
// passwords from the password generator into the cores (one per cycle),
// and Compare, in which the finished MICs leave the pipelines.
//
// Interface: start (pulse) begins a run; batches repeat until gen_done is
// high at the end of a Compare phase, then done is raised (held until the
// next start). ctl is the control word for the cores, registered.
// load_en asks the generator for one password per cycle of the Load phase;
// load_core names the core it goes to (ctl.slot names the slot).
// batch_done pulses in the last Compare cycle.
module wpa2_state_machine
  import wpa2_pkg::*;
#(
  parameter int unsigned SLOTS      = 83,
  parameter int unsigned NUM_CORES  = 2,
  parameter int unsigned ITERATIONS = 4096,
  parameter int unsigned PTK_BLOCKS = 2,
  parameter int unsigned MIC_BLOCKS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        gen_done,
  output ctl_t        ctl,
  output logic        load_en,
  output logic [7:0]  load_core,
  output logic        batch_done,
  output logic        busy,
  output logic        done
);

  initial begin
    assert (SLOTS >= 2 && SLOTS <= MAX_SLOTS) else $error("SLOTS out of range");
    assert (PTK_BLOCKS inside {1, 2} && MIC_BLOCKS inside {1, 2})
      else $error("one or two message blocks supported");
    assert (ITERATIONS >= 1) else $error("ITERATIONS must be at least 1");
    assert (NUM_CORES >= 1 && NUM_CORES <= 256) else $error("NUM_CORES out of range");
  end

  phase_t      phase;
  logic [6:0]  slot;
  logic [7:0]  core;
  logic [12:0] iter;     // j of the U_j being computed, 1..ITERATIONS
  logic        t_sel;
  logic [0:0]  blk;

  wire last_slot = (slot == 7'(SLOTS - 1));
  wire last_core = (core == 8'(NUM_CORES - 1));
  wire last_iter = (iter == 13'(ITERATIONS));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      slot  <= '0;
      core  <= '0;
      iter  <= 13'd1;
      t_sel <= 1'b0;
      blk   <= '0;
      done  <= 1'b0;
    end else if (phase == PH_IDLE) begin
      if (start) begin
        phase <= PH_LOAD;
        slot  <= '0;
        core  <= '0;
        done  <= 1'b0;
      end
    end else begin
      slot <= last_slot ? '0 : slot + 7'd1;
      if (last_slot) begin
        unique case (phase)
          PH_LOAD: begin
            core <= last_core ? '0 : core + 8'd1;
            if (last_core) begin
              phase <= PH_PMK_OSTATE;
            end
          end
          PH_PMK_OSTATE: phase <= PH_PMK_ISTATE;
          PH_PMK_ISTATE: begin
            phase <= PH_PMK_SALT;
            t_sel <= 1'b0;
            iter  <= 13'd1;
          end
          PH_PMK_SALT: phase <= PH_PMK_FINALIZE;
          PH_PMK_FINALIZE: begin
            if (!last_iter) begin
              phase <= PH_PMK_ITERATE;
              iter  <= iter + 13'd1;
            end else if (t_sel == 1'b0) begin
              phase <= PH_PMK_SALT;
              t_sel <= 1'b1;
              iter  <= 13'd1;
            end else begin
              phase <= PH_PTK_OSTATE;
            end
          end
          PH_PMK_ITERATE: phase <= PH_PMK_FINALIZE;
          PH_PTK_OSTATE:  phase <= PH_PTK_ISTATE;
          PH_PTK_ISTATE: begin
            phase <= PH_PTK_SALT;
            blk   <= '0;
          end
          PH_PTK_SALT: begin
            if (blk == 1'(PTK_BLOCKS - 1)) phase <= PH_PTK_FINALIZE;
            else                           blk   <= blk + 1'b1;
          end
          PH_PTK_FINALIZE: phase <= PH_MIC_OSTATE;
          PH_MIC_OSTATE:   phase <= PH_MIC_ISTATE;
          PH_MIC_ISTATE: begin
            phase <= PH_MIC_SALT;
            blk   <= '0;
          end
          PH_MIC_SALT: begin
            if (blk == 1'(MIC_BLOCKS - 1)) phase <= PH_MIC_FINALIZE;
            else                           blk   <= blk + 1'b1;
          end
          PH_MIC_FINALIZE: phase <= PH_COMPARE;
          PH_COMPARE: begin
            if (gen_done) begin
              phase <= PH_IDLE;
              done  <= 1'b1;
            end else begin
              phase <= PH_LOAD;
            end
          end
          default: phase <= PH_IDLE;
        endcase
      end
    end
  end

  // The U arriving from the pipeline is U_1 in the Iterate phase of j = 2,
  // and at the end of a PBKDF2 block when ITERATIONS is 1.
  logic u_first;
  always_comb begin
    unique case (phase)
      PH_PMK_ITERATE: u_first = (iter == 13'd2);
      PH_PMK_SALT:    u_first = t_sel && (ITERATIONS == 1);
      PH_PTK_OSTATE:  u_first = (ITERATIONS == 1);
      default:        u_first = 1'b0;
    endcase
  end

  assign ctl        = '{phase: phase, slot: slot, t_sel: t_sel, u_first: u_first,
                        blk_sel: blk};
  assign load_en    = (phase == PH_LOAD);
  assign load_core  = core;
  assign batch_done = (phase == PH_COMPARE) && last_slot;
  assign busy       = (phase != PH_IDLE);

endmodule
