// tb_wpa2_state_machine: runs the sequencer with small sizes (4 slots,
// 2 cores, 3 PBKDF2 iterations) for two batches and compares the control
// word of every cycle with a phase list built here from the WPA2
// derivation: load, PMK (o-state, i-state, salt/finalize/iterate for T1
// and T2), PTK, MIC and compare. Also checks the U_1 flag, the load core
// numbers, batch_done, done, and the cycle count of a batch.
module tb_wpa2_state_machine;
  import wpa2_pkg::*;

  localparam int SLOTS = 4, CORES = 2, ITERS = 3;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, gen_done;

  int checks = 0, failures = 0;

  ctl_t       ctl;
  logic       load_en, batch_done, busy, done;
  logic [7:0] load_core;

  wpa2_state_machine #(.SLOTS(SLOTS), .NUM_CORES(CORES), .ITERATIONS(ITERS),
                       .PTK_BLOCKS(2), .MIC_BLOCKS(2)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .gen_done(gen_done), .ctl(ctl),
    .load_en(load_en), .load_core(load_core), .batch_done(batch_done), .busy(busy),
    .done(done));

  typedef struct {
    phase_t ph;
    logic   t;
    logic   b;
    logic   uf;
    int     core;
  } exp_t;

  exp_t seq [$];

  function automatic void add(phase_t ph, logic t = 0, logic b = 0, logic uf = 0,
                              int core = 0);
    exp_t e;
    e.ph = ph; e.t = t; e.b = b; e.uf = uf; e.core = core;
    seq.push_back(e);
  endfunction

  function automatic void build_batch();
    for (int c = 0; c < CORES; c++) add(PH_LOAD, 0, 0, 0, c);
    add(PH_PMK_OSTATE);
    add(PH_PMK_ISTATE);
    for (int t = 0; t < 2; t++) begin
      add(PH_PMK_SALT, t[0], 0, 0);
      add(PH_PMK_FINALIZE, t[0]);
      for (int j = 2; j <= ITERS; j++) begin
        add(PH_PMK_ITERATE, t[0], 0, j == 2);
        add(PH_PMK_FINALIZE, t[0]);
      end
    end
    add(PH_PTK_OSTATE, 1);
    add(PH_PTK_ISTATE, 1);
    add(PH_PTK_SALT, 1, 0);
    add(PH_PTK_SALT, 1, 1);
    add(PH_PTK_FINALIZE, 1, 1);
    add(PH_MIC_OSTATE, 1, 1);
    add(PH_MIC_ISTATE, 1, 1);
    add(PH_MIC_SALT, 1, 0);
    add(PH_MIC_SALT, 1, 1);
    add(PH_MIC_FINALIZE, 1, 1);
    add(PH_COMPARE, 1, 1);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, bd, exp_cycles;
    rst_n    = 0;
    start    = 0;
    gen_done = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (busy || done) begin failures++; $display("busy/done after reset"); end
    build_batch();
    build_batch();
    exp_cycles = seq.size() * SLOTS;
    start = 1;
    @(posedge clk);
    #1 start = 0;
    cyc = 0;
    bd  = 0;
    foreach (seq[i]) begin
      for (int s = 0; s < SLOTS; s++) begin
        // generator exhausted during the second batch
        if (i >= seq.size() / 2 + CORES) gen_done = 1;
        checks++;
        if (ctl.phase !== seq[i].ph || ctl.slot !== 7'(s) ||
            (seq[i].ph == PH_PMK_SALT || seq[i].ph == PH_PMK_ITERATE ||
             seq[i].ph == PH_PMK_FINALIZE) && ctl.t_sel !== seq[i].t ||
            (seq[i].ph == PH_PTK_SALT || seq[i].ph == PH_MIC_SALT) && ctl.blk_sel !== seq[i].b ||
            ctl.u_first !== seq[i].uf ||
            load_en !== (seq[i].ph == PH_LOAD) ||
            (seq[i].ph == PH_LOAD && load_core !== 8'(seq[i].core)) ||
            batch_done !== (seq[i].ph == PH_COMPARE && s == SLOTS - 1)) begin
          failures++;
          $display("phase %0d slot %0d: got %s slot %0d t %0b b %0b uf %0b, expected %s",
                   i, s, ctl.phase.name(), ctl.slot, ctl.t_sel, ctl.blk_sel, ctl.u_first,
                   seq[i].ph.name());
        end
        if (batch_done) bd++;
        @(posedge clk);
        #1;
        cyc++;
      end
    end
    checks++;
    if (!done || busy || ctl.phase !== PH_IDLE) begin
      failures++;
      $display("not done after two batches");
    end
    checks++;
    if (bd != 2 || cyc != exp_cycles ||
        exp_cycles != 2 * SLOTS * (CORES + 2 + 4 * ITERS + 5 + 5 + 1)) begin
      failures++;
      $display("batches %0d cycles %0d", bd, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
