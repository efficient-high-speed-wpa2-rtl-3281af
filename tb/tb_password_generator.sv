// tb_password_generator: runs the counter from several start passwords
// (including ones that carry through several characters, "..ZZZ") with
// enable toggled at random, and checks every password against a base-26
// integer model, the count, and that done stops the counter after n.
module tb_password_generator;
  import wpa2_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        reset, enable, done;
  logic [63:0] start_password, cur;
  logic [31:0] n, count;

  password_generator dut (
    .clk(clk), .reset(reset), .enable(enable), .start_password(start_password), .n(n),
    .count(count), .done(done), .current_password(cur));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [63:0] sp, input int unsigned nn);
    int unsigned taken;
    start_password = sp;
    n       = nn;
    reset   = 1;
    enable  = 0;
    @(posedge clk);
    #1 reset = 0;
    taken = 0;
    while (taken < nn + 3) begin
      enable = ($urandom % 4) != 0;
      checks++;
      if (count !== taken || done !== (taken == nn) ||
          (taken < nn && cur !== pwd_add(sp, longint'(taken)))) begin
        failures++;
        $display("start %s step %0d: got %s count %0d done %0b", sp, taken, cur, count, done);
      end
      @(posedge clk);
      #1;
      if (enable && taken < nn) taken++;
      else if (enable) taken = taken + 1 - 1;
      if (taken == nn) begin
        // done must hold the counter
        repeat (3) begin
          enable = 1;
          @(posedge clk);
          #1;
          checks++;
          if (count !== nn || !done) begin
            failures++;
            $display("counter moved after done");
          end
        end
        break;
      end
    end
  endtask

  initial begin
    run("AAAAAAAA", 60);
    run("AAAAAZZY", 40);
    run("KCPFQWBR", 30);
    run("ZZZZZZZX", 5);
    run("ABCDEFGH", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
