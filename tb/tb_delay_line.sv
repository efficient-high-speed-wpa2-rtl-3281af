// tb_delay_line: feeds a random stream into two delay lines (the
// pipeline's 81-cycle FIFO and a short 3-cycle one) and checks that every
// value reappears exactly DELAY clock edges later.
module tb_delay_line;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  logic [159:0] din;
  logic [159:0] dout_l;
  logic [15:0]  dout_s;
  logic [159:0] hist [$];

  delay_line #(.WIDTH(160), .DELAY(81)) dut_long (
    .clk(clk), .rst_n(rst_n), .din(din), .dout(dout_l));
  delay_line #(.WIDTH(16), .DELAY(3)) dut_short (
    .clk(clk), .rst_n(rst_n), .din(din[15:0]), .dout(dout_s));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    din   = '0;
    @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 500; cyc++) begin
      din = {$urandom, $urandom, $urandom, $urandom, $urandom};
      hist.push_front(din);
      @(posedge clk);
      #1;
      // hist[0] was sampled at this edge; hist[k] k edges earlier.
      if (hist.size() > 81) begin
        checks++;
        if (dout_l !== hist[80]) begin
          failures++;
          $display("long line: cycle %0d mismatch", cyc);
        end
      end
      if (hist.size() > 3) begin
        checks++;
        if (dout_s !== hist[2][15:0]) begin
          failures++;
          $display("short line: cycle %0d mismatch", cyc);
        end
      end
      if (hist.size() > 100) void'(hist.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
