// tb_sha1_pipeline: streams one compression per clock through the 83-stage
// pipeline (the standard "abc" known answer first, then random chaining
// values and blocks) and checks each digest against the reference model,
// 83 clock cycles after the cycle in which its inputs were presented.
module tb_sha1_pipeline;
  import sha1_pkg::*;
  import wpa2_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  digest_t in_chain, out_digest;
  block_t  in_block;
  digest_t expq [$];

  sha1_pipeline dut (.clk(clk), .rst_n(rst_n), .in_chain(in_chain), .in_block(in_block),
                     .out_digest(out_digest));

  localparam block_t ABC = {32'h61626380, 416'd0, 64'd24};

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n    = 0;
    in_chain = '0;
    in_block = '0;
    @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      if (cyc == 0) begin
        in_chain = SHA1_IV;
        in_block = ABC;
      end else begin
        in_chain = {$urandom, $urandom, $urandom, $urandom, $urandom};
        for (int i = 0; i < 16; i++) in_block[511-32*i -: 32] = $urandom;
      end
      expq.push_front(ref_compress(in_chain, in_block));
      @(posedge clk);
      #1;
      if (expq.size() > 83) begin
        checks++;
        if (out_digest !== expq[82]) begin
          failures++;
          $display("cycle %0d: digest %h expected %h", cyc, out_digest, expq[82]);
        end
        if (cyc == 82) begin
          checks++;
          if (out_digest !== 160'ha9993e364706816aba3e25717850c26c9cd0d89d) begin
            failures++;
            $display("SHA-1(\"abc\") wrong: %h", out_digest);
          end
        end
        void'(expq.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
