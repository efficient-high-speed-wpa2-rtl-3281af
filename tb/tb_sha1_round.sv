// tb_sha1_round: checks single SHA-1 round stages against a hand-written
// model of one round, for one round of each f_t/K_t group and the last
// round (whose look-ahead sum must be zero). Random inputs, 200 vectors.
module tb_sha1_round;
  import sha1_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int N = 5;
  localparam int unsigned RS [N] = '{0, 19, 20, 45, 79};

  state_t st_i [N], st_o [N];
  word_t  pre_i [N], pre_o [N];
  block_t w_i [N], w_o [N];

  for (genvar g = 0; g < N; g++) begin : g_dut
    sha1_round #(.ROUND(RS[g])) dut (
      .clk(clk), .in_state(st_i[g]), .in_pre(pre_i[g]), .in_w(w_i[g]),
      .out_state(st_o[g]), .out_pre(pre_o[g]), .out_w(w_o[g])
    );
  end

  function automatic logic [31:0] r32(input logic [31:0] x, input int n);
    logic [63:0] d;
    d = {x, x} << n;
    return d[63:32];
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b, c, d, e, f, k, kn, ws [17], ea, epre;
    logic [31:0] x;
    for (int v = 0; v < 200; v++) begin
      for (int g = 0; g < N; g++) begin
        st_i[g]  = {$urandom, $urandom, $urandom, $urandom, $urandom};
        pre_i[g] = $urandom;
        for (int i = 0; i < 16; i++) w_i[g][511-32*i -: 32] = $urandom;
      end
      @(posedge clk);
      #1;
      for (int g = 0; g < N; g++) begin
        {a, b, c, d, e} = st_i[g];
        case (RS[g] / 20)
          0: begin f = (b & c) | (~b & d); k = 32'h5A827999; end
          1: begin f = b ^ c ^ d; k = 32'h6ED9EBA1; end
          2: begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
          default: begin f = b ^ c ^ d; k = 32'hCA62C1D6; end
        endcase
        case ((RS[g] + 1) / 20)
          0: kn = 32'h5A827999;
          1: kn = 32'h6ED9EBA1;
          2: kn = 32'h8F1BBCDC;
          default: kn = 32'hCA62C1D6;
        endcase
        for (int i = 0; i < 16; i++) ws[i] = w_i[g][511-32*i -: 32];
        x = ws[13] ^ ws[8] ^ ws[2] ^ ws[0];
        ws[16] = r32(x, 1);
        ea   = r32(a, 5) + f + pre_i[g];
        epre = (RS[g] == 79) ? 32'd0 : d + kn + ws[1];
        checks++;
        if (st_o[g] !== {ea, a, r32(b, 30), c, d}) begin
          failures++;
          $display("round %0d: state mismatch", RS[g]);
        end
        checks++;
        if (pre_o[g] !== epre) begin
          failures++;
          $display("round %0d: pre-add mismatch %h vs %h", RS[g], pre_o[g], epre);
        end
        checks++;
        for (int i = 0; i < 16; i++)
          if (w_o[g][511-32*i -: 32] !== ws[i+1]) begin
            failures++;
            $display("round %0d: schedule word %0d mismatch", RS[g], i);
            break;
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
