// password_generator: candidate passwords as a fast counter.
//
// The generator steps through n consecutive 8-character passwords starting
// at start_password. Each character is one digit of an odometer over the
// character range CHAR_LO..CHAR_HI; the last character (bits [7:0]) is the
// least significant digit, and a digit that passes CHAR_HI wraps to CHAR_LO
// and carries into the character to its left. The port list is the one the
// design gives for its generator; the character range (default 'A'..'Z',
// the weak default passwords of the case study), the digit order and the
// carry rule are this implementation's choices.
//
// Interface and timing: reset (synchronous, active high) loads
// start_password and clears count. current_password is valid while done is
// low; on each cycle with enable high and done low the consumer takes
// current_password and the generator advances to the next one and counts
// it. done rises once count == n. start_password must hold characters
// inside the range.
module password_generator #(
  parameter logic [7:0] CHAR_LO = 8'h41,   // 'A'
  parameter logic [7:0] CHAR_HI = 8'h5A    // 'Z'
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        enable,
  input  logic [63:0] start_password,
  input  logic [31:0] n,
  output logic [31:0] count,
  output logic        done,
  output logic [63:0] current_password
);

  logic [63:0] next_password;

  // Odometer increment; the carry ripples from the last character leftwards.
  always_comb begin
    logic carry;
    carry         = 1'b1;
    next_password = current_password;
    for (int i = 0; i < 8; i++) begin
      if (carry) begin
        if (current_password[8*i +: 8] >= CHAR_HI) begin
          next_password[8*i +: 8] = CHAR_LO;
        end else begin
          next_password[8*i +: 8] = current_password[8*i +: 8] + 8'd1;
          carry                   = 1'b0;
        end
      end
    end
  end

  assign done = (count == n);

  always_ff @(posedge clk) begin
    if (reset) begin
      current_password <= start_password;
      count            <= '0;
    end else if (enable && !done) begin
      current_password <= next_password;
      count            <= count + 32'd1;
    end
  end

endmodule
