// delay_line: fixed-latency delay line on a memory array.
//
// Instead of a chain of DELAY wide registers, the value is written into a
// circular buffer of DELAY-1 words and read back, through an output
// register, when the write pointer comes round to the same address again.
// This maps onto one block RAM (read-before-write, registered output) and
// keeps a wide, long-lived value out of the pipeline stage interconnect,
// which is the purpose the design gives its block RAM delay lines.
//
// Interface: din is sampled on every rising clock edge; dout shows it
// exactly DELAY cycles later (DELAY >= 2). There is no enable: the delay
// line advances with the free-running pipeline. rst_n only clears the
// pointer; memory contents are don't-care until the line has filled.
module delay_line #(
  parameter int unsigned WIDTH = 160,
  parameter int unsigned DELAY = 81
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned DEPTH = DELAY - 1;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  initial begin
    assert (DELAY >= 2) else $error("delay_line: DELAY must be at least 2");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (ptr == AW'(DEPTH - 1)) begin
      ptr <= '0;
    end else begin
      ptr <= ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    dout     <= mem[ptr];
    mem[ptr] <= din;
  end

endmodule
