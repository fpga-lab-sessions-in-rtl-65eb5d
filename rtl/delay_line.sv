// delay_line: strobe-enabled fixed delay of a WIDTH-bit pixel stream.
//
// Every clock with `en` high, one sample is taken from `din` and the output
// register `dout` is loaded with the sample taken DEPTH-1 strobes earlier.
// Seen from the register that feeds `din`, the block therefore adds exactly
// DEPTH pixel periods of delay, z^-DEPTH counted in strobes: it holds DEPTH
// samples, DEPTH-1 in a circular buffer and one in the output register.
// Clock cycles without `en` do not count, so the delay follows the pixel
// rate of the stream and not the clock.
//
// The buffer is written and read at the same address in one cycle with the
// old contents returned (read-first), which maps onto one dual-port block
// RAM of an FPGA. This is how the long z^-(LINEWIDTH-2) row delays and the
// one-row delay compensation of the detector are built; the circular-buffer
// form is this implementation's choice, the design only asks for a delay
// line of the stated length.
//
// The buffer is not reset: a delay line's first DEPTH outputs after reset
// repeat whatever it held, and the blocks using it never let such samples
// reach an output that belongs to a frame (the border substitution replaces
// them).
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 638    // LINEWIDTH-2 for a 640-pixel line
) (
  input  logic             clk,
  input  logic             rst,         // synchronous, active high
  input  logic             en,          // one sample per clock with en
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned NMEM = DEPTH - 1;
  localparam int unsigned AW   = (NMEM > 1) ? $clog2(NMEM) : 1;

  initial begin
    assert (DEPTH >= 2) else $fatal(1, "delay_line: DEPTH must be at least 2");
  end

  logic [WIDTH-1:0] mem [NMEM];
  logic [AW-1:0]    ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
    end else if (en) begin
      ptr <= (ptr == AW'(NMEM - 1)) ? '0 : ptr + 1'b1;
    end
  end

  // Read-first RAM with registered output: the value read is the one
  // written NMEM strobes ago.
  always_ff @(posedge clk) begin
    if (en) begin
      dout     <= mem[ptr];
      mem[ptr] <= din;
    end
  end

endmodule
