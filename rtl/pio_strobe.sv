// pio_strobe: turns a level held by a processor parallel I/O port into a
// single-clock request pulse.
//
// Software drives the FIFO request ports through PIO registers: it sets a
// request bit, then clears it, and the bit stays high for many fabric clocks
// in between. The buffers store or hand out one entry on every clock on which
// their request is high, so each request level is reduced to one pulse on its
// rising edge. The output is registered: the pulse appears on the clock after
// the level is first seen high and lasts one clock. The handout does not say
// how a held PIO level becomes one buffer access; this edge detector is this
// design's choice.
module pio_strobe (
  input  logic clk,
  input  logic rst,     // synchronous, active high
  input  logic level,
  output logic pulse
);

  logic level_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      level_q <= 1'b0;
      pulse   <= 1'b0;
    end else begin
      level_q <= level;
      pulse   <= level && !level_q;
    end
  end

endmodule
