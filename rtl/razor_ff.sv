// razor_ff: Razor flip-flop, WIDTH independent 1-bit cells sharing one error
// output.
//
// Each cell has a main flip-flop clocked by clk, a shadow latch transparent
// while the delayed clock clk_del is high, an XOR comparing the two and a
// multiplexer in front of the main flip-flop. If the data settles after the
// clk edge but before clk_del falls, the shadow latch holds the correct value
// and the main flip-flop a wrong one. The comparison is sampled when the
// shadow latch closes (falling edge of clk_del) into the error flag; at the
// next clk edge the multiplexer loads the main flip-flop from the shadow latch
// instead of d, so the correct value appears one cycle late. The cycle after a
// recovery is not compared, since the main flip-flop then holds the restored
// value rather than d.
//
// Interface: d/q WIDTH bits; error is high from the falling edge of clk_del to
// the next one; it is valid at every rising edge of clk, and when it is high
// there the value on d is not captured and must be presented again.
// Timing requirements: clk_del is clk delayed by less than the high phase of
// clk, and d must not change between the rising edge of clk_del and its
// falling edge (the Razor short-path constraint).
//
// The shadow latch is a level-sensitive latch by design: it is the Razor
// element and is the reason this module infers a latch. The cell structure
// (main flip-flop, shadow latch, XOR, multiplexer) and the error that asks for
// re-execution follow the document; latch polarity, the error timing and the
// skipped compare after a recovery are this design's choices.
module razor_ff #(
  parameter int WIDTH = 1
) (
  input  logic             clk,
  input  logic             clk_del,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             error
);
  logic [WIDTH-1:0] shadow;

  // shadow latch on the delayed clock
  always_latch begin
    if (!rst_n)       shadow = '0;
    else if (clk_del) shadow = d;
  end

  // error flag, sampled as the shadow latch closes
  always_ff @(negedge clk_del or negedge rst_n) begin
    if (!rst_n) error <= 1'b0;
    else        error <= !error && (q != shadow);
  end

  // main flip-flop with the restore multiplexer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= error ? shadow : d;
  end
endmodule
