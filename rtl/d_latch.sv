// d_latch: level-sensitive D latch, WIDTH bits sharing one enable.
//
// While en is high the latch is transparent: q follows d at once. While en is
// low q holds the value d had when en fell. q_n is the complement of q. Each
// bit behaves as an independent one-bit gated D latch; the width parameter only
// lets one instance store a whole word. There is no reset: in the adder the
// latch is reloaded in every high phase of the clock.
//
// The behaviour is that of the gated D latch the design is built on; writing
// it as an always_latch rather than as cross-coupled gates is this
// implementation's choice.
//
// The storage element is a latch on purpose: the latch that synthesis infers
// here is the design's intended storage, not an accident of coding.
module d_latch #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] q_n
);

  always_latch begin
    if (en) q = d;
  end

  assign q_n = ~q;

endmodule
