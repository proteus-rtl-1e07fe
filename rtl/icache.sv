// icache: PE instruction cache, 1 KB (256 x 32-bit words).
//
// Holds the instruction stream dispatched to the PE by the top controller in
// program order and hands it to the PE controller. It is organised as a
// circular buffer: `push` writes a word at the tail, `pop` removes the word
// shown on `head` (first-word fall-through, valid while `!empty`). `full`
// back-pressures the dispatcher. Capacity is the document's 1 KB; the FIFO
// organisation is this design's choice.
module icache #(
  parameter int unsigned DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  logic [31:0] wdata,
  output logic        full,
  input  logic        pop,
  output logic [31:0] head,
  output logic        empty,
  output logic [$clog2(DEPTH):0] count
);
  logic [31:0] mem [DEPTH];
  logic [$clog2(DEPTH)-1:0] wp, rp;

  always_ff @(posedge clk) if (push && !full) mem[wp] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push && !full) wp <= wp + 1'b1;
      if (pop && !empty) rp <= rp + 1'b1;
      count <= count + (($clog2(DEPTH)+1)'(push && !full)) - (($clog2(DEPTH)+1)'(pop && !empty));
    end
  end

  assign full  = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign empty = (count == 0);
  assign head  = mem[rp];

  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) push |-> !full;
  endproperty
  assert property (p_no_overflow) else $error("icache: push while full");
endmodule
