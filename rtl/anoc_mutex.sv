// anoc_mutex: two-way mutual-exclusion element of the merge module.
//
// Function: each of two requesters holds its request level high for a whole
// 4-phase transaction. The element grants the request that arrived first and
// keeps that grant until the request falls; the other requester waits. At most
// one grant is ever high. This is the role the level-sensitive MUTEX plays in
// the merge module's arbitration circuit.
//
// Implementation (this design's choice): the original element is a
// custom analog cell that resolves metastability. Here it is a clocked
// arbiter: requests are sampled on each rising clk edge and grants are
// registered, so "first to arrive" means "first to be sampled high". When both
// requests are first seen high in the same cycle, the requester that did not
// win the previous tie wins, which gives the alternation between inputs
// that the merge module is expected to show under load.
//
// Interface: req[1:0] levels in, gnt[1:0] levels out, active-high sync reset.
// Timing: a grant rises one clock after its request is sampled and falls one
// clock after the request is sampled low.
module anoc_mutex (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] req,
  output logic [1:0] gnt
);

  logic last_tie;   // index of the winner of the last simultaneous arrival

  always_ff @(posedge clk) begin
    if (rst) begin
      gnt      <= 2'b00;
      last_tie <= 1'b1;
    end else begin
      if (gnt[0]) begin
        if (!req[0]) gnt <= req[1] ? 2'b10 : 2'b00;
      end else if (gnt[1]) begin
        if (!req[1]) gnt <= req[0] ? 2'b01 : 2'b00;
      end else if (req == 2'b11) begin
        gnt      <= last_tie ? 2'b01 : 2'b10;
        last_tie <= ~last_tie;
      end else begin
        gnt <= req;
      end
    end
  end

  a_exclusive: assert property (@(posedge clk) disable iff (rst) !(gnt[0] && gnt[1]))
    else $error("mutex: both grants high");

endmodule
