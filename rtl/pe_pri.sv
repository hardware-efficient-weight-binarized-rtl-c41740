// pe_pri: priority encoder with priority-resolving (PRI) feedback.
//
// Turns a vector of active flags into the list of active indices, one per
// clock, highest index first. A register holds the flags still pending; a
// pe_tree encodes the highest pending one onto idx. With adv high the encoded
// bit is cleared, so the next clock shows the next index. A multiplexer in
// front of the register chooses between a freshly loaded vector (load) and the
// fed-back, cleared one. Bit 0 of din is never loaded: idx = 0 means that
// nothing is pending, which is how a layer learns that its input is done.
//
// Timing: din is captured on the clock edge with load high; idx is valid from
// the next cycle, combinationally from the register. One index per cycle while
// adv is held. W is rounded up to a power of two (at least 16) inside.
// The published block gives the function and the mux/register loop; the
// encoder width rounding and the load/adv handshake are this design's own.
module pe_pri #(
  parameter int unsigned W = 1024
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,     // capture din (overrides adv)
  input  logic [W-1:0]          din,      // active flags, bit i = index i, bit 0 ignored
  input  logic                  adv,      // clear the index now on idx
  output logic [((W <= 16) ? 4 : $clog2(W))-1:0] idx,      // highest pending index, 0 = none
  output logic                  pending   // idx != 0
);
  localparam int unsigned PW = (W <= 16) ? 16 : (1 << $clog2(W));

  logic [PW-1:0] pend_q, pend_d, cleared;

  pe_tree #(.W(PW)) u_pe (.d(pend_q), .q(idx));

  assign pending = (idx != '0);

  always_comb begin
    cleared = pend_q;
    cleared[idx] = 1'b0;
    if (load) begin
      pend_d = '0;
      pend_d[W-1:1] = din[W-1:1];
    end else if (adv) begin
      pend_d = cleared;
    end else begin
      pend_d = pend_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pend_q <= '0;
    else        pend_q <= pend_d;

endmodule
