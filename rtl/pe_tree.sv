// pe_tree: large priority encoder built from small ones.
//
// The W inputs are cut into W/8 groups of eight. Each group is OR-reduced; a
// group-level priority encoder (prio_enc, a PE4 for W = 32) picks the highest
// non-empty group and gives the upper index bits. A multiplexer routes that
// group to a pe8, which gives the lower three bits, and the two are
// concatenated. Input 0 is never a valid index: q = 0 means "no input set".
// The structure generalises the published 32-input construction to any W that
// is a power of two and at least 16. Combinational.
module pe_tree #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         d,
  output logic [$clog2(W)-1:0] q
);
  localparam int unsigned NG  = W / 8;
  localparam int unsigned GW  = $clog2(NG);

  logic [NG-1:0]   grp_any;
  logic [GW-1:0]   grp;
  logic [7:0]      sel;
  logic [2:0]      low;

  always_comb
    for (int unsigned g = 0; g < NG; g++)
      grp_any[g] = |d[g*8 +: 8];

  prio_enc #(.W(NG)) u_grp (.d(grp_any), .q(grp));

  assign sel = d[grp*8 +: 8];

  pe8 u_low (.d(sel), .q(low));

  assign q = {grp, low};

  initial begin
    assert (W >= 16 && (W & (W - 1)) == 0)
      else $error("pe_tree: W must be a power of two >= 16");
  end
endmodule
