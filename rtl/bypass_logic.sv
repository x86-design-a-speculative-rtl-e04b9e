// Bypass logic: turns a load's dependency/forwarding prediction into the
// scheduling mode the memory access buffer uses for it.
//
// The prediction table reports whether the load is predicted dependent on
// an older store (and on which one, by store PC), whether that store can
// forward the whole value, and whether the load is filtered out as
// error-prone.  The buffer reports whether a store with that PC is still in
// flight (pair_hit).  The forwarding bit AND the buffer hit gives
// "forwarding"; from it and the dependence prediction:
//   filtered                        -> MODE_CONS    (conventional scheduling)
//   not dependent, or pair absent   -> MODE_BYPASS  (pass unsolved stores)
//   dependent and forwarding        -> MODE_FORWARD (take the store's value)
//   dependent, pair cannot forward  -> MODE_WAIT    (wait for that store)
// Purely combinational.  The AND of the forwarding bit and the buffer hit
// is drawn in the published block diagrams; the mode encoding and the rule
// for an absent pair are this design's choices.
module bypass_logic
  import smau_pkg::*;
(
  input  logic     pred_dep,
  input  logic     pred_filtered,
  input  logic     pred_fwd,
  input  logic     pair_hit,
  output logic     forwarding,
  output ld_mode_e mode
);

  always_comb begin
    forwarding = pred_fwd && pair_hit;
    if (pred_filtered)                 mode = MODE_CONS;
    else if (!pred_dep || !pair_hit)   mode = MODE_BYPASS;
    else if (forwarding)               mode = MODE_FORWARD;
    else                               mode = MODE_WAIT;
  end

endmodule
