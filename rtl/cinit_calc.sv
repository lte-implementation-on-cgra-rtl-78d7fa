// cinit_calc: initialisation value c_init of the second m-sequence x2 of the
// scrambler (the "LFSR 2 initialization calculator").
//
//   PDSCH: c_init = n_RNTI*2^14 + q*2^13 + floor(n_s/2)*2^9 + N_ID^cell
//   PMCH : c_init =                       floor(n_s/2)*2^9 + N_ID^MBSFN
//
// The formula and the parameter ranges (n_RNTI 0..65535, q 0..1, cell
// identity 0..503) follow the LTE definition. Purely combinational: the
// result is valid in the same cycle as the inputs. The 31-bit result loads
// the 31 cells of LFSR 2 (bit 0 is x2(0)). The widths of n_s (5 bits, so
// slot numbers 0..19 are accepted) and N_ID^MBSFN (8 bits) are this
// design's choice.
module cinit_calc
  import lte_pkg::*;
(
  input  chan_t       chan,      // PDSCH or PMCH formula
  input  logic [15:0] n_rnti,    // radio network temporary identifier
  input  logic        q,         // code word number
  input  logic [4:0]  n_s,       // slot number; floor(n_s/2) is used
  input  logic [8:0]  cell_id,   // N_ID^cell, 0..503
  input  logic [7:0]  mbsfn_id,  // N_ID^MBSFN
  output logic [30:0] c_init
);
  logic [30:0] slot_term;

  always_comb begin
    slot_term = 31'(n_s >> 1) << 9;
    if (chan == CH_PDSCH)
      c_init = (31'(n_rnti) << 14) + (31'(q) << 13) + slot_term + 31'(cell_id);
    else
      c_init = slot_term + 31'(mbsfn_id);
  end
endmodule
