// result_cmp: one comparator of the fault-tolerant cryptographic module.
//
// Compares the AES results and the HMAC results delivered by the left and right input
// interfaces and raises one equality flag per kind. The module holds three of these, in
// triple modular redundancy, whose flags go to the self-checking voter. The comparison of
// both kinds in one comparator is this design's reading of the published block diagram,
// where each of the three comparators receives arrows from both interfaces. Purely
// combinational.
module result_cmp
  import red_pkg::*;
(
  input  res_t             left  [NKIND],
  input  res_t             right [NKIND],
  output logic [NKIND-1:0] eq
);
  always_comb
    for (int t = 0; t < NKIND; t++) eq[t] = (left[t] == right[t]);
endmodule
