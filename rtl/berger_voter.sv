// berger_voter: self-checking majority voter over the three comparators.
//
// Each of the three comparators (TMR) reports one equality flag per kind (AES, HMAC). The
// voter takes the 2-of-3 majority per kind and localizes a comparator that disagrees with the
// majority. Its five information bits I = {disagree[2:0], ok[1:0]} are protected by a Berger
// code: a separate predictor computes, from the comparator flags alone and through the
// complementary (zero-side) logic, the number of zeros that I must contain, and a checker
// counts the zeros actually present in I. Any single fault inside the voter that changes
// output bits in one direction makes the count and the prediction differ and raises
// `berger_err`. The document specifies a Berger-code totally self-checking voter; the predictor
// structure and the single-rail error output (instead of a two-rail checker output) are this
// design's own simplifications. `inject` inverts the voted AES flag after the majority gate,
// modelling a fault inside the voter for test. Purely combinational.
module berger_voter
  import red_pkg::*;
(
  input  logic [NKIND-1:0] eq [NCMP],
  input  logic             inject,      // test: force a fault on the voter's AES output
  output logic [NKIND-1:0] ok,
  output logic [NCMP-1:0]  disagree,
  output logic             berger_err
);
  logic [NKIND-1:0] nok;           // complementary majority, computed on inverted inputs
  logic [NCMP-1:0]  agree;         // complementary disagreement
  logic [4:0]       info;
  logic [2:0]       zeros;
  logic [2:0]       check;         // predicted Berger check symbol

  always_comb begin
    for (int t = 0; t < NKIND; t++) begin
      ok[t]  = (eq[0][t] & eq[1][t]) | (eq[0][t] & eq[2][t]) | (eq[1][t] & eq[2][t]);
      if (t == 0) ok[t] = ok[t] ^ inject;
      nok[t] = (~eq[0][t] & ~eq[1][t]) | (~eq[0][t] & ~eq[2][t]) | (~eq[1][t] & ~eq[2][t]);
    end
    // comparator c disagrees when the other two agree with each other and differ from it
    for (int c = 0; c < NCMP; c++) begin
      disagree[c] = 1'b0;
      agree[c]    = 1'b1;
      for (int t = 0; t < NKIND; t++) begin
        disagree[c] |= (eq[(c+1)%3][t] == eq[(c+2)%3][t]) && (eq[c][t] != eq[(c+1)%3][t]);
        agree[c]    &= (eq[c][t] == eq[(c+1)%3][t]) || (eq[c][t] == eq[(c+2)%3][t]);
      end
    end
    // predictor: zeros of I counted from the complementary signals
    check = 3'(nok[0]) + 3'(nok[1]) + 3'(agree[0]) + 3'(agree[1]) + 3'(agree[2]);
    // checker: zeros actually present in I
    info  = {disagree, ok};
    zeros = '0;
    for (int i = 0; i < 5; i++) zeros += {2'b00, !info[i]};
    berger_err = (zeros != check);
  end

endmodule
