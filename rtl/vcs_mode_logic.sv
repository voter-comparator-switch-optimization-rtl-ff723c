// vcs_mode_logic: voting-mode decision of the VCS matrix section.
//
// Each computer writes one row of the R matrix naming the computers it wants
// to take part in voting (bit c of the row = computer c; all zeros means
// "don't care"). Only rows of computers whose P-matrix diagonal element is
// one (computer judged good) count. The logic produces the fifteen mode
// terms of the specification:
//   four-way  : at least three good computers ask for 1111;
//   three-way : the three named computers, all good, all ask for the set, or
//               two of them ask for it while the fourth computer is failed
//               or don't care;
//   comparator: both named computers, good, ask for the pair while at least
//               one of the other two is failed or don't care;
//   selector  : the named computer, good, asks for itself alone while all
//               others are failed or don't care.
// At most one term is true when the rows are consistent; `used` is the set
// of computers of the winning mode (the operating-mode register contents).
// Purely combinational. The terms follow the matrix-section equations of the
// specification; where those equations were ambiguous the reading above
// (all-zero row = don't care) is this design's choice.
module vcs_mode_logic
  import vcs_pkg::*;
(
  input  logic [15:0]  p,      // P matrix, bit 4*row+col
  input  logic [15:0]  r,      // R matrix, bit 4*row+col
  output mode_terms_t  terms,
  output logic [3:0]   used
);

  logic [3:0] good;     // P diagonal
  logic [3:0] dc;       // failed or don't care (POR terms)
  logic [3:0] row [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      row[i]  = r[4*i +: 4];
      good[i] = p[5*i];
      dc[i]   = !good[i] || (row[i] == 4'b0000);
    end
  end

  // computer i is good and asks for exactly the set m
  function automatic logic req(input logic g, input logic [3:0] rw, input logic [3:0] m);
    return g && (rw == m);
  endfunction

  always_comb begin
    logic [3:0] q4;
    logic [3:0] set3 [4];
    int         miss3 [4];
    logic [3:0] pair [6];
    int         pa [6], pb [6];

    for (int i = 0; i < 4; i++) q4[i] = req(good[i], row[i], 4'b1111);
    terms.v4way = (count4(q4) >= 3);

    // three-way sets, named by the computer left out
    set3[0] = 4'b0111; miss3[0] = 3;   // ABC
    set3[1] = 4'b1011; miss3[1] = 2;   // ABD
    set3[2] = 4'b1101; miss3[2] = 1;   // ACD
    set3[3] = 4'b1110; miss3[3] = 0;   // BCD
    for (int k = 0; k < 4; k++) begin
      logic [3:0] q;
      for (int i = 0; i < 4; i++) q[i] = set3[k][i] && req(good[i], row[i], set3[k]);
      terms.v3way[k] = (count4(q) == 3) || (dc[miss3[k]] && count4(q) >= 2);
    end

    pa[0] = 0; pb[0] = 1;  pa[1] = 0; pb[1] = 2;  pa[2] = 0; pb[2] = 3;
    pa[3] = 1; pb[3] = 2;  pa[4] = 1; pb[4] = 3;  pa[5] = 2; pb[5] = 3;
    for (int k = 0; k < 6; k++) begin
      logic [3:0] others;
      pair[k] = 4'((1 << pa[k]) | (1 << pb[k]));
      others  = ~pair[k];
      terms.comp[k] = req(good[pa[k]], row[pa[k]], pair[k]) && req(good[pb[k]], row[pb[k]], pair[k])
                      && |(others & dc);
    end

    for (int k = 0; k < 4; k++) begin
      logic [3:0] self;
      self = 4'(1 << k);
      terms.slct[k] = req(good[k], row[k], self) && ((dc | self) == 4'b1111);
    end

    used = '0;
    if (terms.v4way) used = 4'b1111;
    for (int k = 0; k < 4; k++) if (terms.v3way[k]) used = set3[k];
    for (int k = 0; k < 6; k++) if (terms.comp[k])  used = pair[k];
    for (int k = 0; k < 4; k++) if (terms.slct[k])  used = 4'(1 << k);
  end

endmodule
